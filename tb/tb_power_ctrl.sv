// tb_power_ctrl: checks the power controller against a cycle-level
// reference model: power on the edge after any activity (wake request,
// pending input, unacknowledged output, held state), power off after exactly
// SLEEP_DELAY idle cycles, always off when the cell is unused, and wake_out
// equal to the previous cycle's wake request or pending input.  Random stimulus with long
// idle gaps so that both wake-ups and sleeps occur many times.
module tb_power_ctrl;
  localparam int unsigned SD = 5;

  logic clk = 1'b0;
  logic rst_n;
  logic cfg_off, wake_req, in_pending, out_busy, holds_state;
  logic pwr_en, wake_out;
  int   checks = 0, failures = 0;
  int   sleeps = 0, wakes = 0;

  power_ctrl #(.SLEEP_DELAY(SD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic m_pwr, m_wake;
  int   m_idle;

  initial begin
    {cfg_off, wake_req, in_pending, out_busy, holds_state} = '0;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    m_pwr = 0; m_wake = 0; m_idle = 0;
    for (int i = 0; i < 4000; i++) begin
      // bursts of activity separated by idle stretches
      if ($urandom_range(0, 9) < 3) begin
        wake_req    = 1'($urandom);
        in_pending  = 1'($urandom);
        out_busy    = ($urandom_range(0, 3) == 0);
        holds_state = ($urandom_range(0, 15) == 0);
      end else begin
        {wake_req, in_pending, out_busy, holds_state} = '0;
      end
      cfg_off = (i > 3000 && i < 3200);
      @(posedge clk);
      // reference model of the registered outputs
      m_wake = !cfg_off && (wake_req || in_pending);
      if (cfg_off) begin m_pwr = 0; m_idle = 0; end
      else if (wake_req || in_pending || out_busy || holds_state) begin
        if (!m_pwr) wakes++;
        m_pwr = 1; m_idle = 0;
      end else if (m_pwr) begin
        if (m_idle >= SD - 1) begin m_pwr = 0; m_idle = 0; sleeps++; end
        else m_idle++;
      end
      #1;
      check(pwr_en == m_pwr, "pwr_en");
      check(wake_out == m_wake, "wake_out");
      @(negedge clk);
    end
    check(sleeps > 10 && wakes > 10, "sleep and wake both exercised");
    $display("wakes=%0d sleeps=%0d", wakes, sleeps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
