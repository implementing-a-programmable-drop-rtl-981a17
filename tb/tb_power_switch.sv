// tb_power_switch: checks the power-switch model's wake-up latency
// (pwr_good exactly WAKE_CYCLES edges after en rises), immediate loss of
// power when en falls, and the conducting-cycle counter.
module tb_power_switch;
  localparam int unsigned WAKE = 3;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        en;
  logic        pwr_good;
  logic [31:0] on_cycles;
  int          checks = 0, failures = 0;
  int          n, on_ref;

  power_switch #(.WAKE_CYCLES(WAKE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    en = 1'b0;
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    on_ref = 0;
    check(!pwr_good && on_cycles == 0, "off after reset");
    for (int k = 0; k < 10; k++) begin
      @(negedge clk);
      en = 1'b1;
      n = 0;
      while (!pwr_good && n < 20) begin @(negedge clk); n++; on_ref++; end
      check(n == WAKE, "wake-up latency");
      repeat ($urandom_range(0, 4)) begin
        @(negedge clk); on_ref++;
        check(pwr_good, "stays on");
      end
      en = 1'b0;
      @(negedge clk);
      check(!pwr_good, "off one edge after en falls");
      repeat ($urandom_range(0, 3)) @(negedge clk);
      check(on_cycles == 32'(on_ref), "conducting cycles counted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
