// tb_fpvlsi_cell: one cell, programmed through its scan path, in a
// surrounding of testbench senders and receivers.
//   * configuration read back from cfg_so after a second pass;
//   * XOR of input A (from west) and input B (from south), output sent to
//     east and north; both receivers acknowledge after random delays, the
//     cell must wait for both (acknowledge join);
//   * an upstream wake wire powers the cell up before data arrives;
//   * after SLEEP_DELAY idle cycles the cell powers down, and a token that
//     arrives while it is down waits (wait_pwr) and is still processed;
//   * unselected links are acknowledged (dropped), unused outputs idle.
module tb_fpvlsi_cell;
  import fpvlsi_pkg::*;

  localparam int unsigned SD = 4, WK = 2;

  logic        clk = 1'b0;
  logic        rst_n, cfg_shift, cfg_si, cfg_so;
  link_fwd_t   in_fwd  [NDIR];
  logic        in_ack  [NDIR];
  link_fwd_t   out_fwd [NDIR];
  logic        out_ack [NDIR];
  logic        pwr_good, fire, wait_pwr;
  logic [31:0] on_cycles;
  int          checks = 0, failures = 0;

  fpvlsi_cell #(.WORD_BITS(8), .SLEEP_DELAY(SD), .WAKE_CYCLES(WK)) dut (.*);

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

  // receivers on east and north
  logic e_q[$], n_q[$];
  logic rx_on = 1'b0;
  for (genvar d = 0; d < 2; d++) begin : g_rx
    localparam dir_e D = (d == 0) ? DIR_E : DIR_N;
    always begin
      @(negedge clk);
      if (rx_on && (out_ack[D] != (out_fwd[D].v ^ out_fwd[D].r))) begin
        if (d == 0) e_q.push_back(out_fwd[D].v);
        else        n_q.push_back(out_fwd[D].v);
        repeat ($urandom_range(0, 4)) @(negedge clk);
        out_ack[D] = out_fwd[D].v ^ out_fwd[D].r;
      end
    end
  end

  cell_cfg_t cfg;
  logic      a_ph, b_ph, x_ph;
  int        n, sleeps, stalls;
  logic      av[40], bv[40];
  logic      prev_pg;

  always @(posedge clk) begin
    if (prev_pg && !pwr_good) sleeps++;
    if (wait_pwr) stalls++;
    prev_pg <= pwr_good;
  end

  task automatic send(input logic a, input logic b);
    a_ph = ~a_ph; b_ph = ~b_ph;
    in_fwd[DIR_W] = '{v: a, r: a ^ a_ph, wake: 1'b1};
    repeat ($urandom_range(0, 2)) @(negedge clk);
    in_fwd[DIR_S] = '{v: b, r: b ^ b_ph, wake: 1'b1};
    while (in_ack[DIR_W] != a_ph || in_ack[DIR_S] != b_ph) @(negedge clk);
    in_fwd[DIR_W].wake = 1'b0;
    in_fwd[DIR_S].wake = 1'b0;
  endtask

  initial begin
    sleeps = 0; stalls = 0; prev_pg = 0;
    for (int d = 0; d < NDIR; d++) begin in_fwd[d] = '0; out_ack[d] = 1'b0; end
    cfg = '{lut: 4'b0110, mode: MODE_LOGIC, sel_a: DIR_W, sel_b: DIR_S, use_b: 1'b1,
            out_en: 4'b0011, init: 1'b0};
    rst_n = 1'b0;
    cfg_shift = 1'b0;
    cfg_si = 1'b0;
    @(negedge clk);
    cfg_shift = 1'b1;
    for (int i = CFG_BITS - 1; i >= 0; i--) begin
      cfg_si = cfg[i];
      @(negedge clk);
    end
    // second pass: the word must come out of cfg_so, MSB first
    for (int i = CFG_BITS - 1; i >= 0; i--) begin
      check(cfg_so == cfg[i], "scan out");
      cfg_si = cfg[i];
      @(negedge clk);
    end
    cfg_shift = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    rx_on = 1'b1;
    a_ph = 0; b_ph = 0;
    check(!pwr_good, "powered down after reset");
    // early wake: raise the wake wire only, no data
    in_fwd[DIR_W].wake = 1'b1;
    n = 0;
    while (!pwr_good && n < 10) begin @(negedge clk); n++; end
    check(n == 1 + WK, "wake wire powers the cell up");
    in_fwd[DIR_W].wake = 1'b0;
    // stream
    foreach (av[i]) begin av[i] = 1'($urandom); bv[i] = 1'($urandom); end
    for (int i = 0; i < 20; i++) send(av[i], bv[i]);
    // a token on the unselected east input is dropped
    x_ph = 1'b1;
    in_fwd[DIR_E] = '{v: 1'b1, r: 1'b0, wake: 1'b0};
    @(negedge clk);
    check(in_ack[DIR_E] == x_ph, "unselected link acknowledged");
    // idle long enough to sleep
    repeat (SD + 15) @(negedge clk);
    check(!pwr_good, "asleep after idle");
    // tokens while asleep: no wake wire this time, so the data waits
    a_ph = ~a_ph; b_ph = ~b_ph;
    in_fwd[DIR_W] = '{v: av[20], r: av[20] ^ a_ph, wake: 1'b0};
    in_fwd[DIR_S] = '{v: bv[20], r: bv[20] ^ b_ph, wake: 1'b0};
    while (in_ack[DIR_W] != a_ph) @(negedge clk);
    for (int i = 21; i < 40; i++) send(av[i], bv[i]);
    n = 0;
    while ((e_q.size() < 40 || n_q.size() < 40) && n < 100) begin @(negedge clk); n++; end
    check(e_q.size() == 40 && n_q.size() == 40, "all tokens delivered on both links");
    for (int i = 0; i < 40 && i < e_q.size() && i < n_q.size(); i++) begin
      check(e_q[i] == (av[i] ^ bv[i]), "east result");
      check(n_q[i] == (av[i] ^ bv[i]), "north result");
    end
    check(out_fwd[DIR_S] == '0 && out_fwd[DIR_W] == '0, "unused outputs idle");
    check(sleeps >= 1, "slept at least once");
    check(stalls >= 1, "waited for power at least once");
    check(on_cycles > 0, "switch conducted");
    $display("sleeps=%0d stall_cycles=%0d on_cycles=%0d", sleeps, stalls, on_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
