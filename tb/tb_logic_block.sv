// tb_logic_block: self-checking test of the bit-serial logic block.
// A sender process drives LEDR tokens on inputs A and B and waits for the
// block's acknowledge; a receiver process collects output tokens and
// acknowledges them after a random delay (back-pressure).  Checked against
// reference models written here:
//   * LOGIC mode, several 2-input functions, random bits, random skew
//     between A and B (the block must wait for the late input);
//   * one-clock latency from a complete input pair to the acknowledge;
//   * ARITH mode: serial addition of WORD_BITS-bit words, LSB first;
//   * STORE mode: the stream delayed by one token, starting from init;
//   * no firing while pwr_good is low; holds_state as specified.
module tb_logic_block;
  import fpvlsi_pkg::*;

  localparam int unsigned WB = 4;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [3:0] cfg_lut;
  mode_e      cfg_mode;
  logic       cfg_use_b, cfg_init;
  logic       a_v, a_r, b_v, b_r, in_ack;
  logic       out_v, out_r, out_ready;
  logic       pwr_good, in_pending, holds_state, fire;

  logic       out_ack;      // receiver's acknowledge phase
  logic       rx_enable;
  logic       got_q[$];
  int         checks = 0, failures = 0;

  logic_block #(.WORD_BITS(WB)) dut (.*);

  assign out_ready = (out_ack == (out_v ^ out_r));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // receiver: take each new output token, acknowledge after 0..3 cycles
  always begin
    @(negedge clk);
    if (rx_enable && rst_n && !out_ready) begin
      got_q.push_back(out_v);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      out_ack = out_v ^ out_r;
    end
  end

  logic a_ph, b_ph;

  // send one token pair; B arrives `skew` cycles after A
  task automatic send(input logic a, input logic b, input int skew);
    a_ph = ~a_ph;
    {a_v, a_r} = ledr_encode(a, a_ph);
    if (cfg_use_b) begin
      repeat (skew) begin
        @(negedge clk);
        check(in_ack != a_ph, "waits for the late input");
      end
      b_ph = ~b_ph;
      {b_v, b_r} = ledr_encode(b, b_ph);
    end
    while (in_ack != a_ph) @(negedge clk);
  endtask

  task automatic restart(input mode_e mode, input logic [3:0] lut,
                         input logic use_b, input logic init);
    rx_enable = 1'b0;
    rst_n     = 1'b0;
    cfg_mode  = mode;
    cfg_lut   = lut;
    cfg_use_b = use_b;
    cfg_init  = init;
    {a_v, a_r, b_v, b_r} = '0;
    a_ph = 1'b0;
    b_ph = 1'b0;
    out_ack = 1'b0;
    got_q.delete();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    rx_enable = 1'b1;
  endtask

  task automatic drain(input int n);
    int guard = 0;
    while (got_q.size() < n && guard < 200) begin
      @(negedge clk);
      guard++;
    end
    repeat (5) @(negedge clk);
    check(got_q.size() == n, "number of output tokens");
  endtask

  logic       av[64], bv[64], exp_bit;
  logic [3:0] f;
  logic [WB-1:0] wa, wb, ws;
  int         t0;

  initial begin
    pwr_good  = 1'b1;
    rx_enable = 1'b0;
    // ---------------- LOGIC mode ----------------
    foreach (av[i]) begin
      av[i] = 1'($urandom);
      bv[i] = 1'($urandom);
    end
    for (int fi = 0; fi < 4; fi++) begin
      f = (fi == 0) ? 4'b1000 : (fi == 1) ? 4'b0110 : (fi == 2) ? 4'b1110 : 4'($urandom);
      restart(MODE_LOGIC, f, 1'b1, 1'b0);
      for (int i = 0; i < 32; i++) send(av[i], bv[i], $urandom_range(0, 2));
      drain(32);
      for (int i = 0; i < 32 && i < got_q.size(); i++)
        check(got_q[i] == f[{av[i], bv[i]}], "logic function result");
    end
    // -------- latency: pair complete -> acknowledged at next edge --------
    restart(MODE_LOGIC, 4'b1000, 1'b1, 1'b0);
    @(negedge clk);
    a_ph = ~a_ph; b_ph = ~b_ph;
    {a_v, a_r} = ledr_encode(1'b1, a_ph);
    {b_v, b_r} = ledr_encode(1'b1, b_ph);
    t0 = 0;
    while (in_ack != a_ph && t0 < 10) begin @(posedge clk); #1 t0++; end
    check(t0 == 1, "one clock from complete pair to acknowledge");
    drain(1);
    // ---------------- no firing without power ----------------
    restart(MODE_LOGIC, 4'b0110, 1'b1, 1'b0);
    pwr_good = 1'b0;
    a_ph = ~a_ph; b_ph = ~b_ph;
    {a_v, a_r} = ledr_encode(1'b1, a_ph);
    {b_v, b_r} = ledr_encode(1'b0, b_ph);
    repeat (5) begin
      @(negedge clk);
      check(in_ack == 1'b0 && !fire && in_pending, "held while unpowered");
    end
    pwr_good = 1'b1;
    @(negedge clk);
    check(in_ack == 1'b1, "fires once powered");
    drain(1);
    check(got_q[0] == 1'b1, "xor after power-up");
    // ---------------- ARITH mode ----------------
    restart(MODE_ARITH, 4'b0110, 1'b1, 1'b0);
    for (int w = 0; w < 40; w++) begin
      wa = WB'($urandom);
      wb = WB'($urandom);
      ws = wa + wb;
      got_q.delete();
      for (int i = 0; i < WB; i++) begin
        send(wa[i], wb[i], $urandom_range(0, 1));
        if (i < WB - 1) check(holds_state, "arith keeps state mid-word");
      end
      drain(WB);
      for (int i = 0; i < WB && i < got_q.size(); i++)
        check(got_q[i] == ws[i], "serial sum bit");
      check(!holds_state, "carry cleared at word end");
    end
    // ---------------- STORE mode ----------------
    for (int init = 0; init < 2; init++) begin
      restart(MODE_STORE, 4'b1100, 1'b0, 1'(init));
      check(holds_state, "storage holds state");
      for (int i = 0; i < 20; i++) send(av[i], 1'b0, 0);
      drain(20);
      for (int i = 0; i < 20 && i < got_q.size(); i++) begin
        exp_bit = (i == 0) ? 1'(init) : av[i-1];
        check(got_q[i] == exp_bit, "storage delays by one token");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
