// tb_fpvlsi_activity: the default 10 x 20 array at low activity.
//
// Same programming and same result checks as tb_fpvlsi_full (row 0: serial
// adder -> store -> buffers -> inverter; row 1: XOR with the adder result ->
// buffers; all other cells unused), but every input token is followed by a
// random gap of 0..13 clocks, so each input carries a token about one clock
// in ten (10 % activity).  The testbench measures how long the power
// switches conduct: for the 40 cells in use and for the whole array, as a
// fraction of the time they would conduct without power gating.  It checks
// the input activity is near 10 %, that the cells in use were switched off
// for a real part of the run, and that unused cells never conducted.
module tb_fpvlsi_activity;
  import fpvlsi_pkg::*;

  localparam int unsigned R  = 10;
  localparam int unsigned C  = 20;
  localparam int unsigned WB = 8;
  localparam int unsigned NWORDS = 24;

  logic      clk = 1'b0;
  logic      rst_n, cfg_shift, cfg_si, cfg_so;
  link_fwd_t n_in [C], n_out [C], s_in [C], s_out [C];
  logic      n_in_ack [C], n_out_ack [C], s_in_ack [C], s_out_ack [C];
  link_fwd_t w_in [R], w_out [R], e_in [R], e_out [R];
  logic      w_in_ack [R], w_out_ack [R], e_in_ack [R], e_out_ack [R];
  logic      pwr_good [R][C], fire [R][C], wait_pwr [R][C];
  logic [31:0] on_cycles [R][C];

  fpvlsi_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- mechanism counters ----------------
  longint cyc = 0, t_start = 0, t_end = 0, on_used = 0, on_all = 0;
  real    act, f_used, f_all;
  always @(posedge clk) cyc++;
  int  n_wake = 0, n_wake_ahead = 0, n_sleep = 0, n_wait_pwr = 0;
  int  n_mixed = 0, n_backpressure = 0, n_carry = 0, n_fire = 0;
  logic pg_q [R][C];
  logic waited [R][C];
  logic w0_ph, n0_ph, w1_ph;
  logic rx_on = 1'b0;

  always @(posedge clk) if (rst_n && rx_on) begin
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        // a wake-up is ahead of the data if no token had to wait for it
        if (!pg_q[r][c] && pwr_good[r][c]) begin
          n_wake++;
          if (!waited[r][c]) n_wake_ahead++;
          waited[r][c] = 1'b0;
        end
        if (pg_q[r][c] && !pwr_good[r][c]) n_sleep++;
        if (wait_pwr[r][c]) begin n_wait_pwr++; waited[r][c] = 1'b1; end
        if (fire[r][c]) n_fire++;
        pg_q[r][c] = pwr_good[r][c];
      end
    // adder input A present and consumed-phase differs from B's: mixed phases
    if (((w_in[0].v ^ w_in[0].r) != w_in_ack[0]) && ((n_in[0].v ^ n_in[0].r) == n_in_ack[0]))
      n_mixed++;
    // output not yet taken and the input side stalled behind it
    if ((e_out_ack[0] != (e_out[0].v ^ e_out[0].r)) &&
        ((w_in[0].v ^ w_in[0].r) != w_in_ack[0]))
      n_backpressure++;
  end

  // ---------------- receivers ----------------
  logic e0_q[$], e1_q[$];
  for (genvar k = 0; k < 2; k++) begin : g_rx
    always begin
      @(negedge clk);
      if (rx_on && (e_out_ack[k] != (e_out[k].v ^ e_out[k].r))) begin
        if (k == 0) e0_q.push_back(e_out[k].v);
        else        e1_q.push_back(e_out[k].v);
        repeat ($urandom_range(0, 3)) @(negedge clk);
        e_out_ack[k] = e_out[k].v ^ e_out[k].r;
      end
    end
  end

  // ---------------- configuration ----------------
  cell_cfg_t cfg [R][C];

  task automatic program_array();
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        cfg[r][c] = '{lut: 4'b0000, mode: MODE_OFF, sel_a: DIR_W, sel_b: DIR_W,
                      use_b: 1'b0, out_en: 4'b0000, init: 1'b0};
    // row 0
    cfg[0][0] = '{lut: 4'b0110, mode: MODE_ARITH, sel_a: DIR_W, sel_b: DIR_N,
                  use_b: 1'b1, out_en: 4'b0110, init: 1'b0};  // to E and S
    cfg[0][1] = '{lut: 4'b1100, mode: MODE_STORE, sel_a: DIR_W, sel_b: DIR_W,
                  use_b: 1'b0, out_en: 4'b0010, init: 1'b0};
    for (int c = 2; c < C - 1; c++)
      cfg[0][c] = '{lut: 4'b1100, mode: MODE_LOGIC, sel_a: DIR_W, sel_b: DIR_W,
                    use_b: 1'b0, out_en: 4'b0010, init: 1'b0};
    cfg[0][C-1] = '{lut: 4'b0011, mode: MODE_LOGIC, sel_a: DIR_W, sel_b: DIR_W,
                    use_b: 1'b0, out_en: 4'b0010, init: 1'b0};
    // row 1
    cfg[1][0] = '{lut: 4'b0110, mode: MODE_LOGIC, sel_a: DIR_W, sel_b: DIR_N,
                  use_b: 1'b1, out_en: 4'b0010, init: 1'b0};
    for (int c = 1; c < C; c++)
      cfg[1][c] = '{lut: 4'b1100, mode: MODE_LOGIC, sel_a: DIR_W, sel_b: DIR_W,
                    use_b: 1'b0, out_en: 4'b0010, init: 1'b0};
    // shift: last cell's word first, each word MSB first
    @(negedge clk);
    cfg_shift = 1'b1;
    for (int k = R * C - 1; k >= 0; k--)
      for (int b = CFG_BITS - 1; b >= 0; b--) begin
        cfg_si = cfg[k / C][k % C][b];
        @(negedge clk);
      end
    cfg_shift = 1'b0;
  endtask

  // ---------------- senders ----------------
  task automatic send_w0(input logic d, input int skew);
    repeat (skew) @(negedge clk);
    w0_ph = ~w0_ph;
    w_in[0] = '{v: d, r: d ^ w0_ph, wake: 1'b1};
    while (w_in_ack[0] != w0_ph) @(negedge clk);
    w_in[0].wake = 1'b0;
  endtask
  task automatic send_n0(input logic d, input int skew);
    repeat (skew) @(negedge clk);
    n0_ph = ~n0_ph;
    n_in[0] = '{v: d, r: d ^ n0_ph, wake: 1'b1};
    while (n_in_ack[0] != n0_ph) @(negedge clk);
    n_in[0].wake = 1'b0;
  endtask
  task automatic send_w1(input logic d, input int skew);
    repeat (skew) @(negedge clk);
    w1_ph = ~w1_ph;
    w_in[1] = '{v: d, r: d ^ w1_ph, wake: 1'b1};
    while (w_in_ack[1] != w1_ph) @(negedge clk);
    w_in[1].wake = 1'b0;
  endtask

  logic [WB-1:0] wa, wb, ws, wx;
  logic          sum_bits[$], x_bits[$];
  logic          exp_bit;
  int            guard;

  initial begin
    for (int c = 0; c < C; c++) begin
      n_in[c] = '0; s_in[c] = '0; n_out_ack[c] = 1'b0; s_out_ack[c] = 1'b0;
    end
    for (int r = 0; r < R; r++) begin
      w_in[r] = '0; e_in[r] = '0; w_out_ack[r] = 1'b0; e_out_ack[r] = 1'b0;
    end
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin pg_q[r][c] = 1'b0; waited[r][c] = 1'b0; end
    w0_ph = 0; n0_ph = 0; w1_ph = 0;
    rst_n = 1'b0;
    cfg_si = 1'b0;
    cfg_shift = 1'b0;
    program_array();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    rx_on = 1'b1;
    t_start = cyc;
    for (int w = 0; w < NWORDS; w++) begin
      wa = WB'($urandom);
      wb = WB'($urandom);
      wx = WB'($urandom);
      if (w == 0) begin wa = '1; wb = 1; end  // a carry through every bit
      ws = wa + wb;
      if ((wa & wb) != 0) n_carry++;  // some bit position generates a carry
      for (int i = 0; i < WB; i++) begin
        sum_bits.push_back(ws[i]);
        x_bits.push_back(wx[i]);
      end
      fork
        for (int i = 0; i < WB; i++) send_w0(wa[i], $urandom_range(0, 13));
        for (int i = 0; i < WB; i++) send_n0(wb[i], $urandom_range(0, 13));
        for (int i = 0; i < WB; i++) send_w1(wx[i], $urandom_range(0, 13));
      join
    end
    guard = 0;
    while ((e0_q.size() < NWORDS * WB || e1_q.size() < NWORDS * WB) && guard < 1000) begin
      @(negedge clk);
      guard++;
    end
    check(e0_q.size() == NWORDS * WB, "row 0 token count");
    check(e1_q.size() == NWORDS * WB, "row 1 token count");
    for (int i = 0; i < NWORDS * WB && i < e0_q.size() && i < e1_q.size(); i++) begin
      exp_bit = (i == 0) ? 1'b0 : sum_bits[i-1];
      check(e0_q[i] == ~exp_bit, "row 0: inverted, delayed sum");
      check(e1_q[i] == (x_bits[i] ^ sum_bits[i]), "row 1: xor with sum");
    end
    for (int r = 2; r < R; r++)
      for (int c = 0; c < C; c++)
        check(on_cycles[r][c] == 0, "unused cell never powered");
    t_end = cyc;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        on_all += longint'(on_cycles[r][c]);
        if (r < 2) on_used += longint'(on_cycles[r][c]);
      end
    act    = real'(NWORDS * WB) / real'(t_end - t_start);
    f_used = real'(on_used) / (real'(2 * C) * real'(t_end - t_start));
    f_all  = real'(on_all) / (real'(R * C) * real'(t_end - t_start));
    $display("cycles=%0d input_activity=%0.3f switch_on_fraction: cells_in_use=%0.3f whole_array=%0.3f",
             t_end - t_start, act, f_used, f_all);
    check(act > 0.05 && act < 0.15, "input activity near 10 percent");
    check(f_used < 0.97, "cells in use were switched off for part of the run");
    check(n_sleep > NWORDS, "cells in use slept many times");
    check(f_all <= f_used, "whole-array on time no more than the used cells'");
    $display("wakes=%0d wakes_ahead_of_data=%0d sleeps=%0d wait_for_power_cycles=%0d",
             n_wake, n_wake_ahead, n_sleep, n_wait_pwr);
    $display("mixed_phase_holds=%0d backpressure_cycles=%0d carry_words=%0d fires=%0d",
             n_mixed, n_backpressure, n_carry, n_fire);
    check(n_wake > 0, "wake-up happened");
    check(n_wake_ahead > 0, "wake-up ahead of data happened");
    check(n_sleep > 0, "sleep happened");
    check(n_wait_pwr > 0, "wait for power happened");
    check(n_mixed > 0, "mixed-phase hold happened");
    check(n_backpressure > 0, "back-pressure happened");
    check(n_carry > 0, "carry happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
