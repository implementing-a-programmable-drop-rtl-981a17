// tb_switch_box: random configurations and link states checked against a
// reference model of the four-neighbour switch box: input selection, wake
// request, acknowledge routing (selected links get the block's phase,
// others their own phase), output fan-out with idle code on disabled links,
// and the acknowledge join that forms out_ready.
module tb_switch_box;
  import fpvlsi_pkg::*;

  dir_e       cfg_sel_a, cfg_sel_b;
  logic       cfg_use_b;
  logic [3:0] cfg_out_en;
  link_fwd_t  in_fwd  [NDIR];
  logic       in_ack  [NDIR];
  link_fwd_t  out_fwd [NDIR];
  logic       out_ack [NDIR];
  logic       a_v, a_r, b_v, b_r, wake_req;
  logic       blk_in_ack, blk_out_v, blk_out_r, blk_wake, out_ready;
  int         checks = 0, failures = 0;
  logic       exp_ready, exp_ack;

  switch_box dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      cfg_sel_a  = dir_e'($urandom_range(0, 3));
      cfg_sel_b  = dir_e'($urandom_range(0, 3));
      cfg_use_b  = 1'($urandom);
      cfg_out_en = 4'($urandom);
      for (int d = 0; d < NDIR; d++) begin
        in_fwd[d]  = link_fwd_t'($urandom);
        out_ack[d] = 1'($urandom);
      end
      {blk_in_ack, blk_out_v, blk_out_r, blk_wake} = 4'($urandom);
      #1;
      check(a_v == in_fwd[cfg_sel_a].v && a_r == in_fwd[cfg_sel_a].r, "input A");
      check(b_v == in_fwd[cfg_sel_b].v && b_r == in_fwd[cfg_sel_b].r, "input B");
      check(wake_req == (in_fwd[cfg_sel_a].wake | (cfg_use_b & in_fwd[cfg_sel_b].wake)),
            "wake request");
      exp_ready = 1'b1;
      for (int d = 0; d < NDIR; d++) begin
        if (d == cfg_sel_a || (cfg_use_b && d == cfg_sel_b)) exp_ack = blk_in_ack;
        else exp_ack = in_fwd[d].v ^ in_fwd[d].r;
        check(in_ack[d] == exp_ack, "acknowledge routing");
        if (cfg_out_en[d]) begin
          check(out_fwd[d] == {blk_out_v, blk_out_r, blk_wake}, "output copy");
          if (out_ack[d] != (blk_out_v ^ blk_out_r)) exp_ready = 1'b0;
        end else begin
          check(out_fwd[d] == '0, "idle output link");
        end
      end
      check(out_ready == exp_ready, "acknowledge join");
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
