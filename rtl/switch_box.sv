// switch_box: the connection of one cell to its four mesh neighbours.
//
// Each cell talks only to its north, east, south and west neighbours over
// 4-wire links: the LEDR pair (V,R), the acknowledge (back) and the wake-up
// wire.  The switch box, set by the cell's configuration,
//   * picks the link that feeds logic-block input A and the one that feeds
//     input B (when B is used), and ORs their wake wires into wake_req;
//   * returns the logic block's acknowledge phase on those links.  A link
//     that is not selected is acknowledged with its own phase, so a neighbour
//     that sends here by mistake cannot hang; its tokens are dropped;
//   * copies the block's output and wake wire onto every link enabled in
//     out_en, and joins their acknowledges: out_ready is true when every
//     enabled receiver has acknowledged the current output phase (the
//     2-phase counterpart of a C-element).  Disabled outgoing links stay at
//     the idle code (0,0).
// Four-neighbour connectivity is the document's; the per-cell selection
// fields and the drop-on-unselected rule are this design's choices.
// Purely combinational.
module switch_box
  import fpvlsi_pkg::*;
(
  // configuration
  input  dir_e       cfg_sel_a,
  input  dir_e       cfg_sel_b,
  input  logic       cfg_use_b,
  input  logic [3:0] cfg_out_en,
  // links from the neighbours into this cell
  input  link_fwd_t  in_fwd  [NDIR],
  output logic       in_ack  [NDIR],
  // links from this cell to the neighbours
  output link_fwd_t  out_fwd [NDIR],
  input  logic       out_ack [NDIR],
  // logic block side
  output logic       a_v, a_r,
  output logic       b_v, b_r,
  output logic       wake_req,
  input  logic       blk_in_ack,
  input  logic       blk_out_v, blk_out_r,
  input  logic       blk_wake,
  output logic       out_ready
);
  logic out_ph;

  always_comb begin
    a_v      = in_fwd[cfg_sel_a].v;
    a_r      = in_fwd[cfg_sel_a].r;
    b_v      = in_fwd[cfg_sel_b].v;
    b_r      = in_fwd[cfg_sel_b].r;
    wake_req = in_fwd[cfg_sel_a].wake || (cfg_use_b && in_fwd[cfg_sel_b].wake);

    out_ph    = blk_out_v ^ blk_out_r;
    out_ready = 1'b1;
    for (int d = 0; d < NDIR; d++) begin
      if (d == int'(cfg_sel_a) || (cfg_use_b && d == int'(cfg_sel_b)))
        in_ack[d] = blk_in_ack;
      else
        in_ack[d] = in_fwd[d].v ^ in_fwd[d].r;

      if (cfg_out_en[d]) begin
        out_fwd[d] = '{v: blk_out_v, r: blk_out_r, wake: blk_wake};
        if (out_ack[d] != out_ph) out_ready = 1'b0;
      end else begin
        out_fwd[d] = '0;
      end
    end
  end
endmodule
