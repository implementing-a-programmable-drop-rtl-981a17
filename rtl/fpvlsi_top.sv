// fpvlsi_top: the field-programmable array - a ROWS x COLS mesh of
// bit-serial, LEDR-coded, self-timed cells with fine-grain power gating.
//
// Every cell links only to its four neighbours.  A link carries one bit per
// token on an LEDR pair, a 2-phase acknowledge back, and a wake wire that
// lets the sender switch the receiver's power on ahead of the data.  The
// cells on the border connect their outward links to the top's edge ports,
// one link per border cell and side:
//   n_* indexed by column, row 0      s_* indexed by column, row ROWS-1
//   w_* indexed by row, column 0      e_* indexed by row, column COLS-1
// <side>_in / <side>_in_ack bring tokens into the array, <side>_out /
// <side>_out_ack take them out, with the same LEDR rules as inside.  An
// unused input link is held at (0,0) and an unused output link may have its
// acknowledge tied to the phase of the link (or left at 0 if it never
// changes).
//
// Programming: all cells form one scan path in row-major order, cell (0,0)
// first.  With cfg_shift high each clock moves the path one bit, so the word
// for cell (r,c) must be shifted in (ROWS*COLS-1-(r*COLS+c))*CFG_BITS
// places ahead of the end.  Keep rst_n low (synchronous) while shifting.
//
// 200 cells come from the document's test chip; the 10 x 20 arrangement,
// the edge-port scheme and the scan path are this design's choices.  The
// whole array runs from one clock: it is a clocked rendering of the
// self-timed circuit in which every token hop costs one clock.
module fpvlsi_top
  import fpvlsi_pkg::*;
#(
  parameter int unsigned ROWS        = 10,
  parameter int unsigned COLS        = 20,
  parameter int unsigned WORD_BITS   = 8,
  parameter int unsigned SLEEP_DELAY = 4,
  parameter int unsigned WAKE_CYCLES = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cfg_shift,
  input  logic      cfg_si,
  output logic      cfg_so,
  // north edge
  input  link_fwd_t n_in      [COLS],
  output logic      n_in_ack  [COLS],
  output link_fwd_t n_out     [COLS],
  input  logic      n_out_ack [COLS],
  // south edge
  input  link_fwd_t s_in      [COLS],
  output logic      s_in_ack  [COLS],
  output link_fwd_t s_out     [COLS],
  input  logic      s_out_ack [COLS],
  // west edge
  input  link_fwd_t w_in      [ROWS],
  output logic      w_in_ack  [ROWS],
  output link_fwd_t w_out     [ROWS],
  input  logic      w_out_ack [ROWS],
  // east edge
  input  link_fwd_t e_in      [ROWS],
  output logic      e_in_ack  [ROWS],
  output link_fwd_t e_out     [ROWS],
  input  logic      e_out_ack [ROWS],
  // per-cell status
  output logic      pwr_good  [ROWS][COLS],
  output logic      fire      [ROWS][COLS],
  output logic      wait_pwr  [ROWS][COLS],
  output logic [31:0] on_cycles [ROWS][COLS]
);
  link_fwd_t into    [ROWS][COLS][NDIR];  // link entering cell from side d
  logic      into_ack[ROWS][COLS][NDIR];
  link_fwd_t outof   [ROWS][COLS][NDIR];  // link leaving cell towards side d
  logic      outof_ack[ROWS][COLS][NDIR];
  logic      chain   [ROWS*COLS+1];

  assign chain[0] = cfg_si;
  assign cfg_so   = chain[ROWS*COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      // north side
      if (r == 0) begin : g_n_edge
        assign into[r][c][DIR_N]      = n_in[c];
        assign n_in_ack[c]            = into_ack[r][c][DIR_N];
        assign n_out[c]               = outof[r][c][DIR_N];
        assign outof_ack[r][c][DIR_N] = n_out_ack[c];
      end else begin : g_n_cell
        assign into[r][c][DIR_N]      = outof[r-1][c][DIR_S];
        assign outof_ack[r][c][DIR_N] = into_ack[r-1][c][DIR_S];
      end
      // south side
      if (r == ROWS-1) begin : g_s_edge
        assign into[r][c][DIR_S]      = s_in[c];
        assign s_in_ack[c]            = into_ack[r][c][DIR_S];
        assign s_out[c]               = outof[r][c][DIR_S];
        assign outof_ack[r][c][DIR_S] = s_out_ack[c];
      end else begin : g_s_cell
        assign into[r][c][DIR_S]      = outof[r+1][c][DIR_N];
        assign outof_ack[r][c][DIR_S] = into_ack[r+1][c][DIR_N];
      end
      // west side
      if (c == 0) begin : g_w_edge
        assign into[r][c][DIR_W]      = w_in[r];
        assign w_in_ack[r]            = into_ack[r][c][DIR_W];
        assign w_out[r]               = outof[r][c][DIR_W];
        assign outof_ack[r][c][DIR_W] = w_out_ack[r];
      end else begin : g_w_cell
        assign into[r][c][DIR_W]      = outof[r][c-1][DIR_E];
        assign outof_ack[r][c][DIR_W] = into_ack[r][c-1][DIR_E];
      end
      // east side
      if (c == COLS-1) begin : g_e_edge
        assign into[r][c][DIR_E]      = e_in[r];
        assign e_in_ack[r]            = into_ack[r][c][DIR_E];
        assign e_out[r]               = outof[r][c][DIR_E];
        assign outof_ack[r][c][DIR_E] = e_out_ack[r];
      end else begin : g_e_cell
        assign into[r][c][DIR_E]      = outof[r][c+1][DIR_W];
        assign outof_ack[r][c][DIR_E] = into_ack[r][c+1][DIR_W];
      end

      fpvlsi_cell #(
        .WORD_BITS  (WORD_BITS),
        .SLEEP_DELAY(SLEEP_DELAY),
        .WAKE_CYCLES(WAKE_CYCLES)
      ) u_cell (
        .clk, .rst_n,
        .cfg_shift,
        .cfg_si   (chain[r*COLS+c]),
        .cfg_so   (chain[r*COLS+c+1]),
        .in_fwd   (into[r][c]),
        .in_ack   (into_ack[r][c]),
        .out_fwd  (outof[r][c]),
        .out_ack  (outof_ack[r][c]),
        .pwr_good (pwr_good[r][c]),
        .fire     (fire[r][c]),
        .wait_pwr (wait_pwr[r][c]),
        .on_cycles(on_cycles[r][c])
      );
    end
  end
endmodule
