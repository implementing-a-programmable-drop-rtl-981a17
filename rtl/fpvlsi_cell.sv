// fpvlsi_cell: one cell of the field-programmable array.
//
// A cell is a bit-serial logic block behind its own power switch, plus the
// switch box that ties it to its four neighbours and the configuration
// register that programs both.  Data arrives as LEDR tokens; the wake wire
// that travels with each link lets the power controller switch the block on
// while the upstream cell is still computing, and the controller switches it
// off again after SLEEP_DELAY idle cycles.  The handshake and phase state
// are kept powered (always-on); only the block's firing waits for pwr_good.
//
// Configuration: cfg_shift moves the CFG_BITS-bit register one place per
// clock, cfg_si entering at the least significant bit, cfg_so leaving from
// the most significant, so cells chain into one scan path.  The field
// layout is fpvlsi_pkg::cell_cfg_t.  The scan path is this design's choice;
// the document does not say how cells are programmed.  Hold rst_n low while
// configuring; reset is synchronous.
//
// Status outputs (for measurement only): pwr_good, fire (a token consumed),
// wait_pwr (a token waits because the block is not yet powered) and
// on_cycles (cycles the power switch has conducted).
module fpvlsi_cell
  import fpvlsi_pkg::*;
#(
  parameter int unsigned WORD_BITS   = 8,
  parameter int unsigned SLEEP_DELAY = 4,
  parameter int unsigned WAKE_CYCLES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration scan path
  input  logic        cfg_shift,
  input  logic        cfg_si,
  output logic        cfg_so,
  // links, indexed by fpvlsi_pkg::dir_e
  input  link_fwd_t   in_fwd  [NDIR],
  output logic        in_ack  [NDIR],
  output link_fwd_t   out_fwd [NDIR],
  input  logic        out_ack [NDIR],
  // status
  output logic        pwr_good,
  output logic        fire,
  output logic        wait_pwr,
  output logic [31:0] on_cycles
);
  logic [CFG_BITS-1:0] cfg_q;
  cell_cfg_t           cfg;

  always_ff @(posedge clk)
    if (cfg_shift) cfg_q <= {cfg_q[CFG_BITS-2:0], cfg_si};

  assign cfg    = cell_cfg_t'(cfg_q);
  assign cfg_so = cfg_q[CFG_BITS-1];

  logic a_v, a_r, b_v, b_r, wake_req, out_ready;
  logic blk_in_ack, blk_out_v, blk_out_r, blk_wake;
  logic in_pending, holds_state, pwr_en, out_busy;

  switch_box u_sw (
    .cfg_sel_a (cfg.sel_a),
    .cfg_sel_b (cfg.sel_b),
    .cfg_use_b (cfg.use_b),
    .cfg_out_en(cfg.out_en),
    .in_fwd, .in_ack, .out_fwd, .out_ack,
    .a_v, .a_r, .b_v, .b_r,
    .wake_req,
    .blk_in_ack, .blk_out_v, .blk_out_r, .blk_wake,
    .out_ready
  );

  logic_block #(.WORD_BITS(WORD_BITS)) u_lb (
    .clk, .rst_n,
    .cfg_lut  (cfg.lut),
    .cfg_mode (cfg.mode),
    .cfg_use_b(cfg.use_b),
    .cfg_init (cfg.init),
    .a_v, .a_r, .b_v, .b_r,
    .in_ack   (blk_in_ack),
    .out_v    (blk_out_v),
    .out_r    (blk_out_r),
    .out_ready,
    .pwr_good,
    .in_pending,
    .holds_state,
    .fire
  );

  assign out_busy = !out_ready;

  power_ctrl #(.SLEEP_DELAY(SLEEP_DELAY)) u_pc (
    .clk, .rst_n,
    .cfg_off   (cfg.mode == MODE_OFF),
    .wake_req,
    .in_pending,
    .out_busy,
    .holds_state,
    .pwr_en,
    .wake_out  (blk_wake)
  );

  power_switch #(.WAKE_CYCLES(WAKE_CYCLES)) u_ps (
    .clk, .rst_n,
    .en       (pwr_en),
    .pwr_good,
    .on_cycles
  );

  assign wait_pwr = in_pending && !pwr_good;
endmodule
