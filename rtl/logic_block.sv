// logic_block: the bit-serial logic block of one cell.
//
// Data moves one bit per token over LEDR-coded links with a 2-phase
// acknowledge.  The block has an input side that detects new tokens, the
// LEDR LUT, the block's own state (carry or stored bit) and an output
// register with its handshake.  Following the document the block can do one
// of three things:
//   MODE_LOGIC  any 2-input function: out = LUT(a,b)
//   MODE_ARITH  1-bit serial addition with the carry kept in the block:
//               out = LUT(a,b) ^ c with the LUT programmed to XOR, and
//               c <= maj(a,b,c).  The carry clears after WORD_BITS bits, so
//               words are sent LSB first, WORD_BITS tokens each.
//   MODE_STORE  1-bit storage: out = stored bit, stored bit <= a, so the
//               block delays the stream by one token (starts from cfg_init).
//   MODE_OFF    unused; never fires.
// The word length, the storage semantics and the XOR programming for
// addition are this design's choices; the document only lists the three
// functions.
//
// Handshake.  in_ack is the phase of the last token pair consumed.  A new
// pair is present when the LUT reports a valid same-phase combination whose
// phase differs from in_ack; a lone token on one input is an invalid
// combination and simply waits.  If input B is not used it is replaced by a
// 0 in A's phase.  The block fires in one clock when a pair is present, the
// block is powered (pwr_good) and out_ready says every receiver has
// acknowledged the current output phase.  Firing sends the result in the
// opposite output phase and flips in_ack.  All state survives power-down in
// this model (it sits in the always-on part); the block just cannot fire
// while unpowered.  Reset is synchronous and must be released after the
// configuration is in place.
module logic_block
  import fpvlsi_pkg::*;
#(
  parameter int unsigned WORD_BITS = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  // configuration
  input  logic [3:0] cfg_lut,
  input  mode_e      cfg_mode,
  input  logic       cfg_use_b,
  input  logic       cfg_init,
  // inputs (already selected from the neighbours)
  input  logic       a_v, a_r,
  input  logic       b_v, b_r,
  output logic       in_ack,
  // output
  output logic       out_v, out_r,
  input  logic       out_ready,   // all receivers acknowledged out phase
  // power and status
  input  logic       pwr_good,
  output logic       in_pending,  // some token has arrived and is not consumed
  output logic       holds_state, // block state would be lost if powered off
  output logic       fire         // a token pair is consumed this cycle
);
  localparam int unsigned CW = (WORD_BITS > 1) ? $clog2(WORD_BITS) : 1;

  logic          bv, br;
  logic          lut_v, lut_r, lut_valid;
  logic          pa, pb, out_ph;
  logic          a_new, b_new, pair_new;
  logic          carry, stored, result;
  logic [CW-1:0] bitcnt;

  always_comb begin
    pa = a_v ^ a_r;
    bv = cfg_use_b ? b_v : 1'b0;
    br = cfg_use_b ? b_r : pa;
    pb = bv ^ br;
  end

  ledr_lut u_lut (
    .clk, .rst_n,
    .va(a_v), .ra(a_r), .vb(bv), .rb(br),
    .m(cfg_lut),
    .vout(lut_v), .rout(lut_r), .valid(lut_valid)
  );

  always_comb begin
    out_ph   = out_v ^ out_r;
    a_new    = (pa != in_ack);
    b_new    = (pb != in_ack);
    pair_new = lut_valid && a_new;
    fire     = pair_new && pwr_good && out_ready && (cfg_mode != MODE_OFF);
    in_pending = a_new || (cfg_use_b && b_new);
    unique case (cfg_mode)
      MODE_ARITH: result = lut_v ^ carry;
      MODE_STORE: result = stored;
      default:    result = lut_v;
    endcase
    holds_state = (cfg_mode == MODE_STORE) ||
                  (cfg_mode == MODE_ARITH && (carry || bitcnt != '0));
  end

  // Synchronous reset so that the storage bit can start from cfg_init:
  // configuration is loaded before reset is released.
  always_ff @(posedge clk)
    if (!rst_n) begin
      in_ack <= 1'b0;
      out_v  <= 1'b0;
      out_r  <= 1'b0;
      carry  <= 1'b0;
      bitcnt <= '0;
      stored <= cfg_init;
    end else if (fire) begin
      in_ack           <= ~in_ack;
      {out_v, out_r}   <= ledr_encode(result, ~out_ph);
      if (cfg_mode == MODE_STORE) stored <= a_v;
      if (cfg_mode == MODE_ARITH) begin
        if (bitcnt == CW'(WORD_BITS - 1)) begin
          bitcnt <= '0;
          carry  <= 1'b0;
        end else begin
          bitcnt <= bitcnt + 1'b1;
          carry  <= (a_v & bv) | (carry & (a_v ^ bv));
        end
      end
    end

  // The LUT output that is used must be a legal LEDR code of the pair's phase.
  assert property (@(posedge clk) disable iff (!rst_n)
                   fire |-> (lut_r == (lut_v ^ pa)));
endmodule
