// power_ctrl: fine-grain power-gating controller of one logic block.
//
// Every logic block has its own power switch.  The controller turns it on
// when the block is about to get work and off when the block has been idle
// for a while, using only information the self-timed handshake already
// carries:
//   * Early wake-up.  An upstream block raises its wake wire as soon as a
//     token reaches its own inputs, i.e. one stage before its result arrives
//     here.  wake_req (the OR of the wake wires of the links this block
//     listens to) switches the power on at the next clock edge, so the
//     wake-up latency overlaps the upstream computation.  The block passes
//     the request on: it raises wake_out towards its receivers, one clock
//     later, while it sees a wake request or has a token waiting at its
//     inputs.  The request thus runs ahead of the data along the configured
//     path, one cell per clock.  Once the token has moved on, the
//     receiver's own pending input keeps it awake.
//   * Delayed sleep.  The power switch is turned off only after SLEEP_DELAY
//     consecutive idle cycles, so a block that receives tokens back to back
//     is not cycled on and off for every bit.  This is the document's remedy
//     for the energy spent by switching a large power switch too often.
//   * A block that holds state (stored bit, carry mid-word) is never turned
//     off, and a block configured as unused is always off.
// The idle-count scheme and SLEEP_DELAY value are this design's choices; the
// document gives the behaviour, not the circuit.
//
// Timing: pwr_en and wake_out are registers.
module power_ctrl #(
  parameter int unsigned SLEEP_DELAY = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cfg_off,      // cell configured as unused
  input  logic wake_req,     // wake wires from the upstream links
  input  logic in_pending,   // token waiting at this block's inputs
  input  logic out_busy,     // output token not yet acknowledged
  input  logic holds_state,  // block state must be kept
  output logic pwr_en,       // power switch on
  output logic wake_out      // wake request to the downstream blocks
);
  localparam int unsigned IW = (SLEEP_DELAY > 1) ? $clog2(SLEEP_DELAY + 1) : 1;

  logic          active;
  logic [IW-1:0] idle;

  always_comb begin
    active   = wake_req || in_pending || out_busy || holds_state;
  end

  always_ff @(posedge clk)
    if (!rst_n) wake_out <= 1'b0;
    else        wake_out <= !cfg_off && (wake_req || in_pending);

  always_ff @(posedge clk)
    if (!rst_n) begin
      pwr_en <= 1'b0;
      idle   <= '0;
    end else if (cfg_off) begin
      pwr_en <= 1'b0;
      idle   <= '0;
    end else if (active) begin
      pwr_en <= 1'b1;
      idle   <= '0;
    end else if (pwr_en) begin
      if (idle >= IW'(SLEEP_DELAY - 1)) begin
        pwr_en <= 1'b0;
        idle   <= '0;
      end else begin
        idle <= idle + 1'b1;
      end
    end
endmodule
