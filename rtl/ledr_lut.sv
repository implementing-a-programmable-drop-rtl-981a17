// ledr_lut: two-input look-up table working directly on LEDR-coded inputs.
//
// Two ledr_lut_sub halves, one per phase, share the four memory bits of the
// programmed function.  At most one half drives at a time: the one whose
// phase both inputs carry.  When the inputs are an invalid combination (A and
// B in different phases, i.e. one token has arrived and the other has not)
// neither half drives and the output keeper holds the previous result, as the
// document describes for its keeper latch.  So the LUT output is always a
// legal LEDR pair, and `valid` doubles as the completion detector of the
// logic block.
//
// Timing: the result is combinational from the inputs when valid; the keeper
// register takes the driven value on each clock edge.  In this clocked
// rendering of the self-timed circuit the keeper latch is a flip-flop that
// resets to the phase-0 code of 0, i.e. (0,0).
module ledr_lut (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       va, ra,
  input  logic       vb, rb,
  input  logic [3:0] m,       // programmed function, m[{a,b}]
  output logic       vout,
  output logic       rout,
  output logic       valid    // inputs form a complete same-phase pair
);
  logic d0, v0, r0, d1, v1, r1;
  logic keep_v, keep_r;

  ledr_lut_sub #(.PHASE(1'b0)) u_ph0 (
    .va, .ra, .vb, .rb, .m, .drive(d0), .vout(v0), .rout(r0)
  );
  ledr_lut_sub #(.PHASE(1'b1)) u_ph1 (
    .va, .ra, .vb, .rb, .m, .drive(d1), .vout(v1), .rout(r1)
  );

  always_comb begin
    valid = d0 | d1;
    if (d0)      begin vout = v0;     rout = r0;     end
    else if (d1) begin vout = v1;     rout = r1;     end
    else         begin vout = keep_v; rout = keep_r; end
  end

  always_ff @(posedge clk)
    if (!rst_n) begin
      keep_v <= 1'b0;
      keep_r <= 1'b0;
    end else begin
      keep_v <= vout;
      keep_r <= rout;
    end

  // The two halves never drive together (the bus would short).
  assert property (@(posedge clk) disable iff (!rst_n) !(d0 && d1));
endmodule
