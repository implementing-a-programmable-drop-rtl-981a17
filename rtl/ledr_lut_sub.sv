// ledr_lut_sub: one phase half of the LEDR look-up table.
//
// The LEDR LUT is split into two identical sub-modules, one answering tokens
// of phase 0 and one answering tokens of phase 1 (parameter PHASE).  Each has
// three parts, as in the document: a decoder, the memory bits Mmn (Mmn is the
// result for Va=m, Vb=n) and an output driver.  The decoder enables the
// driver only when both inputs carry a token of this sub-module's phase; it
// then selects the memory bit addressed by (Va,Vb) and drives it LEDR-coded
// in the same phase (Rout = Vout ^ PHASE).  For any other input combination
// the driver is released, which in silicon is a high-impedance output; here
// it is shown by drive=0 and the outputs read 0.
//
// Purely combinational.  Memory bit order m[{m,n}] is this design's choice.
module ledr_lut_sub #(
  parameter bit PHASE = 1'b0
) (
  input  logic       va, ra,  // input A, LEDR pair
  input  logic       vb, rb,  // input B, LEDR pair
  input  logic [3:0] m,       // memory bits, m[{a,b}]
  output logic       drive,   // this half drives the LUT output
  output logic       vout,
  output logic       rout
);
  logic       pa, pb;
  logic [3:0] dec;  // one-hot decoder of (Va,Vb), gated by the phase check

  always_comb begin
    pa  = va ^ ra;
    pb  = vb ^ rb;
    dec = '0;
    if (pa == PHASE && pb == PHASE) dec[{va, vb}] = 1'b1;
    drive = |dec;
    vout  = |(dec & m);
    rout  = drive & (vout ^ PHASE);
  end
endmodule
