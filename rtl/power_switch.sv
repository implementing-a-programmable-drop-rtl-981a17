// power_switch: behavioural model of the per-block power switch (a sleep
// transistor between the supply and the block's virtual supply rail).
//
// This is not synthesizable logic of the design: in silicon it is an analog
// device.  The model gives the digital view the controller needs: when `en`
// rises the virtual rail takes WAKE_CYCLES clock cycles to charge, after
// which `pwr_good` rises; when `en` falls the rail is considered discharged
// at once and `pwr_good` falls at the next edge.  `on_cycles` counts the
// cycles the switch conducts, a stand-in for the leakage the block draws.
// The wake-up latency value is this design's assumption; the document only
// says that waking a block costs extra delay.
module power_switch #(
  parameter int unsigned WAKE_CYCLES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic        pwr_good,
  output logic [31:0] on_cycles
);
  localparam int unsigned CW = $clog2(WAKE_CYCLES + 2);

  logic [CW-1:0] charge;

  always_ff @(posedge clk)
    if (!rst_n) begin
      charge    <= '0;
      pwr_good  <= 1'b0;
      on_cycles <= '0;
    end else if (!en) begin
      charge    <= '0;
      pwr_good  <= 1'b0;
    end else begin
      on_cycles <= on_cycles + 1;
      if (charge >= CW'(WAKE_CYCLES - 1)) pwr_good <= 1'b1;
      else                                charge   <= charge + 1'b1;
    end
endmodule
