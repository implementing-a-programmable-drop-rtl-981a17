// tb_ledr_lut: exhaustive check of the LEDR look-up table.
// For every programmed function and every (Va,Ra,Vb,Rb) combination, in a
// random order so the keeper starts from varying values, the testbench
// checks: a same-phase pair gives valid=1, Vout = M[{Va,Vb}] and
// Rout = Vout ^ phase; a mixed-phase pair gives valid=0 and the previous
// output unchanged.
module tb_ledr_lut;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       va, ra, vb, rb;
  logic [3:0] m;
  logic       vout, rout, valid;
  int         checks = 0, failures = 0;
  logic       prev_v, prev_r;

  ledr_lut dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: m=%b a=(%b,%b) b=(%b,%b) out=(%b,%b) valid=%b",
               what, m, va, ra, vb, rb, vout, rout, valid);
    end
  endtask

  initial begin
    {va, ra, vb, rb} = '0;
    m      = '0;
    rst_n  = 1'b0;
    repeat (2) @(negedge clk);
    rst_n  = 1'b1;
    // after reset the keeper holds the phase-0 code of 0
    {va, ra, vb, rb} = 4'b0001;  // mixed phases
    #1 check(!valid && vout == 1'b0 && rout == 1'b0, "reset keeper");
    prev_v = vout;
    prev_r = rout;
    for (int rep = 0; rep < 4; rep++) begin
      for (int f = 0; f < 16; f++) begin
        for (int k = 0; k < 16; k++) begin
          @(negedge clk);
          m = 4'(f);
          {va, ra, vb, rb} = 4'($urandom_range(0, 15));
          #1;
          if ((va ^ ra) == (vb ^ rb)) begin
            check(valid, "valid");
            check(vout == f[{va, vb}], "vout");
            check(rout == (f[{va, vb}] ^ va ^ ra), "rout");
          end else begin
            check(!valid, "invalid");
            check(vout == prev_v && rout == prev_r, "keeper holds");
          end
          prev_v = vout;
          prev_r = rout;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
