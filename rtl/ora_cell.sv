// One output response analyser (ORA) bit.
//
// A look-up table compares the same output bit of two DSP slices that should
// agree (XNOR) and ANDs the result with the cell's own pass flag; a
// flip-flop keeps the result, so once a mismatch is seen the flag stays low
// until the next `init`. The carry multiplexer of the logic block then forms
// one link of an OR chain: with the flag high (pass) it forwards
// `carry_in`, with the flag low (fail) it outputs 1. The LUT, flip-flop and
// carry-multiplexer structure follows the document's figure of the ORA.
//
// Timing: `init` (synchronous, priority) sets the flag to pass, as loading the
// configuration would; otherwise the flag is updated on each rising edge with
// `ce` high. `carry_out` is combinational from the flag and `carry_in`.
module ora_cell (
  input  logic clk,
  input  logic init,
  input  logic ce,
  input  logic dut_j,
  input  logic dut_k,
  input  logic carry_in,
  output logic pass,
  output logic carry_out
);
  logic lut;
  assign lut = ~(dut_j ^ dut_k) & pass;

  always_ff @(posedge clk) begin
    if (init)    pass <= 1'b1;
    else if (ce) pass <= lut;
  end

  assign carry_out = pass ? carry_in : 1'b1;
endmodule
