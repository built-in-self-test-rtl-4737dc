// A set of ORAs that compares the W-bit outputs of two DSP slices bit by bit
// (W = 48 for the P port), one ora_cell per bit.
//
// The cells' carry multiplexers are chained from bit 0 upwards, so
// `carry_out` is 1 when `carry_in` is 1 or any cell of the set has seen a
// mismatch: sets chained one after another form the iterative OR chain that
// gives a single pass/fail bit for the whole array. `pass` exposes the
// individual flags (what a configuration readback would return for
// diagnosis). One ORA per output bit follows the document; the order of the
// cells in the chain is this design's choice.
//
// Timing as ora_cell: flags update on rising edges with `ce` high, `init`
// sets them all to pass; the chain is combinational.
module ora_set #(
  parameter int unsigned W = 48
) (
  input  logic         clk,
  input  logic         init,
  input  logic         ce,
  input  logic [W-1:0] dut_j,
  input  logic [W-1:0] dut_k,
  input  logic         carry_in,
  output logic [W-1:0] pass,
  output logic         carry_out
);
  logic [W:0] chain;
  assign chain[0] = carry_in;

  for (genvar i = 0; i < W; i++) begin : g_cell
    ora_cell u_cell (
      .clk, .init, .ce,
      .dut_j(dut_j[i]), .dut_k(dut_k[i]),
      .carry_in(chain[i]), .pass(pass[i]), .carry_out(chain[i+1])
    );
  end

  assign carry_out = chain[W];
endmodule
