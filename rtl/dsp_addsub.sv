// Two-stage adder/subtractor of the DSP slice: P = Z +/- (X + Y + CIN).
//
// The first carry look-ahead adder forms X + Y + CIN. Its sum is inverted
// bit by bit when SUBTRACT is high and added to Z by the second carry
// look-ahead adder, whose carry-in is SUBTRACT, so that Z - S = Z + ~S + 1.
// This two-stage structure is the one the document assumes for the slice;
// the CLA inside each stage is cla_adder. Purely combinational, results are
// 48-bit two's complement, carries out of bit 47 are dropped.
module dsp_addsub #(
  parameter int unsigned W = 48
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  input  logic         cin,
  input  logic         subtract,
  output logic [W-1:0] p
);
  logic [W-1:0] s1, s1_inv;
  logic         co1, co2;

  cla_adder #(.W(W)) u_stage1 (.a(x), .b(y), .cin(cin), .sum(s1), .cout(co1));

  assign s1_inv = s1 ^ {W{subtract}};

  cla_adder #(.W(W)) u_stage2 (.a(z), .b(s1_inv), .cin(subtract), .sum(p), .cout(co2));

  // The carries out of bit 47 are not part of a 48-bit two's complement result.
  logic unused_carries;
  assign unused_carries = co1 ^ co2;
endmodule
