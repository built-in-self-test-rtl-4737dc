// Carry look-ahead adder: sum = a + b + cin, with carry out.
//
// The word is cut into 4-bit groups. Inside a group every carry is formed
// directly from the bit generate (a&b) and propagate (a^b) terms; each group
// also forms a group generate and group propagate, and the carry into group
// k+1 is G_k | P_k & c_k. The document assumes a CLA for the DSP adder but does
// not give its group size or how group carries are combined: 4-bit groups
// with group carries passed from group to group are this design's choice.
// Purely combinational. W must be a multiple of 4.
module cla_adder #(
  parameter int unsigned W = 48
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NG = W / 4;

  logic [W-1:0] g, p, c;
  logic         gc;  // carry into the current group

  always_comb begin
    g = a & b;
    p = a ^ b;
    gc = cin;
    for (int k = 0; k < NG; k++) begin
      int unsigned i;
      i = 4 * k;
      c[i]     = gc;
      c[i + 1] = g[i] | (p[i] & gc);
      c[i + 2] = g[i + 1] | (p[i + 1] & g[i]) | (p[i + 1] & p[i] & gc);
      c[i + 3] = g[i + 2] | (p[i + 2] & g[i + 1]) | (p[i + 2] & p[i + 1] & g[i])
               | (p[i + 2] & p[i + 1] & p[i] & gc);
      gc = (g[i + 3] | (p[i + 3] & g[i + 2]) | (p[i + 3] & p[i + 2] & g[i + 1])
                  | (p[i + 3] & p[i + 2] & p[i + 1] & g[i]))
                | (p[i + 3] & p[i + 2] & p[i + 1] & p[i] & gc);
    end
    sum  = p ^ c;
    cout = gc;
  end

  initial assert (W % 4 == 0) else $error("cla_adder: W must be a multiple of 4");
endmodule
