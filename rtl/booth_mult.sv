// 18x18 two's complement multiplier, modified (radix-4) Booth encoding with
// a Wallace tree of carry-save adders, leaving two partial products.
//
// B is Booth encoded in overlapping 3-bit windows, giving nine digits in
// {-2,-1,0,+1,+2}. Each digit selects 0, A or 2A, inverted when negative; the
// +1 that completes each negation is collected in one extra row. The ten rows,
// sign-extended to 48 bits, are reduced by 3:2 carry-save adders in five
// levels to two rows whose sum, modulo 2^48, is the sign-extended product.
// The two rows are not added here: as in the slice the document describes,
// the final addition is left to the slice's adder, which receives one row
// through the X multiplexer and one through the Y multiplexer.
// The document names the architecture (modified Booth / Wallace tree) as the
// most likely one but gives no details: the choice of B as the Booth-encoded
// port and the tree shape are this design's own. The figure of the slice
// shows each row as 36 bits; here the rows are kept at 48 bits so that their
// sum is correct over the full adder width. Purely combinational.
module booth_mult (
  input  logic [17:0] a,
  input  logic [17:0] b,
  output logic [47:0] row0,
  output logic [47:0] row1
);
  localparam int unsigned W  = 48;
  localparam int unsigned ND = 9;

  typedef struct packed {
    logic [W-1:0] s;
    logic [W-1:0] c;
  } csa_t;

  function automatic csa_t csa(input logic [W-1:0] x, input logic [W-1:0] y,
                               input logic [W-1:0] z);
    csa_t r;
    r.s = x ^ y ^ z;
    r.c = ((x & y) | (x & z) | (y & z)) << 1;
    return r;
  endfunction

  logic [W-1:0] pp [ND];
  logic [W-1:0] negs;
  logic [W-1:0] a_ext;
  csa_t l1a, l1b, l1c, l2a, l2b, l3, l4, l5;

  always_comb begin
    logic [18:0] bx;
    logic [2:0]  win;
    logic [W-1:0] mag;
    logic         neg;
    a_ext = {{(W-18){a[17]}}, a};
    bx    = {b, 1'b0};
    negs  = '0;
    for (int j = 0; j < ND; j++) begin
      win = bx[2*j +: 3];
      unique case (win)
        3'b001, 3'b010: begin mag = a_ext;      neg = 1'b0; end
        3'b011:         begin mag = a_ext << 1; neg = 1'b0; end
        3'b100:         begin mag = a_ext << 1; neg = 1'b1; end
        3'b101, 3'b110: begin mag = a_ext;      neg = 1'b1; end
        default:        begin mag = '0;         neg = 1'b0; end
      endcase
      pp[j] = (neg ? ~mag : mag) << (2 * j);
      negs[2*j] = neg;
    end
    // Wallace tree: 10 rows -> 7 -> 5 -> 4 -> 3 -> 2
    l1a = csa(pp[0], pp[1], pp[2]);
    l1b = csa(pp[3], pp[4], pp[5]);
    l1c = csa(pp[6], pp[7], pp[8]);
    l2a = csa(l1a.s, l1a.c, l1b.s);
    l2b = csa(l1b.c, l1c.s, l1c.c);
    l3  = csa(l2a.s, l2a.c, l2b.s);
    l4  = csa(l3.s, l3.c, l2b.c);
    l5  = csa(l4.s, l4.c, negs);
    row0 = l5.s;
    row1 = l5.c;
  end
endmodule
