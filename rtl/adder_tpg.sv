// Test pattern generator for an N-bit carry look-ahead adder.
//
// An (N+1)-bit shift register SReg[0..N] and one extra flip-flop form a
// twisted ring: the flip-flop takes the last shift-register bit, and its
// inverted output feeds the first shift-register bit. The ring has N+2
// stages and one inversion, so it steps through 2*(N+2) distinct states.
// From each state one adder test vector is decoded:
//   va[i] = ~(SReg[i] ^ SReg[i+1]) ^ SReg[N]   (adder operand A)
//   vb[i] =  SReg[i+1]                         (adder operand B)
//   vc    = inverted flip-flop output          (adder carry-in)
// The ring, the N+1-bit register, the flip-flop with inverted output and the
// gate types follow the document's figure of the modified adder test. Which
// end of the register is its serial input, and that the common XOR input is
// the register's last bit, are this design's reading of the figure.
//
// Timing: `init` (synchronous, priority) clears the ring; each cycle with
// `adv` high moves it one step. The outputs are decoded from the state.
module adder_tpg #(
  parameter int unsigned N = 48
) (
  input  logic         clk,
  input  logic         init,
  input  logic         adv,
  output logic [N-1:0] va,
  output logic [N-1:0] vb,
  output logic         vc
);
  logic [N:0] sreg;
  logic       ff;

  always_ff @(posedge clk) begin
    if (init) begin
      sreg <= '0;
      ff   <= 1'b0;
    end else if (adv) begin
      sreg <= {sreg[N-1:0], ~ff};
      ff   <= sreg[N];
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      va[i] = ~(sreg[i] ^ sreg[i+1]) ^ sreg[N];
      vb[i] = sreg[i+1];
    end
    vc = ~ff;
  end
endmodule
