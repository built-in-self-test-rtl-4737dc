// Weighted pseudo-random generator for the clock enables and resets of a DSP
// slice.
//
// Two maximal-length Fibonacci LFSRs run side by side: L1 of 15 bits
// (x^15 + x^14 + 1) and L2 of 17 bits (x^17 + x^14 + 1). Each of the eight
// clock enables is the OR of one bit of each LFSR, so it is active about 3/4
// of the time; each of the seven resets is the AND of three bits, so it is
// active about 1/8 of the time. The carry-in and subtract pins are left low.
// The document states only that two LFSRs give weighted pseudo-random control
// signals; the lengths, polynomials, seeds and weights are this design's.
//
// Timing: `init` (synchronous, priority) loads the seeds; each cycle with `en`
// high steps both LFSRs. `ctrl` is decoded from the current state, in the
// logical (active-high) sense.
module ctrl_lfsr
  import dsp_bist_pkg::*;
#(
  parameter logic [14:0] SEED1 = 15'h5A3C,
  parameter logic [16:0] SEED2 = 17'h1B2E5
) (
  input  logic      clk,
  input  logic      init,
  input  logic      en,
  output dsp_ctrl_t ctrl
);
  logic [14:0] l1;
  logic [16:0] l2;

  always_ff @(posedge clk) begin
    if (init) begin
      l1 <= SEED1;
      l2 <= SEED2;
    end else if (en) begin
      l1 <= {l1[13:0], l1[14] ^ l1[13]};
      l2 <= {l2[15:0], l2[16] ^ l2[13]};
    end
  end

  logic [7:0] ce;
  logic [6:0] rst;

  always_comb begin
    for (int k = 0; k < 8; k++) ce[k] = l1[k] | l2[k];
    for (int k = 0; k < 7; k++) rst[k] = l1[k + 8] & l2[k + 8] & l2[k + 1];
    ctrl = '{ce_a: ce[0], ce_b: ce[1], ce_c: ce[2], ce_m: ce[3], ce_p: ce[4],
             ce_ctrl: ce[5], ce_cinsub: ce[6], ce_carryin: ce[7],
             rst_a: rst[0], rst_b: rst[1], rst_c: rst[2], rst_m: rst[3],
             rst_p: rst[4], rst_ctrl: rst[5], rst_carryin: rst[6],
             subtract: 1'b0, carryin: 1'b0};
  end

  initial begin
    assert (SEED1 != '0) else $error("ctrl_lfsr: SEED1 must not be zero");
    assert (SEED2 != '0) else $error("ctrl_lfsr: SEED2 must not be zero");
  end
endmodule
