// Test pattern generator (TPG) for one row of DSP tiles.
//
// It holds the four parts the document gives the TPG:
//   * a 10-bit counter: bits 9:8 count the four 256-cycle groups of the
//     1,024-cycle BIST sequence, bits 7:0 are the 8-bit multiplier test
//     pattern;
//   * the adder test shift register (adder_tpg, N = 48: a 49-bit register plus
//     one flip-flop, 50 bits), which feeds the C port;
//   * two LFSRs (ctrl_lfsr) for weighted pseudo-random clock enables and
//     resets, used in groups 3 and 4 of the multiplier and adder tests;
//   * the sequence / OPMODE state machine (opmode_fsm).
//
// Multiplier patterns: in groups 1 and 3 the five counter MSBs go to A and
// the three LSBs to B (5x3); in groups 2 and 4 the three LSBs go to A and the
// five MSBs to B (3x5). Each field is repeated from bit 0 upwards to fill the
// 18-bit port. Which of A and B counts as the "5" side of 5x3 is this
// design's choice; the document only says both orders are run.
//
// Adder test: each vector takes two cycles (counter bit 0 = phase). The C
// port carries the vector's low 48 bits in phase 0 and its high 48 bits in
// phase 1; the 97th bit is applied in phase 1 to CARRYIN (groups 1 and 3) or
// SUBTRACT (groups 2 and 4). The ring steps once per vector. The assignment of
// group 4 to SUBTRACT is this design's choice.
//
// ORA enables: `ora_ce` is high from the first group until the next start.
// `ora_ce_bot[s]` is for the ORAs that watch slice s of the bottom tile,
// whose cascade inputs are unconnected: in the cascade test slice 0 reads its
// cascade inputs from group 3 on, so ora_ce_bot[0] drops there and stays low.
//
// Interface: `rst` (synchronous) puts the TPG in its idle state, as loading
// the configuration does; `start` (one cycle) begins a sequence of mode `mode`;
// `ctrl_low` makes the control outputs active low, matching a configuration
// whose control pins are inverted. All outputs are decoded from registers, so
// a new vector appears one clock after each rising edge. `done` rises after
// 1,024 cycles of `running`.
module tpg
  import dsp_bist_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  test_mode_e     mode,
  input  logic           ctrl_low,
  output logic [A_W-1:0] a,
  output logic [B_W-1:0] b,
  output logic [D_W-1:0] c,
  output opmode_t        opm0,
  output opmode_t        opm1,
  output dsp_ctrl_t      ctrl,
  output logic           ora_ce,
  output logic [1:0]     ora_ce_bot,
  output logic           running,
  output logic           done
);
  // ---------------- 10-bit counter ----------------
  logic [9:0] cnt;
  logic       grp_end, phase;
  logic [1:0] group;

  always_ff @(posedge clk) begin
    if (rst || start) cnt <= '0;
    else if (running) cnt <= cnt + 10'd1;
  end
  assign grp_end = running && (cnt[7:0] == 8'(GRP_LEN - 1));
  assign phase   = cnt[0];

  opmode_fsm u_fsm (
    .clk, .rst, .start, .grp_end, .mode, .phase,
    .opm0, .opm1, .group, .running, .done
  );

  // ---------------- adder test shift register ----------------
  logic [D_W-1:0] va, vb;
  logic           vc;

  adder_tpg #(.N(D_W)) u_add (
    .clk, .init(start), .adv(running && phase), .va, .vb, .vc
  );
  assign c = phase ? vb : va;

  // ---------------- weighted pseudo-random controls ----------------
  dsp_ctrl_t rnd;
  ctrl_lfsr u_lfsr (.clk, .init(start), .en(running), .ctrl(rnd));

  // ---------------- multiplier patterns ----------------
  function automatic logic [17:0] rep(logic [4:0] v, int unsigned k);
    logic [17:0] r;
    for (int i = 0; i < 18; i++) r[i] = v[i % k];
    return r;
  endfunction

  always_comb begin
    if (group[0] == 1'b0) begin  // groups 1 and 3: 5x3
      a = rep(cnt[7:3], 5);
      b = rep({2'b00, cnt[2:0]}, 3);
    end else begin               // groups 2 and 4: 3x5
      a = rep({2'b00, cnt[2:0]}, 3);
      b = rep(cnt[7:3], 5);
    end
  end

  // ---------------- control pins ----------------
  dsp_ctrl_t lc;  // logical sense
  always_comb begin
    lc = CTRL_IDLE;
    if (running && mode != TM_CASC && group[1]) lc = rnd;
    if (running && mode == TM_ADD && phase) begin
      if (group[0] == 1'b0) lc.carryin  = vc;
      else                  lc.subtract = vc;
    end
    ctrl = ctrl_low ? ~lc : lc;
  end

  // ---------------- ORA enables ----------------
  always_comb begin
    ora_ce        = running || done;
    ora_ce_bot[1] = ora_ce;
    ora_ce_bot[0] = ora_ce && !(mode == TM_CASC && (done || (running && group[1])));
  end

  initial assert (SEQ_LEN == 4 * GRP_LEN && SEQ_LEN == 2 ** $bits(cnt))
    else $error("tpg: counter does not match the sequence length");

  // The counter's group field and the state machine advance together.
  always_ff @(posedge clk)
    if (!rst && running) assert (cnt[9:8] == group) else $error("tpg: counter and FSM out of step");
endmodule
