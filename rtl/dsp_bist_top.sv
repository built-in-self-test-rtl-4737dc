// Built-in self-test of an array of DSP tiles.
//
// The array has N_COLS columns of N_TILES identically configured DSP tiles
// (two slices each), with the B and P cascades running from each tile to the
// one above in the same column. Two identical test pattern generators drive
// alternate rows: the bottom row (tile 0) and every second row above it from
// TPG 1, the others from TPG 0. Both slices of a tile are driven by the same
// TPG, which lets the cascade modes be tested. All slices are tested at
// once, so the test time does not depend on the array size.
//
// Every slice's 48-bit P output is watched by two ORA sets: in each column,
// ORA set (t, s) compares slice s of tile t with slice s of tile t-1, wrapping
// from tile 0 to tile N_TILES-1. This forms two circular comparison chains, one for the s0
// slices and one for the s1 slices, so a fault shows as a mismatch in the two
// sets that watch the faulty slice. The ORA sets that watch the bottom tile
// (sets of tiles 0 and 1) are enabled by TPG 1's bottom enables, which are
// dropped while the bottom tile's unconnected cascade inputs would cause a
// mismatch. The carry chains of all ORA sets are joined into one OR chain;
// `fail` is its end: 1 when any ORA has seen a mismatch.
//
// The two TPGs, the alternating rows, the two circular chains, the bottom
// enables and the OR chain follow the document's BIST architecture. The
// neighbour order of the comparisons and the chain order are this design's.
//
// Interface: `rst` (synchronous) idles both TPGs after power-up;
// `cfg0` / `cfg1` are the configuration bits of every s0 / s1
// slice (what a partial reconfiguration would write); `start` (one cycle)
// resets the slices and ORAs, as loading a configuration does, and begins a
// BIST sequence of `mode`; `ctrl_low` must match the active level in the
// configuration. `done` rises 1,025 cycles after `start`; a few cycles later,
// once the slices' pipelines have emptied, `fail` and `ora_pass` (the
// individual ORA flags, for readback and diagnosis) are final. They hold
// until the next `start`.
module dsp_bist_top
  import dsp_bist_pkg::*;
#(
  parameter int unsigned N_COLS  = 1,
  parameter int unsigned N_TILES = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  test_mode_e     mode,
  input  logic           ctrl_low,
  input  dsp_cfg_t       cfg0,
  input  dsp_cfg_t       cfg1,
  output logic           done,
  output logic           fail,
  output logic [D_W-1:0] ora_pass [N_COLS][N_TILES][2]
);
  // ---------------- test pattern generators ----------------
  logic [A_W-1:0] t_a    [2];
  logic [B_W-1:0] t_b    [2];
  logic [D_W-1:0] t_c    [2];
  opmode_t        t_opm0 [2];
  opmode_t        t_opm1 [2];
  dsp_ctrl_t      t_ctrl [2];
  logic           t_ce   [2];
  logic [1:0]     t_bot  [2];
  logic           t_run  [2];
  logic           t_done [2];

  for (genvar g = 0; g < 2; g++) begin : g_tpg
    tpg u_tpg (
      .clk, .rst, .start, .mode, .ctrl_low,
      .a(t_a[g]), .b(t_b[g]), .c(t_c[g]), .opm0(t_opm0[g]), .opm1(t_opm1[g]),
      .ctrl(t_ctrl[g]), .ora_ce(t_ce[g]), .ora_ce_bot(t_bot[g]),
      .running(t_run[g]), .done(t_done[g])
    );
  end

  assign done = t_done[0] && t_done[1];

  // ---------------- DSP tiles, ORAs and the OR chain ----------------
  localparam int unsigned NSETS = 2 * N_TILES;  // ORA sets per column

  logic [D_W-1:0] p     [N_COLS][N_TILES][2];
  logic           orc   [N_COLS*NSETS+1];

  assign orc[0] = 1'b0;

  for (genvar k = 0; k < N_COLS; k++) begin : g_col
    for (genvar t = 0; t < N_TILES; t++) begin : g_tile
      localparam int unsigned G = (t + 1) % 2;  // TPG driving this row
      logic [B_W-1:0] bc_in, bc_out;
      logic [D_W-1:0] pc_in, pc_out;

      if (t == 0) begin : g_first
        // The cascade inputs of the bottom tile are not connected.
        assign bc_in = '0;
        assign pc_in = '0;
      end else begin : g_next
        assign bc_in = g_tile[t-1].bc_out;
        assign pc_in = g_tile[t-1].pc_out;
      end

      dsp_tile u_tile (
        .clk, .gsr(start), .cfg0, .cfg1,
        .a0(t_a[G]), .b0(t_b[G]), .a1(t_a[G]), .b1(t_b[G]), .c(t_c[G]),
        .opm0(t_opm0[G]), .opm1(t_opm1[G]), .ctrl0(t_ctrl[G]), .ctrl1(t_ctrl[G]),
        .bcin(bc_in), .pcin(pc_in),
        .p0(p[k][t][0]), .p1(p[k][t][1]),
        .bcout(bc_out), .pcout(pc_out)
      );

      for (genvar s = 0; s < 2; s++) begin : g_ora
        localparam int unsigned PREV = (t + N_TILES - 1) % N_TILES;
        localparam int unsigned IDX  = k * NSETS + 2 * t + s;
        logic ce;
        if (t < 2) begin : g_bot
          assign ce = t_bot[1][s];
        end else begin : g_mid
          assign ce = t_ce[G];
        end
        ora_set #(.W(D_W)) u_ora (
          .clk, .init(start), .ce,
          .dut_j(p[k][t][s]), .dut_k(p[k][PREV][s]),
          .carry_in(orc[IDX]), .pass(ora_pass[k][t][s]), .carry_out(orc[IDX+1])
        );
      end
    end
  end

  assign fail = orc[N_COLS*NSETS];

  // The top tiles' cascade outputs and the TPGs' run flags are not used.
  logic [N_COLS-1:0] unused_casc;
  for (genvar k = 0; k < N_COLS; k++) begin : g_unused
    assign unused_casc[k] = ^{g_col[k].g_tile[N_TILES-1].bc_out,
                              g_col[k].g_tile[N_TILES-1].pc_out};
  end
  logic unused;
  assign unused = ^{unused_casc, t_run[0], t_run[1]};

  initial begin
    assert (N_TILES >= 3) else $error("dsp_bist_top: N_TILES must be at least 3");
    assert (N_COLS >= 1) else $error("dsp_bist_top: N_COLS must be at least 1");
  end
endmodule
