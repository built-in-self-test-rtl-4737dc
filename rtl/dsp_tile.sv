// A DSP tile: two DSP slices, s0 at the bottom and s1 above it.
//
// Both slices share the tile's C port. Inside the tile the P cascade and the
// B cascade run from s0 to s1 (PCOUT of s0 is PCIN of s1, BCOUT of s0 is BCIN
// of s1); s0 takes its cascade inputs from the tile below and s1's cascade
// outputs leave the tile to the tile above. A, B, OPMODE and the control
// pins are separate per slice, so that a test can drive the two slices
// independently. Sharing C and cascading within a column follow the
// document. Timing is that of dsp_slice.
module dsp_tile
  import dsp_bist_pkg::*;
(
  input  logic           clk,
  input  logic           gsr,
  input  dsp_cfg_t       cfg0,
  input  dsp_cfg_t       cfg1,
  input  logic [A_W-1:0] a0,
  input  logic [B_W-1:0] b0,
  input  logic [A_W-1:0] a1,
  input  logic [B_W-1:0] b1,
  input  logic [D_W-1:0] c,
  input  opmode_t        opm0,
  input  opmode_t        opm1,
  input  dsp_ctrl_t      ctrl0,
  input  dsp_ctrl_t      ctrl1,
  input  logic [B_W-1:0] bcin,    // from the tile below
  input  logic [D_W-1:0] pcin,    // from the tile below
  output logic [D_W-1:0] p0,
  output logic [D_W-1:0] p1,
  output logic [B_W-1:0] bcout,   // to the tile above
  output logic [D_W-1:0] pcout    // to the tile above
);
  logic [B_W-1:0] bc01;
  logic [D_W-1:0] pc01;

  dsp_slice u_s0 (
    .clk, .gsr, .cfg(cfg0), .a(a0), .b(b0), .c, .bcin, .pcin,
    .opmode(opm0), .ctrl(ctrl0), .p(p0), .pcout(pc01), .bcout(bc01)
  );

  dsp_slice u_s1 (
    .clk, .gsr, .cfg(cfg1), .a(a1), .b(b1), .c, .bcin(bc01), .pcin(pc01),
    .opmode(opm1), .ctrl(ctrl1), .p(p1), .pcout, .bcout
  );
endmodule
