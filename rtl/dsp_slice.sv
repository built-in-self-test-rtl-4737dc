// One DSP slice: an 18x18 multiplier, X/Y/Z multiplexers, a 48-bit two-stage
// adder/subtractor, a P accumulator register, optional pipeline registers and
// the B and P cascade paths.
//
//   P = Z +/- (X + Y + CARRYIN), sign +/- chosen by SUBTRACT
//   X : 0 | multiplier row 0 | P | A:B (sign-extended to 48 bits)
//   Y : 0 | multiplier row 1 | C
//   Z : 0 | PCIN | P | C | PCIN>>>17 | P>>>17
//
// Structure, widths, multiplexer inputs and the 17-bit shifts follow the
// document's description of the slice. The OPMODE encoding (dsp_bist_pkg)
// is the usual DSP48 one. The configuration input `cfg` stands for the
// configuration-memory bits: the number of A and B registers (0..2), the C,
// M, P and control registers (0/1), whether the 17 control pins are active
// low, and whether B comes from the B port or from BCIN. It is meant to be
// held constant while a test runs.
//
// Timing: every pipeline register is clocked on the rising edge, with its own
// clock enable and synchronous reset from `ctrl`. `gsr` clears every register
// (the state a freshly configured device starts in) and has priority. The P
// feedback into X and Z is always taken from the P register, also when the P
// port bypasses it (cfg.preg = 0); this keeps the feedback free of a
// combinational loop and is this design's choice. BCOUT is B after its
// pipeline registers; PCOUT equals the P port.
module dsp_slice
  import dsp_bist_pkg::*;
(
  input  logic            clk,
  input  logic            gsr,
  input  dsp_cfg_t        cfg,
  input  logic [A_W-1:0]  a,
  input  logic [B_W-1:0]  b,
  input  logic [D_W-1:0]  c,
  input  logic [B_W-1:0]  bcin,
  input  logic [D_W-1:0]  pcin,
  input  opmode_t         opmode,
  input  dsp_ctrl_t       ctrl,
  output logic [D_W-1:0]  p,
  output logic [D_W-1:0]  pcout,
  output logic [B_W-1:0]  bcout
);
  // Control pins in their logical sense after the programmable inversion.
  dsp_ctrl_t ct;
  assign ct = cfg.ctrl_low ? ~ctrl : ctrl;

  // ---------------- input pipeline registers ----------------
  logic [A_W-1:0] a1, a2, a_q;
  logic [B_W-1:0] b_in, b1, b2, b_q;
  logic [D_W-1:0] c1, c_q;

  assign b_in = cfg.b_cascade ? bcin : b;

  always_ff @(posedge clk) begin
    if (gsr || ct.rst_a) begin
      a1 <= '0; a2 <= '0;
    end else if (ct.ce_a) begin
      a1 <= a;  a2 <= a1;
    end
    if (gsr || ct.rst_b) begin
      b1 <= '0; b2 <= '0;
    end else if (ct.ce_b) begin
      b1 <= b_in; b2 <= b1;
    end
    if (gsr || ct.rst_c)   c1 <= '0;
    else if (ct.ce_c)      c1 <= c;
  end

  always_comb begin
    unique case (cfg.areg)
      2'd0:    a_q = a;
      2'd1:    a_q = a1;
      default: a_q = a2;
    endcase
    unique case (cfg.breg)
      2'd0:    b_q = b_in;
      2'd1:    b_q = b1;
      default: b_q = b2;
    endcase
  end
  assign c_q   = cfg.creg ? c1 : c;
  assign bcout = b_q;

  // ---------------- control registers ----------------
  opmode_t opm1, opm_q;
  logic    sub1, sub_q, cin1, cin_q;

  always_ff @(posedge clk) begin
    if (gsr || ct.rst_ctrl) begin
      opm1 <= OPM_ZERO; sub1 <= 1'b0;
    end else begin
      if (ct.ce_ctrl)   opm1 <= opmode;
      if (ct.ce_cinsub) sub1 <= ct.subtract;
    end
    if (gsr || ct.rst_carryin) cin1 <= 1'b0;
    else if (ct.ce_carryin)    cin1 <= ct.carryin;
  end
  assign opm_q = cfg.ctrlreg ? opm1 : opmode;
  assign sub_q = cfg.ctrlreg ? sub1 : ct.subtract;
  assign cin_q = cfg.ctrlreg ? cin1 : ct.carryin;

  // ---------------- multiplier ----------------
  logic [D_W-1:0] m0, m1, m0r, m1r, m0_q, m1_q;

  booth_mult u_mult (.a(a_q), .b(b_q), .row0(m0), .row1(m1));

  always_ff @(posedge clk) begin
    if (gsr || ct.rst_m) begin
      m0r <= '0; m1r <= '0;
    end else if (ct.ce_m) begin
      m0r <= m0; m1r <= m1;
    end
  end
  assign m0_q = cfg.mreg ? m0r : m0;
  assign m1_q = cfg.mreg ? m1r : m1;

  // ---------------- X / Y / Z multiplexers ----------------
  logic [D_W-1:0] preg_q, x, y, z, ab_ext, psum;

  assign ab_ext = {{(D_W-AB_W){a_q[A_W-1]}}, a_q, b_q};

  always_comb begin
    unique case (opm_q.x)
      X_M:     x = m0_q;
      X_P:     x = preg_q;
      X_AB:    x = ab_ext;
      default: x = '0;
    endcase
    unique case (opm_q.y)
      Y_M:     y = m1_q;
      Y_C:     y = c_q;
      default: y = '0;
    endcase
    unique case (opm_q.z)
      Z_PC:    z = pcin;
      Z_P:     z = preg_q;
      Z_C:     z = c_q;
      Z_SPC:   z = D_W'($signed(pcin) >>> SHIFT);
      Z_SP:    z = D_W'($signed(preg_q) >>> SHIFT);
      default: z = '0;
    endcase
  end

  // ---------------- adder / subtractor and P ----------------
  dsp_addsub #(.W(D_W)) u_addsub (
    .x(x), .y(y), .z(z), .cin(cin_q), .subtract(sub_q), .p(psum)
  );

  always_ff @(posedge clk) begin
    if (gsr || ct.rst_p) preg_q <= '0;
    else if (ct.ce_p)    preg_q <= psum;
  end

  assign p     = cfg.preg ? preg_q : psum;
  assign pcout = p;

  initial begin
    assert ($bits(dsp_ctrl_t) == CTRL_W) else $error("dsp_slice: control pin count");
    assert ($bits(opmode_t) == OPMODE_W) else $error("dsp_slice: OPMODE width");
  end
endmodule
