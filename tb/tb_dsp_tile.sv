// Self-checking testbench for dsp_tile. With no pipeline registers it checks
// the paths inside a tile against arithmetic in the testbench: the shared C
// port, the P cascade from s0 to s1 (plain and shifted by 17), the B cascade
// from s0 to s1, the cascade inputs of s0 from the tile below and the
// cascade outputs to the tile above. With the P registers of configuration
// 4 it checks that s1 sees s0's registered P one cycle later.
module tb_dsp_tile;
  import dsp_bist_pkg::*;
  logic clk = 0, gsr;
  dsp_cfg_t cfg0, cfg1;
  logic [A_W-1:0] a0, a1;
  logic [B_W-1:0] b0, b1, bcin, bcout;
  logic [D_W-1:0] c, pcin, p0, p1, pcout;
  opmode_t opm0, opm1;
  dsp_ctrl_t ctrl0, ctrl1;
  int checks = 0, failures = 0;

  dsp_tile dut (.clk, .gsr, .cfg0, .cfg1, .a0, .b0, .a1, .b1, .c, .opm0, .opm1,
                .ctrl0, .ctrl1, .bcin, .pcin, .p0, .p1, .bcout, .pcout);
  always #5 clk = ~clk;

  function automatic opmode_t om(xsel_e x, ysel_e y, zsel_e z);
    return '{z: z, y: y, x: x};
  endfunction
  function automatic logic [D_W-1:0] abx(logic [A_W-1:0] aa, logic [B_W-1:0] bb);
    return {{(D_W-AB_W){aa[A_W-1]}}, aa, bb};
  endfunction
  function automatic logic [D_W-1:0] sh(logic [D_W-1:0] v);
    return D_W'($signed(v) >>> 17);
  endfunction

  task automatic chk(logic [D_W-1:0] got, logic [D_W-1:0] exp, string s);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h exp %h", s, got, exp);
    end
  endtask

  initial begin
    #500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gsr = 1; cfg0 = '0; cfg1 = '0; ctrl0 = CTRL_IDLE; ctrl1 = CTRL_IDLE;
    a0 = 0; a1 = 0; b0 = 0; b1 = 0; c = 0; bcin = 0; pcin = 0;
    opm0 = OPM_ZERO; opm1 = OPM_ZERO;
    @(negedge clk); gsr = 0;
    for (int n = 0; n < 500; n++) begin
      a0 = 18'($urandom); a1 = 18'($urandom); b0 = 18'($urandom); b1 = 18'($urandom);
      c = {$urandom, $urandom}; pcin = {$urandom, $urandom}; bcin = 18'($urandom);
      cfg0 = '0; cfg1 = '0;
      // s1 = A:B + PC (PC = s0 = C), then A:B + PC>>>17
      opm0 = om(X_ZERO, Y_ZERO, Z_C); opm1 = om(X_AB, Y_ZERO, Z_PC);
      #1 chk(p0, c, "s0 = C"); chk(p1, abx(a1, b1) + c, "s1 = A:B + PC");
      chk(pcout, p1, "tile PCOUT");
      opm1 = om(X_AB, Y_ZERO, Z_SPC);
      #1 chk(p1, abx(a1, b1) + sh(c), "s1 = A:B + PC>>>17");
      // B cascade s0 -> s1
      cfg1.b_cascade = 1; opm1 = om(X_AB, Y_ZERO, Z_ZERO);
      #1 chk(p1, abx(a1, b0), "s1 B from s0");
      checks++; if (bcout !== b0) begin failures++; $display("FAIL tile BCOUT"); end
      // s0 from the tile below, s1 = C
      cfg0.b_cascade = 1; cfg1 = '0;
      opm0 = om(X_AB, Y_ZERO, Z_PC); opm1 = om(X_ZERO, Y_C, Z_ZERO);
      #1 chk(p0, abx(a0, bcin) + pcin, "s0 = A:BCIN + PCIN");
      chk(p1, c, "s1 = C");
      opm0 = om(X_AB, Y_ZERO, Z_SPC);
      #1 chk(p0, abx(a0, bcin) + sh(pcin), "s0 = A:BCIN + PCIN>>>17");
      @(negedge clk);
    end
    // configuration 4: P registers; s1 adds s0's registered P
    cfg0 = bist_config(4, 0); cfg1 = bist_config(4, 1);
    opm0 = om(X_ZERO, Y_ZERO, Z_C); opm1 = om(X_ZERO, Y_ZERO, Z_PC);
    c = 48'h1; @(negedge clk);
    c = 48'h2; @(negedge clk);
    chk(p0, 48'h2, "s0 registered"); chk(p1, 48'h1, "s1 one cycle behind");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
