// Self-checking testbench for dsp_slice. Expected values are computed in the
// testbench with plain arithmetic. It checks:
//   * the combinational datapath (no pipeline registers): A*B, A:B + C,
//     C - (A:B + CIN), PCIN and PCIN>>>17 through Z, B from BCIN;
//   * the P feedback: accumulation P <= P + C and P>>>17 through Z;
//   * the latency of A*B for 1 and for 2 A/B registers (3 and 4 cycles with
//     M and P registers), and one-cycle OPMODE register delay;
//   * clock enable and reset of P, and active-low control pins.
module tb_dsp_slice;
  import dsp_bist_pkg::*;

  logic            clk = 0;
  logic            gsr;
  dsp_cfg_t        cfg;
  logic [A_W-1:0]  a;
  logic [B_W-1:0]  b, bcin, bcout;
  logic [D_W-1:0]  c, pcin, p, pcout;
  opmode_t         opmode;
  dsp_ctrl_t       ctrl;
  int checks = 0, failures = 0;

  dsp_slice dut (.clk, .gsr, .cfg, .a, .b, .c, .bcin, .pcin, .opmode, .ctrl,
                 .p, .pcout, .bcout);

  always #5 clk = ~clk;

  function automatic opmode_t om(xsel_e x, ysel_e y, zsel_e z);
    return '{z: z, y: y, x: x};
  endfunction

  function automatic logic [D_W-1:0] prod(logic [A_W-1:0] aa, logic [B_W-1:0] bb);
    longint r;
    r = longint'($signed(aa)) * longint'($signed(bb));
    return r[D_W-1:0];
  endfunction

  function automatic logic [D_W-1:0] abx(logic [A_W-1:0] aa, logic [B_W-1:0] bb);
    return {{(D_W-AB_W){aa[A_W-1]}}, aa, bb};
  endfunction

  task automatic expect_p(logic [D_W-1:0] exp, string what);
    checks++;
    if (p !== exp || pcout !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: p=%h exp %h", what, p, exp);
    end
  endtask

  task automatic do_gsr();
    @(negedge clk); gsr = 1; @(negedge clk); gsr = 0;
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [D_W-1:0] acc, v;
    int lat;
    gsr = 0; cfg = '0; a = 0; b = 0; c = 0; bcin = 0; pcin = 0;
    opmode = OPM_ZERO; ctrl = CTRL_IDLE;
    do_gsr();

    // ---- combinational datapath ----
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      a = 18'($urandom); b = 18'($urandom); c = {$urandom, $urandom};
      pcin = {$urandom, $urandom}; bcin = 18'($urandom);
      ctrl = CTRL_IDLE;
      opmode = om(X_M, Y_M, Z_ZERO); #1 expect_p(prod(a, b), "A*B");
      opmode = om(X_M, Y_M, Z_C);    #1 expect_p(prod(a, b) + c, "A*B+C");
      opmode = om(X_AB, Y_ZERO, Z_C); ctrl.carryin = 1;
      #1 expect_p(c + abx(a, b) + 1, "A:B+C+CIN");
      ctrl.subtract = 1;
      #1 expect_p(c - (abx(a, b) + 1), "C-(A:B+CIN)");
      ctrl = CTRL_IDLE;
      opmode = om(X_ZERO, Y_C, Z_PC);  #1 expect_p(c + pcin, "C+PCIN");
      opmode = om(X_ZERO, Y_ZERO, Z_SPC);
      #1 expect_p(D_W'($signed(pcin) >>> 17), "PCIN>>>17");
      cfg.b_cascade = 1;
      opmode = om(X_AB, Y_ZERO, Z_ZERO); #1 expect_p(abx(a, bcin), "A:BCIN");
      checks++;
      if (bcout !== bcin) begin failures++; $display("FAIL bcout"); end
      cfg.b_cascade = 0;
    end

    // ---- P feedback: accumulate C ----
    opmode = OPM_ZERO;
    do_gsr();
    @(negedge clk);
    c = 48'h0000_1234_5679; opmode = om(X_P, Y_C, Z_ZERO); acc = '0;
    for (int n = 0; n < 50; n++) begin
      #1 expect_p(acc + c, "P+C (feedback)");
      @(negedge clk); acc = acc + c;
    end
    // ---- P>>>17 feedback: load a negative P, then shift it ----
    @(negedge clk); c = 48'h8765_4321_0FED; opmode = om(X_ZERO, Y_ZERO, Z_C);
    @(negedge clk); opmode = om(X_ZERO, Y_C, Z_SP); c = 48'd5;
    #1 expect_p(D_W'($signed(48'h8765_4321_0FED) >>> 17) + 48'd5, "C+P>>>17");

    // ---- latency, configuration 2 (all registers 1) ----
    cfg = bist_config(2, 0);
    for (int r = 0; r < 2; r++) begin
      do_gsr();
      @(negedge clk); opmode = om(X_M, Y_M, Z_ZERO); a = 0; b = 0;
      repeat (6) @(negedge clk);
      a = 18'($urandom); b = 18'($urandom) | 18'h1; if (a == 0) a = 3;
      lat = 0;
      do begin @(negedge clk); lat++; end while (p !== prod(a, b) && lat < 10);
      checks++;
      if (lat != ((r == 0) ? 3 : 4)) begin
        failures++; $display("FAIL latency cfg %0d: %0d cycles", r ? 3 : 2, lat);
      end
      cfg = bist_config(3, 0);
      ctrl = ~CTRL_IDLE;   // configuration 3: active-low control pins
    end

    // ---- OPMODE register delay (configuration 3, active low) ----
    @(negedge clk); c = 48'hABCD; opmode = om(X_ZERO, Y_ZERO, Z_C);
    repeat (4) @(negedge clk);
    opmode = om(X_ZERO, Y_C, Z_ZERO);  // same value through Y: P unchanged
    @(negedge clk); expect_p(48'hABCD, "C via Z");
    c = 48'h1111;
    // C reg, OPMODE reg, P reg: new C reaches P 2 cycles after it is applied
    @(negedge clk); expect_p(48'hABCD, "before C/P latency");
    @(negedge clk); expect_p(48'h1111, "after C/P latency");

    // ---- clock enable and reset of P (active low pins) ----
    ctrl = ~CTRL_IDLE; ctrl.ce_p = 1'b1;      // CEP inactive (pin high)
    c = 48'h2222;
    repeat (4) @(negedge clk);
    expect_p(48'h1111, "P held with CEP low");
    ctrl.rst_p = 1'b0;                         // RSTP active (pin low)
    @(negedge clk); expect_p('0, "P reset");
    ctrl = ~CTRL_IDLE;
    repeat (3) @(negedge clk); expect_p(48'h2222, "P after reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
