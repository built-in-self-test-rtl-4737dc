// Self-checking testbench for tpg. Runs the multiplier, adder and cascade
// sequences and checks, cycle by cycle:
//   * the sequence lasts exactly 1,024 cycles, then `done`;
//   * A and B carry the 5x3 pattern in groups 1 and 3 and the 3x5 pattern in
//     groups 2 and 4, made from the cycle number;
//   * C carries the low / high half of the adder test vector in alternate
//     cycles, predicted by a separate twisted-ring model, and the 97th bit
//     appears on CARRYIN (groups 1, 3) or SUBTRACT (groups 2, 4);
//   * clock enables are all on and resets off in groups 1 and 2, while in
//     groups 3 and 4 of the multiplier and adder tests both vary;
//   * with `ctrl_low` every control bit is the inverse of the run without it;
//   * the bottom ORA enable of slice 0 drops from group 3 of the cascade test.
module tb_tpg;
  import dsp_bist_pkg::*;
  localparam int unsigned N = 48, L = N + 2;
  logic clk = 0, rst, start, ctrl_low;
  test_mode_e mode;
  logic [A_W-1:0] a;
  logic [B_W-1:0] b;
  logic [D_W-1:0] c;
  opmode_t opm0, opm1;
  dsp_ctrl_t ctrl;
  logic ora_ce, running, done;
  logic [1:0] ora_ce_bot;
  int checks = 0, failures = 0;
  dsp_ctrl_t rec [1024];

  tpg dut (.clk, .rst, .start, .mode, .ctrl_low, .a, .b, .c, .opm0, .opm1, .ctrl,
           .ora_ce, .ora_ce_bot, .running, .done);
  always #5 clk = ~clk;

  function automatic logic [17:0] rep(logic [4:0] v, int unsigned k);
    logic [17:0] r;
    for (int i = 0; i < 18; i++) r[i] = v[i % k];
    return r;
  endfunction

  function automatic logic [2*N:0] vec(int unsigned k);  // {vc, vb, va}
    logic [L-1:0] r;
    logic [N-1:0] va, vb;
    int unsigned m;
    m = k % (2 * L);
    for (int i = 0; i < L; i++) r[i] = (m <= L) ? (i < m) : (i >= m - L);
    for (int i = 0; i < N; i++) begin
      va[i] = ~(r[i] ^ r[i+1]) ^ r[N];
      vb[i] = r[i+1];
    end
    return {~r[N+1], vb, va};
  endfunction

  task automatic fail(string s);
    failures++;
    if (failures < 15) $display("FAIL %s", s);
  endtask

  initial begin
    #500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; ctrl_low = 0; mode = TM_MULT; rst = 1;
    @(negedge clk); rst = 0;
    for (int run = 0; run < 4; run++) begin
      int k, rnd_ce_off, rnd_rst_on;
      mode = (run == 0 || run == 3) ? TM_MULT : (run == 1) ? TM_ADD : TM_CASC;
      ctrl_low = (run == 3);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      k = 0; rnd_ce_off = 0; rnd_rst_on = 0;
      while (running && k < 1100) begin
        int g;
        logic [2*N:0] v;
        dsp_ctrl_t lc;
        g = k / 256;
        v = vec(k / 2);
        lc = ctrl_low ? ~ctrl : ctrl;
        checks++;
        if (g % 2 == 0 ? (a !== rep(5'(k[7:3]), 5) || b !== rep(5'(k[2:0]), 3))
                       : (a !== rep(5'(k[2:0]), 3) || b !== rep(5'(k[7:3]), 5)))
          fail($sformatf("A/B pattern at cycle %0d", k));
        checks++;
        if (c !== (k % 2 ? v[2*N-1:N] : v[N-1:0])) fail($sformatf("C at cycle %0d", k));
        if (run == 3) begin
          checks++;
          if (ctrl !== ~rec[k]) fail($sformatf("active-low ctrl at cycle %0d", k));
        end else if (run == 0) rec[k] = ctrl;
        if (g < 2 || mode == TM_CASC) begin
          checks++;
          if ({lc.ce_a, lc.ce_b, lc.ce_c, lc.ce_m, lc.ce_p, lc.ce_ctrl, lc.ce_cinsub,
               lc.ce_carryin} !== 8'hFF ||
              {lc.rst_a, lc.rst_b, lc.rst_c, lc.rst_m, lc.rst_p, lc.rst_ctrl,
               lc.rst_carryin} !== 7'h00)
            fail($sformatf("enables/resets not idle at cycle %0d", k));
        end else begin
          rnd_ce_off += !lc.ce_p;
          rnd_rst_on += lc.rst_p;
        end
        checks++;
        if (mode == TM_ADD && k % 2 == 1) begin
          if ((g % 2 == 0) ? (lc.carryin !== v[2*N] || lc.subtract !== 1'b0)
                           : (lc.subtract !== v[2*N] || lc.carryin !== 1'b0))
            fail($sformatf("adder bit 97 at cycle %0d", k));
        end else if (lc.carryin !== 1'b0 || lc.subtract !== 1'b0)
          fail($sformatf("carry/subtract not low at cycle %0d", k));
        checks++;
        if (!ora_ce || ora_ce_bot[1] !== 1'b1 ||
            ora_ce_bot[0] !== !(mode == TM_CASC && g >= 2))
          fail($sformatf("ORA enables at cycle %0d", k));
        @(negedge clk);
        k++;
      end
      checks++;
      if (k != 1024 || !done) fail($sformatf("run %0d lasted %0d cycles", run, k));
      if (mode != TM_CASC) begin
        checks++;
        if (rnd_ce_off < 20 || rnd_rst_on < 5)
          fail($sformatf("weighted controls did not vary (%0d, %0d)", rnd_ce_off, rnd_rst_on));
      end
      checks++;
      if (!ora_ce || ora_ce_bot[0] !== (mode != TM_CASC))
        fail("ORA enables after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
