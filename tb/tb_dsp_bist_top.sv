// End-to-end testbench for dsp_bist_top at its default size (16 tiles,
// 32 slices). It runs the complete test of the slices: the five
// configurations one after another, seven BIST sequences in all
// (configurations 2 and 3 run the multiplier and then the adder sequence).
// For every sequence it checks that `done` comes 1,025 cycles after `start`
// and that a fault-free array reports pass, with every ORA flag set.
//
// It then injects single stuck-at faults into chosen slices (with force) and
// checks that the sequence that should catch each one reports fail, and that
// the failing ORA sets are exactly the two that watch the faulty slice:
//   * multiplier row bit in tile 5, slice 0, multiplier sequence;
//   * adder stage-1 sum bit in bottom tile 0, slice 1, adder sequence;
//   * P cascade input bit of tile 7, slice 1, cascade sequence (config 4);
//     it is not seen by the multiplier sequence, and its effect also reaches
//     the slice above through the cascade, so only the two sets that watch
//     the faulty slice are checked;
//   * B cascade input bit of tile 9, slice 0, cascade sequence (config 5).
//
// It also counts how often each mechanism of the test happened and counts a
// failure for any that never did: each test mode, weighted random resets and
// disabled clock enables, the 17-bit shifted feedback and cascade paths, the
// B cascade, the bottom ORA enable being dropped while the bottom slice
// really differs from its neighbour, and the OR chain reporting a fault.
module tb_dsp_bist_top;
  import dsp_bist_pkg::*;
  localparam int unsigned NC = 1;   // the top's defaults
  localparam int unsigned NT = 16;
  logic clk = 0, rst, start, ctrl_low, done, fail;
  test_mode_e mode;
  dsp_cfg_t cfg0, cfg1;
  logic [D_W-1:0] ora_pass [NC][NT][2];
  int checks = 0, failures = 0;

  dsp_bist_top dut (.clk, .rst, .start, .mode, .ctrl_low, .cfg0, .cfg1, .done, .fail, .ora_pass);
  always #5 clk = ~clk;

  // mechanism counters
  int n_mode [3];
  int n_rand_rst = 0, n_ce_off = 0, n_shiftp = 0, n_shiftpc = 0, n_bcasc = 0;
  int n_bot_masked = 0, n_detect = 0;

  always @(posedge clk) begin
    dsp_ctrl_t lc;
    lc = ctrl_low ? ~dut.t_ctrl[0] : dut.t_ctrl[0];
    if (dut.t_run[0]) begin
      n_rand_rst += int'(lc.rst_a || lc.rst_b || lc.rst_c || lc.rst_m || lc.rst_p);
      n_ce_off   += int'(!(lc.ce_a && lc.ce_b && lc.ce_c && lc.ce_m && lc.ce_p));
      n_shiftp   += (dut.t_opm0[0].z == Z_SP);
      n_shiftpc  += (dut.t_opm0[0].z == Z_SPC) || (dut.t_opm1[0].z == Z_SPC);
      n_bcasc    += (cfg0.b_cascade || cfg1.b_cascade) &&
                    (dut.t_opm0[0].x == X_AB || dut.t_opm1[0].x == X_AB);
    end
    if (dut.t_ce[1] && !dut.t_bot[1][0] && dut.p[0][0][0] != dut.p[0][1][0]) n_bot_masked++;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one BIST sequence of configuration n; return fail.
  task automatic run_seq(int unsigned n, test_mode_e m, output logic f);
    int cyc;
    cfg0 = bist_config(n, 0); cfg1 = bist_config(n, 1);
    ctrl_low = cfg0.ctrl_low; mode = m;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 3000) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 1025) begin
      failures++; $display("FAIL config %0d mode %s: done after %0d cycles", n, m.name(), cyc);
    end
    repeat (8) @(negedge clk);
    n_mode[m]++;
    f = fail;
  endtask

  // Check that the ORA sets of slice s of tiles t and t+1 failed and, when
  // `exact`, that no other set did.
  task automatic check_diag(int t, int s, string what, bit exact = 1);
    for (int i = 0; i < NT; i++)
      for (int j = 0; j < 2; j++) begin
        logic should;
        should = (j == s) && (i == t || i == (t + 1) % NT);
        if (!exact && !should) continue;
        checks++;
        if ((ora_pass[0][i][j] != '1) !== should) begin
          failures++;
          $display("FAIL %s: ORA set (%0d,%0d) flags %h", what, i, j, ora_pass[0][i][j]);
        end
      end
  endtask

  initial begin
    logic f;
    int test_no;
    start = 0; ctrl_low = 0; mode = TM_MULT; cfg0 = '0; cfg1 = '0; rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;

    // ---- fault-free: five configurations, seven sequences ----
    test_no = 0;
    for (int unsigned n = 1; n <= N_CONFIGS; n++)
      for (int unsigned k = 0; k < config_runs(n); k++) begin
        test_no++;
        run_seq(n, config_mode(n, k), f);
        checks++;
        if (f !== 1'b0) begin
          failures++; $display("FAIL test #%0d (config %0d) reports fail on a good array", test_no, n);
        end
        for (int i = 0; i < NT; i++)
          for (int j = 0; j < 2; j++) begin
            checks++;
            if (ora_pass[0][i][j] !== '1) begin
              failures++; $display("FAIL test #%0d: ORA set (%0d,%0d) = %h", test_no, i, j, ora_pass[0][i][j]);
            end
          end
        $display("test #%0d config %0d %s: %s", test_no, n, config_mode(n, k).name(),
                 f ? "FAIL" : "pass");
      end
    checks++;
    if (test_no != 7) begin failures++; $display("FAIL %0d sequences instead of 7", test_no); end

    // ---- injected faults ----
    force dut.g_col[0].g_tile[5].u_tile.u_s0.m0[21] = 1'b1;
    run_seq(2, TM_MULT, f);
    release dut.g_col[0].g_tile[5].u_tile.u_s0.m0[21];
    checks++; if (f !== 1'b1) begin failures++; $display("FAIL multiplier fault missed"); end
    else n_detect++;
    check_diag(5, 0, "multiplier fault");

    force dut.g_col[0].g_tile[0].u_tile.u_s1.u_addsub.s1[30] = 1'b0;
    run_seq(2, TM_ADD, f);
    release dut.g_col[0].g_tile[0].u_tile.u_s1.u_addsub.s1[30];
    checks++; if (f !== 1'b1) begin failures++; $display("FAIL adder fault missed"); end
    else n_detect++;
    check_diag(0, 1, "adder fault");

    force dut.g_col[0].g_tile[7].u_tile.pc01[33] = 1'b1;
    run_seq(1, TM_MULT, f);
    checks++; if (f !== 1'b0) begin failures++; $display("FAIL cascade fault seen by the multiplier test"); end
    run_seq(4, TM_CASC, f);
    release dut.g_col[0].g_tile[7].u_tile.pc01[33];
    checks++; if (f !== 1'b1) begin failures++; $display("FAIL P cascade fault missed"); end
    else n_detect++;
    // The wrong P of tile 7's slice 1 also reaches slice 0 of tile 8 through
    // the cascade in the first cycle of group 3, so more sets may fail.
    check_diag(7, 1, "P cascade fault", 0);

    force dut.g_col[0].g_tile[9].bc_in[4] = 1'b1;
    run_seq(5, TM_CASC, f);
    release dut.g_col[0].g_tile[9].bc_in[4];
    checks++; if (f !== 1'b1) begin failures++; $display("FAIL B cascade fault missed"); end
    else n_detect++;
    check_diag(9, 0, "B cascade fault");

    // ---- mechanisms ----
    $display("sequences: multiply %0d, adder %0d, cascade %0d", n_mode[TM_MULT], n_mode[TM_ADD], n_mode[TM_CASC]);
    $display("random resets %0d, enables off %0d, P>>17 %0d, PC>>17 %0d, B cascade %0d",
             n_rand_rst, n_ce_off, n_shiftp, n_shiftpc, n_bcasc);
    $display("bottom mismatches masked %0d, faults detected %0d", n_bot_masked, n_detect);
    for (int m = 0; m < 3; m++) begin
      checks++; if (n_mode[m] == 0) begin failures++; $display("FAIL test mode %0d never ran", m); end
    end
    checks++; if (n_rand_rst == 0) begin failures++; $display("FAIL no random reset"); end
    checks++; if (n_ce_off == 0) begin failures++; $display("FAIL no enable off"); end
    checks++; if (n_shiftp == 0) begin failures++; $display("FAIL P>>17 never used"); end
    checks++; if (n_shiftpc == 0) begin failures++; $display("FAIL PC>>17 never used"); end
    checks++; if (n_bcasc == 0) begin failures++; $display("FAIL B cascade never used"); end
    checks++; if (n_bot_masked == 0) begin failures++; $display("FAIL bottom ORA masking never needed"); end
    checks++; if (n_detect != 4) begin failures++; $display("FAIL only %0d faults detected", n_detect); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
