// Fault-coverage run of the DSP BIST on a small array (4 tiles, 8 slices).
//
// Single stuck-at faults (stuck-at-0 and stuck-at-1) are placed one at a
// time on chosen bits inside slice s0 of tile 2: the input pipeline
// registers, the multiplexed A/B/C operands, both multiplier rows and the
// M register, the X/Y/Z buses, both adder stages, carry-in and subtract,
// the P register and the in-tile cascades. For each fault the complete test
// (five configurations, seven sequences) is run. The testbench prints, for
// every sequence, how many faults it detects and the cumulative coverage
// after it, in the same form as a per-sequence coverage chart.
//
// Checks: the fault-free array passes every sequence; every fault reported
// is in the two ORA sets of the faulty slice or in slices it feeds; the
// cumulative coverage never falls; the multiplier sequences catch every
// multiplier-row fault; the adder sequences catch every adder-stage fault;
// and at least 95% of all faults are detected.
module tb_dsp_bist_fault_cov;
  import dsp_bist_pkg::*;
  localparam int unsigned NT = 4;
  logic clk = 0, rst, start, ctrl_low, done, fail;
  test_mode_e mode;
  dsp_cfg_t cfg0, cfg1;
  logic [D_W-1:0] ora_pass [1][NT][2];
  int checks = 0, failures = 0;

  dsp_bist_top #(.N_COLS(1), .N_TILES(NT)) dut (
    .clk, .rst, .start, .mode, .ctrl_low, .cfg0, .cfg1, .done, .fail, .ora_pass);
  always #5 clk = ~clk;

  `define SL dut.g_col[0].g_tile[2].u_tile.u_s0
  `define TL dut.g_col[0].g_tile[2].u_tile

  localparam int unsigned NF = 48;  // 24 sites x 2 polarities

  // Apply (en = 1) or remove (en = 0) fault f.
  task automatic fault(int f, bit en);
    logic v;
    v = f[0];
    if (en) begin
      case (f / 2)
        0:  force `SL.a1[5] = v;
        1:  force `SL.b2[11] = v;
        2:  force `SL.a_q[17] = v;
        3:  force `SL.b_q[0] = v;
        4:  force `SL.c_q[40] = v;
        5:  force `SL.m0[9] = v;
        6:  force `SL.m1[30] = v;
        7:  force `SL.m0r[20] = v;
        8:  force `SL.x[3] = v;
        9:  force `SL.y[26] = v;
        10: force `SL.z[44] = v;
        11: force `SL.u_addsub.s1[0] = v;
        12: force `SL.u_addsub.s1[23] = v;
        13: force `SL.u_addsub.s1_inv[31] = v;
        14: force `SL.psum[12] = v;
        15: force `SL.psum[47] = v;
        16: force `SL.cin_q = v;
        17: force `SL.sub_q = v;
        18: force `SL.preg_q[16] = v;
        19: force `SL.preg_q[35] = v;
        20: force `TL.pc01[17] = v;
        21: force `TL.pc01[2] = v;
        22: force `TL.bc01[9] = v;
        default: force `SL.c1[7] = v;
      endcase
    end else begin
      case (f / 2)
        0:  release `SL.a1[5];
        1:  release `SL.b2[11];
        2:  release `SL.a_q[17];
        3:  release `SL.b_q[0];
        4:  release `SL.c_q[40];
        5:  release `SL.m0[9];
        6:  release `SL.m1[30];
        7:  release `SL.m0r[20];
        8:  release `SL.x[3];
        9:  release `SL.y[26];
        10: release `SL.z[44];
        11: release `SL.u_addsub.s1[0];
        12: release `SL.u_addsub.s1[23];
        13: release `SL.u_addsub.s1_inv[31];
        14: release `SL.psum[12];
        15: release `SL.psum[47];
        16: release `SL.cin_q;
        17: release `SL.sub_q;
        18: release `SL.preg_q[16];
        19: release `SL.preg_q[35];
        20: release `TL.pc01[17];
        21: release `TL.pc01[2];
        22: release `TL.bc01[9];
        default: release `SL.c1[7];
      endcase
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_seq(int unsigned n, test_mode_e m, output logic f);
    int cyc;
    cfg0 = bist_config(n, 0); cfg1 = bist_config(n, 1);
    ctrl_low = cfg0.ctrl_low; mode = m;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 3000) begin @(negedge clk); cyc++; end
    repeat (8) @(negedge clk);
    f = fail;
  endtask

  initial begin
    logic f;
    bit hit [NF][7];
    int cum_prev;
    start = 0; ctrl_low = 0; mode = TM_MULT; cfg0 = '0; cfg1 = '0; rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;

    for (int fi = -1; fi < int'(NF); fi++) begin
      int t;
      if (fi >= 0) fault(fi, 1);
      t = 0;
      for (int unsigned n = 1; n <= N_CONFIGS; n++)
        for (int unsigned k = 0; k < config_runs(n); k++) begin
          run_seq(n, config_mode(n, k), f);
          if (fi < 0) begin
            checks++;
            if (f) begin failures++; $display("FAIL fault-free sequence #%0d reports fail", t + 1); end
          end else begin
            hit[fi][t] = f;
            if (f) begin
              // the sets of tiles 0 and 1 for slice 0 never see tile 2's slice 0
              checks++;
              if (ora_pass[0][0][0] != '1 || ora_pass[0][1][0] != '1) begin
                failures++; $display("FAIL fault %0d seen by unrelated ORA sets", fi);
              end
            end
          end
          t++;
        end
      if (fi >= 0) fault(fi, 0);
    end

    // per-sequence and cumulative coverage
    $display("sequence  detected  individual  cumulative");
    cum_prev = 0;
    for (int k = 0; k < 7; k++) begin
      int d, c;
      d = 0; c = 0;
      for (int i = 0; i < NF; i++) begin
        bit any;
        any = 0;
        for (int j = 0; j <= k; j++) any |= hit[i][j];
        d += hit[i][k];
        c += any;
      end
      $display("   #%0d      %3d       %5.1f%%      %5.1f%%", k + 1, d, 100.0 * d / NF, 100.0 * c / NF);
      checks++;
      if (c < cum_prev) begin failures++; $display("FAIL cumulative coverage fell"); end
      cum_prev = c;
    end
    for (int i = 0; i < NF; i++) begin
      bit any, mult, add;
      any  = hit[i][0] | hit[i][1] | hit[i][2] | hit[i][3] | hit[i][4] | hit[i][5] | hit[i][6];
      mult = hit[i][0] | hit[i][1] | hit[i][3];
      add  = hit[i][2] | hit[i][4];
      if (!any) $display("fault %0d (site %0d, stuck-at-%0d) not detected", i, i / 2, i % 2);
      if (i / 2 inside {[5:7]}) begin
        checks++;
        if (!mult) begin failures++; $display("FAIL multiplier fault %0d missed by the multiplier sequences", i); end
      end
      if (i / 2 inside {[11:15]}) begin
        checks++;
        if (!add) begin failures++; $display("FAIL adder fault %0d missed by the adder sequences", i); end
      end
    end
    $display("cumulative: %0d of %0d faults", cum_prev, NF);
    checks++;
    if (cum_prev * 100 < 95 * NF) begin failures++; $display("FAIL cumulative coverage below 95%%"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
