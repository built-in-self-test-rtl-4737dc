// Two-column run of the DSP BIST: 2 columns of 16 tiles (64 slices, the
// size of an LX60-class device). Runs the seven sequences on a fault-free
// array and checks each passes with every ORA flag set, then injects a
// stuck-at fault into slice 1 of tile 4 in the second column and checks
// that the multiplier sequence of configuration 3 reports it, through the
// OR chain that now spans both columns, in exactly the two ORA sets that
// watch that slice.
module tb_dsp_bist_two_col;
  import dsp_bist_pkg::*;
  localparam int unsigned NC = 2, NT = 16;
  logic clk = 0, rst, start, ctrl_low, done, fail;
  test_mode_e mode;
  dsp_cfg_t cfg0, cfg1;
  logic [D_W-1:0] ora_pass [NC][NT][2];
  int checks = 0, failures = 0;

  dsp_bist_top #(.N_COLS(NC), .N_TILES(NT)) dut (
    .clk, .rst, .start, .mode, .ctrl_low, .cfg0, .cfg1, .done, .fail, .ora_pass);
  always #5 clk = ~clk;

  initial begin
    #10_000_000;
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
    checks++;
    if (cyc != 1025) begin failures++; $display("FAIL done after %0d cycles", cyc); end
    repeat (8) @(negedge clk);
    f = fail;
  endtask

  initial begin
    logic f;
    start = 0; ctrl_low = 0; mode = TM_MULT; cfg0 = '0; cfg1 = '0; rst = 1;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int unsigned n = 1; n <= N_CONFIGS; n++)
      for (int unsigned k = 0; k < config_runs(n); k++) begin
        run_seq(n, config_mode(n, k), f);
        checks++;
        if (f !== 1'b0) begin failures++; $display("FAIL config %0d run %0d fails on a good array", n, k); end
        foreach (ora_pass[c, t, s]) begin
          checks++;
          if (ora_pass[c][t][s] !== '1) begin
            failures++; $display("FAIL config %0d: ORA set (%0d,%0d,%0d) = %h", n, c, t, s, ora_pass[c][t][s]);
          end
        end
      end

    force dut.g_col[1].g_tile[4].u_tile.u_s1.u_addsub.s1[7] = 1'b1;
    run_seq(3, TM_MULT, f);
    release dut.g_col[1].g_tile[4].u_tile.u_s1.u_addsub.s1[7];
    checks++;
    if (f !== 1'b1) begin failures++; $display("FAIL fault in column 1 missed"); end
    foreach (ora_pass[c, t, s]) begin
      logic should;
      should = (c == 1) && (s == 1) && (t == 4 || t == 5);
      checks++;
      if ((ora_pass[c][t][s] != '1) !== should) begin
        failures++; $display("FAIL diagnosis: ORA set (%0d,%0d,%0d) = %h", c, t, s, ora_pass[c][t][s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
