// Self-checking testbench for opmode_fsm. For each of the three test modes it
// runs a full sequence, generating `grp_end` and `phase` from a counter in
// the testbench, and checks in every cycle that both OPMODEs equal the entry
// of the table of BIST sequences for the current group and phase, that the
// machine runs for exactly 1,024 cycles, then reports done with OPMODE 0,
// and that a new `start` restarts it.
module tb_opmode_fsm;
  import dsp_bist_pkg::*;
  logic clk = 0, rst, start, grp_end, phase;
  test_mode_e mode;
  opmode_t opm0, opm1;
  logic [1:0] group;
  logic running, done;
  int checks = 0, failures = 0;

  opmode_fsm dut (.clk, .rst, .start, .grp_end, .mode, .phase, .opm0, .opm1, .group,
                  .running, .done);
  always #5 clk = ~clk;

  // {x, y, z} as 2+2+3 bits, written out from the table of sequences
  function automatic logic [6:0] tbl(test_mode_e m, int g, int ph, int s);
    // X: 0=0 1=M 2=P 3=AB   Y: 0=0 1=M 3=C   Z: 0=0 1=PC 2=P 3=C 5=PC>>17 6=P>>17
    case (m)
      TM_MULT: case (g)
        0, 1: return {3'd0, 2'd1, 2'd1};
        2:    return {3'd3, 2'd1, 2'd1};
        default: return {3'd3, 2'd0, 2'd3};
      endcase
      TM_ADD: case ({g[1:0], ph[0]})
        3'b000: return {3'd3, 2'd0, 2'd0};
        3'b001: return {3'd0, 2'd3, 2'd2};
        3'b010: return {3'd0, 2'd3, 2'd0};
        3'b011: return {3'd3, 2'd0, 2'd2};
        3'b100: return {3'd3, 2'd0, 2'd0};
        3'b101: return {3'd2, 2'd3, 2'd0};
        3'b110: return {3'd0, 2'd3, 2'd0};
        default: return {3'd6, 2'd3, 2'd0};
      endcase
      default: begin
        if ((g < 2) == (s == 1)) return {(g % 2 == 0) ? 3'd1 : 3'd5, 2'd0, 2'd3};
        else return {3'd3, 2'd0, 2'd0};
      end
    endcase
  endfunction

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; grp_end = 0; phase = 0; mode = TM_MULT; rst = 1;
    @(negedge clk); #1;
    checks++;
    if (running || done || opm0 !== OPM_ZERO) begin failures++; $display("FAIL reset state"); end
    rst = 0;
    for (int mi = 0; mi < 3; mi++) begin
      int cnt;
      mode = test_mode_e'(mi);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cnt = 0;
      while (running && cnt < 2000) begin
        phase = cnt[0];
        grp_end = (cnt % 256 == 255);
        #1;
        checks++;
        if (opm0 !== opmode_t'(tbl(mode, cnt / 256, cnt % 2, 0)) ||
            opm1 !== opmode_t'(tbl(mode, cnt / 256, cnt % 2, 1)) || group != 2'(cnt / 256)) begin
          failures++;
          if (failures < 10) $display("FAIL mode %0d cycle %0d: %b %b", mi, cnt, opm0, opm1);
        end
        @(negedge clk);
        cnt++;
      end
      grp_end = 0;
      checks++;
      if (cnt != 1024 || !done || opm0 !== OPM_ZERO || opm1 !== OPM_ZERO) begin
        failures++; $display("FAIL mode %0d ran %0d cycles, done=%b", mi, cnt, done);
      end
      repeat (3) @(negedge clk);
      checks++;
      if (!done || running) begin failures++; $display("FAIL done not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
