// Self-checking testbench for ctrl_lfsr. A model of the two LFSRs in the
// testbench predicts every output for 40,000 steps; the testbench also
// checks that both LFSRs have maximal period (32767 and 131071 steps, seen
// through the returning seed), that the enables are active near 3/4 and the
// resets near 1/8 of the time, and that `en` low holds the outputs.
module tb_ctrl_lfsr;
  import dsp_bist_pkg::*;
  localparam logic [14:0] S1 = 15'h5A3C;
  localparam logic [16:0] S2 = 17'h1B2E5;
  logic clk = 0, init, en;
  dsp_ctrl_t ctrl;
  int checks = 0, failures = 0;

  ctrl_lfsr #(.SEED1(S1), .SEED2(S2)) dut (.clk, .init, .en, .ctrl);
  always #5 clk = ~clk;

  logic [14:0] m1;
  logic [16:0] m2;

  function automatic dsp_ctrl_t predict(logic [14:0] x1, logic [16:0] x2);
    logic [16:0] bits;
    dsp_ctrl_t r;
    // bits 16..9: enables a,b,c,m,p,ctrl,cinsub,carryin; 8..2: resets
    for (int k = 0; k < 8; k++) bits[16 - k] = x1[k] | x2[k];
    for (int k = 0; k < 7; k++) bits[8 - k] = x1[k + 8] & x2[k + 8] & x2[k + 1];
    bits[1:0] = 2'b00;
    r = dsp_ctrl_t'(bits);
    return r;
  endfunction

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ce_on = 0, rst_on = 0, p1 = 0, p2 = 0;
    dsp_ctrl_t held;
    init = 1; en = 0;
    @(negedge clk); init = 0; en = 1;
    m1 = S1; m2 = S2;
    for (int n = 0; n < 140000; n++) begin
      if (n < 40000) begin
        checks++;
        if (ctrl !== predict(m1, m2)) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d: %h exp %h", n, ctrl, predict(m1, m2));
        end
        ce_on  += ctrl.ce_a + ctrl.ce_p + ctrl.ce_carryin;
        rst_on += ctrl.rst_a + ctrl.rst_p + ctrl.rst_carryin;
      end
      @(negedge clk);
      m1 = {m1[13:0], m1[14] ^ m1[13]};
      m2 = {m2[15:0], m2[16] ^ m2[13]};
      if (m1 == S1 && p1 == 0) p1 = n + 1;
      if (m2 == S2 && p2 == 0) p2 = n + 1;
    end
    checks++;
    if (p1 != 32767 || p2 != 131071) begin
      failures++; $display("FAIL periods %0d %0d", p1, p2);
    end
    checks++;
    if (ce_on < 3 * 40000 * 70 / 100 || ce_on > 3 * 40000 * 80 / 100) begin
      failures++; $display("FAIL enable weight %0d / %0d", ce_on, 3 * 40000);
    end
    checks++;
    if (rst_on < 3 * 40000 * 9 / 100 || rst_on > 3 * 40000 * 16 / 100) begin
      failures++; $display("FAIL reset weight %0d / %0d", rst_on, 3 * 40000);
    end
    en = 0; held = ctrl;
    repeat (10) @(negedge clk);
    checks++;
    if (ctrl !== held) begin failures++; $display("FAIL en low did not hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
