// Self-checking testbench for ora_cell. A reference flag in the testbench is
// updated with the same rule (cleared on a mismatch while enabled, set by
// init) from random inputs; the flag and the OR-chain output
// (carry_out = carry_in OR not pass) are checked every cycle.
module tb_ora_cell;
  logic clk = 0, init, ce, dut_j, dut_k, carry_in, pass, carry_out;
  logic ref_pass;
  int checks = 0, failures = 0, mism = 0;

  ora_cell dut (.clk, .init, .ce, .dut_j, .dut_k, .carry_in, .pass, .carry_out);
  always #5 clk = ~clk;

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 1; ce = 0; dut_j = 0; dut_k = 0; carry_in = 0;
    @(negedge clk); init = 0; ref_pass = 1;
    for (int n = 0; n < 5000; n++) begin
      // mostly matching inputs, rare mismatches and inits
      dut_j = $urandom; dut_k = ($urandom % 16 == 0) ? ~dut_j : dut_j;
      ce = ($urandom % 4 != 0);
      carry_in = $urandom;
      init = ($urandom % 64 == 0);
      #1;
      checks++;
      if (pass !== ref_pass || carry_out !== (carry_in | ~ref_pass)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: pass=%b exp %b carry_out=%b", n, pass, ref_pass, carry_out);
      end
      if (init) ref_pass = 1;
      else if (ce && dut_j != dut_k) begin ref_pass = 0; mism++; end
      @(negedge clk);
    end
    checks++;
    if (mism < 20) begin failures++; $display("FAIL too few mismatches applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
