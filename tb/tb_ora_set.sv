// Self-checking testbench for ora_set (W = 48). Drives equal words, then
// single-bit and random mismatches, with and without the enable, and checks
// the flag word against a reference and the chain output against
// carry_in OR (any flag low).
module tb_ora_set;
  localparam int unsigned W = 48;
  logic clk = 0, init, ce, carry_in, carry_out;
  logic [W-1:0] dut_j, dut_k, pass, ref_pass;
  int checks = 0, failures = 0;

  ora_set #(.W(W)) dut (.clk, .init, .ce, .dut_j, .dut_k, .carry_in, .pass, .carry_out);
  always #5 clk = ~clk;

  initial begin
    #500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    #1;
    checks++;
    if (pass !== ref_pass || carry_out !== (carry_in | ~&ref_pass)) begin
      failures++;
      if (failures < 10) $display("FAIL pass=%h exp %h carry_out=%b", pass, ref_pass, carry_out);
    end
    if (init) ref_pass = '1;
    else if (ce) ref_pass &= ~(dut_j ^ dut_k);
    @(negedge clk);
  endtask

  initial begin
    init = 1; ce = 1; carry_in = 0; dut_j = 0; dut_k = 0;
    @(negedge clk); init = 0; ref_pass = '1;
    for (int i = 0; i < W; i++) begin
      // bit i differs; first with ce low (must be ignored), then with ce high
      dut_j = {$urandom, $urandom}; dut_k = dut_j ^ (W'(1) << i);
      ce = 0; carry_in = 0; step();
      ce = 1; carry_in = $urandom; step();
      dut_k = dut_j; step();
      checks++;
      if (pass !== ~(W'(1) << i)) begin failures++; $display("FAIL bit %0d flag", i); end
      init = 1; step(); init = 0;
    end
    for (int n = 0; n < 3000; n++) begin
      dut_j = {$urandom, $urandom};
      dut_k = ($urandom % 32 == 0) ? {$urandom, $urandom} : dut_j;
      ce = $urandom; carry_in = ($urandom % 8 == 0); init = ($urandom % 100 == 0);
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
