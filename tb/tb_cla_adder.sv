// Self-checking testbench for cla_adder (W = 48): compares sum and carry out
// with the built-in + operator over corner cases and random operands,
// including long carry-propagate chains.
module tb_cla_adder;
  localparam int unsigned W = 48;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  cla_adder #(.W(W)) dut (.a, .b, .cin, .sum, .cout);

  task automatic check();
    logic [W:0] exp;
    #1;
    exp = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h cin=%b got %b_%h exp %h", a, b, cin, cout, sum, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corners: all-propagate chains, single generates
    a = '1; b = '0; cin = 1'b1; check();
    a = '0; b = '1; cin = 1'b1; check();
    a = '1; b = '1; cin = 1'b0; check();
    for (int i = 0; i < W; i++) begin
      a = '1 >> (W - 1 - i); b = 1; cin = 0; check();
      a = {W{1'b1}} ^ (W'(1) << i); b = W'(1) << i; cin = 1; check();
    end
    for (int n = 0; n < 20000; n++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (n % 4 == 0) b = ~a;          // propagate everywhere
      cin = $urandom;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
