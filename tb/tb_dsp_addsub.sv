// Self-checking testbench for dsp_addsub: P = Z +/- (X + Y + CIN) checked
// against a reference computed with the + and - operators, for random
// operands and for operands that make each stage carry across all 48 bits.
module tb_dsp_addsub;
  localparam int unsigned W = 48;
  logic [W-1:0] x, y, z, p;
  logic         cin, subtract;
  int checks = 0, failures = 0;

  dsp_addsub #(.W(W)) dut (.x, .y, .z, .cin, .subtract, .p);

  task automatic check();
    logic [W-1:0] s, exp;
    #1;
    s   = x + y + W'(cin);
    exp = subtract ? z - s : z + s;
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h y=%h z=%h cin=%b sub=%b got %h exp %h",
                                  x, y, z, cin, subtract, p, exp);
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
    x = '1; y = '0; z = '0; cin = 1; subtract = 0; check();
    x = '1; y = '0; z = '0; cin = 1; subtract = 1; check();
    x = '0; y = '0; z = '0; cin = 0; subtract = 1; check();
    x = 5;  y = 7;  z = 3;  cin = 1; subtract = 1; check();   // 3 - 13
    for (int n = 0; n < 20000; n++) begin
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      z = {$urandom, $urandom};
      if (n % 5 == 0) y = ~x;
      cin = $urandom; subtract = $urandom;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
