// Self-checking testbench for booth_mult: the two partial-product rows must
// add up, modulo 2^48, to the sign-extended product A*B. Covers the extreme
// operands, all 512 patterns of the 5x3 and 3x5 multiplier tests, and random
// operands.
module tb_booth_mult;
  logic [17:0] a, b;
  logic [47:0] row0, row1;
  int checks = 0, failures = 0;

  booth_mult dut (.a, .b, .row0, .row1);

  function automatic logic [17:0] rep(logic [4:0] v, int unsigned k);
    logic [17:0] r;
    for (int i = 0; i < 18; i++) r[i] = v[i % k];
    return r;
  endfunction

  task automatic check();
    longint exp;
    logic [47:0] got;
    #1;
    exp = longint'($signed(a)) * longint'($signed(b));
    got = row0 + row1;
    checks++;
    if (got !== exp[47:0]) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d got %h exp %h",
                                  $signed(a), $signed(b), got, exp[47:0]);
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
    a = 18'h20000; b = 18'h20000; check();  // -2^17 * -2^17
    a = 18'h1FFFF; b = 18'h20000; check();
    a = 18'h3FFFF; b = 18'h3FFFF; check();
    a = 0; b = 18'h2AAAA; check();
    for (int k = 0; k < 256; k++) begin
      a = rep(5'(k >> 3), 5); b = rep(5'(k & 7), 3); check();
      a = rep(5'(k & 7), 3);  b = rep(5'(k >> 3), 5); check();
    end
    for (int n = 0; n < 20000; n++) begin
      a = 18'($urandom); b = 18'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
