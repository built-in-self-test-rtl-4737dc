// Self-checking testbench for adder_tpg (N = 48). A separate model of a
// twisted ring of N+2 stages (all zeros, then ones filling in from the input
// end, then zeros filling in) predicts every vector. It checks the vectors
// for two full periods, that the period is 2*(N+2) = 100 with 100 distinct
// vectors, that `adv` low holds the state and that `init` restarts it.
module tb_adder_tpg;
  localparam int unsigned N = 48;
  localparam int unsigned L = N + 2;
  logic clk = 0, init, adv;
  logic [N-1:0] va, vb;
  logic vc;
  int checks = 0, failures = 0;

  adder_tpg #(.N(N)) dut (.clk, .init, .adv, .va, .vb, .vc);
  always #5 clk = ~clk;

  // ring state after k steps: r[0..N] is the shift register, r[N+1] the flip-flop
  function automatic logic [L-1:0] ring(int unsigned k);
    logic [L-1:0] r;
    int unsigned m;
    m = k % (2 * L);
    for (int i = 0; i < L; i++) r[i] = (m <= L) ? (i < m) : (i >= m - L);
    return r;
  endfunction

  task automatic check_step(int unsigned k);
    logic [L-1:0] r;
    logic [N-1:0] ea, eb;
    r = ring(k);
    for (int i = 0; i < N; i++) begin
      ea[i] = (r[i] == r[i+1]) ? ~r[N] : r[N];
      eb[i] = r[i+1];
    end
    checks++;
    if (va !== ea || vb !== eb || vc !== ~r[N+1]) begin
      failures++;
      if (failures < 10) $display("FAIL step %0d: va=%h vb=%h vc=%b exp %h %h %b",
                                  k, va, vb, vc, ea, eb, ~r[N+1]);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*N:0] seen [$];
    logic [2*N:0] v0;
    init = 1; adv = 0;
    @(negedge clk); init = 0; adv = 1;
    for (int k = 0; k < 2 * 2 * L; k++) begin
      check_step(k);
      if (k < 2 * L) begin
        logic [2*N:0] v;
        v = {vc, vb, va};
        checks++;
        if (v inside {seen}) begin failures++; $display("FAIL repeated vector at %0d", k); end
        seen.push_back(v);
      end
      if (k == 0) v0 = {vc, vb, va};
      if (k == 2 * L) begin
        checks++;
        if ({vc, vb, va} !== v0) begin failures++; $display("FAIL period is not %0d", 2 * L); end
      end
      @(negedge clk);
    end
    // hold
    adv = 0;
    repeat (5) @(negedge clk);
    check_step(4 * L);
    // restart
    init = 1; @(negedge clk); init = 0;
    check_step(0);
    adv = 1; @(negedge clk); check_step(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
