// gstar_sec4_tb: checks the single-output augmented machine at the default
// size (10 flip-flops) with beta2 and at 4 flip-flops with beta1.
// A random original machine drives t_orig and out_orig; the testbench keeps
// its own state number (state i has code n-i, state 0 code 0) and checks
// that eps moves state i to i-1 (0 stays), that other inputs follow the
// original machine, and that out is beta(i) under eps and out_orig
// otherwise. A third instance takes D inputs from its original logic. It
// also walks the augmented chain 00..01 -> ... -> 00..00.
module gstar_sec4_tb;
  import ce_pkg::*;

  localparam int unsigned NU  = 10;
  localparam int unsigned N   = 2 ** NU;
  localparam int unsigned NUS = 4;
  localparam int unsigned NS  = 2 ** NUS;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic          rst_n = 1'b0;
  logic          eps = 1'b0, out_orig = 1'b0;
  logic [NU-1:0] t_orig = '0, q;
  logic          out;
  gstar_sec4 #(.NU(NU), .BETA(BETA2_NONZERO)) dut (.clk, .rst_n, .eps, .t_orig, .out_orig, .q, .out);

  logic           eps_s = 1'b0, out_orig_s = 1'b0;
  logic [NUS-1:0] t_orig_s = '0, q_s;
  logic           out_s;
  gstar_sec4 #(.NU(NUS), .BETA(BETA1_PARITY)) dut_s (.clk, .rst_n, .eps(eps_s), .t_orig(t_orig_s),
                                                     .out_orig(out_orig_s), .q(q_s), .out(out_s));

  // 4 flip-flops, beta2, original logic producing D inputs
  logic           eps_d = 1'b0, out_orig_d = 1'b0;
  logic [NUS-1:0] d_orig = '0, q_d;
  logic           out_d;
  gstar_sec4 #(.NU(NUS), .BETA(BETA2_NONZERO), .ORIG_FF(ORIG_D)) dut_d (.clk, .rst_n, .eps(eps_d),
                 .t_orig(d_orig), .out_orig(out_orig_d), .q(q_d), .out(out_d));

  function automatic int unsigned code_of(int unsigned s, int unsigned n);
    return (s == 0) ? 0 : n - s;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned s, s_s, s_d, ns, ns_s, ns_d, steps;
    @(negedge clk);
    rst_n = 1'b1;
    s = 0; s_s = 0; s_d = 0;
    for (int k = 0; k < 20000; k++) begin
      eps   = ($urandom % 3) == 0;
      eps_s = ($urandom % 3) == 0;
      ns    = $urandom % N;
      ns_s  = $urandom % NS;
      eps_d = ($urandom % 3) == 0;
      ns_d  = $urandom % NS;
      d_orig     = NUS'(code_of(ns_d, NS));
      out_orig_d = 1'($urandom);
      t_orig     = q ^ NU'(code_of(ns, N));
      t_orig_s   = q_s ^ NUS'(code_of(ns_s, NS));
      out_orig   = 1'($urandom);
      out_orig_s = 1'($urandom);
      #1;
      check(q == NU'(code_of(s, N)), "state code (beta2 instance)");
      check(q_s == NUS'(code_of(s_s, NS)), "state code (beta1 instance)");
      check(out == (eps ? (s > 0) : out_orig), "output (beta2 instance)");
      check(out_s == (eps_s ? 1'(s_s % 2) : out_orig_s), "output (beta1 instance)");
      check(q_d == NUS'(code_of(s_d, NS)), "state code (D-input instance)");
      check(out_d == (eps_d ? (s_d > 0) : out_orig_d), "output (D-input instance)");
      s_d = eps_d ? ((s_d > 0) ? s_d - 1 : 0) : ns_d;
      s   = eps   ? ((s > 0) ? s - 1 : 0)     : ns;
      s_s = eps_s ? ((s_s > 0) ? s_s - 1 : 0) : ns_s;
      @(negedge clk);
    end
    // augmented chain: from state n-1 (code 00..01) eps reaches state 0 in
    // n-1 steps and then stays there
    eps = 1'b0;
    t_orig = q ^ NU'(1);
    @(negedge clk);
    check(q == NU'(1), "moved to code 00..01");
    eps = 1'b1;
    steps = 0;
    while (q != 0 && steps < N + 4) begin
      @(negedge clk);
      steps++;
    end
    check(steps == N - 1, "eps chain length n-1");
    repeat (3) @(negedge clk);
    check(q == '0, "state 0 holds under eps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
