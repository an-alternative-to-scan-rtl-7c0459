// verifier_tb: checks one verifier (syndrome compaction) and one with a
// transition counter against the streams an augmented machine produces.
// A model state i under eps gives beta2 = 1 for i cycles, then 0 (syndrome
// i); beta1 = i mod 2 down to 0 (transition count i over n cycles). With RR
// right the alpha-latch must stay clear, with RR wrong it must set on the
// cycle after eps falls and stay set. The beta-latch must set only when an
// enabled output check sees out_bit != RV. A burst without an RR load must
// not be compared.
module verifier_tb;
  import ce_pkg::*;

  localparam int unsigned FW = 10;
  localparam int unsigned N  = 64;

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

  logic rst_n = 1'b0, eps = 1'b0, beta_en = 1'b0, rv_load = 1'b0, rv_in = 1'b0, rr_load = 1'b0;
  logic out_syn = 1'b0, out_tc = 1'b0;
  logic [FW-1:0] rr_in = '0;
  logic [FW-1:0] f_syn, f_tc;
  logic fire_syn, mis_syn, alpha_syn, beta_syn;
  logic fire_tc, mis_tc, alpha_tc, beta_tc;

  verifier #(.FW(FW), .F_KIND(F_SYN)) u_syn (.clk, .rst_n, .eps, .out_bit(out_syn), .beta_en,
    .rv_load, .rv_in, .rr_load, .rr_in, .f_value(f_syn), .cmp_fire(fire_syn),
    .cmp_mismatch(mis_syn), .alpha(alpha_syn), .beta(beta_syn));
  verifier #(.FW(FW), .F_KIND(F_TC)) u_tc (.clk, .rst_n, .eps, .out_bit(out_tc), .beta_en,
    .rv_load, .rv_in, .rr_load, .rr_in, .f_value(f_tc), .cmp_fire(fire_tc),
    .cmp_mismatch(mis_tc), .alpha(alpha_tc), .beta(beta_tc));

  int unsigned n_fire = 0;
  always @(posedge clk) if (fire_syn) n_fire++;

  // apply eps**N from model state i; RR loaded with rr on the first cycle
  task automatic fds(int unsigned i, int unsigned rr, bit load);
    int unsigned s;
    s = i;
    for (int unsigned k = 0; k < N; k++) begin
      eps     = 1'b1;
      out_syn = (s > 0);
      out_tc  = 1'(s % 2);
      rr_load = load && (k == 0);
      rr_in   = FW'(rr);
      s = (s > 0) ? s - 1 : 0;
      @(negedge clk);
    end
    rr_load = 1'b0;
    eps = 1'b0;
    out_syn = 1'b0; out_tc = 1'b0;
    #1;
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned fires;
    @(negedge clk);
    do_reset();
    // every state with the right reference
    for (int unsigned i = 0; i < N; i++) begin
      fds(i, i, 1'b1);
      check(fire_syn && fire_tc, "comparison on the cycle after eps falls");
      check(int'(f_syn) == i, "syndrome equals the state number");
      check(int'(f_tc) == i,  "transition count equals the state number");
      check(!mis_syn && !mis_tc, "no mismatch with the right reference");
      @(negedge clk);
      check(!fire_syn, "one comparison per burst");
      check(!alpha_syn && !alpha_tc, "alpha clear with right references");
    end
    // a burst without an RR load is not compared
    fires = n_fire;
    fds(17, 0, 1'b0);
    check(!fire_syn, "no comparison without RR load");
    @(negedge clk);
    check(n_fire == fires && !alpha_syn, "unarmed burst leaves alpha clear");
    // synchronising burst directly followed by an FDS: the RR load restarts
    eps = 1'b1; out_syn = 1'b1; out_tc = 1'b1;
    repeat (5) @(negedge clk);
    fds(9, 9, 1'b1);
    check(int'(f_syn) == 9 && !mis_syn, "RR load restarts the compaction");
    @(negedge clk);
    check(!alpha_syn, "alpha clear after restarted burst");
    // a wrong reference sets alpha, which then stays set
    fds(5, 6, 1'b1);
    check(mis_syn && mis_tc, "mismatch with a wrong reference");
    @(negedge clk);
    check(alpha_syn && alpha_tc, "alpha set by the mismatch");
    fds(3, 3, 1'b1);
    @(negedge clk);
    check(alpha_syn && alpha_tc, "alpha is sticky");
    // beta: RV loaded, output checks
    do_reset();
    rv_in = 1'b1; rv_load = 1'b1;
    @(negedge clk);
    rv_load = 1'b0;
    out_syn = 1'b1; out_tc = 1'b1; beta_en = 1'b1;
    @(negedge clk);
    check(!beta_syn && !beta_tc, "beta clear when output equals RV");
    beta_en = 1'b0; out_syn = 1'b0;
    @(negedge clk);
    check(!beta_syn, "no output check without beta_en");
    beta_en = 1'b1; out_syn = 1'b0; out_tc = 1'b1;
    @(negedge clk);
    beta_en = 1'b0;
    check(beta_syn && !beta_tc, "beta set when output differs from RV");
    repeat (2) @(negedge clk);
    check(beta_syn, "beta is sticky");
    check(!alpha_syn, "beta check leaves alpha alone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
