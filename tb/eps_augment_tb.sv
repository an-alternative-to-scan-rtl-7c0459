// eps_augment_tb: checks the eps augmentation gates at the default size
// (10 flip-flops) and exhaustively at 3 flip-flops.
// With eps = 1 the T inputs must turn code c into c+1 for c != 0 (with
// 11..1 -> 00..0) and keep 00..0; with eps = 0 they must equal t_orig. The
// reference is plain arithmetic on the code, independent of the gate chain.
module eps_augment_tb;

  localparam int unsigned NU  = 10;
  localparam int unsigned NUS = 3;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  logic          eps;
  logic [NU-1:0] t_orig, q, t_mod;
  logic          any_q;
  eps_augment #(.NU(NU)) dut (.eps, .t_orig, .q, .t_mod, .any_q);

  logic           eps_s;
  logic [NUS-1:0] t_orig_s, q_s, t_mod_s;
  logic           any_q_s;
  eps_augment #(.NU(NUS)) dut_s (.eps(eps_s), .t_orig(t_orig_s), .q(q_s), .t_mod(t_mod_s), .any_q(any_q_s));

  function automatic logic [NU-1:0] next_code(logic [NU-1:0] c);
    return (c == 0) ? '0 : c + 1'b1;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned walk;
    logic [NU-1:0] c;
    // every code under eps, with random t_orig (must be ignored)
    for (int unsigned v = 0; v < 2 ** NU; v++) begin
      @(negedge clk);
      eps = 1'b1; q = NU'(v); t_orig = NU'($urandom);
      #1;
      check((q ^ t_mod) == next_code(q), "eps next code");
      check(any_q == (v != 0), "any_q");
    end
    // random codes without eps: t_orig passes
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      eps = 1'b0; q = NU'($urandom); t_orig = NU'($urandom);
      #1;
      check(t_mod == t_orig, "t_orig passes without eps");
    end
    // walk the chain of the augmented part: 00..01 -> ... -> 11..11 -> 00..00
    c = NU'(1); walk = 0;
    eps = 1'b1;
    while (c != 0 && walk < 2 ** NU + 4) begin
      @(negedge clk);
      q = c; t_orig = '0;
      #1;
      c = q ^ t_mod;
      walk++;
    end
    check(walk == 2 ** NU - 1, "chain from 00..01 reaches 00..00 in n-1 steps");
    // exhaustive small instance
    for (int unsigned v = 0; v < 2 ** (2 * NUS + 1); v++) begin
      @(negedge clk);
      {eps_s, q_s, t_orig_s} = (2 * NUS + 1)'(v);
      #1;
      if (eps_s) check((q_s ^ t_mod_s) == ((q_s == 0) ? NUS'(0) : q_s + 1'b1), "small eps next code");
      else       check(t_mod_s == t_orig_s, "small pass-through");
      check(any_q_s == (q_s != 0), "small any_q");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
