// gstar_alg1_tb: checks the multiple-output augmented machine (q = 3,
// l = 2, n = 9) under random inputs. A random original machine supplies
// ns_orig and out_orig; the testbench tracks the state number itself and
// checks that eps decrements each base-3 digit (held at 0) with outputs
// beta2 of the digits, that other inputs follow the original machine, and
// that eps**(q-1) synchronises every state to 0.
module gstar_alg1_tb;
  import ce_pkg::*;

  localparam int unsigned Q = 3, L = 2, N = 9;

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

  logic rst_n = 1'b0, eps = 1'b0;
  logic [3:0] ns_orig = '0, state;
  logic [L-1:0] out_orig = '0, out;
  gstar_alg1 #(.Q(Q), .L(L), .BETA(BETA2_NONZERO)) dut (.clk, .rst_n, .eps, .ns_orig, .out_orig, .state, .out);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned s, ns, hi, lo;
    @(negedge clk);
    rst_n = 1'b1;
    s = 0;
    for (int k = 0; k < 5000; k++) begin
      eps      = ($urandom % 2) == 0;
      ns       = $urandom % N;
      ns_orig  = 4'(ns);
      out_orig = L'($urandom);
      #1;
      check(int'(state) == s, "state");
      hi = s / Q; lo = s % Q;
      check(out == (eps ? {hi != 0, lo != 0} : out_orig), "outputs");
      s = eps ? ((hi > 0 ? hi - 1 : 0) * Q + (lo > 0 ? lo - 1 : 0)) : ns;
      @(negedge clk);
    end
    // synchronising sequence from every state
    for (int unsigned i = 0; i < N; i++) begin
      eps = 1'b0; ns_orig = 4'(i);
      @(negedge clk);
      eps = 1'b1;
      repeat (Q - 1) @(negedge clk);
      check(state == '0, "eps**(q-1) reaches state 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
