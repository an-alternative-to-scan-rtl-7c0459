// eps_digit_fn_tb: checks the eps next state and outputs against the
// example table for n = 9, l = 2, q = 3 (every state, with beta1 and beta2
// outputs), then a larger instance (q = 4, l = 3) against digit arithmetic.
module eps_digit_fn_tb;
  import ce_pkg::*;

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

  logic [3:0] st, ns2, ns1;
  logic [1:0] o2, o1;
  eps_digit_fn #(.Q(3), .L(2), .BETA(BETA2_NONZERO)) dut2 (.state(st), .ns(ns2), .out(o2));
  eps_digit_fn #(.Q(3), .L(2), .BETA(BETA1_PARITY))  dut1 (.state(st), .ns(ns1), .out(o1));

  logic [5:0] stb, nsb;
  logic [2:0] ob;
  eps_digit_fn #(.Q(4), .L(3), .BETA(BETA2_NONZERO)) dutb (.state(stb), .ns(nsb), .out(ob));

  // example table, rows i = 0..8: next state, beta1 outputs, beta2 outputs
  // (outputs written as lambda^1, lambda^0)
  int unsigned tab_ns [9] = '{0, 0, 1, 0, 0, 1, 3, 3, 4};
  logic [1:0]  tab_b1 [9] = '{2'b00, 2'b01, 2'b00, 2'b10, 2'b11, 2'b10, 2'b00, 2'b01, 2'b00};
  logic [1:0]  tab_b2 [9] = '{2'b00, 2'b01, 2'b01, 2'b10, 2'b11, 2'b11, 2'b10, 2'b11, 2'b11};

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned d0, d1, d2;
    for (int unsigned i = 0; i < 9; i++) begin
      @(negedge clk);
      st = 4'(i);
      #1;
      check(int'(ns2) == tab_ns[i] && int'(ns1) == tab_ns[i], $sformatf("next state of %0d", i));
      check(o1 == tab_b1[i], $sformatf("beta1 outputs of %0d", i));
      check(o2 == tab_b2[i], $sformatf("beta2 outputs of %0d", i));
    end
    for (int unsigned i = 0; i < 64; i++) begin
      @(negedge clk);
      stb = 6'(i);
      #1;
      d0 = i % 4; d1 = (i / 4) % 4; d2 = i / 16;
      check(int'(nsb) == ((d2 > 0 ? d2 - 1 : 0) * 16 + (d1 > 0 ? d1 - 1 : 0) * 4 + (d0 > 0 ? d0 - 1 : 0)),
            "q=4 l=3 next state");
      check(ob == {d2 != 0, d1 != 0, d0 != 0}, "q=4 l=3 outputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
