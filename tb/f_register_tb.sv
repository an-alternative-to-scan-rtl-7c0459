// f_register_tb: checks the three compaction functions on random streams of
// random length. The references are computed bit by bit in the testbench:
// a transition count, a ones count and a Galois LFSR signature with the same
// polynomial (x^10 + x^3 + 1), each restarted on the stream's first bit.
module f_register_tb;
  import ce_pkg::*;

  localparam int unsigned FW = 10;
  localparam logic [FW-1:0] POLY = 10'h009;

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

  logic rst_n = 1'b0, start = 1'b0, en = 1'b0, din = 1'b0;
  logic [FW-1:0] v_tc, v_syn, v_lfsr;
  f_register #(.FW(FW), .KIND(F_TC))   u_tc   (.clk, .rst_n, .start, .en, .din, .value(v_tc));
  f_register #(.FW(FW), .KIND(F_SYN))  u_syn  (.clk, .rst_n, .start, .en, .din, .value(v_syn));
  f_register #(.FW(FW), .KIND(F_LFSR), .POLY(POLY)) u_lfsr (.clk, .rst_n, .start, .en, .din, .value(v_lfsr));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned tc, syn, len;
    logic [FW-1:0] sig;
    logic prev, fb;
    @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 300; s++) begin
      len = 1 + $urandom % 40;
      tc = 0; syn = 0; sig = '0; prev = 1'b0;
      for (int unsigned k = 0; k < len; k++) begin
        din   = (s % 3 == 0) ? 1'(k % 2) : 1'($urandom);
        start = (k == 0);
        en    = 1'b1;
        if (k > 0 && din != prev) tc++;
        if (din) syn++;
        fb  = sig[FW-1];
        sig = {sig[FW-2:0], 1'b0} ^ (fb ? POLY : '0);
        sig[0] = sig[0] ^ din;
        prev = din;
        @(negedge clk);
      end
      // idle cycles with en = 0 must hold the value
      start = 1'b0; en = 1'b0; din = 1'($urandom);
      repeat (1 + $urandom % 3) @(negedge clk);
      check(int'(v_tc) == tc,   "transition count");
      check(int'(v_syn) == syn, "syndrome");
      check(v_lfsr == sig,      "LFSR signature");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
