// ce_top_tc_tb: end-to-end test of ce_top with beta1 outputs and transition-counter compaction
// on both machines (5 flip-flops, 4 input symbols).
//
// A behavioural original machine G (a pseudo-random state table with MI
// input symbols, in which input 0 maps state s to s-1 mod n so that the
// machine is strongly connected and state 0 goes to n-1) is wrapped around
// each augmented machine. The testbench then plays the part of the checking-
// experiment source:
//   1. synchronising sequence: eps for n-1 cycles (state 0 from anywhere);
//   2. for every state i: transfer from 0 to i, then the distinguishing
//      sequence eps**n (eps**(Q-1) for the multiple-output machine) with RR
//      loaded with the expected compaction of state i;
//   3. for every state j and input x: transfer to j, apply x with beta_en and
//      RV = expected output, then the distinguishing sequence with RR = the
//      expected next state.
// A fault-free machine must end with fail = 0; a machine with one wrong
// next state must end with alpha set, one with one wrong output with beta
// set. Along the way the state, the outputs under eps and every F-register
// value are checked against the testbench's own model, and the length of the
// experiment is checked against its closed form and against the bound
// 4n^2 + 1.5*MI*n^2 + n. Every mechanism (eps chain step, wrap from 11..1 to
// 00..0, hold at 00..0, normal transition, comparison, output check, alpha
// and beta detection) is counted and must occur.
module ce_top_tc_tb;
  import ce_pkg::*;

  localparam int unsigned NU   = 5;     // flip-flops of the single-output machine
  localparam int unsigned MI   = 4;     // input alphabet size of G
  localparam int unsigned XW   = $clog2(MI);
  localparam int unsigned N4   = 2 ** NU;
  localparam int unsigned Q    = 3;
  localparam int unsigned L    = 2;
  localparam int unsigned N1   = Q ** L;
  localparam int unsigned SW1  = $clog2(N1);
  localparam int unsigned MI1  = 4;
  localparam int unsigned FW4  = 5;
  localparam int unsigned FW1  = 4;
  localparam bit          S4_FAULTS = 1'b1;
  localparam beta_e       S4_BETA_T = BETA1_PARITY;
  localparam f_kind_e     S4_FK     = F_TC;
  localparam int unsigned FW4P      = 5;
  localparam logic [FW4P-1:0] POLY4 = FW4P'(10'h009);
  localparam beta_e       A1_BETA_T = BETA1_PARITY;
  localparam f_kind_e     A1_FK     = F_TC;
  localparam logic [3:0]  POLY1     = 4'h3;
  localparam int unsigned FDS1      = Q;      // eps**Q: enough for every compaction
  localparam longint unsigned WATCHDOG = 2000000;

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

  // ---------------- behavioural original machines ----------------
  function automatic int unsigned mix(int unsigned a, int unsigned b, int unsigned c);
    int unsigned h;
    h = (a * 32'h9E3779B1) ^ ((b + 32'h7F4A7C15) * 32'h85EBCA6B) ^ (c * 32'hC2B2AE35);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  // fault kinds applied to the machine under test (not to the references)
  typedef enum int { FAULT_NONE, FAULT_NEXT, FAULT_OUT } fault_e;
  fault_e      s4_fault = FAULT_NONE, a1_fault = FAULT_NONE;
  int unsigned s4_fs = 0, s4_fx = 1, a1_fs = 0, a1_fx = 1;

  function automatic int unsigned g4_next(int unsigned s, int unsigned x);
    return (x == 0) ? (s + N4 - 1) % N4 : mix(s, x, 11) % N4;
  endfunction
  function automatic logic g4_out(int unsigned s, int unsigned x);
    return mix(s, x, 23) % 2 == 1;
  endfunction
  function automatic int unsigned g1_next(int unsigned s, int unsigned x);
    return (x == 0) ? (s + N1 - 1) % N1 : mix(s, x, 37) % N1;
  endfunction
  function automatic logic [L-1:0] g1_out(int unsigned s, int unsigned x);
    return L'(mix(s, x, 41));
  endfunction

  // expected compaction of the eps stream of length len from state (or
  // digit) i: the stream is beta(i), beta(i-1), ..., beta(0), beta(0), ...
  function automatic int unsigned compact(f_kind_e kind, beta_e b, int unsigned i,
                                          int unsigned len, int unsigned fw, int unsigned poly);
    int unsigned v, s, mask;
    logic bit_now, bit_prev;
    mask = (1 << fw) - 1;
    v = 0; s = i; bit_prev = 1'b0;
    for (int unsigned k = 0; k < len; k++) begin
      bit_now = beta_of(b, s);
      case (kind)
        F_TC:    if (k > 0 && bit_now != bit_prev) v = (v + 1) & mask;
        F_SYN:   if (bit_now) v = (v + 1) & mask;
        default: v = ((((v << 1) & mask) ^ (((v >> (fw - 1)) & 1) != 0 ? poly : 0)) ^ int'(bit_now)) & mask;
      endcase
      bit_prev = bit_now;
      s = (s > 0) ? s - 1 : 0;
    end
    return v;
  endfunction
  function automatic int unsigned exp4(int unsigned i);
    return compact(S4_FK, S4_BETA_T, i, N4, FW4, int'(POLY4));
  endfunction
  function automatic int unsigned exp1(int unsigned d);
    return compact(A1_FK, A1_BETA_T, d, FDS1, FW1, int'(POLY1));
  endfunction

  // state number <-> flip-flop code of the single-output machine
  function automatic int unsigned code_of(int unsigned s);
    return (s == 0) ? 0 : N4 - s;
  endfunction
  function automatic int unsigned state_of(int unsigned c);
    return (c == 0) ? 0 : N4 - c;
  endfunction

  // ---------------- DUT ----------------
  logic                 rst_n = 1'b0;
  logic                 s4_eps = 0, s4_beta_en = 0, s4_rv_load = 0, s4_rv_in = 0, s4_rr_load = 0;
  logic [FW4-1:0]       s4_rr_in = '0;
  logic [NU-1:0]        s4_t_orig, s4_q;
  logic                 s4_out_orig, s4_out;
  logic [FW4-1:0]       s4_f_value;
  logic                 s4_cmp_fire, s4_cmp_mismatch, s4_alpha, s4_beta, s4_fail;
  logic [XW-1:0]        s4_x = '0;

  logic                 a1_eps = 0;
  logic [L-1:0]         a1_beta_en = '0, a1_rv_load = '0, a1_rv_in = '0, a1_rr_load = '0;
  logic [L-1:0][FW1-1:0] a1_rr_in = '0;
  logic [SW1-1:0]       a1_ns_orig, a1_state;
  logic [L-1:0]         a1_out_orig, a1_out;
  logic [L-1:0][FW1-1:0] a1_f_value;
  logic [L-1:0]         a1_cmp_fire, a1_cmp_mismatch, a1_alpha, a1_beta;
  logic                 a1_fail;
  logic [1:0]           a1_x = '0;

  ce_top #(.NU(NU), .S4_BETA(S4_BETA_T), .S4_F_KIND(S4_FK), .A1_BETA(A1_BETA_T), .A1_F_KIND(A1_FK)) dut (
    .clk, .rst_n,
    .s4_eps, .s4_t_orig, .s4_out_orig, .s4_q, .s4_out, .s4_beta_en, .s4_rv_load,
    .s4_rv_in, .s4_rr_load, .s4_rr_in, .s4_f_value, .s4_cmp_fire, .s4_cmp_mismatch,
    .s4_alpha, .s4_beta, .s4_fail,
    .a1_eps, .a1_ns_orig, .a1_out_orig, .a1_state, .a1_out, .a1_beta_en, .a1_rv_load,
    .a1_rv_in, .a1_rr_load, .a1_rr_in, .a1_f_value, .a1_cmp_fire, .a1_cmp_mismatch,
    .a1_alpha, .a1_beta, .a1_fail
  );

  // original combinational logic around the T flip-flops
  always_comb begin
    int unsigned s, ns;
    logic o;
    s  = state_of(int'(s4_q));
    ns = g4_next(s, int'(s4_x));
    o  = g4_out(s, int'(s4_x));
    if (s == s4_fs && int'(s4_x) == s4_fx) begin
      if (s4_fault == FAULT_NEXT) ns = (ns + 1) % N4;
      if (s4_fault == FAULT_OUT)  o  = ~o;
    end
    s4_t_orig   = s4_q ^ NU'(code_of(ns));
    s4_out_orig = o;
  end

  // original next-state and output logic of the multiple-output machine
  always_comb begin
    int unsigned s, ns;
    logic [L-1:0] o;
    s  = int'(a1_state) % N1;
    ns = g1_next(s, int'(a1_x));
    o  = g1_out(s, int'(a1_x));
    if (s == a1_fs && int'(a1_x) == a1_fx) begin
      if (a1_fault == FAULT_NEXT) ns = (ns + 1) % N1;
      if (a1_fault == FAULT_OUT)  o  = ~o;
    end
    a1_ns_orig  = SW1'(ns);
    a1_out_orig = o;
  end

  // ---------------- mechanism monitors ----------------
  longint unsigned n_chain = 0, n_wrap = 0, n_hold = 0, n_normal = 0, n_cmp4 = 0;
  longint unsigned n_a1_eps = 0, n_a1_normal = 0, n_cmp1 = 0;
  longint unsigned n_beta_chk4 = 0, n_beta_chk1 = 0;
  longint unsigned n_alpha_det = 0, n_beta_det = 0;
  logic [NU-1:0] exp_q;
  logic          mon_on = 1'b0;

  always @(posedge clk) if (rst_n) begin
    // expected flip-flop code after this edge (single-output machine)
    if (s4_eps) begin
      if (s4_q == '0)      n_hold++;
      else if (s4_q == '1) n_wrap++;
      else                 n_chain++;
      exp_q <= (s4_q == '0) ? '0 : s4_q + 1'b1;
    end else begin
      n_normal++;
      exp_q <= s4_q ^ s4_t_orig;
    end
    if (s4_cmp_fire) n_cmp4++;
    if (s4_beta_en)  n_beta_chk4++;
    if (a1_eps) n_a1_eps++; else n_a1_normal++;
    if (a1_cmp_fire[0]) n_cmp1++;
    if (a1_beta_en[0])  n_beta_chk1++;
    mon_on <= 1'b1;
  end else mon_on <= 1'b0;
  always @(negedge clk) if (rst_n && mon_on)
    check(s4_q == exp_q, "single-output machine flip-flop update");

  // ---------------- comparison monitors ----------------
  bit          good4 = 1'b1, good1 = 1'b1;
  int unsigned exp_f4 = 0;
  int unsigned exp_f1 [L];

  always @(negedge clk) if (rst_n) begin
    if (s4_cmp_fire && good4) begin
      check(int'(s4_f_value) == exp_f4, "F-register holds the compacted state");
      check(!s4_cmp_mismatch, "comparator agrees with RR");
    end
    for (int k = 0; k < L; k++)
      if (a1_cmp_fire[k] && good1) begin
        check(int'(a1_f_value[k]) == exp_f1[k], "F-register holds the state digit");
        check(!a1_cmp_mismatch[k], "comparator agrees with RR (multi-output)");
      end
  end

  // ---------------- single-output checking experiment ----------------
  longint unsigned cyc4, cyc1;

  task automatic tick4(bit eps, int unsigned x, bit ben);
    s4_eps     = eps;
    s4_x       = XW'(x);
    s4_beta_en = ben;
    @(negedge clk);
    s4_beta_en = 1'b0;
    s4_rr_load = 1'b0;
    s4_rv_load = 1'b0;
    cyc4++;
  endtask

  // distinguishing sequence eps**N4 for expected state s; RR is loaded on its
  // first cycle and RV (for the next output check) on its last
  task automatic fds4(int unsigned s, logic next_rv);
    for (int unsigned k = 0; k < N4; k++) begin
      s4_eps = 1'b1;
      #1;
      if (good4) check(s4_out == beta_of(S4_BETA_T, state_of(int'(s4_q))), "output under eps is beta of the state");
      if (k == 0) begin
        s4_rr_load = 1'b1;
        s4_rr_in   = FW4'(exp4(s));
      end
      if (k == N4 - 1) begin
        s4_rv_load = 1'b1;
        s4_rv_in   = next_rv;
      end
      tick4(1'b1, 0, 1'b0);
    end
    exp_f4 = exp4(s);
  endtask

  task automatic transfer4(int unsigned j);
    for (int unsigned k = 0; k < (N4 - j) % N4; k++) tick4(1'b0, 0, 1'b0);
    if (good4) check(s4_q == NU'(code_of(j)), "transfer reached its state");
  endtask

  task automatic ce4();
    int unsigned j, x;
    // leave the reset state first: arbitrary inputs
    for (int k = 0; k < 7; k++) tick4(1'b0, $urandom % MI, 1'b0);
    cyc4 = 0;
    for (int unsigned k = 0; k < N4 - 1; k++) tick4(1'b1, 0, 1'b0);
    if (good4) check(s4_q == '0, "synchronising sequence reaches state 0");
    for (int unsigned i = 0; i < N4; i++) begin
      transfer4(i);
      fds4(i, g4_out(0, 0));
    end
    for (int unsigned t = 0; t < N4 * MI; t++) begin
      j = t / MI;
      x = t % MI;
      transfer4(j);
      tick4(1'b0, x, 1'b1);
      fds4(g4_next(j, x), (t + 1 < N4 * MI) ? g4_out((t + 1) / MI, (t + 1) % MI) : 1'b0);
    end
    tick4(1'b0, 0, 1'b0);  // cycle of the last comparison
  endtask

  function automatic longint unsigned ce4_len();
    longint unsigned n = N4, m = MI;
    return (n - 1) + (n * (n - 1) / 2 + n * n) + m * (n * (n - 1) / 2 + n + n * n) + 1;
  endfunction

  // ---------------- multiple-output checking experiment ----------------
  task automatic tick1(bit eps, int unsigned x, bit ben);
    a1_eps     = eps;
    a1_x       = 2'(x);
    a1_beta_en = {L{ben}};
    @(negedge clk);
    a1_beta_en = '0;
    a1_rr_load = '0;
    a1_rv_load = '0;
    cyc1++;
  endtask

  task automatic fds1(int unsigned s, logic [L-1:0] next_rv);
    int unsigned d;
    for (int unsigned k = 0; k < FDS1; k++) begin
      a1_eps = 1'b1;
      #1;
      d = int'(a1_state);
      for (int i = 0; i < L; i++) begin
        if (good1) check(a1_out[i] == beta_of(A1_BETA_T, d % Q), "multi-output beta of the digit");
        d = d / Q;
      end
      if (k == 0) begin
        a1_rr_load = '1;
        d = s;
        for (int i = 0; i < L; i++) begin
          a1_rr_in[i] = FW1'(exp1(d % Q));
          d = d / Q;
        end
      end
      if (k == FDS1 - 1) begin
        a1_rv_load = '1;
        a1_rv_in   = next_rv;
      end
      tick1(1'b1, 0, 1'b0);
    end
    d = s;
    for (int i = 0; i < L; i++) begin
      exp_f1[i] = exp1(d % Q);
      d = d / Q;
    end
  endtask

  task automatic transfer1(int unsigned j);
    for (int unsigned k = 0; k < (N1 - j) % N1; k++) tick1(1'b0, 0, 1'b0);
    if (good1) check(int'(a1_state) == j, "multi-output transfer reached its state");
  endtask

  task automatic ce1();
    int unsigned j, x;
    for (int k = 0; k < 5; k++) tick1(1'b0, $urandom % MI1, 1'b0);
    cyc1 = 0;
    for (int unsigned k = 0; k < Q - 1; k++) tick1(1'b1, 0, 1'b0);
    if (good1) check(a1_state == '0, "multi-output synchronising sequence reaches state 0");
    for (int unsigned i = 0; i < N1; i++) begin
      transfer1(i);
      fds1(i, g1_out(0, 0));
    end
    for (int unsigned t = 0; t < N1 * MI1; t++) begin
      j = t / MI1;
      x = t % MI1;
      transfer1(j);
      tick1(1'b0, x, 1'b1);
      fds1(g1_next(j, x), (t + 1 < N1 * MI1) ? g1_out((t + 1) / MI1, (t + 1) % MI1) : '0);
    end
    tick1(1'b0, 0, 1'b0);
  endtask

  task automatic reset_dut();
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  endtask

  initial begin
    repeat (int'(WATCHDOG)) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned len;
    // the distinguishing sequence must tell every state apart after compaction
    begin
      bit seen4 [int unsigned];
      bit seen1 [int unsigned];
      for (int unsigned i = 0; i < N4; i++) seen4[exp4(i)] = 1'b1;
      for (int unsigned d = 0; d < Q; d++) seen1[exp1(d)] = 1'b1;
      check(seen4.num() == N4, "compacted values distinguish all single-output states");
      check(seen1.num() == Q, "compacted values distinguish all digit values");
    end
    @(negedge clk);
    reset_dut();

    // ---- single-output machine, fault free ----
    s4_fault = FAULT_NONE; good4 = 1'b1;
    ce4();
    len = ce4_len();
    check(cyc4 == len, "single-output experiment length");
    check(cyc4 <= 4 * N4 * N4 + (3 * MI * N4 * N4) / 2 + N4, "within 4n^2 + 1.5*MI*n^2 + n");
    check(!s4_fail, "fault-free single-output machine passes");
    $display("single-output CE: n=%0d MI=%0d cycles=%0d fail=%0b", N4, MI, cyc4, s4_fail);

    if (S4_FAULTS) begin
      // wrong next state on one transition
      reset_dut();
      s4_fault = FAULT_NEXT; s4_fs = N4 / 2 + 1; s4_fx = MI - 1; good4 = 1'b0;
      ce4();
      check(s4_alpha, "next-state fault sets alpha");
      check(s4_fail,  "next-state fault fails the machine");
      if (s4_alpha) n_alpha_det++;
      // wrong output on one transition
      reset_dut();
      s4_fault = FAULT_OUT; s4_fs = 3; s4_fx = 1;
      ce4();
      check(s4_beta, "output fault sets beta");
      check(!s4_alpha, "output fault leaves alpha clear");
      check(s4_fail,  "output fault fails the machine");
      if (s4_beta) n_beta_det++;
      s4_fault = FAULT_NONE; good4 = 1'b1;
    end

    // ---- multiple-output machine ----
    reset_dut();
    a1_fault = FAULT_NONE; good1 = 1'b1;
    ce1();
    check(!a1_fail, "fault-free multi-output machine passes");
    reset_dut();
    a1_fault = FAULT_NEXT; a1_fs = 7; a1_fx = 2; good1 = 1'b0;
    ce1();
    check(|a1_alpha, "multi-output next-state fault sets alpha");
    check(a1_fail, "multi-output next-state fault fails the machine");
    if (|a1_alpha) n_alpha_det++;
    reset_dut();
    a1_fault = FAULT_OUT; a1_fs = 4; a1_fx = 3;
    ce1();
    check(|a1_beta, "multi-output output fault sets beta");
    check(a1_fail, "multi-output output fault fails the machine");
    if (|a1_beta) n_beta_det++;

    // ---- every mechanism must have happened ----
    $display("eps chain=%0d wrap=%0d hold=%0d normal=%0d cmp=%0d beta_chk=%0d",
             n_chain, n_wrap, n_hold, n_normal, n_cmp4, n_beta_chk4);
    $display("multi-output eps=%0d normal=%0d cmp=%0d beta_chk=%0d alpha_det=%0d beta_det=%0d",
             n_a1_eps, n_a1_normal, n_cmp1, n_beta_chk1, n_alpha_det, n_beta_det);
    check(n_chain > 0,     "eps chain step happened");
    check(n_wrap > 0,      "wrap 11..1 -> 00..0 happened");
    check(n_hold > 0,      "hold at 00..0 happened");
    check(n_normal > 0,    "normal transition happened");
    check(n_cmp4 > 0,      "single-output comparison happened");
    check(n_beta_chk4 > 0, "single-output output check happened");
    check(n_a1_eps > 0,    "multi-output eps step happened");
    check(n_cmp1 > 0,      "multi-output comparison happened");
    check(n_beta_chk1 > 0, "multi-output output check happened");
    check(n_alpha_det >= (S4_FAULTS ? 2 : 1), "alpha detection happened");
    check(n_beta_det >= (S4_FAULTS ? 2 : 1),  "beta detection happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
