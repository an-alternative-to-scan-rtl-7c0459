// ce_top: structure for testing sequential machines by a checking
// experiment with a single observed value.
//
// Two augmented machines stand side by side, each with one verifier per
// output and one fail bit that is the OR of all its verifiers' alpha- and
// beta-latches; at the end of a checking experiment the fail bit alone says
// whether the machine is faulty.
//   s4_*  Single-output machine made testable by circuit modification: NU
//         T flip-flops with the eps augmentation gates (gstar_sec4) and one
//         verifier. The original machine's combinational logic is outside:
//         it gets s4_q and returns s4_t_orig (T inputs, or D inputs when
//         S4_ORIG_FF = ORIG_D) and s4_out_orig.
//   a1_*  Multiple-output machine augmented at state-table level
//         (gstar_alg1, Q**L states, L outputs) with L verifiers, all driven
//         by the same eps. The original machine's next-state and output
//         logic is outside: it gets a1_state and returns a1_ns_orig and
//         a1_out_orig.
// The checking-experiment source (which applies the synchronising, transfer
// and distinguishing sequences and loads the reference registers) is
// outside too; it drives the eps, beta_en and RV/RR load ports.
//
// Timing: everything is clocked by clk; rst_n is an active-low asynchronous
// reset. See gstar_sec4, gstar_alg1 and verifier for cycle-level behaviour.
// Defaults: NU = 10 flip-flops (n = 1024 states) for the single-output
// machine, Q = 3, L = 2 (n = 9) for the multiple-output one.
module ce_top
  import ce_pkg::*;
#(
  parameter int unsigned     NU        = 10,
  parameter beta_e           S4_BETA   = BETA2_NONZERO,
  parameter orig_ff_e        S4_ORIG_FF = ORIG_T,
  parameter f_kind_e         S4_F_KIND = F_SYN,
  parameter int unsigned     S4_FW     = NU,
  parameter logic [S4_FW-1:0] S4_POLY  = S4_FW'(10'h009),
  parameter int unsigned     Q         = 3,
  parameter int unsigned     L         = 2,
  parameter beta_e           A1_BETA   = BETA2_NONZERO,
  parameter f_kind_e         A1_F_KIND = F_SYN,
  parameter int unsigned     A1_FW     = 4,
  parameter logic [A1_FW-1:0] A1_POLY  = A1_FW'(4'h3),
  localparam int unsigned    A1_SW     = (Q ** L > 1) ? $clog2(Q ** L) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // single-output machine
  input  logic                       s4_eps,
  input  logic [NU-1:0]              s4_t_orig,
  input  logic                       s4_out_orig,
  output logic [NU-1:0]              s4_q,
  output logic                       s4_out,
  input  logic                       s4_beta_en,
  input  logic                       s4_rv_load,
  input  logic                       s4_rv_in,
  input  logic                       s4_rr_load,
  input  logic [S4_FW-1:0]           s4_rr_in,
  output logic [S4_FW-1:0]           s4_f_value,
  output logic                       s4_cmp_fire,
  output logic                       s4_cmp_mismatch,
  output logic                       s4_alpha,
  output logic                       s4_beta,
  output logic                       s4_fail,
  // multiple-output machine
  input  logic                       a1_eps,
  input  logic [A1_SW-1:0]           a1_ns_orig,
  input  logic [L-1:0]               a1_out_orig,
  output logic [A1_SW-1:0]           a1_state,
  output logic [L-1:0]               a1_out,
  input  logic [L-1:0]               a1_beta_en,
  input  logic [L-1:0]               a1_rv_load,
  input  logic [L-1:0]               a1_rv_in,
  input  logic [L-1:0]               a1_rr_load,
  input  logic [L-1:0][A1_FW-1:0]    a1_rr_in,
  output logic [L-1:0][A1_FW-1:0]    a1_f_value,
  output logic [L-1:0]               a1_cmp_fire,
  output logic [L-1:0]               a1_cmp_mismatch,
  output logic [L-1:0]               a1_alpha,
  output logic [L-1:0]               a1_beta,
  output logic                       a1_fail
);

  // ---------------- single-output machine and its verifier ----------------
  gstar_sec4 #(.NU(NU), .BETA(S4_BETA), .ORIG_FF(S4_ORIG_FF)) u_s4 (
    .clk      (clk),
    .rst_n    (rst_n),
    .eps      (s4_eps),
    .t_orig   (s4_t_orig),
    .out_orig (s4_out_orig),
    .q        (s4_q),
    .out      (s4_out)
  );

  verifier #(.FW(S4_FW), .F_KIND(S4_F_KIND), .POLY(S4_POLY)) u_s4_ver (
    .clk          (clk),
    .rst_n        (rst_n),
    .eps          (s4_eps),
    .out_bit      (s4_out),
    .beta_en      (s4_beta_en),
    .rv_load      (s4_rv_load),
    .rv_in        (s4_rv_in),
    .rr_load      (s4_rr_load),
    .rr_in        (s4_rr_in),
    .f_value      (s4_f_value),
    .cmp_fire     (s4_cmp_fire),
    .cmp_mismatch (s4_cmp_mismatch),
    .alpha        (s4_alpha),
    .beta         (s4_beta)
  );

  assign s4_fail = s4_alpha | s4_beta;

  // ------------- multiple-output machine and its L verifiers --------------
  gstar_alg1 #(.Q(Q), .L(L), .BETA(A1_BETA)) u_a1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .eps      (a1_eps),
    .ns_orig  (a1_ns_orig),
    .out_orig (a1_out_orig),
    .state    (a1_state),
    .out      (a1_out)
  );

  for (genvar k = 0; k < L; k++) begin : g_ver
    verifier #(.FW(A1_FW), .F_KIND(A1_F_KIND), .POLY(A1_POLY)) u_ver (
      .clk          (clk),
      .rst_n        (rst_n),
      .eps          (a1_eps),
      .out_bit      (a1_out[k]),
      .beta_en      (a1_beta_en[k]),
      .rv_load      (a1_rv_load[k]),
      .rv_in        (a1_rv_in[k]),
      .rr_load      (a1_rr_load[k]),
      .rr_in        (a1_rr_in[k]),
      .f_value      (a1_f_value[k]),
      .cmp_fire     (a1_cmp_fire[k]),
      .cmp_mismatch (a1_cmp_mismatch[k]),
      .alpha        (a1_alpha[k]),
      .beta         (a1_beta[k])
    );
  end

  assign a1_fail = |{a1_alpha, a1_beta};

endmodule
