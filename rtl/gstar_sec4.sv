// gstar_sec4: augmented machine G* built by modifying a T flip-flop circuit
// (single output, l = 1).
//
// The original machine is a block of combinational logic around NU T-type
// flip-flops. Its logic stays outside this module: it receives the state q
// and returns its T inputs (t_orig) and its output (out_orig). This module
// holds the flip-flops, the eps augmentation gates (eps_augment) and the
// output modification:
//   out = eps ? beta(state) : out_orig
// With the state assignment of eps_augment (state i has code n-i for i > 0,
// code 0 for state 0, n = 2**NU), beta1 (i mod 2) equals q[0] and
// beta2/beta3 (i > 0) equal the OR of all flip-flops, so either costs three
// two-input gates (a two-AND/one-OR selector).
//
// The method assumes T flip-flops. For an original machine whose logic was
// designed for D flip-flops, set ORIG_FF = ORIG_D: t_orig then carries the D
// inputs and is converted to T inputs by one XOR per flip-flop (T = D ^ Q)
// in front of the augmentation gates, which is the only extra cost.
//
// Timing: one state transition per rising clock edge; out is combinational
// (Mealy) in the current state, eps and out_orig.
module gstar_sec4
  import ce_pkg::*;
#(
  parameter int unsigned NU   = 10,
  parameter beta_e       BETA = BETA2_NONZERO,
  parameter orig_ff_e    ORIG_FF = ORIG_T
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          eps,       // extra test input
  input  logic [NU-1:0] t_orig,    // T (or D, see ORIG_FF) inputs from the original logic
  input  logic          out_orig,  // output of the original logic
  output logic [NU-1:0] q,         // state, to the original logic
  output logic          out        // output of G*
);

  logic [NU-1:0] t_in;   // original logic's request as T inputs
  logic [NU-1:0] t_mod;
  logic          any_q;
  logic          beta_bit;

  eps_augment #(.NU(NU)) u_aug (
    .eps    (eps),
    .t_orig (t_in),
    .q      (q),
    .t_mod  (t_mod),
    .any_q  (any_q)
  );

  tff_bank #(.NU(NU)) u_ff (
    .clk   (clk),
    .rst_n (rst_n),
    .t     (t_mod),
    .q     (q)
  );

  assign t_in = (ORIG_FF == ORIG_D) ? (t_orig ^ q) : t_orig;

  always_comb begin
    beta_bit = (BETA == BETA1_PARITY) ? q[0] : any_q;
    out      = (eps & beta_bit) | (~eps & out_orig);
  end

endmodule
