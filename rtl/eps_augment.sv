// eps_augment: the gates that turn a T flip-flop machine into its augmented
// version G* (single-output case, l = 1).
//
// With eps = 0 the T inputs from the original combinational logic pass
// unchanged. With eps = 1 the flip-flops are toggled as a binary up-counter
// whose bit 0 is flip-flop 0, except that the all-zero state is held:
//   t_mod[0] = q[0] | q[1] | ... | q[NU-1]      (OR chain)
//   t_mod[k] = q[0] & q[1] & ... & q[k-1]        (AND chain, k >= 1)
// Under the state assignment state 0 = 00..00, state n-1 = 00..01,
// state n-2 = 00..10, ..., state 1 = 11..11 this is delta(i, eps) = i-1 for
// i > 0 and 0 for i = 0, i.e. the chain 00..01 -> 00..10 -> ... -> 11..11 ->
// 00..00 with a self-loop on 00..00.
//
// Gate structure (two-input gates, as in the method's circuit): one inverter
// makes ~eps; each flip-flop has a two-AND/one-OR selector; the OR chain
// needs NU-1 gates; the AND chain that carries eps and the lower q bits is
// shared with the selectors. Total 4*NU-1 two-input gates plus the inverter.
//
// The eps transitions and the state assignment follow the method; the
// grouping into gates is this design's realisation, chosen to meet the
// method's stated cost of 4*NU-1 two-input gates.
//
// Purely combinational. any_q (end of the OR chain) is brought out because the
// output modification for beta2/beta3 reuses it.
module eps_augment #(
  parameter int unsigned NU = 10   // number of state flip-flops (nu = log2 n)
) (
  input  logic          eps,
  input  logic [NU-1:0] t_orig,
  input  logic [NU-1:0] q,
  output logic [NU-1:0] t_mod,
  output logic          any_q
);

  logic          eps_n;
  logic [NU-1:0] or_chain;   // or_chain[k]  = q[0] | ... | q[k]
  logic [NU-1:0] and_chain;  // and_chain[k] = eps & q[0] & ... & q[k-1]

  assign eps_n        = ~eps;
  assign or_chain[0]  = q[0];
  assign and_chain[0] = eps;

  for (genvar k = 1; k < NU; k++) begin : g_chain
    assign or_chain[k]  = or_chain[k-1] | q[k];
    assign and_chain[k] = and_chain[k-1] & q[k-1];
    // flip-flops 1..NU-1: eps selects the carry of the lower bits
    assign t_mod[k] = and_chain[k] | (eps_n & t_orig[k]);
  end

  assign any_q = or_chain[NU-1];
  // flip-flop 0: eps selects the OR of all outputs
  assign t_mod[0] = (eps & any_q) | (eps_n & t_orig[0]);

endmodule
