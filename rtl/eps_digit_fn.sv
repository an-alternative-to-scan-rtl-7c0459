// eps_digit_fn: next state and outputs of the augmented machine G* for the
// extra input eps, in the general multiple-output form.
//
// The machine has n = Q**L states numbered 0..n-1 and L outputs. State i is
// read as L base-Q digits (i_{L-1}, ..., i_0). Under eps every digit is
// decremented and held at zero,
//   delta(i, eps) = (D(i_{L-1}), ..., D(i_0)),  D(j) = j-1 for j > 0, D(0) = 0,
// and output k shows beta(i_k), so that each output's stream under repeated
// eps depends only on its own digit and a compaction of each output stream
// identifies one digit of the start state. For Q = 3, L = 2, BETA2 it gives
// e.g. 8 = (2,2) -> 4 = (1,1) with outputs (1,1), and 6 = (2,0) -> 3 = (1,0)
// with outputs (1,0).
//
// The digit-wise decrement and the per-digit outputs follow the method's
// augmentation algorithm; the binary state-number encoding and the handling
// of unused codes are this design's choices.
//
// Purely combinational. state is the binary state number, SW bits wide.
// Codes at or above Q**L are not states of the machine; their top digit is
// then larger than Q-1, is decremented like any other, and repeated eps still
// leads them to state 0.
module eps_digit_fn
  import ce_pkg::*;
#(
  parameter int unsigned Q    = 3,
  parameter int unsigned L    = 2,
  parameter beta_e       BETA = BETA2_NONZERO,
  localparam int unsigned N   = Q ** L,
  localparam int unsigned SW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic [SW-1:0] state,
  output logic [SW-1:0] ns,
  output logic [L-1:0]  out
);

  always_comb begin
    int unsigned rest;
    int unsigned digit;
    int unsigned weight;
    int unsigned acc;
    rest   = int'(state);
    weight = 1;
    acc    = 0;
    out    = '0;
    for (int k = 0; k < L; k++) begin
      digit  = (k == L - 1) ? rest : rest % Q;
      rest   = rest / Q;
      out[k] = beta_of(BETA, digit);
      acc    = acc + ((digit > 0) ? digit - 1 : 0) * weight;
      weight = weight * Q;
    end
    ns = SW'(acc);
  end

endmodule
