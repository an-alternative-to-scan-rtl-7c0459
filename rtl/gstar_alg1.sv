// gstar_alg1: multiple-output augmented machine G* realised from its state
// table.
//
// The original machine G supplies, for the current state number and its
// ordinary input, its next state (ns_orig) and its L outputs (out_orig); that
// logic stays outside this module. This module holds the state register and
// adds the extra input eps: with eps = 1 the next state and outputs come from
// eps_digit_fn (every base-Q digit of the state decremented and held at 0,
// output k = beta of digit k); with eps = 0 those of G pass unchanged.
//
// The augmented state table follows the method; realising it as a state
// register with a selector is this design's choice (the method gives a
// gate-level modification only for the single-output case).
//
// Timing: the state register loads on each rising clock edge; out is
// combinational (Mealy). An active-low asynchronous reset puts the machine in
// state 0; the method needs no reset because eps**(Q-1) synchronises G* to
// state 0 from any state, so the reset is this design's addition.
module gstar_alg1
  import ce_pkg::*;
#(
  parameter int unsigned Q    = 3,
  parameter int unsigned L    = 2,
  parameter beta_e       BETA = BETA2_NONZERO,
  localparam int unsigned N   = Q ** L,
  localparam int unsigned SW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          eps,
  input  logic [SW-1:0] ns_orig,
  input  logic [L-1:0]  out_orig,
  output logic [SW-1:0] state,
  output logic [L-1:0]  out
);

  logic [SW-1:0] ns_eps;
  logic [L-1:0]  out_eps;

  eps_digit_fn #(.Q(Q), .L(L), .BETA(BETA)) u_fn (
    .state (state),
    .ns    (ns_eps),
    .out   (out_eps)
  );

  assign out = eps ? out_eps : out_orig;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   state <= '0;
    else if (eps) state <= ns_eps;
    else          state <= ns_orig;
  end

endmodule
