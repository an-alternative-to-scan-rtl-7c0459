// verifier: checker attached to one output of the augmented machine G*.
//
// The whole checking experiment is judged by two sticky latches per output,
// so that only one value has to be read at the end:
//   beta-latch  checks single output values. RV holds the value the output
//               must have; on a cycle with beta_en = 1 the latch is set if
//               out_bit differs from RV (out_bit XOR RV).
//   alpha-latch checks states. While eps = 1 the F-register compacts out_bit;
//               a new stream starts on the first cycle of an eps burst and
//               on any eps cycle that loads RR (so a distinguishing
//               sequence that directly follows the synchronising sequence
//               is compacted on its own). On the first
//               cycle after eps falls the comparator checks the F-register
//               against the reference register RR and sets the latch on a
//               mismatch. cmp_fire marks that cycle and cmp_mismatch its
//               result.
// RV and RR are loaded from rv_in / rr_in by rv_load / rr_load, from the
// source that applies the checking experiment. A load on the compare cycle
// takes effect after the comparison. f_value brings the F-register out so the
// state can also be observed directly.
//
// The blocks (RV, XOR, beta-latch, F-register, comparator, RR, alpha-latch)
// follow the method's verifier; when each latch samples, how the references
// are loaded and the reset are this design's choices.
module verifier
  import ce_pkg::*;
#(
  parameter int unsigned   FW     = 10,
  parameter f_kind_e       F_KIND = F_SYN,
  parameter logic [FW-1:0] POLY   = FW'(10'h009)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          eps,
  input  logic          out_bit,
  input  logic          beta_en,
  input  logic          rv_load,
  input  logic          rv_in,
  input  logic          rr_load,
  input  logic [FW-1:0] rr_in,
  output logic [FW-1:0] f_value,
  output logic          cmp_fire,
  output logic          cmp_mismatch,
  output logic          alpha,
  output logic          beta
);

  logic          eps_q;
  logic          armed;  // RR loaded since the last comparison
  logic          rv;
  logic [FW-1:0] rr;

  f_register #(.FW(FW), .KIND(F_KIND), .POLY(POLY)) u_f (
    .clk   (clk),
    .rst_n (rst_n),
    .start (eps & (~eps_q | rr_load)),
    .en    (eps),
    .din   (out_bit),
    .value (f_value)
  );

  always_comb begin
    cmp_fire     = ~eps & eps_q & armed;
    cmp_mismatch = f_value != rr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eps_q <= 1'b0;
      armed <= 1'b0;
      rv    <= 1'b0;
      rr    <= '0;
      alpha <= 1'b0;
      beta  <= 1'b0;
    end else begin
      eps_q <= eps;
      if (rv_load) rv <= rv_in;
      if (rr_load) rr <= rr_in;
      if (rr_load)       armed <= 1'b1;
      else if (cmp_fire) armed <= 1'b0;
      if (cmp_fire && cmp_mismatch) alpha <= 1'b1;
      if (beta_en && (out_bit ^ rv)) beta <= 1'b1;
    end
  end

endmodule
