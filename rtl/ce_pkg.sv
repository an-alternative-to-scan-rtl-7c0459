// ce_pkg: types shared by the checking-experiment testable design.
//
// beta_e selects the output that an augmented machine shows while the extra
// input eps is applied, as a function beta of the state (or state digit) i:
//   BETA1_PARITY  : i mod 2
//   BETA2_NONZERO : 1 for i > 0, 0 for i = 0
//   BETA3_NONZERO : same values as BETA2 (the two are kept apart because the
//                   method names three output functions; their tabulated
//                   values for beta2 and beta3 coincide).
// orig_ff_e says how the original machine's logic drives its flip-flops:
//   ORIG_T : it produces T (toggle) inputs
//   ORIG_D : it produces D (next-value) inputs, converted to T by D ^ Q
// f_kind_e selects the compaction function of a verifier's F-register:
//   F_TC   : transition counter (number of value changes in the stream)
//   F_LFSR : serial signature in a linear feedback shift register
//   F_SYN  : syndrome (number of ones in the stream)
package ce_pkg;

  typedef enum logic [1:0] {
    BETA1_PARITY  = 2'd0,
    BETA2_NONZERO = 2'd1,
    BETA3_NONZERO = 2'd2
  } beta_e;

  typedef enum logic {
    ORIG_T = 1'b0,
    ORIG_D = 1'b1
  } orig_ff_e;

  typedef enum logic [1:0] {
    F_TC   = 2'd0,
    F_LFSR = 2'd1,
    F_SYN  = 2'd2
  } f_kind_e;

  // beta applied to one state number or digit.
  function automatic logic beta_of(beta_e sel, int unsigned i);
    case (sel)
      BETA1_PARITY: return logic'(i % 2);
      default:      return i != 0;
    endcase
  endfunction

endpackage
