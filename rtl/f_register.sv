// f_register: the F-register of a verifier. It compacts the bit stream one
// output of the machine produces while a distinguishing sequence is applied,
// so that the start state can be read from one word instead of the whole
// stream.
//
// Three compaction functions are selectable by KIND:
//   F_TC   value = number of changes between consecutive bits of the stream
//   F_SYN  value = number of ones in the stream (syndrome)
//   F_LFSR value = serial signature: each bit is shifted into a Galois LFSR
//          with feedback polynomial POLY (x^FW term implied; the default
//          10'h009 is x^10 + x^3 + 1)
// Counts wrap modulo 2**FW; choose FW so that the longest stream fits.
//
// Interface and timing: on a rising edge with start = 1 a new stream begins
// and din is its first bit; on a rising edge with start = 0 and en = 1 din is
// appended. value is registered and shows the compaction of every bit taken
// so far. The compaction functions are those the method names; widths,
// polynomial and the start/en handshake are this design's choices.
module f_register
  import ce_pkg::*;
#(
  parameter int unsigned FW   = 10,
  parameter f_kind_e     KIND = F_SYN,
  parameter logic [FW-1:0] POLY = FW'(10'h009)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          en,
  input  logic          din,
  output logic [FW-1:0] value
);

  logic prev;  // last bit taken (transition counter only)

  function automatic logic [FW-1:0] lfsr_step(logic [FW-1:0] s, logic d);
    logic [FW-1:0] n;
    n = {s[FW-2:0], 1'b0} ^ (s[FW-1] ? POLY : '0);
    n[0] = n[0] ^ d;
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      value <= '0;
      prev  <= 1'b0;
    end else if (start) begin
      prev <= din;
      case (KIND)
        F_TC:    value <= '0;
        F_LFSR:  value <= lfsr_step('0, din);
        default: value <= FW'(din);
      endcase
    end else if (en) begin
      prev <= din;
      case (KIND)
        F_TC:    value <= value + FW'(din ^ prev);
        F_LFSR:  value <= lfsr_step(value, din);
        default: value <= value + FW'(din);
      endcase
    end
  end

endmodule
