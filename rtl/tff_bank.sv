// tff_bank: the state register of the machine, NU T-type flip-flops sharing
// one clock. A flip-flop toggles on a rising clock edge when its T input is 1.
// An active-low asynchronous reset clears all of them to the all-zero state;
// the method itself needs no reset (the eps sequence synchronises the
// machine), the reset is this design's addition for simulation and bring-up.
module tff_bank #(
  parameter int unsigned NU = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NU-1:0] t,
  output logic [NU-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q ^ t;
  end

endmodule
