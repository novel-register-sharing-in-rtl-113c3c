// ewf_adder: one of the three adders of the EWF datapath.
//
// Adds two W-bit two's-complement operands and wraps on overflow, as a
// fixed-point filter datapath normally does. It is purely combinational:
// every operation in the schedule is single-cycle, so operands are read from
// the register file at the start of a control step and the sum is written
// back at the clock edge that ends it. Three of them run in parallel, as in
// the schedule. The word width and wrap-around arithmetic are this design's
// choices; the schedule only fixes that additions take one step.
module ewf_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_comb y = a + b;
endmodule
