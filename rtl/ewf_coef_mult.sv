// ewf_coef_mult: the single multiplier of the EWF datapath.
//
// Every multiplication of the wave digital filter scales a signal by one of
// eight fixed filter coefficients, so this unit multiplies the W-bit signed
// operand x by the coefficient picked by sel, COEFS[sel], and returns the
// product shifted right by FRAC bits (coefficients are fixed point with FRAC
// fraction bits), truncated to W bits. It is combinational and completes
// within the control step, as the single-cycle schedule requires. The number
// format and the coefficient values are this design's choice: the schedule
// gives only where multiplications occur, not the filter's coefficients.
module ewf_coef_mult #(
  parameter int unsigned W     = 16,
  parameter int unsigned FRAC  = 14,
  parameter int          COEFS [ewf_pkg::N_COEFS] = '{8192, 12288, -6144, 10240, -4096, 14336, 2048, 5120}
) (
  input  logic [W-1:0] x,
  input  logic [2:0]   sel,
  output logic [W-1:0] y
);
  logic signed [W+31:0] prod;
  logic signed [31:0]   c;

  always_comb begin
    c    = COEFS[sel];
    prod = $signed(x) * c;
    y    = W'(prod >>> FRAC);
  end
endmodule
