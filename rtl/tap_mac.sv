// tap_mac: one tap of the direct-form FIR filter.
//
// Multiplies the register tap by its constant coefficient and adds the
// partial sum coming from the previous tap:
//   sum_out = sum_in + COEFF * tap
// The product of the 16-bit unsigned sample and 16-bit unsigned coefficient
// is 32 bits wide and so is the running sum (R0..R20 in the filter). The
// block is purely combinational; the filter chains 21 of them between the
// sample registers and the output register, as in the filter's block diagram.
// The coefficient is a parameter, so synthesis turns each multiplier into a
// constant multiplier. The sum wraps modulo 2^ACC_W; with the filter's own
// coefficient set it never reaches that.
module tap_mac #(
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned COEFF_W = 16,
  parameter int unsigned ACC_W   = 32,
  parameter logic [COEFF_W-1:0] COEFF = 16'd287
) (
  input  logic [DATA_W-1:0] tap,
  input  logic [ACC_W-1:0]  sum_in,
  output logic [ACC_W-1:0]  sum_out
);

  logic [ACC_W-1:0] product;

  always_comb begin
    product = ACC_W'(tap) * ACC_W'(COEFF);
    sum_out = sum_in + product;
  end

endmodule
