// ecg_fir_pkg: widths, types and the filter coefficient table shared by the
// ECG FIR filter blocks.
//
// The filter is a 21-tap (order 20) low-pass FIR with a Kaiser-window design
// and a 20 Hz cut-off. Its coefficients b_n (all below one) are stored as
// round(b_n * 2^16) in 16-bit unsigned fixed point. The set is symmetric
// (b_n == b_(20-n)) and sums to 65535, so the filter has unity DC gain with
// the output read as a 16.16 fixed-point number. Samples are 16-bit unsigned
// and every product and partial sum is 32 bits wide; because the taps sum to
// less than 2^16 the 32-bit sum can never overflow.
package ecg_fir_pkg;

  localparam int unsigned DATA_W  = 16;  // ECG sample width (X)
  localparam int unsigned COEFF_W = 16;  // coefficient width, scaled by 2^16
  localparam int unsigned ACC_W   = 32;  // product and partial-sum width
  localparam int unsigned NTAPS   = 21;  // filter order 20 -> 21 taps
  localparam int unsigned NUM_SAMPLES = 4000;  // samples in one ECG record

  typedef logic [DATA_W-1:0]  sample_t;
  typedef logic [COEFF_W-1:0] coeff_t;
  typedef logic [ACC_W-1:0]   acc_t;

  // b_0 .. b_20, rounded values of b_n * 2^16.
  localparam coeff_t KAISER_LP_COEFF [NTAPS] = '{
    16'd287,  16'd616,  16'd1098, 16'd1726, 16'd2474, 16'd3292, 16'd4113,
    16'd4861, 16'd5460, 16'd5849, 16'd5983, 16'd5849, 16'd5460, 16'd4861,
    16'd4113, 16'd3292, 16'd2474, 16'd1726, 16'd1098, 16'd616,  16'd287
  };

endpackage
