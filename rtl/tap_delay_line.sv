// tap_delay_line: the sample register chain of the FIR filter (reg0..reg20).
//
// On each clock edge with shift_en high, reg0 captures the new sample din and
// every reg_k captures reg_(k-1); reg_k therefore holds x(n-k) once sample
// x(n) has been taken in. All registers are presented in parallel on taps[],
// where taps[k] is reg_k, for the constant multipliers. A synchronous
// active-high reset clears the chain to zero so the first outputs of a record
// only see the samples already taken in. The shift enable is this design's
// own addition; with it held high the chain shifts every cycle.
module tap_delay_line #(
  parameter int unsigned NTAPS  = 21,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              shift_en,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] taps [NTAPS]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) taps[k] <= '0;
    end else if (shift_en) begin
      taps[0] <= din;
      for (int k = 1; k < NTAPS; k++) taps[k] <= taps[k-1];
    end
  end

endmodule
