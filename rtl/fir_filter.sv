// fir_filter: 21-tap direct-form FIR low-pass filter for ECG samples.
//
// Implements y(n) = b_0*x(n) + b_1*x(n-1) + ... + b_20*x(n-20) with the
// Kaiser-window coefficients of ecg_fir_pkg (16-bit, scaled by 2^16). The
// structure follows the filter's block diagram: a chain of 21 sample
// registers (reg0..reg20, tap_delay_line), one constant multiplier per
// register and a chain of adders that forms the partial sums R0..R20
// (tap_mac), and a 32-bit output register Y that captures R20. All taps work
// in parallel, so one filtered sample leaves per clock.
//
// Interface and timing: x is taken into reg0 on the clock edge where x_valid
// is high. The adder chain settles during the following cycle and Y captures
// it on the next edge, so y/y_valid appear two clock edges after x/x_valid
// (one edge for reg0, one for Y). Y holds its value while no new sample
// arrives. Y is the full 32-bit sum; y >> 16 is the filtered sample in the
// input's scale. The valid handshake and the synchronous active-high reset
// are this design's own choices; widths, tap count and coefficients are the
// document's.
module fir_filter
#(
  parameter int unsigned NTAPS  = ecg_fir_pkg::NTAPS,
  parameter int unsigned DATA_W = ecg_fir_pkg::DATA_W,
  parameter int unsigned ACC_W  = ecg_fir_pkg::ACC_W,
  parameter ecg_fir_pkg::coeff_t COEFF [NTAPS] = ecg_fir_pkg::KAISER_LP_COEFF
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] x,
  input  logic              x_valid,
  output logic [ACC_W-1:0]  y,
  output logic              y_valid
);

  logic [DATA_W-1:0] taps [NTAPS];   // reg0 .. reg20
  logic [ACC_W-1:0]  psum [NTAPS+1]; // psum[k+1] is R_k; psum[0] is zero
  logic              shifted;        // the register chain moved last edge

  tap_delay_line #(.NTAPS(NTAPS), .DATA_W(DATA_W)) u_delay (
    .clk      (clk),
    .rst      (rst),
    .shift_en (x_valid),
    .din      (x),
    .taps     (taps)
  );

  assign psum[0] = '0;

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    tap_mac #(
      .DATA_W (DATA_W),
      .COEFF_W(ecg_fir_pkg::COEFF_W),
      .ACC_W  (ACC_W),
      .COEFF  (COEFF[k])
    ) u_mac (
      .tap     (taps[k]),
      .sum_in  (psum[k]),
      .sum_out (psum[k+1])
    );
  end

  // Output register Y.
  always_ff @(posedge clk) begin
    if (rst) begin
      shifted <= 1'b0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      shifted <= x_valid;
      y_valid <= shifted;
      if (shifted) y <= psum[NTAPS];
    end
  end

  // Handshake rule: an output is flagged exactly two edges after its input.
  a_latency: assert property (@(posedge clk) disable iff (rst)
                              $past(x_valid, 2) && !$past(rst, 1) && !$past(rst, 2) |-> y_valid);
  a_no_spurious: assert property (@(posedge clk) disable iff (rst)
                                  y_valid |-> $past(x_valid, 2));

endmodule
