// ecg_fir_top: ECG denoising system - sample ROM, address counter and the
// 21-tap FIR low-pass filter.
//
// After reset the address counter reads the record out of the ROM one sample
// per clock. Each sample is shown on X_out (the raw, noisy ECG) and fed to the
// filter, whose output register Y carries the filtered ECG two clock edges
// later. At the 50 MHz clock (20 ns per sample) the 4000-sample record takes
// 80 us; done rises when the last sample has been read and y_valid falls two
// cycles after that. Asserting rst again replays the record.
//
// The ROM, filter structure, widths and coefficients follow the document; the
// reset polarity, the valid/done flags and the stop-at-end behaviour of the
// counter are this design's own choices.
module ecg_fir_top
#(
  parameter int unsigned NUM_SAMPLES = ecg_fir_pkg::NUM_SAMPLES,
  parameter string       INIT_FILE   = ""
) (
  input  logic                clk,
  input  logic                rst,
  output logic [ecg_fir_pkg::DATA_W-1:0] X_out,
  output logic                x_valid,
  output logic [ecg_fir_pkg::ACC_W-1:0]  Y,
  output logic                y_valid,
  output logic                done
);

  localparam int unsigned AW = (NUM_SAMPLES > 1) ? $clog2(NUM_SAMPLES) : 1;

  logic [AW-1:0] addr;

  sample_address_counter #(.NUM_SAMPLES(NUM_SAMPLES)) u_counter (
    .clk   (clk),
    .rst   (rst),
    .addr  (addr),
    .valid (x_valid),
    .done  (done)
  );

  ecg_sample_rom #(
    .DEPTH    (NUM_SAMPLES),
    .DATA_W   (ecg_fir_pkg::DATA_W),
    .INIT_FILE(INIT_FILE)
  ) u_rom (
    .addr (addr),
    .data (X_out)
  );

  fir_filter u_fir (
    .clk     (clk),
    .rst     (rst),
    .x       (X_out),
    .x_valid (x_valid),
    .y       (Y),
    .y_valid (y_valid)
  );

endmodule
