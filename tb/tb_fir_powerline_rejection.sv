// tb_fir_powerline_rejection: frequency-response test of the FIR low-pass
// filter against its purpose - keep the ECG band, remove 60 Hz mains hum.
//
// The sample rate is taken as 500 Hz (a 4000-sample record spans 8 s). For
// each test tone a full-scale-centred sine (offset 32768, amplitude 16000) is
// fed for 600 samples; after the filter has settled the peak-to-peak swing of
// Y / 2^16 is compared with the input's swing. Expected gains, worked out
// from the coefficient table: about 0.97 at 5 Hz, about 0.58 at the 20 Hz
// cut-off, below 0.01 at 60 Hz. The DC level must pass with unity gain.
module tb_fir_powerline_rejection;
  timeunit 1ns; timeprecision 1ps;

  localparam real FS = 500.0;

  int checks = 0, failures = 0;

  logic        clk = 0, rst = 1;
  logic [15:0] x = '0;
  logic        x_valid = 0;
  logic [31:0] y;
  logic        y_valid;

  fir_filter dut (.clk(clk), .rst(rst), .x(x), .x_valid(x_valid), .y(y), .y_valid(y_valid));

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tone(input real f, input real gmin, input real gmax);
    int ymin, ymax, xmin, xmax;
    longint ysum;
    int nsum;
    real gain, mean;
    ymin = 1 << 30; ymax = -1; xmin = 1 << 30; xmax = -1; ysum = 0; nsum = 0;
    @(negedge clk) rst = 1; x_valid = 0;
    @(negedge clk) rst = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      x = 16'($rtoi(32768.0 + 16000.0 * $sin(2.0 * 3.14159265358979 * f * n / FS) + 0.5));
      x_valid = 1;
      if (int'(x) < xmin) xmin = int'(x);
      if (int'(x) > xmax) xmax = int'(x);
      if (n >= 100 && y_valid) begin
        if (int'(y >> 16) < ymin) ymin = int'(y >> 16);
        if (int'(y >> 16) > ymax) ymax = int'(y >> 16);
        ysum += longint'(y[31:16]);
        nsum++;
      end
    end
    @(negedge clk) x_valid = 0;
    gain = real'(ymax - ymin) / real'(xmax - xmin);
    mean = real'(ysum) / real'(nsum);
    $display("tone %0.1f Hz: gain %0.4f, output mean %0.1f", f, gain, mean);
    checks++;
    if (gain < gmin || gain > gmax) begin
      failures++;
      $display("FAIL gain at %0.1f Hz is %0.4f, expected %0.3f .. %0.3f", f, gain, gmin, gmax);
    end
    checks++;
    if (mean < 32768.0 - 400.0 || mean > 32768.0 + 400.0) begin
      failures++;
      $display("FAIL DC level at %0.1f Hz is %0.1f", f, mean);
    end
  endtask

  initial begin
    tone(5.0, 0.93, 1.01);
    tone(20.0, 0.50, 0.66);
    tone(60.0, 0.0, 0.01);
    tone(50.0, 0.0, 0.01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
