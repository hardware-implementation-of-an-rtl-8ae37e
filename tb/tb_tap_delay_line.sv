// tb_tap_delay_line: self-checking test of the 21-stage sample register chain.
//
// Random samples are offered with a random shift enable. A history queue
// kept here records every sample taken in; after each clock edge taps[k]
// must equal the k-th newest sample taken in, or zero where fewer than k+1
// samples have entered since reset. A mid-run reset must clear every stage.
module tb_tap_delay_line;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 21;

  int checks = 0, failures = 0;

  logic        clk = 0, rst = 1, shift_en = 0;
  logic [15:0] din = '0;
  logic [15:0] taps [N];

  logic [15:0] hist [$];

  tap_delay_line #(.NTAPS(N), .DATA_W(16)) dut (
    .clk(clk), .rst(rst), .shift_en(shift_en), .din(din), .taps(taps)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k < N; k++) begin
      logic [15:0] e;
      e = (k < hist.size()) ? hist[k] : 16'd0;
      checks++;
      if (taps[k] !== e) begin
        failures++;
        $display("FAIL t=%0t tap %0d got %0h exp %0h", $time, k, taps[k], e);
      end
    end
  endtask

  task automatic step(input logic en, input logic [15:0] d, input logic r);
    @(negedge clk);
    shift_en = en; din = d; rst = r;
    @(posedge clk);
    if (r) hist.delete();
    else if (en) hist.push_front(d);
    #1 compare();
  endtask

  initial begin
    step(0, 16'h0, 1);
    step(0, 16'h0, 1);
    for (int i = 0; i < 400; i++) step($urandom_range(0, 3) != 0, 16'($urandom), 0);
    step(1, 16'h1234, 1);  // reset wins over shift
    for (int i = 0; i < 100; i++) step(1, 16'($urandom), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
