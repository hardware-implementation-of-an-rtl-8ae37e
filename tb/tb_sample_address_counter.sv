// tb_sample_address_counter: self-checking test of the ROM address sequencer.
//
// A 10-sample instance and a default 4000-sample instance run side by side
// from the same reset. Every cycle the address must equal the number of
// cycles since reset while valid is high; valid must stay high for exactly
// NUM_SAMPLES cycles (4000 x 20 ns = 80 us for the default) and done must rise
// on the following cycle and stay high. A second reset must restart both.
module tb_sample_address_counter;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;

  logic clk = 0, rst = 1;
  logic [3:0]  addr_s;  logic valid_s, done_s;
  logic [11:0] addr_d;  logic valid_d, done_d;

  sample_address_counter #(.NUM_SAMPLES(10)) dut_s (
    .clk(clk), .rst(rst), .addr(addr_s), .valid(valid_s), .done(done_s));
  sample_address_counter dut_d (
    .clk(clk), .rst(rst), .addr(addr_d), .valid(valid_d), .done(done_d));

  always #10 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(input int n, input int k, input int a, input logic v, input logic d);
    checks++;
    if (n == 10) begin
      if (int'(addr_s) != a || valid_s !== v || done_s !== d) begin
        failures++;
        $display("FAIL small k=%0d addr=%0d valid=%0b done=%0b", k, addr_s, valid_s, done_s);
      end
    end else begin
      if (int'(addr_d) != a || valid_d !== v || done_d !== d) begin
        failures++;
        $display("FAIL default k=%0d addr=%0d valid=%0b done=%0b", k, addr_d, valid_d, done_d);
      end
    end
  endtask

  task automatic run_record();
    realtime t0;
    int valid_cycles;
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    t0 = $realtime;
    valid_cycles = 0;
    for (int k = 0; k < 4010; k++) begin
      // state during cycle k after reset release
      if (k < 10) expect_state(10, k, k, 1'b1, 1'b0);
      else        expect_state(10, k, 9, 1'b0, 1'b1);
      if (k < 4000) expect_state(4000, k, k, 1'b1, 1'b0);
      else          expect_state(4000, k, 3999, 1'b0, 1'b1);
      if (valid_d) valid_cycles++;
      @(negedge clk);
      if (k == 3999) begin
        checks++;
        if ($realtime - t0 != 80000.0) begin
          failures++;
          $display("FAIL record took %0t ns", $realtime - t0);
        end
      end
    end
    checks++;
    if (valid_cycles != 4000) begin
      failures++;
      $display("FAIL %0d valid cycles", valid_cycles);
    end
  endtask

  initial begin
    @(negedge clk);
    run_record();
    repeat (3) @(negedge clk);
    run_record();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
