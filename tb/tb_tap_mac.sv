// tb_tap_mac: self-checking test of one FIR tap (multiply by a constant
// coefficient and add the incoming partial sum).
//
// Two instances, with the smallest (287) and the largest (5983) coefficient
// of the filter, are driven with corner values and random values; every
// result is compared with sum_in + coeff * tap worked out here in 64-bit
// arithmetic and reduced to 32 bits.
module tb_tap_mac;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;

  logic [15:0] tap;
  logic [31:0] sum_in;
  logic [31:0] out_a, out_b;

  tap_mac #(.COEFF(16'd287))  dut_a (.tap(tap), .sum_in(sum_in), .sum_out(out_a));
  tap_mac #(.COEFF(16'd5983)) dut_b (.tap(tap), .sum_in(sum_in), .sum_out(out_b));

  task automatic check(input logic [15:0] t, input logic [31:0] s);
    longint unsigned ea, eb;
    tap = t; sum_in = s;
    #1;
    ea = (longint'(s) + longint'(t) * 287)  & 64'hFFFF_FFFF;
    eb = (longint'(s) + longint'(t) * 5983) & 64'hFFFF_FFFF;
    checks += 2;
    if (out_a !== ea[31:0]) begin
      failures++;
      $display("FAIL a: tap=%0d sum_in=%0d got %0d exp %0d", t, s, out_a, ea);
    end
    if (out_b !== eb[31:0]) begin
      failures++;
      $display("FAIL b: tap=%0d sum_in=%0d got %0d exp %0d", t, s, out_b, eb);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'd0, 32'd0);
    check(16'd1, 32'd0);
    check(16'hFFFF, 32'd0);
    check(16'hFFFF, 32'd123456);
    check(16'd100, 32'd1);
    for (int i = 0; i < 2000; i++) check(16'($urandom), $urandom_range(0, 32'h7FFF_FFFF));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
