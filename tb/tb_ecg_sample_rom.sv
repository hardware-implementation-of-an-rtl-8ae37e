// tb_ecg_sample_rom: self-checking test of the ECG sample memory.
//
// Instance a loads a 16-entry hex file (tb/ecg_rom_test.hex) and every word is
// compared with the values listed below. Instance b uses the default
// synthetic record of 4000 samples; every sample is compared with the
// generator formula written out again here, and each 400-sample beat must
// have its maximum at the R-spike peak (phase 136). Addresses past the end
// must read zero.
module tb_ecg_sample_rom;
  timeunit 1ns; timeprecision 1ps;

  localparam logic [15:0] FILE_WORDS [16] = '{
    16'ha5cd, 16'h4d3c, 16'hca26, 16'h18b8, 16'h2516, 16'h3031, 16'hbb3b, 16'h1db2,
    16'h6dec, 16'h1332, 16'h2c01, 16'hde06, 16'hd61a, 16'h23c4, 16'h7b38, 16'h2e71};

  int checks = 0, failures = 0;

  logic [3:0]  addr_a;
  logic [15:0] data_a;
  logic [11:0] addr_b;
  logic [15:0] data_b;

  ecg_sample_rom #(.DEPTH(16), .DATA_W(16), .INIT_FILE("tb/ecg_rom_test.hex")) dut_a (
    .addr(addr_a), .data(data_a));
  ecg_sample_rom dut_b (.addr(addr_b), .data(data_b));

  function automatic int tri_ref(int p, int s, int len, int amp);
    int h = len / 2;
    int d;
    if (p < s || p >= s + len) return 0;
    d = (p - s - h < 0) ? (s + h - p) : (p - s - h);
    return amp * (h - d) / h;
  endfunction

  function automatic int model(int i);
    int p = i % 400;
    int m = i % 8;
    int v = 1024 + tri_ref(p, 40, 40, 48) - tri_ref(p, 116, 12, 64)
          + tri_ref(p, 128, 16, 640) - tri_ref(p, 144, 12, 128)
          + tri_ref(p, 220, 80, 160);
    longint unsigned h = (longint'(i) * 1103515245 + 12345) & 64'hFFFF_FFFF;
    v += (m < 4) ? (8 * m - 16) : (8 * (8 - m) - 16);
    v += int'((h >> 16) % 64) - 32;
    return v;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      addr_a = 4'(i);
      #1;
      checks++;
      if (data_a !== FILE_WORDS[i]) begin
        failures++;
        $display("FAIL file word %0d: got %h exp %h", i, data_a, FILE_WORDS[i]);
      end
    end

    for (int beat = 0; beat < 10; beat++) begin
      int best, best_p, i;
      best = -1;
      best_p = -1;
      for (int p = 0; p < 400; p++) begin
        i = beat * 400 + p;
        addr_b = 12'(i);
        #1;
        checks++;
        if (int'(data_b) != model(i)) begin
          failures++;
          $display("FAIL sample %0d: got %0d exp %0d", i, data_b, model(i));
        end
        if (int'(data_b) > best) begin best = int'(data_b); best_p = p; end
      end
      checks++;
      if (best_p != 136) begin
        failures++;
        $display("FAIL beat %0d peaks at phase %0d", beat, best_p);
      end
    end

    for (int i = 4000; i < 4096; i++) begin
      addr_b = 12'(i);
      #1;
      checks++;
      if (data_b !== 16'd0) begin
        failures++;
        $display("FAIL address %0d past the end reads %0d", i, data_b);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
