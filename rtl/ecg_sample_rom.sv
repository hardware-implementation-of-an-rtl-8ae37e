// ecg_sample_rom: read-only memory holding one ECG record.
//
// DEPTH samples of DATA_W-bit unsigned fixed-point data, read
// combinationally: data is mem[addr] in the same cycle, so the filter's first
// register (reg0) is the only register between the memory and the
// multipliers. Addresses at or past DEPTH read as zero.
//
// Contents: with INIT_FILE set, the memory is loaded from that hex file (one
// sample per line), which is how a recorded ECG trace is put into the design.
// With INIT_FILE empty (the default) the memory is filled with a synthetic
// noisy ECG so the design runs on its own. The synthetic record is built per
// sample index i from beats of BEAT_LEN samples (400 samples, 0.8 s at a
// 500 Hz sample rate), each beat with phase p = i mod BEAT_LEN:
//   baseline   1024
//   P wave     +48 triangle over p in [40, 80)
//   Q dip      -64 triangle over p in [116, 128)
//   R spike    +640 triangle over p in [128, 144)
//   S dip      -128 triangle over p in [144, 156)
//   T wave     +160 triangle over p in [220, 300)
//   mains hum  triangle of period 8 samples (about 60 Hz), -16 .. +16
//   noise      ((i * 1103515245 + 12345) >> 16) mod 64, minus 32
// where a triangle of amplitude A over [s, s+L) is A*(L/2 - |p-s-L/2|)/(L/2).
// The record, its length and the hex loading are what the design's test
// flow needs; the waveform itself is this design's own stand-in for a
// recorded trace.
module ecg_sample_rom #(
  parameter int unsigned DEPTH     = 4000,
  parameter int unsigned DATA_W    = 16,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic [AW-1:0]     addr,
  output logic [DATA_W-1:0] data
);

  localparam int BEAT_LEN = 400;

  function automatic int tri_pulse(int p, int s, int len, int amp);
    int half, d;
    half = len / 2;
    if (p < s || p >= s + len) return 0;
    d = p - s - half;
    if (d < 0) d = -d;
    return amp * (half - d) / half;
  endfunction

  function automatic logic [DATA_W-1:0] synth_sample(int i);
    int p, v, hum;
    logic [31:0] h;
    p   = i % BEAT_LEN;
    v   = 1024;
    v  += tri_pulse(p, 40, 40, 48);
    v  -= tri_pulse(p, 116, 12, 64);
    v  += tri_pulse(p, 128, 16, 640);
    v  -= tri_pulse(p, 144, 12, 128);
    v  += tri_pulse(p, 220, 80, 160);
    hum = (i % 8 < 4) ? (i % 8) * 8 - 16 : (8 - i % 8) * 8 - 16;
    v  += hum;
    h   = 32'(i) * 32'd1103515245 + 32'd12345;
    v  += int'((h >> 16) & 32'd63) - 32;
    return DATA_W'(v);
  endfunction

  logic [DATA_W-1:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, mem);
    end else begin
      for (int i = 0; i < DEPTH; i++) mem[i] = synth_sample(i);
    end
  end

  always_comb begin
    if (32'(addr) < DEPTH) data = mem[addr];
    else                   data = '0;
  end

endmodule
