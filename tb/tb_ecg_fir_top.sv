// tb_ecg_fir_top: end-to-end test of the ECG denoising system at its default
// size (4000-sample record, 21-tap filter, 20 ns clock).
//
// The testbench watches the raw samples on X_out and computes the expected
// filter output itself, y(n) = sum_k b_k * x(n-k), from its own copy of the
// coefficient table. It checks that:
//   - every Y matches the reference and arrives two clock edges after its
//     sample, and Y holds between outputs;
//   - the record gives exactly 4000 outputs and done rises 4000 cycles
//     (80 us) after reset is released;
//   - the filter smooths: the summed squared sample-to-sample change of
//     Y/2^16 is well below that of X_out;
//   - a second reset replays the same record with identical results.
// It counts how often each mechanism occurred - outputs during pipeline fill
// (fewer than 21 samples taken in), steady-state outputs, end of record, and
// replay - and counts a failure for any that never did.
module tb_ecg_fir_top;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 21;
  localparam int unsigned B [N] = '{287, 616, 1098, 1726, 2474, 3292, 4113,
                                    4861, 5460, 5849, 5983, 5849, 5460, 4861,
                                    4113, 3292, 2474, 1726, 1098, 616, 287};
  localparam int RECORD = 4000;

  int checks = 0, failures = 0;
  int n_fill = 0, n_steady = 0, n_end = 0, n_replay = 0;

  logic        clk = 0, rst = 1;
  logic [15:0] X_out;
  logic        x_valid, y_valid, done;
  logic [31:0] Y;

  ecg_fir_top dut (
    .clk(clk), .rst(rst), .X_out(X_out), .x_valid(x_valid),
    .Y(Y), .y_valid(y_valid), .done(done));

  always #10 clk = ~clk;

  logic [15:0]     hist [$];
  longint unsigned exp_q [$];
  int              exp_fill [$];
  int unsigned     exp_cycle [$];
  int unsigned     cycle = 0;
  int              outputs;
  logic [31:0]     last_y;
  logic [31:0]     y_rec [2][RECORD];
  int              pass_no = 0;

  function automatic longint unsigned ref_out();
    longint unsigned acc = 0;
    for (int k = 0; k < N && k < hist.size(); k++)
      acc += longint'(B[k]) * longint'(hist[k]);
    return acc;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && x_valid) begin
      hist.push_front(X_out);
      if (hist.size() > N) void'(hist.pop_back());
      exp_q.push_back(ref_out());
      exp_fill.push_back(hist.size() < N);
      exp_cycle.push_back(cycle + 2);
    end
    #1;
    if (!rst && y_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        longint unsigned e;
        int unsigned c;
        int f;
        e = exp_q.pop_front();
        c = exp_cycle.pop_front();
        f = exp_fill.pop_front();
        if (Y !== e[31:0] || cycle != c) begin
          failures++;
          $display("FAIL Y=%0d exp %0d at cycle %0d (due %0d)", Y, e, cycle, c);
        end
        if (f != 0) n_fill++; else n_steady++;
      end
      if (outputs < RECORD) y_rec[pass_no][outputs] = Y;
      outputs++;
      last_y = Y;
    end else if (!rst && outputs > 0) begin
      checks++;
      if (Y !== last_y) begin
        failures++;
        $display("FAIL Y changed without y_valid at cycle %0d", cycle);
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_record();
    int edges;
    longint unsigned dx, dy;
    logic [15:0] prev_x;
    logic [31:0] prev_y;
    bit have_x, have_y;
    @(negedge clk);
    rst = 1;
    repeat (2) @(negedge clk);
    hist.delete(); exp_q.delete(); exp_cycle.delete(); exp_fill.delete();
    outputs = 0;
    rst = 0;
    edges = 0;
    dx = 0; dy = 0; have_x = 0; have_y = 0;
    while (!done) begin
      @(posedge clk);
      edges++;
      #2;
      if (y_valid) begin
        if (have_y) dy += longint'((Y >> 16) > (prev_y >> 16) ? (Y >> 16) - (prev_y >> 16)
                                                              : (prev_y >> 16) - (Y >> 16)) ** 2;
        prev_y = Y; have_y = 1;
      end
      if (x_valid || done) begin
        if (have_x) dx += longint'(X_out > prev_x ? X_out - prev_x : prev_x - X_out) ** 2;
        prev_x = X_out; have_x = 1;
      end
    end
    checks++;
    // 4000 clock edges after reset release at 20 ns each: 80 us
    if (edges != RECORD) begin
      failures++;
      $display("FAIL done after %0d clock edges (%0d ns), expected %0d", edges, edges * 20, RECORD);
    end else n_end++;
    repeat (5) @(posedge clk);
    #2;
    checks++;
    if (outputs != RECORD || exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs, %0d still expected", outputs, exp_q.size());
    end
    checks++;
    if (dy * 4 > dx) begin
      failures++;
      $display("FAIL filter does not smooth: sum dX^2=%0d sum dY^2=%0d", dx, dy);
    end
    $display("record %0d: done after %0d edges = %0d ns", pass_no, edges, edges * 20);
    $display("record %0d: %0d outputs, sum dX^2=%0d sum dY^2=%0d", pass_no, outputs, dx, dy);
  endtask

  initial begin
    run_record();
    pass_no = 1;
    run_record();
    for (int i = 0; i < RECORD; i++) begin
      checks++;
      if (y_rec[0][i] !== y_rec[1][i]) begin
        failures++;
        $display("FAIL replay differs at output %0d", i);
      end
    end
    n_replay++;
    $display("mechanisms: fill=%0d steady=%0d end_of_record=%0d replay=%0d",
             n_fill, n_steady, n_end, n_replay);
    if (n_fill == 0)   begin failures++; $display("FAIL pipeline fill never seen"); end
    if (n_steady == 0) begin failures++; $display("FAIL steady state never seen"); end
    if (n_end == 0)    begin failures++; $display("FAIL end of record never seen"); end
    if (n_replay == 0) begin failures++; $display("FAIL replay never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
