// tb_fir_filter: self-checking test of the 21-tap FIR low-pass filter.
//
// Reference: the coefficient table (round(b_n * 2^16) of the 20th-order
// Kaiser low-pass design) is written out here independently of the RTL
// package, and y(n) = sum_k b_k * x(n-k) is computed from a history of the
// samples driven. Tests:
//   impulse   - a single 1 gives the coefficients one per sample
//   step      - a constant 65535 settles at 65535 * 65535 (unity DC gain)
//   alternate - 0/65535 at the Nyquist rate is strongly attenuated
//   random    - random samples with random gaps in x_valid
// Each output must appear exactly two clock edges after its input
// (reg0, then the output register), and y must hold during gaps.
module tb_fir_filter;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 21;
  localparam int unsigned B [N] = '{287, 616, 1098, 1726, 2474, 3292, 4113,
                                    4861, 5460, 5849, 5983, 5849, 5460, 4861,
                                    4113, 3292, 2474, 1726, 1098, 616, 287};

  int checks = 0, failures = 0;
  int outputs = 0;

  logic        clk = 0, rst = 1;
  logic [15:0] x = '0;
  logic        x_valid = 0;
  logic [31:0] y;
  logic        y_valid;

  fir_filter dut (.clk(clk), .rst(rst), .x(x), .x_valid(x_valid), .y(y), .y_valid(y_valid));

  always #10 clk = ~clk;   // 20 ns clock

  logic [15:0] hist [$];                 // newest first
  longint unsigned exp_q [$];            // expected outputs in order
  int unsigned     exp_cycle [$];        // cycle each is due
  int unsigned     cycle = 0;
  logic [31:0]     last_y;

  function automatic longint unsigned ref_out();
    longint unsigned acc = 0;
    for (int k = 0; k < N; k++)
      if (k < hist.size()) acc += longint'(B[k]) * longint'(hist[k]);
    return acc;
  endfunction

  // Output monitor: every y_valid must match the oldest expected value and
  // arrive exactly on the cycle it is due.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    #1;
    if (!rst) begin
      if (y_valid) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected output %0d at cycle %0d", y, cycle);
        end else begin
          longint unsigned e;
          int unsigned c;
          e = exp_q.pop_front();
          c = exp_cycle.pop_front();
          if (y !== e[31:0] || cycle != c) begin
            failures++;
            $display("FAIL y=%0d exp %0d at cycle %0d (due %0d)", y, e, cycle, c);
          end
        end
        outputs++;
        last_y = y;
      end else if (outputs > 0) begin
        checks++;
        if (y !== last_y) begin
          failures++;
          $display("FAIL y changed without y_valid at cycle %0d", cycle);
        end
      end
    end
  end

  task automatic drive(input logic v, input logic [15:0] d);
    @(negedge clk);
    x_valid = v; x = d;
    @(posedge clk);
    if (v) begin
      hist.push_front(d);
      if (hist.size() > N) void'(hist.pop_back());
      exp_q.push_back(ref_out());
      exp_cycle.push_back(cycle + 2);   // cycle is updated after this edge
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst = 1; x_valid = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    hist.delete();
    outputs = 0;
  endtask

  task automatic flush();
    @(negedge clk); x_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_q.size());
      exp_q.delete(); exp_cycle.delete();
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    do_reset();

    // impulse: outputs are the coefficients themselves
    drive(1, 16'd1);
    for (int i = 0; i < N + 4; i++) drive(1, 16'd0);
    flush();

    // step: full-scale constant input
    do_reset();
    for (int i = 0; i < N + 5; i++) drive(1, 16'hFFFF);
    flush();
    checks++;
    if (y !== 32'd65535 * 32'd65535) begin
      failures++;
      $display("FAIL step settles at %0d", y);
    end

    // Nyquist-rate square wave: the output stays near the mean
    do_reset();
    for (int i = 0; i < N + 10; i++) drive(1, (i % 2) ? 16'hFFFF : 16'h0000);
    flush();
    checks++;
    if ((y >> 16) < 16'd32000 || (y >> 16) > 16'd33600) begin
      failures++;
      $display("FAIL alternating input not smoothed: y>>16 = %0d", y >> 16);
    end

    // random data with random gaps in x_valid
    do_reset();
    for (int i = 0; i < 1500; i++) drive($urandom_range(0, 4) != 0, 16'($urandom));
    flush();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
