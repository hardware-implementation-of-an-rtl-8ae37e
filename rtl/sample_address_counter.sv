// sample_address_counter: reads one ECG record out of the sample ROM.
//
// After reset the address starts at 0 and advances by one every clock, so one
// sample is presented per cycle (20 ns at the 50 MHz clock used for the
// record timing). valid is high while addr points at a sample of the record;
// after the last address (NUM_SAMPLES-1) the counter stops, valid falls and
// done rises and stays high until the next reset. A record of NUM_SAMPLES
// samples therefore takes NUM_SAMPLES cycles, 4000 x 20 ns = 80 us at the
// default. Stopping at the end rather than wrapping is this design's choice.
module sample_address_counter #(
  parameter int unsigned NUM_SAMPLES = 4000,
  localparam int unsigned AW = (NUM_SAMPLES > 1) ? $clog2(NUM_SAMPLES) : 1
) (
  input  logic          clk,
  input  logic          rst,
  output logic [AW-1:0] addr,
  output logic          valid,
  output logic          done
);

  localparam logic [AW-1:0] LAST = AW'(NUM_SAMPLES - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      addr <= '0;
      done <= 1'b0;
    end else if (!done) begin
      if (addr == LAST) done <= 1'b1;
      else              addr <= addr + 1'b1;
    end
  end

  assign valid = !done;

  // The address never leaves the record, and done, once set, holds until reset.
  a_addr_in_range: assert property (@(posedge clk) disable iff (rst) addr <= LAST);
  a_done_sticky:   assert property (@(posedge clk) disable iff (rst) $past(done) && !$past(rst) |-> done);

endmodule
