// elapsed_counter: 20-bit up counter of clock periods since the last fiducial.
//
// The count goes to zero on the clock edge that samples fiducial high and
// then rises by one every clock period (8.4 ns at 119 MHz), so it always holds
// the time elapsed since the last fiducial in clock periods. At 360 Hz the
// interpulse period is about 330,556 periods, well inside 2**20. The count
// wraps at 2**20 if no fiducial comes.
//
// Two test inputs that the chip also brings out are kept: preload loads
// preload_value into the counter, and clk_en low gates the clock, freezing the
// counter. The overflow output is the AND of the second and third most
// significant count bits: it rises at 3/8 and 7/8 of the count range and
// falls at 0 and 1/2.
//
// Priority: fiducial, then preload, then clk_en. fiducial and preload act even
// when the clock is gated. All inputs are sampled on the rising edge of clk;
// count and overflow are registered (overflow is decoded from the register).
//
// The chip's counter is pseudo-synchronous; how its carries were arranged is
// not known, and this one is plainly synchronous. The priority of the inputs,
// their being synchronous and the use of the data lines as preload value (see
// the top level) are this design's choices.
module elapsed_counter #(
  parameter int unsigned WIDTH = alarm_clock_pkg::TIME_BITS
) (
  input  logic             clk,
  input  logic             fiducial,
  input  logic             clk_en,
  input  logic             preload,
  input  logic [WIDTH-1:0] preload_value,
  output logic [WIDTH-1:0] count,
  output logic             overflow
);

  always_ff @(posedge clk) begin
    if (fiducial)     count <= '0;
    else if (preload) count <= preload_value;
    else if (clk_en)  count <= count + 1'b1;
  end

  assign overflow = count[WIDTH-2] & count[WIDTH-3];

endmodule
