// pulse_former: turns the two match signals of each channel into an output
// pulse eight clock periods long.
//
// The stored time T of a channel is split into a low part (3 bits) and a high
// part (17 bits). As the counter advances, the low part matches once every
// eight clock periods; the high part matches during the one eight-period slot
// that contains T. The low match is used as the enable of a flip-flop whose
// input is the high match: at count T the flip-flop takes 1, eight periods
// later (count T+8, low part matches again, high part no longer does) it takes
// 0. The pulse is therefore exactly 2**LSB_BITS periods long and starts with
// the resolution of one clock period, without a counter per channel.
//
// Timing: pulse[c] rises on the clock edge that samples count == T and falls
// on the edge that samples count == T+8. fiducial clears every pulse at the
// same edge that clears the counter; clk_en low freezes the pulses with the
// counter.
//
// The gating of the high match by the low match and the eight-period pulse
// come from the chip's description; the flip-flop that holds the pulse between
// low matches, and the clear on fiducial, are this design's reading of it.
module pulse_former #(
  parameter int unsigned N_CHANNELS = alarm_clock_pkg::N_CHANNELS
) (
  input  logic                  clk,
  input  logic                  fiducial,
  input  logic                  clk_en,
  input  logic [N_CHANNELS-1:0] match_lsb,
  input  logic [N_CHANNELS-1:0] match_hi,
  output logic [N_CHANNELS-1:0] pulse
);

  always_ff @(posedge clk) begin
    if (fiducial) pulse <= '0;
    else if (clk_en) begin
      for (int c = 0; c < int'(N_CHANNELS); c++)
        if (match_lsb[c]) pulse[c] <= match_hi[c];
    end
  end

endmodule
