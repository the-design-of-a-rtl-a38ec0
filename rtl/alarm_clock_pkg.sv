// alarm_clock_pkg: sizes shared by the eight channel alarm clock.
//
// The chip counts periods of its 119 MHz input clock (8.4 ns each) since the
// last fiducial and fires one output pulse per channel when the count equals
// the time stored for that channel. The numbers below are the chip's own:
// eight channels, 20-bit times, the time split into 3 low bits that select the
// clock period within an eight-period slot and 17 high bits that select the
// slot, so that every output pulse is eight clock periods long.
package alarm_clock_pkg;

  // Number of channels (words of the content addressable memory).
  localparam int unsigned N_CHANNELS = 8;
  // Width of a stored time, of the counter and of the shared data lines.
  localparam int unsigned TIME_BITS  = 20;
  // Low bits whose match gates the match of the high bits.
  localparam int unsigned LSB_BITS   = 3;
  // Length of an output pulse in clock periods (2**LSB_BITS).
  localparam int unsigned PULSE_CLOCKS = 1 << LSB_BITS;

endpackage
