// alarm_clock_chip: the eight channel alarm clock of the SLC timing system.
//
// The chip produces eight timing pulses per beam crossing, each delayed from
// the fiducial by its own programmed number of 8.4 ns clock periods anywhere
// in the 2.78 ms (360 Hz) interpulse period. Instead of a presettable counter
// per channel it has one counter of the time since the fiducial and an 8 x 20
// content addressable memory (CAM) holding the eight programmed times. The
// counter drives the CAM's data lines; a word whose stored time equals the
// count raises its match, and a pulse former per channel stretches the match
// into a pulse eight clock periods long.
//
// Data lines: the CAM has one set of 20 data lines used both to write words
// and as the compare key. With load_sel high they carry the external data_in
// pins (for writing words with latch_en, or for preloading the counter);
// with load_sel low they carry the counter, which is normal operation.
//
// Interface (all synchronous to the rising edge of clk except latch_en,
// which is a level-sensitive latch enable per word, and out_en, which gates
// the outputs combinationally):
//   fiducial  clears the counter and the pulses (the start of the period)
//   clk_en    low gates the clock: counter and pulses hold
//   preload   loads the counter from the data lines (data_in with load_sel)
//   out_en    enables the eight pulse pairs and the buffered clock pair
// latch_en may be raised only while load_sel is high (checked by an assertion).
// A channel programmed with time T raises pulse_p one clock edge after the
// counter reaches T, that is T+1 edges after the edge that samples fiducial,
// and holds it for eight clock periods.
//
// The split into CAM, counter, match gating, enabled differential outputs and
// overflow pair follows the chip. The select between data_in and the counter,
// the use of the data lines for the preload value, and the synchronous
// fiducial input are this design's choices; how the fiducial is obtained from
// the clock with its missing pulse is outside this block.
module alarm_clock_chip #(
  parameter int unsigned N_CHANNELS = alarm_clock_pkg::N_CHANNELS,
  parameter int unsigned TIME_BITS  = alarm_clock_pkg::TIME_BITS,
  parameter int unsigned LSB_BITS   = alarm_clock_pkg::LSB_BITS
) (
  input  logic                  clk,
  input  logic                  fiducial,
  input  logic                  clk_en,
  input  logic                  preload,
  input  logic                  load_sel,
  input  logic [TIME_BITS-1:0]  data_in,
  input  logic [N_CHANNELS-1:0] latch_en,
  input  logic                  out_en,
  output logic [N_CHANNELS-1:0] pulse_p,
  output logic [N_CHANNELS-1:0] pulse_n,
  output logic                  clk_out_p,
  output logic                  clk_out_n,
  output logic                  overflow_p,
  output logic                  overflow_n
);

  logic [TIME_BITS-1:0]  count;
  logic [TIME_BITS-1:0]  data_lines;
  logic                  overflow;
  logic [N_CHANNELS-1:0] match_lsb, match_hi, pulse;

  // The shared data lines: external data while loading, the count otherwise.
  assign data_lines = load_sel ? data_in : count;

  elapsed_counter #(.WIDTH(TIME_BITS)) u_counter (
    .clk,
    .fiducial,
    .clk_en,
    .preload,
    .preload_value(data_lines),
    .count,
    .overflow
  );

  cam_array #(.N_WORDS(N_CHANNELS), .WIDTH(TIME_BITS), .LSB_BITS(LSB_BITS)) u_cam (
    .latch_en,
    .data(data_lines),
    .match_lsb,
    .match_hi
  );

  pulse_former #(.N_CHANNELS(N_CHANNELS)) u_pulse (
    .clk,
    .fiducial,
    .clk_en,
    .match_lsb,
    .match_hi,
    .pulse
  );

  // Words are written only from the external data pins: a word enabled while
  // the counter drives the data lines would follow the count.
  a_write_from_pins : assert property (@(posedge clk) !load_sel |-> latch_en == '0)
    else $error("latch_en raised while the counter drives the data lines");

  output_stage #(.N_CHANNELS(N_CHANNELS)) u_out (
    .clk,
    .out_en,
    .pulse,
    .overflow,
    .pulse_p,
    .pulse_n,
    .clk_out_p,
    .clk_out_n,
    .overflow_p,
    .overflow_n
  );

endmodule
