// output_stage: the backplane outputs of the alarm clock.
//
// The eight channel pulses and a buffered copy of the input clock leave the
// chip as differential pairs (true and complement) able to drive the
// backplane directly. All nine are enabled by one control input, out_en; a
// disabled pair rests at logic 0 (true low, complement high). The overflow
// indication is a further differential pair that out_en does not gate, so
// its true side is the overflow input itself.
//
// The logic is combinational: outputs follow their inputs with no clock. The
// ECL levels and the 25 ohm drive of the real output cells are electrical
// properties that this logic model does not represent; only their logic
// values are modelled. The enable and the set of gated outputs follow the
// chip's description; the resting value of a disabled pair and the ungated
// overflow pair are this design's choices.
module output_stage #(
  parameter int unsigned N_CHANNELS = alarm_clock_pkg::N_CHANNELS
) (
  input  logic                  clk,
  input  logic                  out_en,
  input  logic [N_CHANNELS-1:0] pulse,
  input  logic                  overflow,
  output logic [N_CHANNELS-1:0] pulse_p,
  output logic [N_CHANNELS-1:0] pulse_n,
  output logic                  clk_out_p,
  output logic                  clk_out_n,
  output logic                  overflow_p,
  output logic                  overflow_n
);

  logic [N_CHANNELS-1:0] pulse_g;
  logic                  clk_g;

  assign pulse_g = out_en ? pulse : '0;
  assign clk_g   = out_en & clk;

  assign pulse_p    = pulse_g;
  assign pulse_n    = ~pulse_g;
  assign clk_out_p  = clk_g;
  assign clk_out_n  = ~clk_g;
  assign overflow_p = overflow;
  assign overflow_n = ~overflow;

endmodule
