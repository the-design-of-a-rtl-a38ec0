// cam_array: the 8 x 20 content addressable memory of the alarm clock.
//
// Each word is a row of transparent latches. While a word's latch enable is
// high the word follows the shared data lines; when the enable falls the word
// holds the last value. Every word compares itself, bit by bit, with whatever
// is on the data lines (an exclusive-or per bit, as the chip does) and all
// words compare in parallel. The result is split in two per word: one match
// for the LSB_BITS low bits and one for the remaining high bits, because the
// channel logic after the array gates the second with the first.
//
// Interface: latch_en[w] writes word w (level sensitive, several may be high
// at once); data is both the write data and the compare key; match_lsb[w] and
// match_hi[w] are combinational from data and the stored words, with no clock.
//
// The storage in latches, the per-bit exclusive-or and the 3/17 split of the
// match follow the chip; there is no read port, since the chip is not said to
// read its words back.
module cam_array #(
  parameter int unsigned N_WORDS  = alarm_clock_pkg::N_CHANNELS,
  parameter int unsigned WIDTH    = alarm_clock_pkg::TIME_BITS,
  parameter int unsigned LSB_BITS = alarm_clock_pkg::LSB_BITS
) (
  input  logic [N_WORDS-1:0] latch_en,
  input  logic [WIDTH-1:0]   data,
  output logic [N_WORDS-1:0] match_lsb,
  output logic [N_WORDS-1:0] match_hi
);

  logic [WIDTH-1:0] word_q [N_WORDS];

  for (genvar w = 0; w < N_WORDS; w++) begin : g_word
    logic [WIDTH-1:0] diff;

    // Transparent latch row: the word is written while its enable is high.
    always_latch begin
      if (latch_en[w]) word_q[w] = data;
    end

    // One exclusive-or per bit; a part matches when none of its bits differ.
    assign diff         = word_q[w] ^ data;
    assign match_lsb[w] = ~|diff[LSB_BITS-1:0];
    assign match_hi[w]  = ~|diff[WIDTH-1:LSB_BITS];
  end

endmodule
