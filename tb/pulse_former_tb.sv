// pulse_former_tb: self-checking test of the per-channel pulse former.
//
// The testbench holds eight random times, keeps its own count of clock
// periods since a fiducial and derives the low and high match signals from
// them, as the content addressable memory would. After the clock edge that
// samples count k, channel c must be high exactly when T[c] <= k <= T[c]+7.
// It checks that at every edge, measures each pulse to be eight clock periods
// long, and gates the clock at random to check that the pulses freeze with
// the count: the expected state follows the last count sampled with the
// clock enabled. Several fiducial periods are run, with new times for each. A
// watchdog ends a hung run.
module pulse_former_tb;
  import alarm_clock_pkg::*;

  localparam int unsigned N = N_CHANNELS;
  localparam int unsigned W = TIME_BITS;
  localparam int unsigned L = LSB_BITS;
  localparam int unsigned PERIOD = 3000;

  logic clk = 0;
  logic fiducial, clk_en;
  logic [N-1:0] match_lsb, match_hi, pulse;

  logic [W-1:0] t [N];
  logic [W-1:0] k, last;
  logic seen;
  int width [N];
  int checks = 0, failures = 0, pulses = 0;

  pulse_former dut (.clk, .fiducial, .clk_en, .match_lsb, .match_hi, .pulse);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb
    for (int c = 0; c < int'(N); c++) begin
      match_lsb[c] = (t[c][L-1:0] == k[L-1:0]);
      match_hi[c]  = (t[c][W-1:L] == k[W-1:L]);
    end

  initial begin
    fiducial = 1'b0; clk_en = 1'b1; k = '0;
    for (int c = 0; c < int'(N); c++) t[c] = '0;
    for (int p = 0; p < 4; p++) begin
      for (int c = 0; c < int'(N); c++) begin
        t[c] = W'($urandom_range(PERIOD - 20));
        width[c] = 0;
      end
      if (p == 0) t[0] = '0;
      fiducial = 1'b1;
      @(posedge clk); #1;
      fiducial = 1'b0;
      k = '0;
      seen = 1'b0;
      checks++;
      if (pulse !== '0) begin failures++; $display("fiducial did not clear pulses"); end
      while (k < PERIOD) begin
        logic sampled_en;
        logic [W-1:0] ks;
        clk_en = ($urandom_range(9) != 0);
        sampled_en = clk_en;
        ks = k;
        @(posedge clk); #1;
        if (sampled_en) begin
          last = ks;
          seen = 1'b1;
        end
        for (int c = 0; c < int'(N); c++) begin
          logic exp;
          exp = seen && (last >= t[c]) && (last <= t[c] + 7);
          checks++;
          if (pulse[c] !== exp) begin
            failures++;
            if (failures < 10) $display("ch %0d T %0d k %0d: pulse %b exp %b", c, t[c], ks, pulse[c], exp);
          end
          if (sampled_en && pulse[c]) width[c]++;
        end
        if (sampled_en) k = k + 1'b1;
      end
      for (int c = 0; c < int'(N); c++) begin
        checks++;
        pulses++;
        if (width[c] != int'(PULSE_CLOCKS)) begin
          failures++;
          $display("ch %0d pulse %0d clocks long", c, width[c]);
        end
      end
    end
    $display("pulses measured: %0d", pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
