// alarm_clock_chip_tb: end-to-end test of the eight channel alarm clock at
// its full size (eight channels, 20-bit times).
//
// The testbench plays the part of the timing module around the chip: it
// writes eight times into the memory through data_in and the latch enables,
// sends fiducials, and watches the differential outputs. At every clock edge
// it compares all outputs with a model of the chip's behaviour (count since
// fiducial, data line select, per-channel pulse state, overflow, output
// enable). Independently of that model it measures when each pulse rises and
// how long it lasts: with the clock running freely a channel programmed with
// T must rise T+1 edges after the fiducial edge and last eight edges.
//
// Runs, in order:
//   1. short periods (2,400 clocks) with times below 2,300: exact timing,
//      then random clock gating and random output disabling;
//   2. counter preloads to just before 3/8, 1/2, 7/8 of the range and to the
//      end of the range, to see the overflow pair rise, fall and the count
//      wrap;
//   3. one full 360 Hz interpulse period, 119 MHz / 360 Hz = 330,556 clocks,
//      with times spread over the whole period, the last one ending exactly
//      at its end.
// Each mechanism (word write, fiducial, pulse, clock gating, output disable,
// preload, overflow rise and fall, wrap) is counted and must occur.
module alarm_clock_chip_tb;
  import alarm_clock_pkg::*;

  localparam int unsigned N = N_CHANNELS;
  localparam int unsigned W = TIME_BITS;
  localparam int unsigned L = LSB_BITS;
  localparam int unsigned SHORT_PERIOD = 2400;
  localparam int unsigned FULL_PERIOD  = 330_556;

  logic clk = 0;
  logic fiducial, clk_en, preload, load_sel, out_en;
  logic [W-1:0] data_in;
  logic [N-1:0] latch_en;
  logic [N-1:0] pulse_p, pulse_n;
  logic clk_out_p, clk_out_n, overflow_p, overflow_n;

  alarm_clock_chip dut (
    .clk, .fiducial, .clk_en, .preload, .load_sel, .data_in, .latch_en, .out_en,
    .pulse_p, .pulse_n, .clk_out_p, .clk_out_n, .overflow_p, .overflow_n
  );

  always #4.2ns clk = ~clk;

  // Model state.
  logic [W-1:0] stored [N];
  logic [W-1:0] k;
  logic [N-1:0] pulse_m;

  // Measurements of the pulses since the last fiducial.
  int edges_since_fid;
  int rise_edge [N];
  int width [N];
  int rises [N];

  int checks = 0, failures = 0;
  int n_writes = 0, n_fiducials = 0, n_pulses = 0, n_gated = 0, n_disabled = 0;
  int n_preloads = 0, n_ovf_rise = 0, n_ovf_fall = 0, n_wraps = 0;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The low phase of the clock: the buffered clock pair must be low too.
  always @(negedge clk) begin
    #1ns;
    checks++;
    if (clk_out_p !== 1'b0 || clk_out_n !== 1'b1)
      fail($sformatf("clock pair %b/%b in the low phase", clk_out_p, clk_out_n));
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL at count %0d: %s", k, msg);
  endtask

  // One clock edge with the given inputs; updates the model and checks.
  task automatic step(logic fid, logic en, logic pre, logic sel, logic oe, logic [W-1:0] din);
    logic [W-1:0] dl;
    logic [N-1:0] prev_p;
    logic prev_ovf;
    fiducial = fid; clk_en = en; preload = pre; load_sel = sel; out_en = oe; data_in = din;
    dl = sel ? din : k;
    prev_p = pulse_m;
    prev_ovf = k[W-2] & k[W-3];
    @(posedge clk);
    #1ns;
    if (fid) begin
      k = '0;
      pulse_m = '0;
      edges_since_fid = 0;
      n_fiducials++;
    end else begin
      if (en)
        for (int c = 0; c < int'(N); c++)
          if (stored[c][L-1:0] == dl[L-1:0]) pulse_m[c] = (stored[c][W-1:L] == dl[W-1:L]);
      if (pre) begin
        k = dl;
        n_preloads++;
      end else if (en) begin
        if (k == '1) n_wraps++;
        k = k + 1'b1;
      end
      if (!en) n_gated++;
      edges_since_fid++;
    end
    if ((k[W-2] & k[W-3]) && !prev_ovf) n_ovf_rise++;
    if (!(k[W-2] & k[W-3]) && prev_ovf) n_ovf_fall++;
    if (!oe && pulse_m != '0) n_disabled++;
    for (int c = 0; c < int'(N); c++) begin
      if (pulse_m[c] && !prev_p[c]) begin
        rise_edge[c] = edges_since_fid;
        rises[c]++;
        n_pulses++;
      end
      if (pulse_m[c]) width[c]++;
    end
    check_outputs();
  endtask

  task automatic check_outputs();
    logic [N-1:0] ep;
    ep = out_en ? pulse_m : '0;
    checks++;
    if (pulse_p !== ep || pulse_n !== ~ep)
      fail($sformatf("pulse pairs %h/%h, expected %h", pulse_p, pulse_n, ep));
    checks++;
    if (overflow_p !== (k[W-2] & k[W-3]) || overflow_n !== ~overflow_p)
      fail($sformatf("overflow pair %b/%b", overflow_p, overflow_n));
    checks++;
    if (clk_out_p !== (out_en & clk) || clk_out_n !== ~clk_out_p)
      fail($sformatf("clock pair %b/%b with clk %b out_en %b", clk_out_p, clk_out_n, clk, out_en));
  endtask

  // Write all eight words with the outputs disabled, between clock edges.
  task automatic load_words(logic [W-1:0] t [N]);
    for (int c = 0; c < int'(N); c++) begin
      @(negedge clk);
      load_sel = 1'b1; out_en = 1'b0; data_in = t[c];
      #1ns latch_en[c] = 1'b1;
      #1ns latch_en[c] = 1'b0;
      stored[c] = t[c];
      n_writes++;
    end
    @(negedge clk);
  endtask

  task automatic clear_measurements();
    for (int c = 0; c < int'(N); c++) begin
      rise_edge[c] = -1;
      width[c] = 0;
      rises[c] = 0;
    end
  endtask

  // After a free-running period: every channel rose once, T+1 edges after
  // the fiducial edge, and stayed high eight edges.
  task automatic check_period_timing();
    for (int c = 0; c < int'(N); c++) begin
      checks++;
      if (rises[c] != 1 || rise_edge[c] != int'(stored[c]) + 1 || width[c] != int'(PULSE_CLOCKS))
        fail($sformatf("ch %0d T %0d: %0d rises, first at edge %0d, %0d edges high",
                       c, stored[c], rises[c], rise_edge[c], width[c]));
    end
  endtask

  // Run one period from a fiducial with the given clocks; optional gating
  // and output disabling at random.
  task automatic run_period(int unsigned clocks, bit gate, bit disable_out);
    logic oe;
    oe = 1'b1;
    clear_measurements();
    step(1'b1, 1'b1, 1'b0, 1'b0, 1'b1, '0);
    while (int'(k) < int'(clocks)) begin
      logic en;
      en = gate ? ($urandom_range(7) != 0) : 1'b1;
      if (disable_out && $urandom_range(63) == 0) oe = ~oe;
      step(1'b0, en, 1'b0, 1'b0, oe, W'($urandom));
    end
  endtask

  task automatic preload_and_run(logic [W-1:0] value, int unsigned clocks);
    step(1'b0, 1'b1, 1'b1, 1'b1, 1'b0, value);
    checks++;
    if (k != value) fail("preload");
    repeat (clocks) step(1'b0, 1'b1, 1'b0, 1'b0, 1'b1, '0);
  endtask

  initial begin
    logic [W-1:0] t [N];
    latch_en = '0;
    k = '0;
    pulse_m = '0;
    edges_since_fid = 0;
    for (int c = 0; c < int'(N); c++) stored[c] = '0;
    clear_measurements();

    // Reset the chip state the model starts from.
    step(1'b1, 1'b1, 1'b0, 1'b1, 1'b0, '0);

    // 1. Short periods.
    for (int c = 0; c < int'(N); c++) t[c] = W'($urandom_range(SHORT_PERIOD - 100));
    t[0] = '0;
    t[1] = 20'd7;
    t[2] = 20'd8;
    t[5] = t[4];
    load_words(t);
    run_period(SHORT_PERIOD, 1'b0, 1'b0);
    check_period_timing();
    run_period(SHORT_PERIOD, 1'b1, 1'b1);
    for (int c = 0; c < int'(N); c++) begin
      checks++;
      if (rises[c] != 1) fail($sformatf("ch %0d rose %0d times with gating", c, rises[c]));
    end
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < int'(N); c++) t[c] = W'($urandom_range(SHORT_PERIOD - 100));
      load_words(t);
      run_period(SHORT_PERIOD, 1'b0, 1'b0);
      check_period_timing();
    end

    // 2. Overflow indication and wrap.
    preload_and_run(W'((3 << (W-3)) - 4), 10);
    preload_and_run(W'((4 << (W-3)) - 4), 10);
    preload_and_run(W'((7 << (W-3)) - 4), 10);
    preload_and_run(W'((1 << W) - 4), 10);

    // 3. One full interpulse period at 360 Hz.
    for (int c = 0; c < int'(N); c++) t[c] = W'($urandom_range(FULL_PERIOD - 9));
    t[0] = '0;
    t[7] = W'(FULL_PERIOD - 9);
    load_words(t);
    run_period(FULL_PERIOD, 1'b0, 1'b0);
    check_period_timing();
    step(1'b1, 1'b1, 1'b0, 1'b0, 1'b1, '0);

    $display("mechanisms: writes %0d fiducials %0d pulses %0d gated %0d disabled %0d",
             n_writes, n_fiducials, n_pulses, n_gated, n_disabled);
    $display("            preloads %0d overflow rises %0d falls %0d wraps %0d",
             n_preloads, n_ovf_rise, n_ovf_fall, n_wraps);
    checks++; if (n_writes == 0)    fail("no word written");
    checks++; if (n_fiducials == 0) fail("no fiducial");
    checks++; if (n_pulses == 0)    fail("no pulse");
    checks++; if (n_gated == 0)     fail("clock never gated");
    checks++; if (n_disabled == 0)  fail("outputs never disabled during a pulse");
    checks++; if (n_preloads == 0)  fail("no preload");
    checks++; if (n_ovf_rise == 0)  fail("overflow never rose");
    checks++; if (n_ovf_fall == 0)  fail("overflow never fell");
    checks++; if (n_wraps == 0)     fail("counter never wrapped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
