// elapsed_counter_tb: self-checking test of the time-since-fiducial counter.
//
// Drives fiducial, preload and clock gating in random order at every clock
// edge and compares the count and the overflow output with a model. Also
// runs the counter once through its whole 2**20 range and checks the
// overflow output changes exactly at 3/8 and 7/8 (rise) and at 1/2 and 0
// (fall), and that the count wraps to zero. A watchdog ends a hung run.
module elapsed_counter_tb;
  import alarm_clock_pkg::*;

  localparam int unsigned W = TIME_BITS;

  logic clk = 0;
  logic fiducial, clk_en, preload;
  logic [W-1:0] preload_value, count;
  logic overflow;

  logic [W-1:0] model;
  int checks = 0, failures = 0;

  elapsed_counter dut (.clk, .fiducial, .clk_en, .preload, .preload_value, .count, .overflow);

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic exp_ovf;
    exp_ovf = model[W-2] & model[W-3];
    checks++;
    if (count !== model || overflow !== exp_ovf) begin
      failures++;
      if (failures < 10) $display("count %h exp %h ovf %b exp %b", count, model, overflow, exp_ovf);
    end
  endtask

  initial begin
    int rises, falls;
    logic prev_ovf;
    fiducial = 1'b1; clk_en = 1'b1; preload = 1'b0; preload_value = '0;
    @(posedge clk); #1;
    model = '0;
    check();

    // Random mix of controls.
    for (int i = 0; i < 20000; i++) begin
      int r;
      r = $urandom_range(99);
      fiducial = (r < 3);
      preload  = (r >= 3 && r < 8);
      clk_en   = (r < 90);
      preload_value = W'($urandom);
      @(posedge clk); #1;
      if (fiducial)     model = '0;
      else if (preload) model = preload_value;
      else if (clk_en)  model = model + 1'b1;
      check();
    end

    // One pass over the whole range from zero.
    fiducial = 1'b1; preload = 1'b0; clk_en = 1'b1;
    @(posedge clk); #1;
    fiducial = 1'b0;
    model = '0;
    rises = 0; falls = 0; prev_ovf = overflow;
    for (int i = 1; i <= (1 << W); i++) begin
      @(posedge clk); #1;
      model = model + 1'b1;
      if (overflow && !prev_ovf) begin
        rises++;
        checks++;
        if (count != (3 << (W-3)) && count != (7 << (W-3))) begin
          failures++;
          $display("overflow rose at %h", count);
        end
      end
      if (!overflow && prev_ovf) begin
        falls++;
        checks++;
        if (count != (4 << (W-3)) && count != 0) begin
          failures++;
          $display("overflow fell at %h", count);
        end
      end
      prev_ovf = overflow;
      if (i % 4096 == 0) check();
    end
    check();
    checks++;
    if (rises != 2 || falls != 2 || count != 0) begin
      failures++;
      $display("full range: %0d rises %0d falls, final count %h", rises, falls, count);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
