// output_stage_tb: self-checking test of the enabled differential outputs.
//
// Applies random pulse, overflow and enable values over both clock phases
// and checks every true/complement pair: the eight pulse pairs and the clock
// pair follow their inputs only while out_en is high and rest at logic 0
// otherwise; the overflow pair follows overflow regardless of out_en.
module output_stage_tb;
  import alarm_clock_pkg::*;

  localparam int unsigned N = N_CHANNELS;

  logic clk = 0, out_en, overflow;
  logic [N-1:0] pulse, pulse_p, pulse_n;
  logic clk_out_p, clk_out_n, overflow_p, overflow_n;
  int checks = 0, failures = 0;

  output_stage dut (.clk, .out_en, .pulse, .overflow, .pulse_p, .pulse_n,
                    .clk_out_p, .clk_out_n, .overflow_p, .overflow_n);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [N-1:0] ep;
    logic ec;
    ep = out_en ? pulse : '0;
    ec = out_en & clk;
    checks++;
    if (pulse_p !== ep || pulse_n !== ~ep || clk_out_p !== ec || clk_out_n !== ~ec ||
        overflow_p !== overflow || overflow_n !== ~overflow) begin
      failures++;
      $display("en %b clk %b pulse %h ovf %b -> %h/%h %b/%b %b/%b", out_en, clk, pulse, overflow,
               pulse_p, pulse_n, clk_out_p, clk_out_n, overflow_p, overflow_n);
    end
  endtask

  initial begin
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      out_en = 1'($urandom); overflow = 1'($urandom); pulse = N'($urandom);
      #2 check();
      @(posedge clk);
      #2 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
