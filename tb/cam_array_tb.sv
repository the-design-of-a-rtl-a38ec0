// cam_array_tb: self-checking test of the 8 x 20 content addressable memory.
//
// Writes random times into the words through their latch enables, then puts
// keys on the data lines and compares both match outputs of every word with
// a model kept in the testbench: keys equal to a stored word, keys differing
// from it in one low bit or in one high bit, and random keys. It also checks
// that a word follows the data lines while its enable is high (transparent
// latch) and holds after the enable falls, and that writing one word leaves
// the others alone. A watchdog ends the run if it hangs.
module cam_array_tb;
  import alarm_clock_pkg::*;

  localparam int unsigned N = N_CHANNELS;
  localparam int unsigned W = TIME_BITS;
  localparam int unsigned L = LSB_BITS;

  logic [N-1:0] latch_en;
  logic [W-1:0] data;
  logic [N-1:0] match_lsb, match_hi;

  logic [W-1:0] model [N];
  int checks = 0, failures = 0;
  logic clk = 0;

  cam_array dut (.latch_en, .data, .match_lsb, .match_hi);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(int w, logic [W-1:0] value);
    data = value;
    #1 latch_en[w] = 1'b1;
    #2 latch_en[w] = 1'b0;
    #1 model[w] = value;
  endtask

  task automatic check_key(logic [W-1:0] key);
    data = key;
    #1;
    for (int w = 0; w < int'(N); w++) begin
      logic exp_lsb, exp_hi;
      exp_lsb = (model[w][L-1:0] == key[L-1:0]);
      exp_hi  = (model[w][W-1:L] == key[W-1:L]);
      checks++;
      if (match_lsb[w] !== exp_lsb || match_hi[w] !== exp_hi) begin
        failures++;
        $display("key %h word %0d stored %h: lsb %b/%b hi %b/%b", key, w, model[w],
                 match_lsb[w], exp_lsb, match_hi[w], exp_hi);
      end
    end
  endtask

  initial begin
    latch_en = '0;
    data = '0;
    #1;
    for (int w = 0; w < int'(N); w++) write_word(w, W'($urandom));

    for (int r = 0; r < 2000; r++) begin
      int w;
      logic [W-1:0] k;
      w = $urandom_range(N-1);
      k = model[w];
      case (r % 4)
        0: check_key(k);
        1: check_key(k ^ (W'(1) << $urandom_range(L-1)));
        2: check_key(k ^ (W'(1) << $urandom_range(W-1, L)));
        default: check_key(W'($urandom));
      endcase
      if (r % 50 == 0) write_word($urandom_range(N-1), W'($urandom));
    end

    // Transparency: with the enable held high the word follows the lines.
    latch_en[3] = 1'b1;
    for (int i = 0; i < 20; i++) begin
      data = W'($urandom);
      #1;
      checks++;
      if (!(match_lsb[3] && match_hi[3])) begin
        failures++;
        $display("word 3 does not follow the data lines while enabled");
      end
    end
    model[3] = data;
    latch_en[3] = 1'b0;
    #1;
    for (int r = 0; r < 200; r++) check_key(W'($urandom));
    for (int w = 0; w < int'(N); w++) check_key(model[w]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
