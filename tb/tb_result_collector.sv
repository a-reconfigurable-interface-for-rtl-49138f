// Testbench for result_collector (delay 24 clocks, 48 characters).  After a
// start pulse a random result string (random wild cards) is driven on x/wx
// from clock 24 to clock 71 after start, with random values outside that
// window.  Checks: six words, word m bit k = character 8m+k, each word valid
// for one clock right after its eighth character, the non-wild-card count,
// and busy high exactly from start to the last character.
module tb_result_collector;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, x = 1'b0, wx = 1'b0;
  logic [7:0] word, nonwild_count;
  logic word_valid, busy;
  int checks = 0, failures = 0;

  result_collector #(.DELAY(24), .LEN(48)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  initial begin
    bit xs [48], ws [48];
    int nw, words;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 20; run++) begin
      nw = 0;
      for (int i = 0; i < 48; i++) begin
        xs[i] = ($urandom_range(0, 1) != 0);
        ws[i] = (run % 2 == 0) ? (i >= 30) : ($urandom_range(0, 3) == 0);
        if (!ws[i]) nw++;
      end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      words = 0;
      // clock c after start: c = 0 is this cycle
      for (int c = 0; c < 80; c++) begin
        if (c >= 24 && c < 72) begin
          x = xs[c - 24];
          wx = ws[c - 24];
        end else begin
          x = ($urandom_range(0, 1) != 0);
          wx = ($urandom_range(0, 1) != 0);
        end
        #1;
        chk(busy == (c < 72), $sformatf("busy at clock %0d", c));
        if (word_valid) begin
          logic [7:0] e;
          for (int k = 0; k < 8; k++) e[k] = xs[8 * words + k];
          chk(c == 24 + 8 * words + 8, $sformatf("word %0d at clock %0d", words, c));
          chk(word == e, $sformatf("word %0d: %b expected %b", words, word, e));
          words++;
        end
        @(negedge clk);
      end
      chk(words == 6, $sformatf("%0d words", words));
      chk(nonwild_count == 8'(nw), $sformatf("count %0d expected %0d", nonwild_count, nw));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
