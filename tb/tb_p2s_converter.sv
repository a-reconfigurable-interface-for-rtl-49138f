// Testbench for p2s_converter (N = 8) in all four formats: 1, 2, 4 and 8 bits
// per clock.  Words are offered back to back with the output always taken,
// then with random gaps on both sides.  Expected: line j at the t-th output
// clock of a word carries word bit l*t + j (l = bits per clock), lines l and
// up are 0, each word takes exactly N/l output clocks, and with no gaps the
// output is valid every clock (a new word loads in the clock the last bits
// leave).
module tb_p2s_converter;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] fmt = '0;
  logic in_valid = 1'b0, out_ready = 1'b0;
  logic [N-1:0] in_word = '0, out_bits;
  logic in_ready, out_valid;
  int checks = 0, failures = 0;

  p2s_converter #(.N(N)) dut (.*);

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

  logic [N-1:0] q [$];
  int t_in_word;     // output clocks already given for the head word
  int bubbles;
  bit primed;       // a word of the current run has been taken

  // sample mid-cycle (inputs change at the falling edge)
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      int l;
      logic [N-1:0] exp_bits;
      l = 1 << fmt;
      exp_bits = '0;
      if (q.size() == 0) chk(1'b0, "output with no word");
      else begin
        for (int j = 0; j < l; j++) exp_bits[j] = q[0][l * t_in_word + j];
        chk(out_bits == exp_bits, $sformatf("fmt %0d word %h clock %0d: %b exp %b",
                                            fmt, q[0], t_in_word, out_bits, exp_bits));
        t_in_word++;
        if (t_in_word == N / l) begin
          void'(q.pop_front());
          t_in_word = 0;
        end
      end
    end else if (out_ready && primed && (q.size() != 0 || in_valid)) bubbles++;
    if (in_valid && in_ready) begin
      q.push_back(in_word);
      primed = 1'b1;
    end
  end

  task automatic run(input int f, input int nwords, input bit gaps);
    @(negedge clk);
    fmt = 2'(f);
    bubbles = 0;
    primed = 1'b0;
    for (int k = 0; k < nwords; k++) begin
      bit taken;
      in_word  = N'($urandom);
      in_valid = 1'b1;
      do begin
        out_ready = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
        #1;
        taken = in_ready;
        @(negedge clk);
      end while (!taken);
      in_valid = 1'b0;
      if (gaps && $urandom_range(0, 3) == 0) begin
        out_ready = 1'b1;
        @(negedge clk);
      end
    end
    out_ready = 1'b1;
    while (q.size() != 0) @(negedge clk);
    if (!gaps) chk(bubbles == 0, $sformatf("fmt %0d: %0d idle clocks with words waiting", f, bubbles));
    out_ready = 1'b0;
  endtask

  initial begin
    t_in_word = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 4; f++) begin
      run(f, 40, 1'b0);
      run(f, 40, 1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
