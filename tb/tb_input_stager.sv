// Testbench for input_stager (N = 8, the default).
//
// Feeds random words with random gaps on in_valid and out_ready, then flushes.
// The expected output is worked out from the input list alone: the words are
// cut into blocks of N (the last one padded with zero words) and each block is
// transposed, output word k holding bit k of input word j in bit j.  Checks:
// every output word in order, the exact number of output words, that output
// word number k leaves at step N+k (one block of latency, one word out per
// word in once the grid is full, with no bubbles between blocks entering
// down and across), that busy drops after the flush, and, with bypass set,
// that words pass straight through in the same clock.
module tb_input_stager;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bypass = 1'b0, in_valid = 1'b0, flush = 1'b0, out_ready = 1'b0;
  logic [N-1:0] in_word = '0, out_word;
  logic in_ready, out_valid, busy;
  int checks = 0, failures = 0;

  input_stager #(.N(N)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  logic [N-1:0] ins [$];
  logic [N-1:0] exp_out [$];
  int steps = 0, outs = 0, blocks_in;

  // sample the combinational outputs mid-cycle, where the inputs are stable
  always @(negedge clk) if (rst_n && !bypass) begin
    if (out_valid) begin
      chk(outs < exp_out.size(), "no extra output");
      if (outs < exp_out.size()) chk(out_word == exp_out[outs], $sformatf("word %0d got %h exp %h", outs, out_word, exp_out[outs]));
      chk(steps == N + outs, $sformatf("output %0d at step %0d", outs, steps));
      outs++;
    end
    if (out_ready && (in_valid || (flush && busy))) steps++;
  end

  initial begin
    int nwords;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    nwords = 5 * N + 3;
    for (int k = 0; k < nwords; k++) ins.push_back(N'($urandom));
    while (ins.size() % N != 0) ins.push_back('0);
    blocks_in = ins.size() / N;
    for (int b = 0; b < blocks_in; b++)
      for (int k = 0; k < N; k++) begin
        logic [N-1:0] w;
        for (int j = 0; j < N; j++) w[j] = ins[b*N + j][k];
        exp_out.push_back(w);
      end
    // drive the real words only; the flush supplies the padding.  Inputs
    // change at the falling edge so they are stable at the rising edge.
    @(negedge clk);
    for (int k = 0; k < nwords; k++) begin
      bit taken;
      in_word  = ins[k];
      in_valid = 1'b1;
      do begin
        out_ready = ($urandom_range(0, 2) != 0);
        @(posedge clk);
        taken = out_ready;
        @(negedge clk);
      end while (!taken);
      in_valid  = 1'b0;
      out_ready = 1'b0;
      if ($urandom_range(0, 2) == 0) @(negedge clk);
    end
    flush     = 1'b1;
    out_ready = 1'b1;
    repeat (3 * N) @(negedge clk);
    flush = 1'b0;
    @(negedge clk);
    chk(outs == exp_out.size(), $sformatf("output count %0d of %0d", outs, exp_out.size()));
    chk(!busy, "busy low after flush");
    // bypass
    bypass    = 1'b1;
    out_ready = 1'b1;
    for (int k = 0; k < 20; k++) begin
      in_word  = N'($urandom);
      in_valid = ($urandom_range(0, 1) != 0);
      #1;
      chk(out_valid == in_valid, "bypass valid");
      if (in_valid) chk(out_word == in_word, "bypass word");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
