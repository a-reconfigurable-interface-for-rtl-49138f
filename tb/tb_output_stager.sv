// Testbench for output_stager (N = 8).
//
// A reference model, written independently of the RTL, places each task set
// with the scheduling rule (heaviest task first, lowest free module s, then
// modules s + k*N/w are no longer free), drives random bits on all eight
// result lines and records, for each task, the words it must produce: the
// task on module i reads the module's first w lines (module i's lines start
// at bit-reversed i), and its word holds the bit of line j at clock t in bit
// w*t + j.  The words leaving module 0 are sorted by their tag (the collecting
// module) and compared in order with the model.  Checks: contents, number of
// words per task (run clocks * w / N), no collision, and a total throughput
// of N bits per clock when the weights add up to N.  Task sets: the example
// of weights 4,1,1,1,1 (modules 0, 1, 3, 5, 7), weight 8 alone, 2+2+2+2,
// 4+2+1+1, and 200 random sets.
module tb_output_stager;
  import ri_pkg::*;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, run = 1'b0;
  logic [N-1:0] cfg_assigned = '0, lines = '0, out_word;
  logic [1:0] cfg_fmt [N];
  logic out_valid, collision;
  logic [2:0] out_tag;
  int checks = 0, failures = 0;
  int n_collisions = 0;

  output_stager #(.N(N)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  logic [N-1:0] exp_words [N][$];
  logic [N-1:0] got_words [N][$];
  logic [N-1:0] sp_model [N];
  int           cnt_model [N];

  always @(posedge clk) if (rst_n) begin
    if (out_valid) got_words[out_tag].push_back(out_word);
    if (collision) n_collisions++;
  end

  // place tasks (weights as fmt codes); returns 0 if they do not fit
  function automatic bit place(input int fmts [$], output int module_of [$]);
    bit free_m [N];
    int order [$];
    for (int i = 0; i < N; i++) free_m[i] = 1'b1;
    module_of = {};
    foreach (fmts[t]) module_of.push_back(-1);
    for (int lv = 3; lv >= 0; lv--)
      foreach (fmts[t]) if (fmts[t] == lv) order.push_back(t);
    foreach (order[k]) begin
      int t, s, w;
      t = order[k];
      w = 1 << fmts[t];
      s = -1;
      for (int i = N - 1; i >= 0; i--) if (free_m[i]) s = i;
      if (s < 0) return 1'b0;
      module_of[t] = s;
      for (int j = 0; j < w; j++) if (s + j * (N / w) < N) free_m[s + j * (N / w)] = 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic run_set(input int fmts [$], input int rounds);
    int module_of [$];
    int total_w, nexp, nbits_out;
    bit ok;
    ok = place(fmts, module_of);
    chk(ok, "task set fits");
    if (!ok) return;
    total_w = 0;
    foreach (fmts[t]) total_w += 1 << fmts[t];
    @(negedge clk);
    cfg_assigned = '0;
    for (int i = 0; i < N; i++) begin
      cfg_fmt[i] = '0;
      exp_words[i] = {};
      got_words[i] = {};
      sp_model[i] = '0;
      cnt_model[i] = 0;
    end
    foreach (fmts[t]) begin
      cfg_assigned[module_of[t]] = 1'b1;
      cfg_fmt[module_of[t]] = 2'(fmts[t]);
    end
    n_collisions = 0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    run = 1'b1;
    for (int c = 0; c < rounds * N; c++) begin
      lines = N'($urandom);
      for (int i = 0; i < N; i++) if (cfg_assigned[i]) begin
        int w, f;
        w = 1 << cfg_fmt[i];
        f = int'(line_first(i, N));
        for (int j = 0; j < w; j++) sp_model[i][w * cnt_model[i] + j] = lines[f + j];
        cnt_model[i]++;
        if (cnt_model[i] == N / w) begin
          exp_words[i].push_back(sp_model[i]);
          cnt_model[i] = 0;
        end
      end
      @(negedge clk);
    end
    run = 1'b0;
    repeat (N + 2) @(negedge clk);
    nbits_out = 0;
    for (int i = 0; i < N; i++) begin
      if (cfg_assigned[i]) begin
        nexp = rounds * (1 << cfg_fmt[i]);
        chk(exp_words[i].size() == nexp, "model word count");
        chk(got_words[i].size() == nexp,
            $sformatf("module %0d (w=%0d): %0d words, expected %0d", i, 1 << cfg_fmt[i],
                      got_words[i].size(), nexp));
        for (int k = 0; k < nexp && k < got_words[i].size(); k++)
          chk(got_words[i][k] == exp_words[i][k],
              $sformatf("module %0d word %0d: %h expected %h", i, k, got_words[i][k], exp_words[i][k]));
        nbits_out += got_words[i].size() * N;
      end else begin
        chk(got_words[i].size() == 0, $sformatf("unassigned module %0d produced words", i));
      end
    end
    chk(n_collisions == 0, $sformatf("%0d collisions", n_collisions));
    if (total_w == N) chk(nbits_out == rounds * N * N, "N bits per clock collected");
  endtask

  initial begin
    int fmts [$];
    int module_of [$];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // the worked example: weights 4,1,1,1,1 land on modules 0,1,3,5,7
    fmts = '{2, 0, 0, 0, 0};
    void'(place(fmts, module_of));
    chk(module_of[0] == 0 && module_of[1] == 1 && module_of[2] == 3 &&
        module_of[3] == 5 && module_of[4] == 7, "example placement 0,1,3,5,7");
    run_set(fmts, 6);
    run_set('{3}, 4);
    run_set('{1, 1, 1, 1}, 4);
    run_set('{2, 1, 0, 0}, 4);
    for (int r = 0; r < 200; r++) begin
      int room;
      fmts = {};
      room = N;
      while (room > 0 && $urandom_range(0, 5) != 0) begin
        int f;
        f = $urandom_range(0, 3);
        while ((1 << f) > room) f--;
        fmts.push_back(f);
        room -= 1 << f;
      end
      if (fmts.size() == 0) fmts.push_back(0);
      run_set(fmts, 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
