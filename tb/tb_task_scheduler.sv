// Testbench for task_scheduler (N = 8).
//
// For the worked example (weights 4,1,1,1,1), for fixed sets and for 300
// random sets of up to eight tasks, compares the schedule with a model of the
// placement rule: tasks in order of falling weight (lower index first within
// a weight), each on the lowest free module s, after which modules
// s + k*N/w are taken.  Checks every module's assigned bit, fmt and task, each
// task's module, the error flag for sets heavier than N bits per clock, and
// that done rises after the start clock plus N*(log2 N + 1) = 32 candidate
// clocks, 33 clock edges in all.
module tb_task_scheduler;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0] task_valid = '0;
  logic [1:0] task_fmt [N];
  logic done, error;
  logic [N-1:0] mod_assigned;
  logic [1:0] mod_fmt [N];
  logic [2:0] mod_task [N];
  logic [2:0] task_module [N];
  int checks = 0, failures = 0;
  int n_err = 0;

  task_scheduler #(.N(N)) dut (.*);

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

  task automatic try_set(input bit [N-1:0] v, input int f [N]);
    bit free_m [N];
    int mod_of [N];
    int total, clocks;
    bit exp_err;
    total = 0;
    exp_err = 1'b0;
    for (int i = 0; i < N; i++) begin
      free_m[i] = 1'b1;
      mod_of[i] = -1;
      if (v[i]) total += 1 << f[i];
    end
    for (int lv = 3; lv >= 0; lv--)
      for (int t = 0; t < N; t++) if (v[t] && f[t] == lv) begin
        int s, w;
        w = 1 << lv;
        s = -1;
        for (int i = N - 1; i >= 0; i--) if (free_m[i]) s = i;
        if (s < 0) exp_err = 1'b1;
        else begin
          mod_of[t] = s;
          for (int j = 0; j < w; j++) if (s + j * (N / w) < N) free_m[s + j * (N / w)] = 1'b0;
        end
      end
    @(negedge clk);
    task_valid = v;
    for (int i = 0; i < N; i++) task_fmt[i] = 2'(f[i]);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    clocks = 1;
    while (!done && clocks < 100) begin
      @(negedge clk);
      clocks++;
    end
    chk(clocks == 33, $sformatf("done after %0d clocks", clocks));
    chk(error == exp_err, $sformatf("error %0d expected %0d (total weight %0d)", error, exp_err, total));
    if (exp_err) n_err++;
    if (!exp_err) begin
      for (int t = 0; t < N; t++) if (v[t]) begin
        chk(task_module[t] == 3'(mod_of[t]), $sformatf("task %0d on module %0d, expected %0d", t, task_module[t], mod_of[t]));
        chk(mod_assigned[mod_of[t]] && mod_task[mod_of[t]] == 3'(t) && mod_fmt[mod_of[t]] == 2'(f[t]),
            $sformatf("module %0d entry", mod_of[t]));
      end
      for (int i = 0; i < N; i++) begin
        bit used;
        used = 1'b0;
        for (int t = 0; t < N; t++) if (v[t] && mod_of[t] == i) used = 1'b1;
        chk(mod_assigned[i] == used, $sformatf("module %0d assigned flag", i));
      end
    end
  endtask

  initial begin
    int f [N];
    bit [N-1:0] v;
    for (int i = 0; i < N; i++) task_fmt[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    f = '{2, 0, 0, 0, 0, 0, 0, 0};
    try_set(8'b0001_1111, f);
    chk(task_module[0] == 0 && task_module[1] == 1 && task_module[2] == 3 &&
        task_module[3] == 5 && task_module[4] == 7, "example on modules 0,1,3,5,7");
    f = '{1, 1, 2, 0, 0, 0, 0, 0};
    try_set(8'b0000_1111, f);
    f = '{3, 0, 0, 0, 0, 0, 0, 0};
    try_set(8'b0000_0011, f);
    for (int r = 0; r < 300; r++) begin
      v = N'($urandom);
      for (int i = 0; i < N; i++) f[i] = $urandom_range(0, 3);
      try_set(v, f);
    end
    chk(n_err > 0, "an overweight set was seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
