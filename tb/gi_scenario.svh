// End-to-end scenario for the general interface, shared by the testbench of
// general_interface and the testbench of the top level.
//
// The including module declares clk, rst_n, the general interface's ports
// under the names g_<port> (g_host_byte, g_array_in, ...), the counters
// checks and failures, and the task chk(cond, msg).  This file adds a host
// model (byte stream with the zero escape), a reference model of the input
// path (blocks of eight words transposed by the stager, then sent 1, 2, 4 or 8
// bits per clock through the switch network), a PE-array model for the
// output path (random result bits on the rows, expected words worked out per
// task from the placement rule, the row selector and a reference copy of the
// permutation network) and a host reader.  gi_run() performs the whole
// sequence and counts how often each mechanism happened:
//   escaped zero data byte, instruction, master reset, stager permutation,
//   stager bypass, stager flush, each converter format, switch fan-out and
//   row disable, input FIFO full, input memory stall, array starvation,
//   scheduling, scheduling error, result collection, permutation, collision
//   (must stay 0), output memory overflow (out_drop).
// The checked collection runs keep the output memory's load (writes plus
// reads) below its access rate: the array produces results one clock in four
// for 6 bits per clock of tasks, every clock for 2 bits per clock.  The last
// run, 8 bits per clock every clock, overloads it on purpose.
// gi_report() checks that every mechanism (except collision) happened.

  localparam int GN = 8, GR = 16, GM = 16;
  localparam int GPB = 17;

  int gi_cnt_esc = 0, gi_cnt_instr = 0, gi_cnt_mreset = 0, gi_cnt_permute = 0;
  int gi_cnt_bypass = 0, gi_cnt_flush = 0, gi_cnt_fmt [4] = '{0, 0, 0, 0};
  int gi_cnt_switch = 0, gi_cnt_full = 0, gi_cnt_stall = 0, gi_cnt_starve = 0;
  int gi_cnt_sched = 0, gi_cnt_sched_err = 0, gi_cnt_collect = 0, gi_cnt_perm = 0;
  int gi_cnt_collision = 0, gi_cnt_drop = 0;

  // ---------------- host side ----------------
  task automatic gi_byte(input logic [7:0] b);
    g_host_byte = b;
    g_host_valid = 1'b1;
    @(negedge clk);
    g_host_valid = 1'b0;
    @(negedge clk);
  endtask

  task automatic gi_instr(input logic [2:0] op, input logic [4:0] pl);
    gi_byte(8'h00);
    gi_byte({op, pl});
    gi_cnt_instr++;
  endtask

  task automatic gi_field(input logic [2:0] op, input logic [127:0] v, input int width);
    for (int c = 0; c < (width + 4) / 5; c++) gi_instr(op, v[5 * c +: 5]);
  endtask

  // ---------------- input path model ----------------
  logic [GN-1:0] gi_exp_in [$];     // words the array must receive, in order
  logic [GN-1:0] gi_block [$];      // current partial stager block
  bit   gi_bypass = 1'b0;
  bit   gi_stall_test = 1'b0;
  int   gi_fmt = 0;
  logic [GN-1:0] gi_sent [$];       // data words sent since the last block boundary

  task automatic gi_data(input logic [7:0] b);
    // honour the FIFO's full flag
    while (g_host_in_full) begin
      gi_cnt_full++;
      // in the stall test, sending is switched on once the FIFO has been full
      // for a while (instructions do not pass through the FIFO)
      if (gi_stall_test && gi_cnt_full == 50) begin
        gi_instr(3'd6, 5'b10000);
        gi_stall_test = 1'b0;
      end
      @(negedge clk);
    end
    if (b == 8'h00) begin
      gi_byte(8'h00);
      gi_cnt_esc++;
    end
    gi_byte(b);
    if (gi_bypass) gi_exp_in.push_back(b);
    else begin
      gi_block.push_back(b);
      if (gi_block.size() == GN) gi_close_block();
    end
  endtask

  function automatic void gi_close_block();
    while (gi_block.size() < GN) gi_block.push_back('0);
    for (int k = 0; k < GN; k++) begin
      logic [GN-1:0] w;
      for (int j = 0; j < GN; j++) w[j] = gi_block[j][k];
      gi_exp_in.push_back(w);
    end
    gi_block = {};
    gi_cnt_permute++;
  endfunction

  // array-side monitor: rebuild words from rows 0..l-1 (default switch
  // setting) and compare; rows 8..15 must copy rows 0..7 unless a custom
  // switch setting is being checked
  logic [GN-1:0] gi_acc = '0;
  int   gi_t = 0;
  bit   gi_custom_sw = 1'b0;
  logic [2:0] gi_sw_sel [GR];
  logic [GR-1:0] gi_sw_en = '0;
  always @(posedge clk) if (rst_n) begin
    if (g_array_starve) gi_cnt_starve++;
    if (g_in_stall) gi_cnt_stall++;
    if (g_collision) gi_cnt_collision++;
    if (g_out_drop) gi_cnt_drop++;
    if (g_array_in_valid) begin
      int l;
      l = 1 << gi_fmt;
      if (gi_custom_sw) begin
        // format 8 bits per clock: the lines are the word itself
        if (gi_exp_in.size() == 0) chk(1'b0, "array word with none expected");
        else begin
          logic [GR-1:0] e;
          for (int r = 0; r < GR; r++) e[r] = gi_sw_en[r] && gi_exp_in[0][gi_sw_sel[r]];
          chk(g_array_in == e, $sformatf("switch rows %h expected %h", g_array_in, e));
          void'(gi_exp_in.pop_front());
        end
      end else begin
        chk(g_array_in[15:8] == g_array_in[7:0], "rows 8..15 repeat lines 0..7");
        for (int j = 0; j < GN; j++) begin
          if (j < l) gi_acc[l * gi_t + j] = g_array_in[j];
          else chk(!g_array_in[j], "unused converter line is 0");
        end
        gi_t++;
        if (gi_t == GN / l) begin
          gi_t = 0;
          if (gi_exp_in.size() == 0) chk(1'b0, "array word with none expected");
          else begin
            chk(gi_acc == gi_exp_in[0], $sformatf("fmt %0d: array word %h expected %h", gi_fmt, gi_acc, gi_exp_in[0]));
            void'(gi_exp_in.pop_front());
            gi_cnt_fmt[gi_fmt]++;
          end
        end
      end
    end
  end

  // flush pads a partial block and pushes the held block out of the stager
  task automatic gi_flush();
    gi_instr(3'd6, 5'b01000);
    if (gi_block.size() != 0) gi_close_block();
    gi_cnt_flush++;
  endtask

  task automatic gi_wait_in(input string tag);
    int guard;
    guard = 0;
    while (gi_exp_in.size() != 0 && guard < 20000) begin
      @(negedge clk);
      guard++;
    end
    chk(gi_exp_in.size() == 0, $sformatf("%s: %0d array words missing", tag, gi_exp_in.size()));
    gi_exp_in = {};
    repeat (4) @(negedge clk);
  endtask

  // ---------------- output path model ----------------
  logic [GN-1:0] gi_rows_sel;      // lines after the row selector
  logic [GN-1:0] gi_ref_lines;     // lines after the permutation network
  logic [GPB-1:0] gi_perm = '0;
  logic [3:0] gi_row_sel [GN];
  always_comb for (int k = 0; k < GN; k++) gi_rows_sel[k] = g_array_out[gi_row_sel[k]];
  permutation_network #(.N(GN)) u_gi_ref_perm (
    .in_lines(gi_rows_sel), .ctrl(gi_perm), .out_lines(gi_ref_lines)
  );

  int gi_mod_fmt [GN];             // -1: unassigned
  logic [GN-1:0] gi_exp_out [GN][$];
  logic [GN-1:0] gi_sp [GN];
  int gi_cnt [GN];
  logic [GN-1:0] gi_stager_seq [$];  // words leaving the stager, in order
  logic [GN-1:0] gi_got_out [GN][$];
  logic [GN-1:0] gi_host_got [$];
  bit gi_reading = 1'b0;

  always @(posedge clk) if (rst_n) begin
    if (g_stager_valid) begin
      gi_stager_seq.push_back(g_stager_word);
      gi_got_out[g_stager_tag].push_back(g_stager_word);
    end
  end

  // host reader (first-word-fall-through FIFO)
  always @(negedge clk) begin
    g_host_rd = 1'b0;
    if (rst_n && gi_reading && !g_host_rd_empty) begin
      gi_host_got.push_back(g_host_rd_data);
      g_host_rd = 1'b1;
    end
  end

  // placement rule, as a reference
  function automatic bit gi_place(input int fmts [$], output int module_of [$]);
    bit free_m [GN];
    for (int i = 0; i < GN; i++) free_m[i] = 1'b1;
    module_of = {};
    foreach (fmts[t]) module_of.push_back(-1);
    for (int lv = 3; lv >= 0; lv--)
      foreach (fmts[t]) if (fmts[t] == lv) begin
        int s, w;
        w = 1 << lv;
        s = -1;
        for (int i = GN - 1; i >= 0; i--) if (free_m[i]) s = i;
        if (s < 0) return 1'b0;
        module_of[t] = s;
        for (int j = 0; j < w; j++) free_m[s + j * (GN / w)] = 1'b0;
      end
    return 1'b1;
  endfunction

  function automatic int gi_first_line(input int i);
    return {i[0], i[1], i[2]};
  endfunction

  task automatic gi_set_tasks(input int fmts [$]);
    logic [127:0] v;
    v = '0;
    foreach (fmts[t]) v[3 * t +: 3] = {1'b1, 2'(fmts[t])};
    gi_field(3'd5, v, GN * 3);
  endtask

  // schedule, collect for `clocks` clocks with random row data, valid one clock
  // in `duty`, and read back
  task automatic gi_collect(input int fmts [$], input int clocks, input int duty, input bit check_all);
    int module_of [$];
    bit fits;
    int guard, total, drop0;
    fits = gi_place(fmts, module_of);
    gi_set_tasks(fmts);
    gi_instr(3'd6, 5'b00001);                 // schedule
    repeat (2) @(negedge clk);                // done of the previous schedule drops
    chk(!g_sched_done, "schedule running");
    guard = 0;
    while (!g_sched_done && guard < 200) begin @(negedge clk); guard++; end
    chk(g_sched_done, "schedule finished");
    chk(g_sched_error == !fits, "schedule error flag");
    gi_cnt_sched++;
    if (!fits) begin
      gi_cnt_sched_err++;
      return;
    end
    for (int i = 0; i < GN; i++) begin
      gi_mod_fmt[i] = -1;
      gi_exp_out[i] = {};
      gi_got_out[i] = {};
      gi_sp[i] = '0;
      gi_cnt[i] = 0;
    end
    foreach (fmts[t]) gi_mod_fmt[module_of[t]] = fmts[t];
    gi_stager_seq = {};
    gi_host_got = {};
    drop0 = gi_cnt_drop;
    gi_reading = 1'b1;
    gi_instr(3'd6, 5'b00010);                 // start collection
    // the start pulse reaches the stager one clock after the byte returns;
    // results are expected from the clock after that
    @(negedge clk);
    for (int c = 0; c < clocks; c++) begin
      g_array_out = GM'($urandom);
      g_array_out_valid = (c % duty) == 0;
      #1;
      if (g_array_out_valid) for (int i = 0; i < GN; i++) if (gi_mod_fmt[i] >= 0) begin
        int w, f;
        w = 1 << gi_mod_fmt[i];
        f = gi_first_line(i);
        for (int j = 0; j < w; j++) gi_sp[i][w * gi_cnt[i] + j] = gi_ref_lines[f + j];
        gi_cnt[i]++;
        if (gi_cnt[i] == GN / w) begin
          gi_exp_out[i].push_back(gi_sp[i]);
          gi_cnt[i] = 0;
        end
      end
      @(negedge clk);
    end
    g_array_out_valid = 1'b0;
    gi_instr(3'd6, 5'b00100);                 // stop collection
    gi_cnt_collect++;
    if (gi_perm != '0) gi_cnt_perm++;
    repeat (GN + 4) @(negedge clk);
    total = 0;
    if (check_all) begin
      for (int i = 0; i < GN; i++) if (gi_mod_fmt[i] >= 0) begin
        chk(gi_got_out[i].size() == gi_exp_out[i].size(),
            $sformatf("module %0d: %0d words, expected %0d", i, gi_got_out[i].size(), gi_exp_out[i].size()));
        for (int k = 0; k < gi_exp_out[i].size() && k < gi_got_out[i].size(); k++)
          chk(gi_got_out[i][k] == gi_exp_out[i][k], $sformatf("module %0d word %0d: %h expected %h", i, k, gi_got_out[i][k], gi_exp_out[i][k]));
        total += gi_exp_out[i].size();
      end
      chk(gi_cnt_drop == drop0, $sformatf("%0d words lost at the output memory", gi_cnt_drop - drop0));
      // everything reaches the host, in stager order
      guard = 0;
      while (gi_host_got.size() < gi_stager_seq.size() && guard < 5000) begin @(negedge clk); guard++; end
      chk(gi_host_got.size() == gi_stager_seq.size(),
          $sformatf("host read %0d of %0d words", gi_host_got.size(), gi_stager_seq.size()));
      for (int k = 0; k < gi_stager_seq.size() && k < gi_host_got.size(); k++)
        chk(gi_host_got[k] == gi_stager_seq[k], $sformatf("host word %0d", k));
    end else begin
      repeat (2000) @(negedge clk);
    end
    gi_reading = 1'b0;
  endtask

  task automatic gi_run();
    logic [127:0] v;
    int fmts [$];
    g_host_byte = '0; g_host_valid = 1'b0; g_host_rd = 1'b0;
    g_array_out = '0; g_array_out_valid = 1'b0;
    for (int k = 0; k < GN; k++) gi_row_sel[k] = 4'(k);
    @(negedge clk);
    // ---- input path, each converter format, stager in use ----
    gi_instr(3'd6, 5'b10000);                 // sending on
    for (int f = 0; f < 4; f++) begin
      gi_instr(3'd1, 5'(f));
      gi_fmt = f;
      gi_bypass = 1'b0;
      for (int k = 0; k < 16; k++) gi_data((k == 3) ? 8'h00 : 8'($urandom));
      gi_flush();
      gi_wait_in($sformatf("format %0d", f));
    end
    // ---- bypass ----
    gi_instr(3'd1, 5'b00111);
    gi_fmt = 3;
    gi_bypass = 1'b1;
    for (int k = 0; k < 6; k++) gi_data(8'($urandom));
    gi_wait_in("bypass");
    gi_cnt_bypass++;
    // ---- flush of a short block ----
    gi_instr(3'd1, 5'b00011);
    gi_bypass = 1'b0;
    for (int k = 0; k < 5; k++) gi_data(8'($urandom));
    repeat (20) @(negedge clk);
    gi_flush();
    gi_wait_in("flush");
    // ---- switch network: custom fan-out and disabled rows ----
    v = {$urandom, $urandom, $urandom, $urandom};
    for (int r = 0; r < GR; r++) begin
      gi_sw_sel[r] = v[4 * r +: 3];
      gi_sw_en[r] = v[4 * r + 3];
    end
    gi_field(3'd2, v, GR * 4);
    gi_custom_sw = 1'b1;
    for (int k = 0; k < 16; k++) gi_data(8'($urandom));
    gi_flush();
    gi_wait_in("switch");
    gi_custom_sw = 1'b0;
    gi_cnt_switch++;
    // ---- master reset: defaults back (1 bit per clock, sending off) ----
    gi_byte(8'h00);
    gi_byte(8'hFF);
    gi_cnt_mreset++;
    gi_fmt = 0;
    chk(!g_host_in_full, "input FIFO empty after master reset");
    // ---- input FIFO full and memory stall, then starvation ----
    gi_stall_test = 1'b1;
    for (int k = 0; k < 160; k++) gi_data(8'($urandom));
    chk(gi_cnt_full > 0 && gi_cnt_stall > 0, "input FIFO filled and memory stalled");
    chk(!gi_stall_test, "sending switched on after the stall");
    gi_flush();
    gi_wait_in("after the stall");
    // ---- output path ----
    v = {$urandom, $urandom, $urandom, $urandom};
    gi_perm = v[GPB-1:0];
    gi_field(3'd4, v, GPB);
    for (int k = 0; k < GN; k++) gi_row_sel[k] = 4'($urandom);
    v = '0;
    for (int k = 0; k < GN; k++) v[4 * k +: 4] = gi_row_sel[k];
    gi_field(3'd3, v, GN * 4);
    fmts = '{2, 0, 0};                        // 4 + 1 + 1 bits per clock
    gi_collect(fmts, 256, 4, 1'b1);
    fmts = '{1, 1, 0, 0};                     // 2 + 2 + 1 + 1
    gi_collect(fmts, 256, 4, 1'b1);
    fmts = '{0, 0};                           // 1 + 1, every clock
    gi_collect(fmts, 64, 1, 1'b1);
    fmts = '{3, 0};                           // does not fit
    gi_collect(fmts, 8, 1, 1'b1);
    // ---- output memory overflow: 8 bits per clock for a long time ----
    fmts = '{3};
    gi_collect(fmts, 400, 1, 1'b0);
  endtask

  task automatic gi_report();
    chk(gi_cnt_esc > 0, "escaped zero data byte");
    chk(gi_cnt_instr > 0, "instruction");
    chk(gi_cnt_mreset > 0, "master reset");
    chk(gi_cnt_permute > 0, "stager permutation");
    chk(gi_cnt_bypass > 0, "stager bypass");
    chk(gi_cnt_flush > 0, "stager flush");
    for (int f = 0; f < 4; f++) chk(gi_cnt_fmt[f] > 0, $sformatf("converter format %0d", f));
    chk(gi_cnt_switch > 0, "switch network setting");
    chk(gi_cnt_full > 0, "input FIFO full");
    chk(gi_cnt_stall > 0, "input memory stall");
    chk(gi_cnt_starve > 0, "array starvation");
    chk(gi_cnt_sched > 0, "scheduling");
    chk(gi_cnt_sched_err > 0, "scheduling error");
    chk(gi_cnt_collect > 0, "result collection");
    chk(gi_cnt_perm > 0, "permutation");
    chk(gi_cnt_collision == 0, $sformatf("%0d stager collisions", gi_cnt_collision));
    chk(gi_cnt_drop > 0, "output memory overflow");
    $display("general: esc=%0d instr=%0d mreset=%0d permute=%0d bypass=%0d flush=%0d fmt=%0d/%0d/%0d/%0d",
             gi_cnt_esc, gi_cnt_instr, gi_cnt_mreset, gi_cnt_permute, gi_cnt_bypass, gi_cnt_flush,
             gi_cnt_fmt[0], gi_cnt_fmt[1], gi_cnt_fmt[2], gi_cnt_fmt[3]);
    $display("general: switch=%0d full=%0d stall=%0d starve=%0d sched=%0d sched_err=%0d collect=%0d perm=%0d collision=%0d drop=%0d",
             gi_cnt_switch, gi_cnt_full, gi_cnt_stall, gi_cnt_starve, gi_cnt_sched, gi_cnt_sched_err,
             gi_cnt_collect, gi_cnt_perm, gi_cnt_collision, gi_cnt_drop);
  endtask
