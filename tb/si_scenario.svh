// End-to-end scenario for the string-matcher interface, shared by the
// testbench of string_interface and the testbench of the top level.
//
// The including module declares clk, rst_n, the interface's ports under the
// names s_<port> (s_bus_addr, s_mm_x, ...), the counters checks and failures
// and the task chk(cond, msg).  This file adds a bus model of the host (write
// and read strobes held low for three and two clocks), a capture of
// everything the interface sends to the matcher, and a matcher result model
// that returns a random 48-character string 24 clocks after the collector
// starts.
//
// Per run: a random string of 0..48 characters in order or inside out is
// packed into bytes (in order: character 8m+k at bit k of byte m; inside out:
// the first byte holds the first count mod 8 characters, character k at bit
// r-1-k, later bytes character base+k at bit 7-k), written with its count to
// the string FIFO, and a Reset (X-string) or Add (A-string) is started.
// Checks: the microprogram start address (04h Reset, 74h Add, FCh Undo), the
// flip and bar/space lines, 48 X character clocks (x = character t, wx from
// clock count on) or 24 A clocks (upper = character 2t, lower 2t+1), the
// six result bytes and the non-wild-card count read back over the bus after
// an Add, and for Undo 48 clocks with the wild-card line high from clock
// Undo_count on.  si_run() performs a fixed list of corner cases and 30
// random runs; si_report() fails if an instruction or a string order never
// happened.

  int si_n_reset = 0, si_n_add = 0, si_n_undo = 0, si_n_flip = 0, si_n_inorder = 0;

  task automatic si_bus_write(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk);
    s_bus_addr = a;
    s_bus_din = d;
    s_mwtc_n = 1'b0;
    repeat (3) @(negedge clk);
    s_mwtc_n = 1'b1;
    @(negedge clk);
  endtask

  task automatic si_bus_read(input logic [2:0] a, output logic [7:0] d);
    @(negedge clk);
    s_bus_addr = a;
    s_mrtc_n = 1'b0;
    repeat (2) @(negedge clk);
    d = s_bus_dout;
    s_mrtc_n = 1'b1;
    repeat (2) @(negedge clk);
  endtask

  // captured matcher traffic
  bit si_cap_x [$], si_cap_wx [$];
  bit si_cap_au [$], si_cap_wau [$], si_cap_al [$], si_cap_wal [$];
  bit si_cap_uw [$];
  always @(posedge clk) if (rst_n) begin
    if (s_mm_x_valid) begin si_cap_x.push_back(s_mm_x); si_cap_wx.push_back(s_mm_wx); end
    if (s_mm_a_valid) begin
      si_cap_au.push_back(s_mm_a_upper); si_cap_wau.push_back(s_mm_wa_upper);
      si_cap_al.push_back(s_mm_a_lower); si_cap_wal.push_back(s_mm_wa_lower);
    end
    if (s_mm_undo) si_cap_uw.push_back(s_mm_wx);
  end

  // matcher result model: 48 characters, 24 clocks after the collector starts
  bit si_res_x [48], si_res_wx [48];
  bit si_collecting_q = 1'b0;
  int si_res_clock = -1;
  always @(negedge clk) begin
    if (s_collecting && !si_collecting_q) si_res_clock = 0;
    else if (si_res_clock >= 0) si_res_clock++;
    si_collecting_q = s_collecting;
    if (si_res_clock >= 24 && si_res_clock < 72) begin
      s_mm_res_x = si_res_x[si_res_clock - 24];
      s_mm_res_wx = si_res_wx[si_res_clock - 24];
    end else begin
      s_mm_res_x = 1'b0;
      s_mm_res_wx = 1'b1;
    end
  end

  task automatic si_run_string(input bit add, input int n, input bit inorder, input bit bar);
    bit s [48];
    logic [7:0] bytes [$];
    int r;
    logic [7:0] d;
    for (int i = 0; i < 48; i++) s[i] = ($urandom_range(0, 1) != 0);
    r = n % 8;
    bytes = {};
    if (inorder) begin
      for (int m = 0; m < (n + 7) / 8; m++) begin
        logic [7:0] b;
        b = 8'($urandom);
        for (int k = 0; k < 8; k++) if (8 * m + k < n) b[k] = s[8 * m + k];
        bytes.push_back(b);
      end
    end else begin
      logic [7:0] b;
      if (r != 0) begin
        b = 8'($urandom);
        for (int k = 0; k < r; k++) b[r - 1 - k] = s[k];
        bytes.push_back(b);
      end
      for (int base = r; base < n; base += 8) begin
        b = 8'($urandom);
        for (int k = 0; k < 8; k++) b[7 - k] = s[base + k];
        bytes.push_back(b);
      end
    end
    si_cap_x = {}; si_cap_wx = {}; si_cap_au = {}; si_cap_wau = {}; si_cap_al = {}; si_cap_wal = {};
    si_bus_write(3'd4, 8'h00);                               // clear the string FIFO
    si_bus_write(3'd2, {4'b0000, bar, inorder, 1'b0, add});  // instruction register
    si_bus_write(3'd1, 8'(n));
    foreach (bytes[i]) si_bus_write(3'd1, bytes[i]);
    for (int i = 0; i < 48; i++) begin
      si_res_x[i] = ($urandom_range(0, 1) != 0);
      si_res_wx[i] = ($urandom_range(0, 2) == 0);
    end
    si_res_clock = -1;
    si_bus_write(3'd3, 8'h00);                               // instruction in
    @(negedge clk);
    while (s_busy) @(negedge clk);
    chk(s_upc_start == (add ? 8'h74 : 8'h04), $sformatf("start address %h", s_upc_start));
    chk(s_flip == !inorder && s_mm_bar_space == bar, "s_flip and bar/space lines");
    if (inorder) si_n_inorder++; else si_n_flip++;
    if (!add) begin
      si_n_reset++;
      chk(si_cap_x.size() == 48, $sformatf("%0d X clocks", si_cap_x.size()));
      for (int t = 0; t < 48 && t < si_cap_x.size(); t++) begin
        chk(si_cap_wx[t] == (t >= n), $sformatf("X n=%0d in order=%0d clock %0d wx", n, inorder, t));
        if (t < n) chk(si_cap_x[t] == s[t], $sformatf("X n=%0d in order=%0d clock %0d x", n, inorder, t));
      end
    end else begin
      int nw;
      si_n_add++;
      chk(si_cap_au.size() == 24, $sformatf("%0d A clocks", si_cap_au.size()));
      for (int t = 0; t < 24 && t < si_cap_au.size(); t++) begin
        chk(si_cap_wau[t] == (2 * t >= n) && si_cap_wal[t] == (2 * t + 1 >= n),
            $sformatf("A n=%0d in order=%0d clock %0d wild cards", n, inorder, t));
        if (2 * t < n) chk(si_cap_au[t] == s[2 * t], $sformatf("A n=%0d clock %0d upper", n, t));
        if (2 * t + 1 < n) chk(si_cap_al[t] == s[2 * t + 1], $sformatf("A n=%0d clock %0d lower", n, t));
      end
      // result string
      while (si_res_clock < 0 || s_collecting) @(negedge clk);
      nw = 0;
      for (int i = 0; i < 48; i++) if (!si_res_wx[i]) nw++;
      si_bus_read(3'd7, d);
      chk(d == 8'(nw), $sformatf("count read %0d expected %0d", d, nw));
      for (int m = 0; m < 6; m++) begin
        logic [7:0] e;
        for (int k = 0; k < 8; k++) e[k] = si_res_x[8 * m + k];
        si_bus_read(3'd6, d);
        chk(d == e, $sformatf("result byte %0d: %h expected %h", m, d, e));
      end
    end
  endtask

  task automatic si_run_undo(input int n);
    si_cap_uw = {};
    si_bus_write(3'd5, 8'(n));
    si_bus_write(3'd2, 8'b0000_0111);
    si_bus_write(3'd3, 8'h00);
    @(negedge clk);
    while (s_busy) @(negedge clk);
    si_n_undo++;
    chk(s_upc_start == 8'hFC, "Undo start address");
    chk(si_cap_uw.size() == 48, $sformatf("%0d Undo clocks", si_cap_uw.size()));
    for (int t = 0; t < 48 && t < si_cap_uw.size(); t++)
      chk(si_cap_uw[t] == (t >= n), $sformatf("Undo %0d clock %0d", n, t));
  endtask

  task automatic si_run();
    s_bus_addr = '0; s_bus_din = '0; s_mwtc_n = 1'b1; s_mrtc_n = 1'b1;
    si_run_string(1'b0, 11, 1'b1, 1'b1);
    si_run_string(1'b0, 37, 1'b0, 1'b0);
    si_run_string(1'b0, 19, 1'b0, 1'b1);
    si_run_string(1'b1, 13, 1'b1, 1'b0);
    si_run_string(1'b1, 13, 1'b0, 1'b1);
    si_run_string(1'b0, 48, 1'b0, 1'b0);
    si_run_string(1'b1, 48, 1'b1, 1'b0);
    si_run_string(1'b0, 0, 1'b1, 1'b0);
    si_run_undo(20);
    si_run_undo(0);
    for (int k = 0; k < 30; k++)
      si_run_string(($urandom_range(0, 1) != 0), $urandom_range(1, 48),
                    ($urandom_range(0, 1) != 0), ($urandom_range(0, 1) != 0));
    si_run_undo($urandom_range(1, 48));
  endtask

  task automatic si_report();
    chk(si_n_reset > 0, "Reset instruction");
    chk(si_n_add > 0, "Add instruction");
    chk(si_n_undo > 0, "Undo instruction");
    chk(si_n_flip > 0, "inside-out string");
    chk(si_n_inorder > 0, "in-order string");
    $display("string: reset=%0d add=%0d undo=%0d inside-out=%0d in-order=%0d",
             si_n_reset, si_n_add, si_n_undo, si_n_flip, si_n_inorder);
  endtask
