// Testbench for string_controller.  The string FIFO is a queue in the
// testbench and the two loaders are reduced to their length counters (done
// after 48 X or 24 A character clocks from the count load).
//
// For Reset and Add instructions with random counts, both string orders and
// both bar/space values, checks: the start address (04h, 74h, FCh), the flip
// and bar/space lines, that the count byte and exactly ceil(count/8) string
// bytes are read, the first with a load at once, the number of dead shifts
// before an inside-out string with count mod 8 = r > 0 (8 - r for X,
// 4 - r DIV 2 for A, the last one turned into a load when the first byte has
// fewer than two characters), that during character clocks a new byte is
// loaded exactly when the register has given its last character (every 8 X
// or 4 A clocks after the first byte's share), 48 or 24 character clocks,
// the collector start pulse after an Add only, and 48 clocks for an Undo.
module tb_string_controller;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ir_wr = 1'b0, instr_set = 1'b0;
  logic [3:0] ir_data = '0;
  logic fifo_empty, fifo_rd;
  logic [7:0] fifo_data;
  logic x_load_count, a_load_count, load_word, shift, count_en, undo_en, coll_start;
  logic x_done, a_done, flip, bar_space, x_active, a_active, undo_active, instr_ff, busy;
  logic [7:0] upc_start;
  int checks = 0, failures = 0;

  string_controller dut (.*);

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

  logic [7:0] q [$];
  logic fe = 1'b1;
  logic [7:0] fd = '0;
  assign fifo_empty = fe;
  assign fifo_data  = fd;
  task automatic show_head();
    fe <= (q.size() == 0);
    fd <= (q.size() != 0) ? q[0] : 8'h00;
  endtask

  // loader length counters; the FIFO and counter outputs change with
  // nonblocking assignments so the controller samples the old values
  int xl = 0, al = 0;
  logic xd = 1'b1, ad = 1'b1;
  assign x_done = xd;
  assign a_done = ad;

  // event log of one instruction
  int n_rd, n_pre, n_char, n_coll, n_undo, n_loads_run;
  int load_at [$];
  always @(posedge clk) if (rst_n) begin
    if (fifo_rd && q.size() != 0) begin void'(q.pop_front()); n_rd++; show_head(); end
    if (x_load_count) xl = 48;
    else if (count_en && xl != 0) xl--;
    if (a_load_count) al = 24;
    else if (count_en && al != 0) al--;
    if (shift && !count_en) n_pre++;
    if (load_word && !count_en && n_rd > 2) n_pre++;   // not the first byte
    if (count_en) begin
      if (load_word) load_at.push_back(n_char);
      n_char++;
    end
    xd <= (xl == 0);
    ad <= (al == 0);
    if (coll_start) n_coll++;
    if (undo_en) n_undo++;
  end

  task automatic issue(input logic [3:0] ir);
    @(negedge clk);
    ir_wr = 1'b1; ir_data = ir;
    @(negedge clk);
    ir_wr = 1'b0;
    n_rd = 0; n_pre = 0; n_char = 0; n_coll = 0; n_undo = 0;
    load_at = {};
    instr_set = 1'b1;
    @(negedge clk);
    instr_set = 1'b0;
    @(negedge clk);
    while (busy) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic run_string(input bit add, input int n, input bit inorder, input bit bar);
    int r, nbytes, first_share, period, pre_exp, k;
    q = {};
    q.push_back(8'(n));
    nbytes = (n + 7) / 8;
    for (int i = 0; i < nbytes; i++) q.push_back(8'($urandom));
    show_head();
    issue({bar, inorder, 1'b0, add});
    r = n % 8;
    period = add ? 4 : 8;
    chk(upc_start == (add ? 8'h74 : 8'h04), "start address");
    chk(flip == !inorder && bar_space == bar, "flip and bar/space");
    chk(n_rd == 1 + nbytes, $sformatf("n=%0d: %0d bytes read, expected %0d", n, n_rd, 1 + nbytes));
    chk(n_char == (add ? 24 : 48), $sformatf("%0d character clocks", n_char));
    chk(n_coll == (add ? 1 : 0), "collector start after Add only");
    // dead shifts and first byte's share of character clocks
    if (!inorder && r != 0) begin
      pre_exp = add ? 4 - r / 2 : 8 - r;
      first_share = add ? r / 2 : r;
    end else begin
      pre_exp = 0;
      first_share = period;
    end
    chk(n_pre == pre_exp, $sformatf("n=%0d in order=%0d add=%0d: %0d dead shifts, expected %0d",
                                    n, inorder, add, n_pre, pre_exp));
    // loads during character clocks: the first byte whose share is 0 was
    // loaded during the dead shifts
    k = 0;
    for (int b = 1; b < nbytes; b++) begin
      int at;
      if (b == 1 && first_share == 0) continue;
      at = first_share - 1 + (b - 1) * period;
      chk(k < load_at.size() && load_at[k] == at,
          $sformatf("n=%0d in order=%0d add=%0d: byte %0d loaded at clock %0d, expected %0d",
                    n, inorder, add, b, (k < load_at.size()) ? load_at[k] : -1, at));
      k++;
    end
    chk(load_at.size() == k, "no extra loads");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n <= 48; n++) begin
      run_string(1'b0, n, 1'b1, n[0]);
      run_string(1'b0, n, 1'b0, n[1]);
      run_string(1'b1, n, 1'b1, n[0]);
      run_string(1'b1, n, 1'b0, n[1]);
    end
    issue(4'b0111);
    chk(upc_start == 8'hFC, "Undo start address");
    chk(n_undo == 48, $sformatf("%0d Undo clocks", n_undo));
    chk(n_rd == 0, "Undo reads nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
