// Testbench for interface_controller (N = 8, R = 16, M = 16).
//
// Checks the reset defaults (row r fed from line r mod 8 and enabled, line k
// from row k, zero permutation controls, no tasks, 1 bit per clock), then
// loads random switch, row-select, permutation and task configurations by
// 5-bit chunks, low chunk first, and reads them back from the outputs; checks
// the format instruction, every command bit (one-clock schedule and collect
// pulses, collection on and off, the flush request held until the stager is
// empty, send toggling) and that master reset restores every default.
module tb_interface_controller;
  import ri_pkg::*;
  localparam int N = 8, R = 16, M = 16;
  localparam int PB = waksman_bits(N);
  logic clk = 1'b0, rst_n = 1'b0;
  logic instr_valid = 1'b0, master_reset = 1'b0, stager_busy = 1'b0;
  logic [7:0] instr = '0;
  logic [1:0] ps_fmt;
  logic stager_bypass;
  logic [2:0] sw_sel [R];
  logic [R-1:0] sw_en;
  logic [3:0] row_sel [N];
  logic [PB-1:0] perm_ctrl;
  logic [N-1:0] task_valid;
  logic [1:0] task_fmt [N];
  logic sched_start, collect_start, collect_on, flush_on, send_on;
  int checks = 0, failures = 0;

  interface_controller #(.N(N), .R(R), .M(M)) dut (.*);

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

  task automatic send(input logic [2:0] op, input logic [4:0] pl);
    instr = {op, pl};
    instr_valid = 1'b1;
    @(negedge clk);
    instr_valid = 1'b0;
  endtask

  // shift a field in 5-bit chunks, lowest chunk first
  task automatic load_field(input logic [2:0] op, input logic [127:0] v, input int width);
    int chunks;
    chunks = (width + 4) / 5;
    for (int c = 0; c < chunks; c++) send(op, v[5 * c +: 5]);
  endtask

  task automatic check_defaults(input string tag);
    bit ok;
    ok = (ps_fmt == 0) && !stager_bypass && (perm_ctrl == '0) && (task_valid == '0) &&
         (sw_en == '1) && !collect_on && !send_on && !flush_on;
    for (int r = 0; r < R; r++) if (sw_sel[r] != 3'(r % N)) ok = 1'b0;
    for (int k = 0; k < N; k++) if (row_sel[k] != 4'(k)) ok = 1'b0;
    chk(ok, {tag, ": defaults"});
  endtask

  initial begin
    logic [127:0] v;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check_defaults("reset");
    for (int rep = 0; rep < 10; rep++) begin
      // format
      send(3'd1, {2'b00, rep[0], 2'(rep)});
      chk(ps_fmt == 2'(rep) && stager_bypass == rep[0], "format instruction");
      // switch network: R fields of {enable, 3-bit line}
      v = {$urandom, $urandom, $urandom, $urandom};
      load_field(3'd2, v, R * 4);
      for (int r = 0; r < R; r++)
        chk(sw_sel[r] == v[4 * r +: 3] && sw_en[r] == v[4 * r + 3], $sformatf("switch row %0d", r));
      // row select: N fields of 4 bits
      v = {$urandom, $urandom, $urandom, $urandom};
      load_field(3'd3, v, N * 4);
      for (int k = 0; k < N; k++) chk(row_sel[k] == v[4 * k +: 4], $sformatf("row select %0d", k));
      // permutation controls
      v = {$urandom, $urandom, $urandom, $urandom};
      load_field(3'd4, v, PB);
      chk(perm_ctrl == v[PB-1:0], "permutation controls");
      // task table: N fields of {valid, fmt}
      v = {$urandom, $urandom, $urandom, $urandom};
      load_field(3'd5, v, N * 3);
      for (int t = 0; t < N; t++)
        chk(task_fmt[t] == v[3 * t +: 2] && task_valid[t] == v[3 * t + 2], $sformatf("task %0d", t));
    end
    // commands
    send(3'd6, 5'b00001);
    chk(sched_start, "schedule pulse");
    @(negedge clk);
    chk(!sched_start, "schedule pulse lasts one clock");
    send(3'd6, 5'b00010);
    chk(collect_start && collect_on, "collect start");
    @(negedge clk);
    chk(!collect_start && collect_on, "collect stays on");
    send(3'd6, 5'b00100);
    chk(!collect_on, "collect stop");
    stager_busy = 1'b1;
    send(3'd6, 5'b01000);
    chk(flush_on, "flush request");
    repeat (3) @(negedge clk);
    chk(flush_on, "flush held while the stager is busy");
    stager_busy = 1'b0;
    @(negedge clk);
    chk(!flush_on, "flush ends when the stager is empty");
    send(3'd6, 5'b10000);
    chk(send_on, "send on");
    send(3'd6, 5'b10000);
    chk(!send_on, "send off");
    send(3'd6, 5'b10010);
    // master reset
    master_reset = 1'b1;
    @(negedge clk);
    master_reset = 1'b0;
    check_defaults("master reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
