// Testbench for general_interface at its default sizes (8-bit words, 16 rows
// fed, 16 rows read).  Runs the end-to-end scenario of gi_scenario.svh: the
// host sends data and instruction bytes through the escape protocol, the
// array side is checked word by word in every converter format, with the
// stager permuting, bypassed and flushed, with a custom switch setting, after
// a master reset, through a full input FIFO and memory stall; then tasks are
// scheduled, results collected through the row selector, permutation network
// and output stager, and read back by the host.  Every mechanism is counted
// and must have happened.
module tb_general_interface;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] g_host_byte = '0;
  logic g_host_valid = 1'b0, g_host_in_full, g_host_rd = 1'b0, g_host_rd_empty;
  logic [7:0] g_host_rd_data;
  logic [15:0] g_array_in, g_array_out = '0;
  logic g_array_in_valid, g_array_out_valid = 1'b0;
  logic g_master_reset, g_in_stall, g_array_starve, g_out_drop, g_collision;
  logic g_sched_done, g_sched_error, g_stager_valid;
  logic [7:0] g_stager_word;
  logic [2:0] g_stager_tag;
  int checks = 0, failures = 0;

  general_interface dut (
    .clk, .rst_n,
    .host_byte(g_host_byte), .host_valid(g_host_valid), .host_in_full(g_host_in_full),
    .host_rd(g_host_rd), .host_rd_data(g_host_rd_data), .host_rd_empty(g_host_rd_empty),
    .array_in(g_array_in), .array_in_valid(g_array_in_valid),
    .array_out(g_array_out), .array_out_valid(g_array_out_valid),
    .master_reset(g_master_reset), .in_stall(g_in_stall), .array_starve(g_array_starve),
    .out_drop(g_out_drop), .collision(g_collision),
    .sched_done(g_sched_done), .sched_error(g_sched_error),
    .stager_word(g_stager_word), .stager_valid(g_stager_valid), .stager_tag(g_stager_tag)
  );

  always #5 clk = !clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  `include "gi_scenario.svh"

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    gi_run();
    gi_report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
