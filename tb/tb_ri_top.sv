// Full-size end-to-end testbench for ri_top, the two host interfaces side by
// side at the sizes of the text (no parameter overrides): the general
// interface (8-bit array words, 16 rows fed, 16 rows read) and the
// string-matcher interface (48-character strings).
//
// Both scenarios run at the same time on the one clock.  The general side
// (gi_scenario.svh) drives the byte protocol, checks every word reaching the
// array and every result word reaching the host, and counts escaped zeros,
// instructions, master reset, stager permutation / bypass / flush, each
// converter format, the switch network, FIFO full, memory stall, array
// starvation, scheduling and its error, collection, permutation, collisions
// and output-memory overflow.  The string side (si_scenario.svh) runs Reset,
// Add and Undo with strings in order and inside out and checks what the
// matcher receives and what the host reads back.  The test fails if any
// mechanism never happened (or if a stager collision did).
module tb_ri_top;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  // general interface
  logic [7:0] g_host_byte = '0;
  logic g_host_valid = 1'b0, g_host_in_full, g_host_rd = 1'b0, g_host_rd_empty;
  logic [7:0] g_host_rd_data;
  logic [15:0] g_array_in, g_array_out = '0;
  logic g_array_in_valid, g_array_out_valid = 1'b0;
  logic g_master_reset, g_in_stall, g_array_starve, g_out_drop, g_collision;
  logic g_sched_done, g_sched_error, g_stager_valid;
  logic [7:0] g_stager_word;
  logic [2:0] g_stager_tag;

  // string-matcher interface
  logic [2:0] s_bus_addr = '0;
  logic [7:0] s_bus_din = '0, s_bus_dout, s_upc_start;
  logic s_mwtc_n = 1'b1, s_mrtc_n = 1'b1, s_xack_n;
  logic s_mm_x, s_mm_wx, s_mm_x_valid, s_mm_undo, s_mm_a_upper, s_mm_wa_upper, s_mm_a_lower, s_mm_wa_lower;
  logic s_mm_a_valid, s_mm_bar_space, s_busy, s_collecting, s_flip;
  logic s_mm_res_x = 1'b0, s_mm_res_wx = 1'b0;

  ri_top dut (.*);

  always #5 clk = !clk;

  initial begin
    #100000000;
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
  `include "si_scenario.svh"

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      gi_run();
      si_run();
    join
    gi_report();
    si_report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
