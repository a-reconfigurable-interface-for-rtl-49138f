// Testbench for string_interface, the string-matcher host interface, at its
// only size (48-character strings, 8-byte FIFOs).  Runs the scenario of
// si_scenario.svh: Reset, Add and Undo instructions with strings in order and
// inside out, checking every character clock sent to the matcher and the
// result read back over the bus.
module tb_string_interface;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] s_bus_addr = '0;
  logic [7:0] s_bus_din = '0, s_bus_dout, s_upc_start;
  logic s_mwtc_n = 1'b1, s_mrtc_n = 1'b1, s_xack_n;
  logic s_mm_x, s_mm_wx, s_mm_x_valid, s_mm_undo, s_mm_a_upper, s_mm_wa_upper, s_mm_a_lower, s_mm_wa_lower;
  logic s_mm_a_valid, s_mm_bar_space, s_busy, s_collecting, s_flip;
  logic s_mm_res_x = 1'b0, s_mm_res_wx = 1'b0;
  int checks = 0, failures = 0;

  string_interface dut (
    .clk, .rst_n,
    .bus_addr(s_bus_addr), .bus_din(s_bus_din), .mwtc_n(s_mwtc_n), .mrtc_n(s_mrtc_n),
    .xack_n(s_xack_n), .bus_dout(s_bus_dout),
    .mm_x(s_mm_x), .mm_wx(s_mm_wx), .mm_x_valid(s_mm_x_valid), .mm_undo(s_mm_undo),
    .mm_a_upper(s_mm_a_upper), .mm_wa_upper(s_mm_wa_upper),
    .mm_a_lower(s_mm_a_lower), .mm_wa_lower(s_mm_wa_lower), .mm_a_valid(s_mm_a_valid),
    .mm_bar_space(s_mm_bar_space), .mm_res_x(s_mm_res_x), .mm_res_wx(s_mm_res_wx),
    .busy(s_busy), .collecting(s_collecting), .upc_start(s_upc_start), .flip(s_flip)
  );

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

  `include "si_scenario.svh"

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    si_run();
    si_report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
