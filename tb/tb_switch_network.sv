// Testbench for switch_network (N = 8 lines, R = 16 rows).  Random line values,
// selections and enables; every row must carry its selected line when enabled
// and 0 when not.  Also checks one line fanned out to all rows.
module tb_switch_network;
  localparam int N = 8, R = 16;
  logic [N-1:0] lines = '0;
  logic [$clog2(N)-1:0] sel [R];
  logic [R-1:0] row_en = '0, rows;
  int checks = 0, failures = 0;

  switch_network #(.N(N), .R(R)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      lines  = N'($urandom);
      row_en = (t < 100) ? '1 : R'($urandom);
      for (int r = 0; r < R; r++) sel[r] = (t < 100) ? $clog2(N)'(t % N) : $clog2(N)'($urandom);
      #1;
      for (int r = 0; r < R; r++) begin
        checks++;
        if (rows[r] != (row_en[r] && lines[sel[r]])) begin
          failures++;
          $display("FAIL row %0d sel %0d en %0d lines %b -> %0d", r, sel[r], row_en[r], lines, rows[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
