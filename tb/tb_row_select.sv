// Testbench for row_select (M = 16 rows, N = 8 lines).  Random row values and
// selections; line k must carry row sel[k].
module tb_row_select;
  localparam int M = 16, N = 8;
  logic [M-1:0] rows = '0;
  logic [$clog2(M)-1:0] sel [N];
  logic [N-1:0] lines;
  int checks = 0, failures = 0;

  row_select #(.M(M), .N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      rows = M'($urandom);
      for (int k = 0; k < N; k++) sel[k] = $clog2(M)'($urandom);
      #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (lines[k] != rows[sel[k]]) begin
          failures++;
          $display("FAIL line %0d sel %0d rows %h -> %0d", k, sel[k], rows, lines[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
