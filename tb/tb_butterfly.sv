// Testbench for butterfly: all eight input combinations.  With ctrl low the
// element passes a to x and b to y; with ctrl high it exchanges them.
module tb_butterfly;
  logic a = 1'b0, b = 1'b0, ctrl = 1'b0, x, y;
  int checks = 0, failures = 0;

  butterfly dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {ctrl, b, a} = 3'(v);
      #1;
      checks++;
      if ({x, y} != (ctrl ? {b, a} : {a, b})) begin
        failures++;
        $display("FAIL a=%0d b=%0d ctrl=%0d -> x=%0d y=%0d", a, b, ctrl, x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
