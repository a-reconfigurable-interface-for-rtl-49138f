// Testbench for undo_counter.  Loads random counts 0..48 and runs 48 enabled
// clocks with random disabled clocks between them; at enabled clock t the
// wild-card line must be low for t < count and high from then on, and the
// counter must hold while disabled and stop at zero.
module tb_undo_counter;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, count_en = 1'b0;
  logic [7:0] count_in = '0, count;
  logic wx;
  int checks = 0, failures = 0;

  undo_counter dut (.*);

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

  initial begin
    int n, t;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 60; k++) begin
      n = (k < 49) ? k : $urandom_range(0, 48);
      load = 1'b1;
      count_in = 8'(n);
      @(negedge clk);
      load = 1'b0;
      t = 0;
      while (t < 48) begin
        count_en = ($urandom_range(0, 3) != 0);
        #1;
        if (count_en) begin
          chk(wx == (t >= n), $sformatf("count %0d clock %0d: wx=%0d", n, t, wx));
          t++;
        end else begin
          chk(count == 8'((n > t) ? n - t : 0), "count holds while disabled");
        end
        @(negedge clk);
      end
      count_en = 1'b0;
      chk(count == 0 && wx, "stopped at zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
