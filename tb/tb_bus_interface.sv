// Testbench for bus_interface.  Performs bus writes to every address (strobe
// low for three clocks) and checks that exactly the selected write line
// pulses, for one clock, with the bus data; performs reads of the result
// FIFO (address 6) and of the count (address 7), checking the data returned
// while the strobe is low and that only a result read pops the FIFO, once,
// when the strobe ends.  xack_n must go low one clock after a strobe and
// return high with it.
module tb_bus_interface;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] addr = '0;
  logic [7:0] din = '0, dout, wdata, res_fifo_data = 8'h5A, cur_count = 8'h21;
  logic mwtc_n = 1'b1, mrtc_n = 1'b1, xack_n;
  logic wr_fifo, wr_ir, set_instr, clr_fifo, wr_undo, rd_fifo;
  int checks = 0, failures = 0;
  int pulses [8];
  logic [7:0] pdata [8];
  int pops;

  bus_interface dut (.*);

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

  always @(negedge clk) if (rst_n) begin
    if (wr_fifo)   begin pulses[1]++; pdata[1] = wdata; end
    if (wr_ir)     begin pulses[2]++; pdata[2] = wdata; end
    if (set_instr) begin pulses[3]++; pdata[3] = wdata; end
    if (clr_fifo)  begin pulses[4]++; pdata[4] = wdata; end
    if (wr_undo)   begin pulses[5]++; pdata[5] = wdata; end
    if (rd_fifo)   pops++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 20; rep++) begin
      for (int a = 0; a < 8; a++) begin
        logic [7:0] d;
        d = 8'($urandom);
        for (int i = 0; i < 8; i++) pulses[i] = 0;
        pops = 0;
        // write cycle
        @(negedge clk);
        addr = 3'(a);
        din = d;
        mwtc_n = 1'b0;
        chk(xack_n, "xack high before the strobe is seen");
        repeat (3) @(negedge clk);
        chk(!xack_n, "xack low during a write");
        mwtc_n = 1'b1;
        @(negedge clk);
        chk(xack_n, "xack high after a write");
        for (int i = 1; i <= 5; i++) begin
          chk(pulses[i] == ((i == a) ? 1 : 0), $sformatf("address %0d: line %0d pulsed %0d times", a, i, pulses[i]));
          if (i == a) chk(pdata[i] == d, "write data");
        end
        chk(pops == 0, "no pop on a write");
        // read cycle
        res_fifo_data = 8'($urandom);
        cur_count = 8'($urandom);
        @(negedge clk);
        mrtc_n = 1'b0;
        repeat (2) @(negedge clk);
        chk(!xack_n, "xack low during a read");
        if (a == 6) chk(dout == res_fifo_data, "result FIFO read");
        if (a == 7) chk(dout == cur_count, "count read");
        mrtc_n = 1'b1;
        repeat (2) @(negedge clk);
        chk(pops == ((a == 6) ? 1 : 0), $sformatf("address %0d: %0d pops", a, pops));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
