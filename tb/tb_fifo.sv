// Testbench for fifo.
//
// Random writes and reads against a queue model at WIDTH=8, DEPTH=16: checks
// the first-word-fall-through head, empty, full and count every clock, the
// overflow flag for a write into a full FIFO (without a read), the underflow
// flag for a read from an empty one, that a write and a read in the same clock
// on a full FIFO both happen, and that clear empties it.
module tb_fifo;
  localparam int W = 8, D = 16;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full, overflow, underflow;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  int n_full = 0, n_ovf = 0, n_udf = 0, n_both_full = 0;
  logic [W-1:0] q [$];

  fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #2000000;
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
    bit w, r, exp_ovf, exp_udf, did_rd;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 20000; k++) begin
      // bias towards filling or draining in long runs
      w = ($urandom_range(0, 99) < (((k / 500) % 2) ? 70 : 30));
      r = ($urandom_range(0, 99) < (((k / 500) % 2) ? 30 : 70));
      wr_en   <= w;
      rd_en   <= r;
      wr_data <= W'($urandom);
      #1;
      chk(count == q.size(), "count");
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == D), "full");
      if (q.size() != 0) chk(rd_data == q[0], "head");
      if (full) n_full++;
      if (full && w && r) n_both_full++;
      exp_ovf = w && q.size() == D && !r;
      exp_udf = r && q.size() == 0;
      @(posedge clk);
      did_rd = r && q.size() != 0;
      if (w && (q.size() < D || did_rd)) q.push_back(wr_data);
      if (did_rd) void'(q.pop_front());
      #1;
      chk(overflow == exp_ovf, "overflow");
      chk(underflow == exp_udf, "underflow");
      if (exp_ovf) n_ovf++;
      if (exp_udf) n_udf++;
      if (k == 15000) begin
        clear <= 1'b1; wr_en <= 1'b0; rd_en <= 1'b0;
        @(posedge clk);
        clear <= 1'b0;
        q = {};
        #1;
        chk(empty && count == 0, "clear");
      end
    end
    chk(n_full > 0 && n_ovf > 0 && n_udf > 0 && n_both_full > 0, "every corner reached");
    $display("full=%0d ovf=%0d udf=%0d rw_full=%0d", n_full, n_ovf, n_udf, n_both_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
