// Workload testbench for conditioner_memory at the first memory sizing of the
// complexity table: host words of 8 bits every 7 clocks, array words of 10 bits
// every 2 clocks, 8-bit RAM chips with a 3-clock access, and the smallest
// number of chips that covers both rates, s_R = 4 (8/7 + 10/2 = 6.1 bits per
// clock needed, 4*8/3 = 10.7 available).  Then w_R = 32, s_H = 8/gcd(8,32) = 1
// (Register1/2 of 32 bits) and s_A = 10/gcd(10,32) = 5 (Register4/5 of 160
// bits), complexity w_R*(s_A+s_H) = 192.
//
// Part 1, bit stream: 400 random host words (3200 bits, a multiple of 160)
// go in with random gaps while the reader takes words with random gaps; the
// 320 words read must be the same bit stream, least significant bit first.
// Part 2, rates: the host writes one word every 7 clocks without a break.
// After the bank holds 56 memory words (enough for the 200 array words the
// test takes, since the array consumes faster than the host supplies) the
// array starts taking one word every 2 clocks.  For the next 400 clocks the host must never be stalled and the
// array must never find Register5 empty.
module tb_memory_sizing;
  localparam int NW = 8, NRD = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_valid = 1'b0, rd_ready = 1'b0;
  logic [NW-1:0] wr_data = '0;
  logic [NRD-1:0] rd_data;
  logic wr_ready, rd_valid, wr_stall, rd_starve;
  logic [6:0] bank_words;
  int checks = 0, failures = 0;

  conditioner_memory #(.NW(8), .NRD(10), .NR(8), .SR(4), .TR(3), .DEPTH(64)) dut (.*);

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

  bit wbits [$];
  bit rbits [$];
  int nwritten = 0, nread = 0;

  // bookkeeping at each rising edge: what was accepted
  always @(posedge clk) if (rst_n) begin
    if (wr_valid && wr_ready) begin
      for (int b = 0; b < NW; b++) wbits.push_back(wr_data[b]);
      nwritten++;
    end
    if (rd_valid && rd_ready) begin
      for (int b = 0; b < NRD; b++) rbits.push_back(rd_data[b]);
      nread++;
    end
  end

  task automatic compare_streams(input string tag);
    int n;
    int bad;
    n = rbits.size();
    bad = 0;
    chk(n <= wbits.size(), {tag, " not more read than written"});
    for (int i = 0; i < n && i < wbits.size(); i++) if (rbits[i] != wbits[i]) bad++;
    chk(bad == 0, $sformatf("%s: %0d of %0d bits differ", tag, bad, n));
  endtask

  initial begin
    int stalls, starves, target;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // ---------- part 1 ----------
    fork
      begin
        for (int k = 0; k < 400; k++) begin
          wr_data  = NW'($urandom);
          wr_valid = 1'b1;
          do @(negedge clk); while (!(nwritten == k + 1));
          wr_valid = 1'b0;
          repeat ($urandom_range(0, 3)) @(negedge clk);
        end
      end
      begin
        while (nread < 320) begin
          rd_ready = ($urandom_range(0, 2) == 0);
          @(negedge clk);
        end
        rd_ready = 1'b0;
      end
    join
    chk(nread == 320, "part 1: 320 words read");
    compare_streams("part 1");
    chk(!rd_valid && bank_words == 0, "part 1: memory empty at the end");
    // ---------- part 2 ----------
    wbits = {};
    rbits = {};
    stalls = 0;
    starves = 0;
    fork
      begin : writer
        forever begin
          wr_data  = NW'($urandom);
          wr_valid = 1'b1;
          #1;
          if (wr_stall) stalls++;
          @(negedge clk);
          wr_valid = 1'b0;
          repeat (6) @(negedge clk);
        end
      end
      begin
        wait (bank_words >= 56);
        @(negedge clk);
        target = nread + 200;
        stalls = 0;
        for (int k = 0; k < 200; k++) begin
          rd_ready = 1'b1;
          #1;
          if (rd_starve) starves++;
          @(negedge clk);
          rd_ready = 1'b0;
          @(negedge clk);
        end
        disable writer;
      end
    join
    wr_valid = 1'b0;
    chk(nread == target, "part 2: one array word every 2 clocks");
    chk(stalls == 0, $sformatf("part 2: host stalled %0d times", stalls));
    chk(starves == 0, $sformatf("part 2: array starved %0d times", starves));
    compare_streams("part 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
