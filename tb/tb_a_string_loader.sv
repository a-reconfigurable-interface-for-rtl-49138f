// Testbench for a_string_loader (24 clocks of two characters).
//
// The testbench plays the controller: load the count, load the first byte,
// give an inside-out string whose count is not a multiple of 8 its
// 4 - (r DIV 2) dead shifts (r = count mod 8; the last of them is replaced by
// the next byte's load when the first byte holds fewer than two characters),
// then 24 character clocks, loading the next byte in place of a shift
// whenever the registers have given their last pair.  Byte layout as for the
// X-string: in order, character 8m+k at bit k of byte m; inside out, the first
// byte holds characters 0..r-1 at bits r-1..0 and later bytes character base+k
// at bit 7-k.  Expected at character clock t: upper cell = character 2t,
// lower cell = character 2t+1, each with its wild-card line low while the
// character exists and high after the string ends; done after 24 clocks.
// Runs the worked 13-character string in both layouts, lengths 0 to 48 in
// both layouts, and random strings.
module tb_a_string_loader;
  localparam int LEN = 24;
  logic clk = 1'b0, rst_n = 1'b0;
  logic flip = 1'b0, load_count = 1'b0, load_word = 1'b0, shift = 1'b0, count_en = 1'b0;
  logic [7:0] count_in = '0, word_in = '0;
  logic a_upper, w_upper, a_lower, w_lower, done;
  int checks = 0, failures = 0;

  a_string_loader #(.LEN(LEN)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  task automatic idle_ctl();
    load_count = 1'b0; load_word = 1'b0; shift = 1'b0; count_en = 1'b0;
  endtask

  task automatic run_string(input int n, input bit fl);
    bit s [2 * LEN];
    logic [7:0] bytes [$];
    int r, avail, bi, pre;
    for (int i = 0; i < 2 * LEN; i++) s[i] = ($urandom_range(0, 1) != 0);
    r = n % 8;
    bytes = {};
    if (!fl) begin
      for (int m = 0; m < (n + 7) / 8; m++) begin
        logic [7:0] b;
        b = 8'($urandom);
        for (int k = 0; k < 8; k++) if (8 * m + k < n) b[k] = s[8 * m + k];
        bytes.push_back(b);
      end
    end else begin
      logic [7:0] b;
      if (r != 0) begin
        b = 8'($urandom);
        for (int k = 0; k < r; k++) b[r - 1 - k] = s[k];
        bytes.push_back(b);
      end
      for (int base = r; base < n; base += 8) begin
        b = 8'($urandom);
        for (int k = 0; k < 8; k++) b[7 - k] = s[base + k];
        bytes.push_back(b);
      end
    end
    @(negedge clk);
    flip = fl;
    idle_ctl();
    load_count = 1'b1;
    count_in = 8'(n);
    @(negedge clk);
    idle_ctl();
    bi = 0;
    avail = 0;
    if (n != 0) begin
      load_word = 1'b1;
      word_in = bytes[bi++];
      @(negedge clk);
      idle_ctl();
      avail = 4;
      if (fl && r != 0) begin
        pre = 4 - r / 2;
        avail = r / 2;
        for (int p = 0; p < pre; p++) begin
          if (p == pre - 1 && avail == 0 && bi < bytes.size()) begin
            load_word = 1'b1;
            word_in = bytes[bi++];
            avail = 4;
          end else begin
            shift = 1'b1;
          end
          @(negedge clk);
          idle_ctl();
        end
      end
    end
    for (int t = 0; t < LEN; t++) begin
      count_en = 1'b1;
      #1;
      chk(w_upper == (2 * t >= n) && w_lower == (2 * t + 1 >= n),
          $sformatf("n=%0d flip=%0d clock %0d: wa upper/lower %0d%0d", n, fl, t, w_upper, w_lower));
      if (2 * t < n) chk(a_upper == s[2 * t],
          $sformatf("n=%0d flip=%0d clock %0d: upper %0d expected %0d", n, fl, t, a_upper, s[2 * t]));
      if (2 * t + 1 < n) chk(a_lower == s[2 * t + 1],
          $sformatf("n=%0d flip=%0d clock %0d: lower %0d expected %0d", n, fl, t, a_lower, s[2 * t + 1]));
      if (avail == 1 && bi < bytes.size()) begin
        load_word = 1'b1;
        shift = 1'b0;
        word_in = bytes[bi++];
        avail = 4;
      end else begin
        load_word = 1'b0;
        shift = 1'b1;
        avail--;
      end
      @(negedge clk);
    end
    idle_ctl();
    chk(done, "done after 24 character clocks");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_string(13, 1'b0);
    run_string(13, 1'b1);
    for (int n = 0; n <= 2 * LEN; n++) begin
      run_string(n, 1'b0);
      run_string(n, 1'b1);
    end
    for (int k = 0; k < 40; k++) run_string($urandom_range(1, 48), ($urandom_range(0, 1) != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
