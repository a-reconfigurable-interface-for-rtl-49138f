// Testbench for x_string_loader (strings of 48 characters).
//
// The testbench plays the controller: it loads the count, loads the first
// byte, gives an inside-out string whose count is not a multiple of 8 its
// 8 - (count mod 8) dead shifts, then runs 48 character clocks, loading the
// next byte in place of a shift whenever the register has given its last
// character.  Byte layout: in order, character 8m+k is bit k of byte m;
// inside out, the first byte holds the first r = count mod 8 characters,
// character k at bit r-1-k, and every later byte holds character base+k at
// bit 7-k.  Expected at character clock t: x = character t and wx low for
// t < count, wx high afterwards; done after 48 clocks.  Runs the worked
// lengths 11, 37 and 19, both layouts, plus 0, 8, 48 and random lengths.
module tb_x_string_loader;
  localparam int LEN = 48;
  logic clk = 1'b0, rst_n = 1'b0;
  logic flip = 1'b0, load_count = 1'b0, load_word = 1'b0, shift = 1'b0, count_en = 1'b0;
  logic [7:0] count_in = '0, word_in = '0;
  logic x, wx, done;
  int checks = 0, failures = 0;

  x_string_loader #(.LEN(LEN)) dut (.*);

  always #5 clk = !clk;

  initial begin
    #20000000;
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
    bit s [LEN];
    logic [7:0] bytes [$];
    int r, avail, bi;
    for (int i = 0; i < LEN; i++) s[i] = ($urandom_range(0, 1) != 0);
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
      avail = 8;
      if (fl && r != 0) begin
        repeat (8 - r) begin
          shift = 1'b1;
          @(negedge clk);
        end
        idle_ctl();
        avail = r;
      end
    end
    for (int t = 0; t < LEN; t++) begin
      count_en = 1'b1;
      #1;
      chk(wx == (t >= n), $sformatf("n=%0d flip=%0d clock %0d: wx=%0d", n, fl, t, wx));
      if (t < n) chk(x == s[t], $sformatf("n=%0d flip=%0d clock %0d: x=%0d expected %0d", n, fl, t, x, s[t]));
      if (avail == 1 && bi < bytes.size()) begin
        load_word = 1'b1;
        shift = 1'b0;
        word_in = bytes[bi++];
        avail = 8;
      end else begin
        load_word = 1'b0;
        shift = 1'b1;
        avail--;
      end
      @(negedge clk);
    end
    idle_ctl();
    chk(done, "done after 48 character clocks");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_string(11, 1'b0); run_string(11, 1'b1);
    run_string(37, 1'b0); run_string(37, 1'b1);
    run_string(19, 1'b0); run_string(19, 1'b1);
    run_string(0, 1'b0);  run_string(8, 1'b1);
    run_string(48, 1'b0); run_string(48, 1'b1);
    for (int k = 0; k < 40; k++) run_string($urandom_range(1, 48), ($urandom_range(0, 1) != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
