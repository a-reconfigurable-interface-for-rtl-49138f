// Testbench for output_stager_module (N = 8, L = 4 lines, 3-bit tag).
//
// Random run, assigned, fmt (1, 2 or 4 bits per clock), load, line values
// and words from below; a cycle model of the converter (shift by w, new bits
// into the top w cells, bit w*t+j = line j at clock t) and of the latch
// (converter word with this module's tag when loading with a task, otherwise
// the word from below) is compared every clock, as is the collision flag.
module tb_output_stager_module;
  localparam int N = 8, L = 4, TAG = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic run = 1'b0, assigned = 1'b0, load = 1'b0, b_valid = 1'b0;
  logic [1:0] fmt = '0;
  logic [TAG-1:0] my_index = 3'd5, b_tag = '0, d_tag;
  logic [L-1:0] a_in = '0;
  logic [N-1:0] b_in = '0, d_out;
  logic d_valid, collision;
  int checks = 0, failures = 0;
  int n_load = 0, n_pass = 0, n_coll = 0;

  output_stager_module #(.N(N), .L(L), .TAG(TAG)) dut (.*);

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
    logic [N-1:0] sp, nx, ed;
    logic ev;
    logic [TAG-1:0] et;
    int w;
    sp = '0; ed = '0; ev = 1'b0; et = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < 5000; k++) begin
      if (k % 50 == 0) fmt = 2'($urandom_range(0, 2));
      run      = ($urandom_range(0, 5) != 0);
      assigned = ($urandom_range(0, 5) != 0);
      load     = ($urandom_range(0, 3) == 0);
      a_in     = L'($urandom);
      b_in     = N'($urandom);
      b_valid  = ($urandom_range(0, 1) != 0);
      b_tag    = TAG'($urandom);
      w = 1 << fmt;
      nx = sp >> w;
      for (int j = 0; j < w; j++) nx[N - w + j] = a_in[j];
      #1;
      chk(collision == (load && assigned && b_valid), "collision flag");
      if (collision) n_coll++;
      @(posedge clk);
      if (run && assigned) sp = nx;
      if (load && assigned) begin
        ed = nx; ev = 1'b1; et = my_index; n_load++;
      end else begin
        ed = b_in; ev = b_valid; et = b_tag; n_pass++;
      end
      #1;
      chk(d_valid == ev, "d_valid");
      if (ev) chk(d_out == ed && d_tag == et, $sformatf("d_out %h/%0d expected %h/%0d", d_out, d_tag, ed, et));
      @(negedge clk);
    end
    chk(n_load > 0 && n_pass > 0 && n_coll > 0, "load, pass and collision all occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
