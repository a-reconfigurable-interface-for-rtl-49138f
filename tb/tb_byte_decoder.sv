// Testbench for byte_decoder.
//
// Drives a random byte stream (with plenty of zero escape bytes and panic
// bytes) through the decoder and compares every output pulse with a reference
// model of the escape protocol written here: a zero byte escapes the next
// byte; an escaped zero is data, an escaped panic byte is a master reset, any
// other escaped byte is an instruction.  Also replays the fixed sequence
// 00 00 | 00 41 | 00 FF | 12 and checks its outputs one by one, and checks that
// idle clocks (byte_valid low) produce nothing.  Outputs are compared one clock
// after the byte is offered.
module tb_byte_decoder;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] byte_in = '0;
  logic       byte_valid = 1'b0;
  logic [7:0] data_out, instr_out;
  logic       data_valid, instr_valid, master_reset;
  int checks = 0, failures = 0;
  int n_data = 0, n_instr = 0, n_reset = 0;

  byte_decoder dut (.*);

  always #5 clk = !clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  bit esc = 1'b0;
  task automatic send(input logic [7:0] b, input bit v);
    bit exp_d, exp_i, exp_r;
    exp_d = 1'b0; exp_i = 1'b0; exp_r = 1'b0;
    if (v) begin
      if (esc) begin
        esc = 1'b0;
        if (b == 8'h00)      exp_d = 1'b1;
        else if (b == 8'hFF) exp_r = 1'b1;
        else                 exp_i = 1'b1;
      end else if (b == 8'h00) begin
        esc = 1'b1;
      end else begin
        exp_d = 1'b1;
      end
    end
    byte_in    <= b;
    byte_valid <= v;
    @(posedge clk);
    byte_valid <= 1'b0;
    #1;
    checks++;
    if (data_valid != exp_d || instr_valid != exp_i || master_reset != exp_r) begin
      failures++;
      $display("byte %h v=%0d: got d=%0d i=%0d r=%0d, expected %0d %0d %0d",
               b, v, data_valid, instr_valid, master_reset, exp_d, exp_i, exp_r);
    end
    if (exp_d) begin
      n_data++;
      checks++;
      if (data_out != b) begin failures++; $display("data %h != %h", data_out, b); end
    end
    if (exp_i) begin
      n_instr++;
      checks++;
      if (instr_out != b) begin failures++; $display("instr %h != %h", instr_out, b); end
    end
    if (exp_r) n_reset++;
  endtask

  initial begin
    logic [7:0] b;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    // fixed sequence: escaped zero (data 00), instruction 41, reset, data 12
    send(8'h00, 1); send(8'h00, 1);
    send(8'h00, 1); send(8'h41, 1);
    send(8'h00, 1); send(8'hFF, 1);
    send(8'h12, 1);
    // plain FF without escape is data
    send(8'hFF, 1);
    for (int k = 0; k < 4000; k++) begin
      case ($urandom_range(0, 5))
        0, 1:    b = 8'h00;
        2:       b = 8'hFF;
        default: b = 8'($urandom);
      endcase
      send(b, ($urandom_range(0, 4) != 0));
    end
    checks++;
    if (n_data == 0 || n_instr == 0 || n_reset == 0) begin
      failures++;
      $display("a byte class never occurred: d=%0d i=%0d r=%0d", n_data, n_instr, n_reset);
    end
    $display("data=%0d instr=%0d reset=%0d", n_data, n_instr, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
