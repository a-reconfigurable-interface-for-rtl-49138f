// Testbench for flip_mux (8 bits): all 256 words, flip low (unchanged) and
// flip high (bit k moves to bit 7-k).
module tb_flip_mux;
  logic [7:0] in_word = '0, out_word;
  logic flip = 1'b0;
  int checks = 0, failures = 0;

  flip_mux #(.W(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e;
    for (int v = 0; v < 512; v++) begin
      {flip, in_word} = 9'(v);
      #1;
      for (int k = 0; k < 8; k++) e[k] = flip ? in_word[7 - k] : in_word[k];
      checks++;
      if (out_word != e) begin
        failures++;
        $display("FAIL flip=%0d in=%b out=%b", flip, in_word, out_word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
