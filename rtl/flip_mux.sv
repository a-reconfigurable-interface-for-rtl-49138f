// Flip multiplexer of the string-matcher interface.
//
// Eight 2:1 multiplexers between the string FIFO and the loading shift
// registers.  With flip low a FIFO word passes unchanged; with flip high the
// word is bit-reversed (FIFO bit 7-k goes to shift-register bit k), undoing
// the reversed character order of a label scanned inside out.
// Combinational.
module flip_mux #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] in_word,
  input  logic         flip,
  output logic [W-1:0] out_word
);

  always_comb begin
    for (int k = 0; k < W; k++) out_word[k] = flip ? in_word[W-1-k] : in_word[k];
  end

endmodule
