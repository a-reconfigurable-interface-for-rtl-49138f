// Undo counter of the string-matcher interface.
//
// The host writes Undo_count, the number of characters of the reconstructed
// string to keep.  During an Undo the controller enables the counter once per
// character clock for all 48 characters; wx (the wild-card line to the matcher)
// is 0 while the counter is non-zero and 1 once it has reached zero, so every
// character after the first Undo_count ones is turned into a wild card.  The
// counter stops at zero.
module undo_counter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic [7:0] count_in,
  input  logic       count_en,
  output logic       wx,
  output logic [7:0] count
);

  assign wx = (count == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      count <= '0;
    else if (load)                   count <= count_in;
    else if (count_en && count != 0) count <= count - 1'b1;
  end

endmodule
