// Row selector: picks the N array rows whose results are collected.
//
// The array delivers one result bit per row and clock from its right-most
// column; with M rows and an N-line collection path at most N rows can be
// taken at a time.  N multiplexers of M:1 select them: output line k carries
// row sel[k].  Purely combinational.
module row_select #(
  parameter int unsigned M = 16,   // rows of the PE array
  parameter int unsigned N = 8     // collection lines
) (
  input  logic [M-1:0]         rows,
  input  logic [$clog2(M)-1:0] sel [N],
  output logic [N-1:0]         lines
);

  always_comb begin
    for (int k = 0; k < N; k++) lines[k] = rows[sel[k]];
  end

endmodule
