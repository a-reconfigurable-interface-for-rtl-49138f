// Switch network: routes the converter's output lines to the rows of the PE array.
//
// One N:1 multiplexer per array row (R rows).  Row r receives converter line
// sel[r]; any line may feed any number of rows, so one serial stream can be
// broadcast to several rows.  Rows whose enable bit is low are driven with 0.
// Purely combinational, no latency.  The per-row enable is this design's
// addition so unused rows see a defined value.
module switch_network #(
  parameter int unsigned N = 8,    // converter output lines (N_A)
  parameter int unsigned R = 16    // rows of the PE array
) (
  input  logic [N-1:0]         lines,
  input  logic [$clog2(N)-1:0] sel [R],
  input  logic [R-1:0]         row_en,
  output logic [R-1:0]         rows
);

  always_comb begin
    for (int r = 0; r < R; r++) rows[r] = row_en[r] && lines[sel[r]];
  end

endmodule
