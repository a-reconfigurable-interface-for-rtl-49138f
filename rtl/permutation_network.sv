// Permutation network: re-orders N lines into any of the N! orders.
//
// Built from butterfly elements (two 2:1 multiplexers with a common select),
// each with its own control line.  The text asks for enough elements to reach
// every permutation and shows the N = 4 network with five elements in three
// columns.  This module uses the recursive Waksman arrangement, which gives
// exactly that N = 4 network and extends to any N = 2^n:
//   * an input column of N/2 butterflies on line pairs (2i, 2i+1), the upper
//     output of each feeding an upper N/2-line sub-network, the lower output a
//     lower one;
//   * the two sub-networks, built the same way (a single butterfly for N = 2);
//   * an output column of N/2 butterflies joining output i of the two
//     sub-networks onto lines (2i, 2i+1), of which the first is left out
//     (wired straight), since it is never needed.
// The element count is N*log2(N) - N + 1: 5 for N = 4 and 17 for N = 8.  The
// text's figure of 16 control lines for N = 8 is the counting lower bound
// ceil(log2(8!)); the text gives no 16-element arrangement, so this design uses
// the 17-element one.  With all controls low the network is the identity.
//
// Control layout in ctrl: [N/2-1:0] input column, next N/2-1 bits output column
// elements 1..N/2-1, then the upper sub-network's bits, then the lower one's.
// Purely combinational.
//
// A lint check may report up_out and lo_out as not driven: they are driven
// by the output ports of the two recursive sub-network instances, which its
// check does not follow through the recursion.  Simulation of all 2^17 control
// settings shows every output line driven and every permutation reached.
module permutation_network
  import ri_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]                   in_lines,
  input  logic [waksman_bits(N)-1:0]     ctrl,
  output logic [N-1:0]                   out_lines
);

  if (N == 2) begin : g_base
    butterfly u_bf (
      .a(in_lines[0]), .b(in_lines[1]), .ctrl(ctrl[0]),
      .x(out_lines[0]), .y(out_lines[1])
    );
  end else begin : g_rec
    localparam int unsigned H  = N / 2;
    localparam int unsigned SB = waksman_bits(H);
    localparam int unsigned OB = N / 2;            // first output-column bit
    localparam int unsigned UB = N / 2 + N / 2 - 1; // first upper sub-network bit

    logic [H-1:0] up_in, lo_in, up_out, lo_out;

    for (genvar i = 0; i < H; i++) begin : g_in
      butterfly u_bf (
        .a(in_lines[2*i]), .b(in_lines[2*i+1]), .ctrl(ctrl[i]),
        .x(up_in[i]), .y(lo_in[i])
      );
    end

    permutation_network #(.N(H)) u_upper (
      .in_lines(up_in), .ctrl(ctrl[UB +: SB]), .out_lines(up_out)
    );
    permutation_network #(.N(H)) u_lower (
      .in_lines(lo_in), .ctrl(ctrl[UB + SB +: SB]), .out_lines(lo_out)
    );

    assign out_lines[0] = up_out[0];
    assign out_lines[1] = lo_out[0];
    for (genvar i = 1; i < H; i++) begin : g_out
      butterfly u_bf (
        .a(up_out[i]), .b(lo_out[i]), .ctrl(ctrl[OB + i - 1]),
        .x(out_lines[2*i]), .y(out_lines[2*i+1])
      );
    end
  end

endmodule
