// Generalized parallel-to-serial converter (simple-load / complex-shift).
//
// An N-bit memory word a[N-1:0] is always loaded the same way, bit a_i into
// cell c_i.  The word is then shifted out l = 2^fmt bits per clock: in shift
// mode cell c_i takes the contents of cell c_(i+l), so the l lowest cells
// always hold the bits being sent.  Output line j carries c_j, which gives the
// four formats of the text for N = 8:
//   l=1: line0 = a0 a1 ... a7           l=2: line0 = a0 a2 a4 a6, line1 = a1 a3 a5 a7
//   l=4: line0 = a0 a4, ..., line3 = a3 a7   l=8: line j = a_j in one clock
// Each cell needs a multiplexer over {load, c_(i+1), c_(i+2), c_(i+4), ...}
// restricted to the sources that exist, which is the cheaper of the two
// converter styles compared in the text.
//
// Interface: in_valid/in_ready load a word when the register is empty or is
// sending its last bits (back-to-back words give an unbroken bit stream).
// out_valid marks a clock in which out_bits[l-1:0] carry data; higher lines
// are driven with zero.  A step happens only when out_ready is high.  fmt
// must be held constant while a word is being sent.
module p2s_converter #(
  parameter int unsigned N = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [1:0]              fmt,        // log2 of bits per clock
  input  logic                    in_valid,
  input  logic [N-1:0]            in_word,
  output logic                    in_ready,
  output logic                    out_valid,
  output logic [N-1:0]            out_bits,
  input  logic                    out_ready
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0]  c;
  logic [CW-1:0] left;        // clocks of output left for the current word
  logic [CW-1:0] per_word;    // N / l
  int unsigned   l;

  assign l        = 1 << fmt;
  assign per_word = CW'(N >> fmt);
  assign out_valid = (left != 0);
  assign in_ready  = (left == 0) || ((left == 1) && out_ready);

  always_comb begin
    for (int j = 0; j < N; j++) out_bits[j] = (j < l) ? c[j] : 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c    <= '0;
      left <= '0;
    end else if (in_valid && in_ready) begin
      c    <= in_word;
      left <= per_word;
    end else if (out_valid && out_ready) begin
      for (int i = 0; i < N; i++) c[i] <= (i + l < N) ? c[i + l] : 1'b0;
      left <= left - 1'b1;
    end
  end

endmodule
