// X-string loader: sends a new string to the matcher one character per clock.
//
// A string is at most 48 three-valued characters (0, 1, wild card).  The FIFO
// holds the number of non-wild-card characters (X_count) followed by those
// characters packed eight per byte.  The loader has an 8-bit shift-right
// register fed through the flip multiplexer, a count-down X_counter loaded
// with X_count and a count-down length counter loaded with 48.  Each enabled
// clock the matcher sees x = the register's lowest bit and wx = 1 once
// X_counter has reached zero (the rest of the string is wild cards).  Both
// counters stop at zero; done is high when the length counter is zero.
//
// Control inputs (from the string controller, one action per clock):
//   load_count  X_counter <= count_in, length counter <= 48
//   load_word   register <= flip_mux(word_in)        (replaces a shift)
//   shift       register shifts right by one
//   count_en    both counters count down (the clock is a character clock)
// For an inside-out label (flip) whose X_count is not a multiple of 8 the
// first word holds junk in its low bits; the controller shifts it
// 8 - (X_count mod 8) times with count_en low before loading starts.
module x_string_loader #(
  parameter int unsigned LEN = 48
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flip,
  input  logic       load_count,
  input  logic [7:0] count_in,
  input  logic       load_word,
  input  logic [7:0] word_in,
  input  logic       shift,
  input  logic       count_en,
  output logic       x,
  output logic       wx,
  output logic       done
);

  localparam int unsigned CW = $clog2(LEN + 1);

  logic [7:0]    sr;
  logic [7:0]    flipped;
  logic [7:0]    xcnt;
  logic [CW-1:0] lcnt;

  flip_mux #(.W(8)) u_flip (.in_word(word_in), .flip(flip), .out_word(flipped));

  assign x    = sr[0];
  assign wx   = (xcnt == 0);
  assign done = (lcnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      xcnt <= '0;
      lcnt <= '0;
    end else begin
      if (load_word)  sr <= flipped;
      else if (shift) sr <= {1'b0, sr[7:1]};
      if (load_count) begin
        xcnt <= count_in;
        lcnt <= CW'(LEN);
      end else if (count_en) begin
        if (xcnt != 0) xcnt <= xcnt - 1'b1;
        if (lcnt != 0) lcnt <= lcnt - 1'b1;
      end
    end
  end

endmodule
