// A-string loader: sends a string to the matcher two characters per clock.
//
// The flip multiplexer's even bits feed a 4-bit "upper" shift register and its
// odd bits a 4-bit "lower" one, so in the normal case the upper cells of the
// matcher receive a0, a2, a4, ... and the lower cells a1, a3, a5, ... in the
// same clocks.  A one-bit delay register D always holds the lower register's
// previous output.  The Delay/Cross select (dly_cross) swaps the paths: upper
// cells then get D and lower cells get the upper register's output; it is
// used for inside-out labels with an odd character count, where the first
// word leaves the characters on the opposite registers.
// The wild-card flag wa is 1 once A_counter (loaded with A_count DIV 2) has
// reached zero; the lower cells get wa directly and the upper cells get wa
// delayed by one clock when odd is set (A_count odd: the last real character
// goes to the upper cells one clock after the lower cells turn wild).
// A 24-clock length counter ends the load (done).
//
// Control inputs (from the string controller):
//   load_count  A_counter <= count_in DIV 2, length counter <= 24, odd/dly_cross set
//   load_word   both registers <= halves of flip_mux(word_in) (replaces a shift)
//   shift       both registers shift right by one
//   count_en    counters count down (a character-pair clock)
// D captures the lower register's output on every load_word or shift.
module a_string_loader #(
  parameter int unsigned LEN = 24
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
  output logic       a_upper,
  output logic       w_upper,
  output logic       a_lower,
  output logic       w_lower,
  output logic       done
);

  localparam int unsigned CW = $clog2(LEN + 1);

  logic [3:0]    sr_up, sr_lo;
  logic [7:0]    flipped;
  logic [7:0]    acnt;
  logic [CW-1:0] lcnt;
  logic          d_lo, d_wa;
  logic          odd, dly_cross;
  logic          wa;
  logic          lo_path;

  flip_mux #(.W(8)) u_flip (.in_word(word_in), .flip(flip), .out_word(flipped));

  assign wa      = (acnt == 0);
  assign lo_path = dly_cross ? d_lo : sr_lo[0];      // Delay/Cross: delayed or direct lower output
  assign a_upper = dly_cross ? lo_path : sr_up[0];
  assign a_lower = dly_cross ? sr_up[0] : lo_path;
  assign w_lower = wa;
  assign w_upper = odd ? d_wa : wa;
  assign done    = (lcnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_up <= '0;
      sr_lo <= '0;
      acnt  <= '0;
      lcnt  <= '0;
      d_lo  <= 1'b0;
      d_wa  <= 1'b0;
      odd   <= 1'b0;
      dly_cross <= 1'b0;
    end else begin
      if (load_word) begin
        sr_up <= {flipped[6], flipped[4], flipped[2], flipped[0]};
        sr_lo <= {flipped[7], flipped[5], flipped[3], flipped[1]};
      end else if (shift) begin
        sr_up <= {1'b0, sr_up[3:1]};
        sr_lo <= {1'b0, sr_lo[3:1]};
      end
      if (load_word || shift) d_lo <= sr_lo[0];
      if (load_count) begin
        acnt  <= {1'b0, count_in[7:1]};
        lcnt  <= CW'(LEN);
        odd   <= count_in[0];
        dly_cross <= count_in[0] && flip;
        d_wa  <= 1'b0;
      end else if (count_en) begin
        if (acnt != 0) acnt <= acnt - 1'b1;
        if (lcnt != 0) lcnt <= lcnt - 1'b1;
        d_wa <= wa;
      end
    end
  end

endmodule
