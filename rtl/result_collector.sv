// Result collector of the string-matcher interface (a one-module output stager).
//
// After an A-string load the matcher starts to deliver the reconstructed
// string DELAY clocks later, one character per clock for LEN clocks, as a
// value line x and a wild-card line wx.  The collector counts the characters
// with wx = 0 (the new non-wild-card count, readable by the host) and shifts
// x into an 8-bit serial-in parallel-out register; every eighth character the
// register is written to the output FIFO (word_valid for one clock).  The
// first character of each group of eight ends up in bit 0.
//
// start is a one-clock pulse in the clock the A-string load completes.  busy
// is high from start until the last character has been taken.
module result_collector #(
  parameter int unsigned DELAY = 24,
  parameter int unsigned LEN   = 48
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       x,
  input  logic       wx,
  output logic [7:0] word,
  output logic       word_valid,
  output logic [7:0] nonwild_count,
  output logic       busy
);

  localparam int unsigned TW = $clog2(DELAY + LEN + 1);

  logic [TW-1:0] t;          // clocks since start
  logic [7:0]    sr;
  logic [2:0]    bitn;
  logic          active;

  assign active = busy && (t >= TW'(DELAY)) && (t < TW'(DELAY + LEN));
  assign word   = sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t             <= '0;
      busy          <= 1'b0;
      sr            <= '0;
      bitn          <= '0;
      word_valid    <= 1'b0;
      nonwild_count <= '0;
    end else begin
      word_valid <= 1'b0;
      if (start) begin
        t             <= '0;
        busy          <= 1'b1;
        bitn          <= '0;
        nonwild_count <= '0;
      end else if (busy) begin
        t <= t + 1'b1;
        if (t == TW'(DELAY + LEN - 1)) busy <= 1'b0;
        if (active) begin
          sr   <= {x, sr[7:1]};
          bitn <= bitn + 1'b1;
          if (!wx) nonwild_count <= nonwild_count + 1'b1;
          if (bitn == 3'd7) word_valid <= 1'b1;
        end
      end
    end
  end

endmodule
