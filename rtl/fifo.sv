// Synchronous first-in first-out queue.
//
// Used wherever the interface queues words between units that run at different
// rates: the input and output FIFOs between the host and the general interface,
// and the string and result FIFOs of the string-matcher interface.  The design
// is a circular buffer in a register array with separate read and write
// pointers and an occupancy counter.
//
// Interface: a word is written when wr_en is high and full is low; the head
// word is always visible on rd_data while empty is low and is removed when
// rd_en is high (first-word-fall-through).  Writing to a full FIFO or reading
// an empty one is ignored and flagged on overflow / underflow for one clock.
// A simultaneous read and write on a full FIFO is allowed.  clear empties it.
// Latency: a written word is visible on rd_data the next clock.
//
// The host in the text runs asynchronously to the array; here everything is
// on one clock, and the FIFO depth is a parameter (the text gives none for the
// general interface; the string interface must hold a whole 48-character
// string, i.e. a count byte and six data bytes, so depth 8 is enough there).
module fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic             overflow,
  output logic             underflow
);

  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNTW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty   = (count == 0);
  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);
  assign rd_data = mem[rptr];

  function automatic logic [AW-1:0] bump(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      rptr      <= '0;
      count     <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else if (clear) begin
      wptr      <= '0;
      rptr      <= '0;
      count     <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      overflow  <= wr_en && !do_wr;
      underflow <= rd_en && empty;
      if (do_wr) wptr <= bump(wptr);
      if (do_rd) rptr <= bump(rptr);
      count <= count + CNTW'(do_wr) - CNTW'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

endmodule
