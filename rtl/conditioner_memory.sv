// Conditioner & memory: a RAM bank with two-level buffering on each side.
//
// The bank is built from SR RAM chips of NR bits each, so one access moves a
// memory word of WR = SR*NR bits and keeps the bank busy for TR clocks.  The
// writing side (word size NW) fills Register1 one word at a time; a full
// Register1 is copied at once into Register2, which is then written to the
// bank WR bits per access.  On the reading side the bank is read WR bits per
// access into Register4; a full Register4 is copied into Register5, which hands
// out words of NRD bits.  The register sizes are the smallest that are
// multiples of both word sizes they join:
//     |Register1| = |Register2| = SW*WR,  SW = NW  / gcd(NW,  WR)
//     |Register4| = |Register5| = SA*WR,  SA = NRD / gcd(NRD, WR)
// Reads and writes share the bank by cycle stealing.  One side has priority
// by default (the array side); the other side gets the bank when it demands
// it, i.e. when its outer register is full or one word from full (writer) or
// its outer register is empty and the inner one is not full (reader).
//
// The bank is used as a circular buffer: words leave in the order they came.
// The bit stream is preserved: words are packed least significant first, so
// a stream whose length is a multiple of |Register1| comes out unchanged as
// words of NRD bits.  Partially filled registers are not flushed.
//
// Interface: valid/ready on both sides (wr_valid/wr_ready, rd_valid/rd_ready).
// wr_stall is high while the writer offers a word it cannot take, rd_starve
// while the reader asks for a word and Register5 has none.
// Defaults are the worked example of the text (NH=12, NA=10, NR=8, three RAM
// chips, TR=3 clocks); the bank depth, the circular addressing and the
// valid/ready handshakes are this design's choices.
module conditioner_memory
  import ri_pkg::*;
#(
  parameter int unsigned NW    = 12,   // word size of the writing side
  parameter int unsigned NRD   = 10,   // word size of the reading side
  parameter int unsigned NR    = 8,    // word size of one RAM chip
  parameter int unsigned SR    = 3,    // number of RAM chips
  parameter int unsigned TR    = 3,    // RAM access time in clocks
  parameter int unsigned DEPTH = 64,   // words of WR bits in the bank
  parameter bit WRITER_PRIORITY = 1'b0 // 0: reader (array) has priority
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           wr_valid,
  input  logic [NW-1:0]  wr_data,
  output logic           wr_ready,
  output logic           rd_valid,
  output logic [NRD-1:0] rd_data,
  input  logic           rd_ready,
  output logic           wr_stall,
  output logic           rd_starve,
  output logic [$clog2(DEPTH+1)-1:0] bank_words
);

  localparam int unsigned WR  = SR * NR;
  localparam int unsigned SW  = NW  / gcd(NW,  WR);
  localparam int unsigned SA  = NRD / gcd(NRD, WR);
  localparam int unsigned L1  = SW * WR;          // bits in Register1/2
  localparam int unsigned L4  = SA * WR;          // bits in Register4/5
  localparam int unsigned W1  = L1 / NW;          // writer words per Register1
  localparam int unsigned W5  = L4 / NRD;         // reader words per Register5
  localparam int unsigned AW  = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned DW  = $clog2(DEPTH + 1);
  localparam int unsigned TW  = $clog2(TR + 1);

  logic [WR-1:0] bank [DEPTH];

  logic [L1-1:0] reg1, reg2;
  logic [L4-1:0] reg4, reg5;
  logic [$clog2(W1+1)-1:0] r1_words;
  logic [$clog2(SW+1)-1:0] r2_pieces;   // pieces of WR bits still to write
  logic [$clog2(SW+1)-1:0] r2_next;     // index of the next piece to write
  logic [$clog2(SA+1)-1:0] r4_pieces;   // pieces received (including in flight)
  logic [$clog2(SA+1)-1:0] r4_done;     // pieces arrived
  logic [$clog2(W5+1)-1:0] r5_words;    // words left in Register5
  logic [$clog2(W5+1)-1:0] r5_idx;

  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] used;                  // bank words, counting writes in flight
  logic [DW-1:0] avail;                 // bank words readable (not yet claimed)

  logic          busy;
  logic [TW-1:0] tcnt;
  logic          op_write;
  logic [WR-1:0] op_data;
  logic [AW-1:0] op_addr;

  logic done, idle;
  logic r1_full, wreq, rreq, w_urgent, r_urgent, grant_w, grant_r;
  logic take_w, pop_r, dump12, dump45;

  function automatic logic [AW-1:0] bump(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign r1_full  = (r1_words == W1[$bits(r1_words)-1:0]);
  // a full Register1 empties into Register2 in the same clock it takes a word
  assign wr_ready = !r1_full || (r2_pieces == 0);
  assign take_w   = wr_valid && wr_ready;
  assign wr_stall = wr_valid && !wr_ready;

  assign rd_valid = (r5_words != 0);
  assign rd_data  = reg5[r5_idx * NRD +: NRD];
  assign pop_r    = rd_valid && rd_ready;

  assign dump12 = r1_full && (r2_pieces == 0);
  assign dump45 = (r4_done == SA[$bits(r4_done)-1:0]) && (r5_words == 0);

  assign wreq     = (r2_pieces != 0) && (used < DW'(DEPTH));
  assign rreq     = (r4_pieces != SA[$bits(r4_pieces)-1:0]) && (avail != 0);
  assign w_urgent = wreq && (r1_words >= W1[$bits(r1_words)-1:0] - 1'b1);
  assign r_urgent = rreq && (r5_words == 0);

  assign done = busy && (tcnt == 0);
  assign idle = !busy || done;

  always_comb begin
    grant_w = 1'b0;
    grant_r = 1'b0;
    if (idle) begin
      if (WRITER_PRIORITY) begin
        if (wreq && !r_urgent) grant_w = 1'b1;
        else if (rreq)         grant_r = 1'b1;
      end else begin
        if (rreq && !w_urgent) grant_r = 1'b1;
        else if (wreq)         grant_w = 1'b1;
      end
    end
  end

  assign rd_starve  = rd_ready && !rd_valid;
  assign bank_words = used;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg1 <= '0; reg2 <= '0; reg4 <= '0; reg5 <= '0;
      r1_words <= '0; r2_pieces <= '0; r2_next <= '0;
      r4_pieces <= '0; r4_done <= '0; r5_words <= '0; r5_idx <= '0;
      waddr <= '0; raddr <= '0; used <= '0; avail <= '0;
      busy <= 1'b0; tcnt <= '0; op_write <= 1'b0; op_data <= '0; op_addr <= '0;
    end else begin
      // writing side: Register1 <- words, Register1 -> Register2
      if (dump12) begin
        reg2      <= reg1;
        r2_pieces <= SW[$bits(r2_pieces)-1:0];
        r2_next   <= '0;
        r1_words  <= take_w ? 1 : '0;
        if (take_w) reg1[NW-1:0] <= wr_data;
      end else if (take_w) begin
        reg1[r1_words * NW +: NW] <= wr_data;
        r1_words <= r1_words + 1'b1;
      end

      // reading side: Register4 -> Register5 -> words
      if (dump45) begin
        reg5      <= reg4;
        r5_words  <= W5[$bits(r5_words)-1:0];
        r5_idx    <= '0;
        r4_pieces <= '0;
        r4_done   <= '0;
      end else if (pop_r) begin
        r5_words <= r5_words - 1'b1;
        r5_idx   <= r5_idx + 1'b1;
      end

      // bank access, TR clocks each; a new access may start in the clock
      // in which the previous one completes
      if (grant_w || grant_r) begin
        busy     <= 1'b1;
        tcnt     <= TW'(TR - 1);
        op_write <= grant_w;
        op_addr  <= grant_w ? waddr : raddr;
        op_data  <= reg2[r2_next * WR +: WR];
      end else if (busy) begin
        if (tcnt == 0) busy <= 1'b0;
        else           tcnt <= tcnt - 1'b1;
      end
      if (grant_w) begin
        waddr     <= bump(waddr);
        r2_pieces <= r2_pieces - 1'b1;
        r2_next   <= r2_next + 1'b1;
      end
      if (grant_r) begin
        raddr     <= bump(raddr);
        r4_pieces <= r4_pieces + 1'b1;
      end
      if (done && !op_write) begin
        reg4[r4_done * WR +: WR] <= bank[op_addr];
        r4_done <= r4_done + 1'b1;
      end
      used  <= used  + DW'(grant_w) - DW'(done && !op_write);
      avail <= avail - DW'(grant_r) + DW'(done && op_write);
    end
  end

  always_ff @(posedge clk) begin
    if (done && op_write) bank[op_addr] <= op_data;
  end

endmodule
