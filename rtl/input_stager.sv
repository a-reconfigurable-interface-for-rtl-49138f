// Input stager: row-to-column permutation of host words.
//
// An N x N grid of cells, each a flip-flop fed by a 2:1 multiplexer that picks
// either the cell above ("down") or the cell to the left ("across"); one
// select line is common to all cells.  Words enter along one edge and the
// permuted words are collected along the opposite edge through N 2:1
// collection multiplexers.  After a block of N words has entered top-down, the
// direction flips: the next block enters from the left edge while the first
// block leaves column by column at the right edge, each leaving column being
// one bit position of all N words (bit-slice form).  The next flip sends the
// second block out of the bottom row while a third enters from the top, so
// once the grid is full one permuted word leaves for every word that enters.
//
// Output word k of a block holds bit k of every input word of the block, with
// the first input word in bit 0 (bit j of the output = bit k of input word j).
//
// Interface: a step happens when out_ready is high and either in_valid (a real
// word enters) or flush (a zero word enters to push out a stored block).  The
// word leaving at that step is on out_word with out_valid, combinationally, in
// the step's cycle.  busy is high while any real word is held in the grid.
// With bypass high the grid is skipped and words pass straight through.
// Blocks are always N words; a shorter block is padded with zero words by the
// flush steps (the text allows blocks of D <= N words; padding is this
// design's way of handling D < N).
// in_ready is out_ready itself: the grid moves only when the next stage takes
// a word, so it has no other reason to refuse one.
module input_stager #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bypass,
  input  logic         in_valid,
  input  logic [N-1:0] in_word,
  input  logic         flush,
  input  logic         out_ready,
  output logic         in_ready,
  output logic         out_valid,
  output logic [N-1:0] out_word,
  output logic         busy
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0] grid [N];       // grid[row][col]; row 0 at the top, col 0 at the left
  logic         across;         // 0: data moves down, 1: data moves across
  logic [CW-1:0] cnt;           // words entered in the current phase
  logic         phase_real;     // a real word entered in the current phase
  logic         have_block;     // the grid holds a complete block to emit
  logic         step;
  logic [N-1:0] din;
  logic [N-1:0] collect;

  assign in_ready = out_ready;
  assign busy     = have_block || phase_real;
  assign step     = !bypass && out_ready && (in_valid || (flush && busy));
  assign din      = in_valid ? in_word : '0;

  // collection multiplexers: bottom row while moving down, right column while moving across
  always_comb begin
    for (int j = 0; j < N; j++) begin
      collect[j] = across ? grid[N-1-j][N-1] : grid[N-1][N-1-j];
    end
  end

  assign out_word  = bypass ? in_word : collect;
  assign out_valid = bypass ? (in_valid && out_ready) : (step && have_block);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      across     <= 1'b0;
      cnt        <= '0;
      phase_real <= 1'b0;
      have_block <= 1'b0;
      for (int r = 0; r < N; r++) grid[r] <= '0;
    end else if (step) begin
      for (int r = 0; r < N; r++) begin
        for (int c = 0; c < N; c++) begin
          if (!across) grid[r][c] <= (r == 0) ? din[N-1-c] : grid[r-1][c];
          else         grid[r][c] <= (c == 0) ? din[N-1-r] : grid[r][c-1];
        end
      end
      if (cnt == CW'(N - 1)) begin
        cnt        <= '0;
        across     <= !across;
        have_block <= phase_real || in_valid;
        phase_real <= 1'b0;
      end else begin
        cnt        <= cnt + 1'b1;
        phase_real <= phase_real || in_valid;
      end
    end
  end

endmodule
