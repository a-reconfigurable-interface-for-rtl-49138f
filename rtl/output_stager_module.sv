// One module of the output stager.
//
// A serial-to-parallel converter with L input lines, a word-wide 2:1
// multiplexer and a word latch.  While run is high the converter shifts every
// clock by w = 2^fmt cells (w <= L): the w newest bits enter the top w cells
// from lines 0..w-1 and every other cell takes the cell w places above it.
// After N/w clocks the converter holds one N-bit word whose bit w*t + j is the
// bit that line j carried in the t-th clock, i.e. the inverse of the
// parallel-to-serial converter's formats.
//
// The latch loads, when load is high and the module has a task, the converter's contents including the
// bits arriving in that clock (so a word is latched in the clock its last bits
// arrive); otherwise it takes the word latched in the module below (b_in),
// which makes the modules a chain that moves words one module per clock toward
// module 0.  An unassigned module always passes words on, even when the
// load line it shares with another module is high.  Each latched word carries a valid bit and the index of the module
// that collected it; both are this design's additions, used to tell real
// words from empty slots and to separate the words of different tasks.
//
// collision is high when a load replaces a valid word arriving from below,
// which the scheduling rules are meant to rule out.
// Modules with fewer lines have cheaper converters; L is N for module 0 and
// shrinks with the module index (see output_stager).
module output_stager_module #(
  parameter int unsigned N   = 8,   // word size
  parameter int unsigned L   = 8,   // input lines of this module
  parameter int unsigned TAG = 3    // width of the module-index tag
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run,       // converter collects this clock
  input  logic           assigned,  // a task is assigned to this module
  input  logic [1:0]     fmt,       // log2 of the task's bits per clock
  input  logic           load,      // latch <- converter (else latch <- b_in)
  input  logic [TAG-1:0] my_index,
  input  logic [L-1:0]   a_in,
  input  logic [N-1:0]   b_in,
  input  logic           b_valid,
  input  logic [TAG-1:0] b_tag,
  output logic [N-1:0]   d_out,
  output logic           d_valid,
  output logic [TAG-1:0] d_tag,
  output logic           collision
);

  logic [N-1:0] sp, sp_next;
  int unsigned  w;

  assign w = 1 << fmt;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (i + w < N)  sp_next[i] = sp[i + w];
      else if (i + w - N < L) sp_next[i] = a_in[i + w - N];
      else            sp_next[i] = 1'b0;
    end
  end

  assign collision = load && assigned && b_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp      <= '0;
      d_out   <= '0;
      d_valid <= 1'b0;
      d_tag   <= '0;
    end else begin
      if (run && assigned) sp <= sp_next;
      if (load && assigned) begin
        d_out   <= sp_next;
        d_valid <= 1'b1;
        d_tag   <= my_index;
      end else begin
        d_out   <= b_in;
        d_valid <= b_valid;
        d_tag   <= b_tag;
      end
    end
  end

endmodule
