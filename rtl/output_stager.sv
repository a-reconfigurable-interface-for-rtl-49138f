// Output stager: collects the array's serial results into N-bit words.
//
// N = 2^n modules (output_stager_module) form a chain: every clock each latch
// either loads the word its own serial-to-parallel converter has completed or
// takes the word of the module below, and module 0's latch is the output.
// Module i receives the permutation-network lines starting at bit-reversed i,
// N / 2^ceil(log2(i+1)) of them: module 0 all N lines, module 1 N/2, modules
// 2-3 N/4 each, ..., the last N/2 modules one line each.  A task of weight w
// (w bits per clock, a power of two) assigned to module i must have its lines
// routed onto that module's first w lines.
//
// Load control: one line per module pair (i, i+N/2), derived from module i's
// task: it is high every N/w_i clocks, in the clock the converter completes a
// word.  Module i+N/2 always loads together with module i.  With tasks placed
// by the task-scheduling rule (task_scheduler) no collected word is ever
// overwritten, and up to N bits per clock are gathered.
//
// Interface: cfg_assigned[i] / cfg_fmt[i] describe module i's task.  start
// clears the phase counter; the first result bits must arrive in the clock
// after start and then every clock while run is high.  out_word/out_valid/
// out_tag is module 0's latch; out_tag is the index of the collecting module.
// collision reports any overwritten word (never expected).
module output_stager
  import ri_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 run,
  input  logic [N-1:0]         cfg_assigned,
  input  logic [1:0]           cfg_fmt [N],
  input  logic [N-1:0]         lines,
  output logic [N-1:0]         out_word,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_tag,
  output logic                 collision
);

  localparam int unsigned TAG = $clog2(N);

  logic [TAG-1:0] phase;              // clocks since start, modulo N
  logic [N-1:0]   word  [N+1];
  logic [N:0]     valid;
  logic [TAG-1:0] tag   [N+1];
  logic [N-1:0]   load;
  logic [N-1:0]   coll;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      phase <= '0;
    else if (start)  phase <= '0;
    else if (run)    phase <= phase + 1'b1;
  end

  // shared load lines: module i and module i+N/2 use module i's timing
  always_comb begin
    for (int i = 0; i < N / 2; i++) begin
      // words complete when (phase + 1) is a multiple of N/w
      load[i] = run && cfg_assigned[i] &&
                ((((phase + 1'b1) << cfg_fmt[i]) & TAG'(N - 1)) == '0);
      load[i + N/2] = load[i];
    end
  end

  // nothing enters below the last module
  assign word[N]  = '0;
  assign valid[N] = 1'b0;
  assign tag[N]   = '0;

  for (genvar i = 0; i < N; i++) begin : g_mod
    localparam int unsigned FIRST = line_first(i, N);
    localparam int unsigned CNT   = line_count(i, N);
    output_stager_module #(.N(N), .L(CNT), .TAG(TAG)) u_mod (
      .clk, .rst_n,
      .run       (run),
      .assigned  (cfg_assigned[i]),
      .fmt       (cfg_fmt[i]),
      .load      (load[i]),
      .my_index  (TAG'(i)),
      .a_in      (lines[FIRST +: CNT]),
      .b_in      (word[i+1]),
      .b_valid   (valid[i+1]),
      .b_tag     (tag[i+1]),
      .d_out     (word[i]),
      .d_valid   (valid[i]),
      .d_tag     (tag[i]),
      .collision (coll[i])
    );
  end

  assign out_word  = word[0];
  assign out_valid = valid[0];
  assign out_tag   = tag[0];
  assign collision = |coll;

endmodule
