// Task output scheduler: assigns concurrently running array tasks to output
// stager modules so that no collected word is ever overwritten.
//
// Each task has a weight w = 2^fmt, the bits per clock it produces.  The rule
// implemented is the one the interface is built around:
//   S = {0, 1, ..., N-1};  repeat for the heaviest remaining task:
//     s = min(S); assign the task to module s;
//     remove from S every index s + k*(N/w), k = 0 .. w-1.
// If the total weight is at most N this always succeeds and the chain of
// stager modules collects every word without collision.
//
// Hardware: one candidate (weight level, task) is examined per clock, heaviest
// level first and, within a level, lowest task index first, so done rises
// N*(log2(N)+1) + 1 clock edges after the one that samples start.  The
// free-index set S is a register; min(S) is a priority encoder.
//
// Interface: start (one clock) latches nothing, it restarts the search over
// the task_valid / task_fmt inputs, which must stay stable until done.  When
// done is high the outputs hold the schedule: for every module whether it is
// used, its task's fmt and the task index; for every task its module.  error
// is set if some task could not be placed (total weight above N).
module task_scheduler
  import ri_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [N-1:0]         task_valid,
  input  logic [1:0]           task_fmt [N],
  output logic                 done,
  output logic                 error,
  output logic [N-1:0]         mod_assigned,
  output logic [1:0]           mod_fmt  [N],
  output logic [$clog2(N)-1:0] mod_task [N],
  output logic [$clog2(N)-1:0] task_module [N]
);

  localparam int unsigned TW = $clog2(N);
  localparam int unsigned LV = $clog2(N);       // heaviest level, log2(N)

  logic          busy;
  logic [1:0]    level;
  logic [TW-1:0] tidx;
  logic [N-1:0]  free_set;
  logic [TW-1:0] smin;
  logic          any_free;
  logic          hit;
  logic [N-1:0]  remove;

  // priority encoder: lowest free index
  always_comb begin
    smin     = '0;
    any_free = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (free_set[i]) begin
        smin     = TW'(i);
        any_free = 1'b1;
      end
    end
  end

  assign hit = busy && task_valid[tidx] && (task_fmt[tidx] == level);

  // indices s + k*(N/w), k = 0..w-1
  always_comb begin
    remove = '0;
    for (int i = 0; i < N; i++) begin
      if (i >= int'(smin) && (((i - int'(smin)) << task_fmt[tidx]) % N) == 0) remove[i] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      done         <= 1'b0;
      error        <= 1'b0;
      level        <= '0;
      tidx         <= '0;
      free_set     <= '0;
      mod_assigned <= '0;
      for (int i = 0; i < N; i++) begin
        mod_fmt[i]     <= '0;
        mod_task[i]    <= '0;
        task_module[i] <= '0;
      end
    end else if (start) begin
      busy         <= 1'b1;
      done         <= 1'b0;
      error        <= 1'b0;
      level        <= 2'(LV);
      tidx         <= '0;
      free_set     <= '1;
      mod_assigned <= '0;
    end else if (busy) begin
      if (hit) begin
        if (any_free) begin
          mod_assigned[smin] <= 1'b1;
          mod_fmt[smin]      <= level;
          mod_task[smin]     <= tidx;
          task_module[tidx]  <= smin;
          free_set           <= free_set & ~remove;
        end else begin
          error <= 1'b1;
        end
      end
      if (tidx == TW'(N - 1)) begin
        tidx <= '0;
        if (level == 2'd0) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          level <= level - 1'b1;
        end
      end else begin
        tidx <= tidx + 1'b1;
      end
    end
  end

endmodule
