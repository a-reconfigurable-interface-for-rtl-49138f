// Instruction register / controller of the general interface.
//
// The host configures the interface with instruction bytes (the decoder
// delivers every byte that follows a zero escape byte here).  The text leaves
// this unit open ("could well consist of a programmable microcontroller"); the
// instruction format below is this design's own:
//
//   instr[7:5] = op, instr[4:0] = payload
//   op 1  format:   payload[1:0] = converter format (log2 bits per clock),
//                   payload[2]   = input stager bypass (no row-to-column permute)
//   op 2  switch:   shift 5 bits into the switch-network configuration
//   op 3  rowsel:   shift 5 bits into the row-selector configuration
//   op 4  permute:  shift 5 bits into the permutation-network controls
//   op 5  tasks:    shift 5 bits into the task table (valid + fmt per task)
//   op 6  command:  payload[0] schedule tasks onto output stager modules,
//                   payload[1] start result collection, payload[2] stop it,
//                   payload[3] flush the input stager, payload[4] toggle
//                   sending data to the array
// Shifted fields are loaded low chunk first: a field of W bits takes
// ceil(W/5) instruction bytes, each new chunk entering at the top.
// The master reset from the decoder returns every field to its default: format
// 1 bit per clock, stager in use, row r fed from line r mod N, line k taken
// from row k, identity permutation, no tasks, collection and sending off.
//
// Outputs are registers; a command takes effect the clock after the
// instruction byte arrives.  sched_start and collect_start are one-clock
// pulses; flush_on stays high until the input stager reports it is empty.
module interface_controller
  import ri_pkg::*;
#(
  parameter int unsigned N = 8,     // array word size
  parameter int unsigned R = 16,    // array rows fed
  parameter int unsigned M = 16     // array rows read
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 instr_valid,
  input  logic [7:0]           instr,
  input  logic                 master_reset,
  input  logic                 stager_busy,
  output logic [1:0]           ps_fmt,
  output logic                 stager_bypass,
  output logic [$clog2(N)-1:0] sw_sel [R],
  output logic [R-1:0]         sw_en,
  output logic [$clog2(M)-1:0] row_sel [N],
  output logic [waksman_bits(N)-1:0] perm_ctrl,
  output logic [N-1:0]         task_valid,
  output logic [1:0]           task_fmt [N],
  output logic                 sched_start,
  output logic                 collect_start,
  output logic                 collect_on,
  output logic                 flush_on,
  output logic                 send_on
);

  localparam int unsigned SWB = $clog2(N);
  localparam int unsigned RSB = $clog2(M);
  localparam int unsigned PB  = waksman_bits(N);
  // field widths and the shift chains that hold them (multiples of 5 bits)
  localparam int unsigned W_SW = R * (SWB + 1);
  localparam int unsigned W_RS = N * RSB;
  localparam int unsigned W_TK = N * 3;
  localparam int unsigned C_SW = ((W_SW + 4) / 5) * 5;
  localparam int unsigned C_RS = ((W_RS + 4) / 5) * 5;
  localparam int unsigned C_PM = ((PB + 4) / 5) * 5;
  localparam int unsigned C_TK = ((W_TK + 4) / 5) * 5;

  typedef enum logic [2:0] {
    OP_NONE = 3'd0, OP_FORMAT = 3'd1, OP_SWITCH = 3'd2, OP_ROWSEL = 3'd3,
    OP_PERMUTE = 3'd4, OP_TASKS = 3'd5, OP_COMMAND = 3'd6, OP_RESERVED = 3'd7
  } op_t;

  logic [C_SW-1:0] ch_sw;
  logic [C_RS-1:0] ch_rs;
  logic [C_PM-1:0] ch_pm;
  logic [C_TK-1:0] ch_tk;
  op_t             op;
  logic [4:0]      pl;

  assign op = op_t'(instr[7:5]);
  assign pl = instr[4:0];

  function automatic logic [C_SW-1:0] sw_default();
    logic [C_SW-1:0] v;
    v = '0;
    for (int r = 0; r < R; r++) v[r*(SWB+1) +: SWB+1] = {1'b1, SWB'(r % N)};
    return v;
  endfunction

  function automatic logic [C_RS-1:0] rs_default();
    logic [C_RS-1:0] v;
    v = '0;
    for (int k = 0; k < N; k++) v[k*RSB +: RSB] = RSB'(k % M);
    return v;
  endfunction

  always_comb begin
    for (int r = 0; r < R; r++) begin
      sw_sel[r] = ch_sw[r*(SWB+1) +: SWB];
      sw_en[r]  = ch_sw[r*(SWB+1) + SWB];
    end
    for (int k = 0; k < N; k++) row_sel[k] = ch_rs[k*RSB +: RSB];
    for (int t = 0; t < N; t++) begin
      task_fmt[t]   = ch_tk[t*3 +: 2];
      task_valid[t] = ch_tk[t*3 + 2];
    end
  end
  assign perm_ctrl = ch_pm[PB-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps_fmt        <= '0;
      stager_bypass <= 1'b0;
      ch_sw         <= sw_default();
      ch_rs         <= rs_default();
      ch_pm         <= '0;
      ch_tk         <= '0;
      sched_start   <= 1'b0;
      collect_start <= 1'b0;
      collect_on    <= 1'b0;
      flush_on      <= 1'b0;
      send_on       <= 1'b0;
    end else if (master_reset) begin
      ps_fmt        <= '0;
      stager_bypass <= 1'b0;
      ch_sw         <= sw_default();
      ch_rs         <= rs_default();
      ch_pm         <= '0;
      ch_tk         <= '0;
      sched_start   <= 1'b0;
      collect_start <= 1'b0;
      collect_on    <= 1'b0;
      flush_on      <= 1'b0;
      send_on       <= 1'b0;
    end else begin
      sched_start   <= 1'b0;
      collect_start <= 1'b0;
      if (flush_on && !stager_busy) flush_on <= 1'b0;
      if (instr_valid) begin
        unique case (op)
          OP_FORMAT: begin
            ps_fmt        <= pl[1:0];
            stager_bypass <= pl[2];
          end
          OP_SWITCH:  ch_sw <= {pl, ch_sw[C_SW-1:5]};
          OP_ROWSEL:  ch_rs <= {pl, ch_rs[C_RS-1:5]};
          OP_PERMUTE: ch_pm <= {pl, ch_pm[C_PM-1:5]};
          OP_TASKS:   ch_tk <= {pl, ch_tk[C_TK-1:5]};
          OP_COMMAND: begin
            if (pl[0]) sched_start <= 1'b1;
            if (pl[1]) begin
              collect_start <= 1'b1;
              collect_on    <= 1'b1;
            end
            if (pl[2]) collect_on <= 1'b0;
            if (pl[3]) flush_on   <= 1'b1;
            if (pl[4]) send_on    <= !send_on;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
