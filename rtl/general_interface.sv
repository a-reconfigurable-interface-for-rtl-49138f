// General host-to-array interface.
//
// Joins a word-parallel host (byte bus) to a bit-sequential systolic array.
//
// Input path (host -> array):
//   byte_decoder     separates data bytes from instruction bytes
//   fifo (input)     absorbs the host's bursts
//   input_stager     optional row-to-column permutation of blocks of N words
//   conditioner_memory (input)  RAM bank shared by host writes and array reads
//   p2s_converter    sends each word as 1, 2, 4 or N bits per clock
//   switch_network   puts any converter line on any array row(s)
// Output path (array -> host):
//   row_select       picks the N array rows whose results are collected
//   permutation_network  puts each task's rows on its output-stager module lines
//   output_stager    assembles N-bit words from several concurrent tasks
//   conditioner_memory (output) RAM bank shared by array writes and host reads
//   fifo (output)    queue read by the host
// Control:
//   interface_controller  holds the configuration written by instruction bytes
//   task_scheduler        places the configured tasks on output stager modules
//
// All blocks run on one clock.  The host writes one byte per clock at most
// (host_valid) and reads the output FIFO with host_rd.  The array side sees
// array_in (one bit per row, valid with array_in_valid) and returns one result
// bit per row on array_out, qualified by array_out_valid.
// Memory geometry used here: two 8-bit RAM chips (16-bit memory words),
// 2-clock access, 32 memory words per bank.
//
// Status outputs count nothing themselves; they expose, per clock, the events
// a user may want to watch: host stalls at the input memory, array starvation,
// words lost because the output memory was full, and stager collisions.
// The FIFOs' counts and overflow/underflow flags and the memories' fill levels
// are not used: every FIFO write is gated by full and every read by empty.
module general_interface
  import ri_pkg::*;
#(
  parameter int unsigned N          = 8,    // array word size N_A
  parameter int unsigned R          = 16,   // array rows fed
  parameter int unsigned M          = 16,   // array rows read
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned RAM_NR     = 8,
  parameter int unsigned RAM_SR     = 2,
  parameter int unsigned RAM_TR     = 2,
  parameter int unsigned RAM_DEPTH  = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host side
  input  logic [7:0]           host_byte,
  input  logic                 host_valid,
  output logic                 host_in_full,
  input  logic                 host_rd,
  output logic [N-1:0]         host_rd_data,
  output logic                 host_rd_empty,
  // array side
  output logic [R-1:0]         array_in,
  output logic                 array_in_valid,
  input  logic [M-1:0]         array_out,
  input  logic                 array_out_valid,
  // status
  output logic                 master_reset,
  output logic                 in_stall,
  output logic                 array_starve,
  output logic                 out_drop,
  output logic                 collision,
  output logic                 sched_done,
  output logic                 sched_error,
  output logic [N-1:0]         stager_word,
  output logic                 stager_valid,
  output logic [$clog2(N)-1:0] stager_tag
);

  // ---------------- decoder and controller ----------------
  logic [7:0] dec_data, dec_instr;
  logic       dec_data_v, dec_instr_v;

  byte_decoder u_dec (
    .clk, .rst_n,
    .byte_in(host_byte), .byte_valid(host_valid),
    .data_out(dec_data), .data_valid(dec_data_v),
    .instr_out(dec_instr), .instr_valid(dec_instr_v),
    .master_reset(master_reset)
  );

  logic [1:0]           ps_fmt;
  logic                 stager_bypass;
  logic [$clog2(N)-1:0] sw_sel [R];
  logic [R-1:0]         sw_en;
  logic [$clog2(M)-1:0] row_sel [N];
  logic [waksman_bits(N)-1:0] perm_ctrl;
  logic [N-1:0]         task_valid;
  logic [1:0]           task_fmt [N];
  logic                 sched_start, collect_start, collect_on, flush_on, send_on;
  logic                 stg_busy;

  interface_controller #(.N(N), .R(R), .M(M)) u_ctl (
    .clk, .rst_n,
    .instr_valid(dec_instr_v), .instr(dec_instr), .master_reset(master_reset),
    .stager_busy(stg_busy),
    .ps_fmt, .stager_bypass, .sw_sel, .sw_en, .row_sel, .perm_ctrl,
    .task_valid, .task_fmt, .sched_start, .collect_start, .collect_on,
    .flush_on, .send_on
  );

  logic [N-1:0]         mod_assigned;
  logic [1:0]           mod_fmt [N];
  logic [$clog2(N)-1:0] mod_task [N];
  logic [$clog2(N)-1:0] task_module [N];

  task_scheduler #(.N(N)) u_sched (
    .clk, .rst_n,
    .start(sched_start), .task_valid, .task_fmt,
    .done(sched_done), .error(sched_error),
    .mod_assigned, .mod_fmt, .mod_task, .task_module
  );

  // ---------------- input path ----------------
  logic [7:0] inf_data;
  logic       inf_empty, inf_full, inf_rd;
  logic [$clog2(FIFO_DEPTH+1)-1:0] inf_count;
  logic       inf_ovf, inf_udf;

  fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n, .clear(master_reset),
    .wr_en(dec_data_v), .wr_data(dec_data),
    .rd_en(inf_rd), .rd_data(inf_data),
    .empty(inf_empty), .full(inf_full), .count(inf_count),
    .overflow(inf_ovf), .underflow(inf_udf)
  );
  assign host_in_full = inf_full;

  logic         stg_in_ready, stg_out_valid;
  logic [N-1:0] stg_out_word;
  logic         imem_wr_ready;

  input_stager #(.N(N)) u_stager (
    .clk, .rst_n,
    .bypass(stager_bypass),
    .in_valid(!inf_empty), .in_word(N'(inf_data)),
    .flush(flush_on), .out_ready(imem_wr_ready),
    .in_ready(stg_in_ready), .out_valid(stg_out_valid), .out_word(stg_out_word),
    .busy(stg_busy)
  );
  assign inf_rd = !inf_empty && stg_in_ready;

  logic         imem_rd_valid, imem_rd_ready, imem_stall, imem_starve;
  logic [N-1:0] imem_rd_data;
  logic [$clog2(RAM_DEPTH+1)-1:0] imem_words;

  conditioner_memory #(
    .NW(N), .NRD(N), .NR(RAM_NR), .SR(RAM_SR), .TR(RAM_TR), .DEPTH(RAM_DEPTH),
    .WRITER_PRIORITY(1'b0)
  ) u_in_mem (
    .clk, .rst_n,
    .wr_valid(stg_out_valid), .wr_data(stg_out_word), .wr_ready(imem_wr_ready),
    .rd_valid(imem_rd_valid), .rd_data(imem_rd_data), .rd_ready(imem_rd_ready),
    .wr_stall(imem_stall), .rd_starve(imem_starve), .bank_words(imem_words)
  );
  // host data is waiting but the input memory cannot take a word
  assign in_stall = !imem_wr_ready && !inf_empty;

  logic         p2s_out_valid;
  logic [N-1:0] p2s_bits;

  p2s_converter #(.N(N)) u_p2s (
    .clk, .rst_n,
    .fmt(ps_fmt),
    .in_valid(imem_rd_valid), .in_word(imem_rd_data), .in_ready(imem_rd_ready),
    .out_valid(p2s_out_valid), .out_bits(p2s_bits), .out_ready(send_on)
  );
  assign array_starve = send_on && !p2s_out_valid;

  switch_network #(.N(N), .R(R)) u_switch (
    .lines(p2s_bits), .sel(sw_sel), .row_en(sw_en), .rows(array_in)
  );
  assign array_in_valid = send_on && p2s_out_valid;

  // ---------------- output path ----------------
  logic [N-1:0] sel_lines, perm_lines;

  row_select #(.M(M), .N(N)) u_rowsel (
    .rows(array_out), .sel(row_sel), .lines(sel_lines)
  );

  permutation_network #(.N(N)) u_perm (
    .in_lines(sel_lines), .ctrl(perm_ctrl), .out_lines(perm_lines)
  );

  output_stager #(.N(N)) u_ostager (
    .clk, .rst_n,
    .start(collect_start), .run(collect_on && array_out_valid),
    .cfg_assigned(mod_assigned), .cfg_fmt(mod_fmt),
    .lines(perm_lines),
    .out_word(stager_word), .out_valid(stager_valid), .out_tag(stager_tag),
    .collision(collision)
  );

  logic         omem_wr_ready, omem_rd_valid, omem_stall, omem_starve;
  logic [N-1:0] omem_rd_data;
  logic [$clog2(RAM_DEPTH+1)-1:0] omem_words;
  logic         outf_full, outf_ovf, outf_udf;
  logic [$clog2(FIFO_DEPTH+1)-1:0] outf_count;

  conditioner_memory #(
    .NW(N), .NRD(N), .NR(RAM_NR), .SR(RAM_SR), .TR(RAM_TR), .DEPTH(RAM_DEPTH),
    .WRITER_PRIORITY(1'b1)
  ) u_out_mem (
    .clk, .rst_n,
    .wr_valid(stager_valid), .wr_data(stager_word), .wr_ready(omem_wr_ready),
    .rd_valid(omem_rd_valid), .rd_data(omem_rd_data), .rd_ready(!outf_full),
    .wr_stall(omem_stall), .rd_starve(omem_starve), .bank_words(omem_words)
  );
  assign out_drop = omem_stall;

  fifo #(.WIDTH(N), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n, .clear(master_reset),
    .wr_en(omem_rd_valid && !outf_full), .wr_data(omem_rd_data),
    .rd_en(host_rd), .rd_data(host_rd_data),
    .empty(host_rd_empty), .full(outf_full), .count(outf_count),
    .overflow(outf_ovf), .underflow(outf_udf)
  );

endmodule
