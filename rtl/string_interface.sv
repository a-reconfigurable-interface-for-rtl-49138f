// Host interface of a bit-serial string-matching array (bar-code label
// reconstruction).
//
// The host, an 8-bit microprocessor system, holds label fragments as strings
// of up to 48 three-valued characters (0, 1, wild card).  The matcher takes a
// new X-string one character per clock or an A-string, to be joined to the
// current string, two characters per clock, and returns the reconstructed
// string serially.  This interface:
//   * bus_interface      decodes the host's seven addresses and handshakes
//   * fifo (strings)     holds one whole string: a count byte and the
//                        non-wild-card characters, eight per byte
//   * string_controller  instruction register and sequencing
//   * x_string_loader    one character per clock (X, Wx)
//   * a_string_loader    two characters per clock (A/Wa to upper and lower cells)
//   * undo_counter       turns the tail of the string into wild cards
//   * result_collector   counts the result's non-wild-card characters and packs
//                        the result into bytes
//   * fifo (results)     result bytes read by the host
// The matcher itself is outside this module: its inputs and its result lines
// are ports; the status outputs include upc_start, whose low bits are
// constant (see string_controller).  The FIFOs' full, overflow and underflow
// flags and the Undo counter's count are not used here: the host writes at
// most one string per instruction and reads the result count from the
// collector.  mm_x/mm_wx carry either an X-string (mm_x_valid) or, during an
// Undo (mm_undo), the wild-card pattern.  Everything runs on one clock.
module string_interface (
  input  logic       clk,
  input  logic       rst_n,
  // host bus
  input  logic [2:0] bus_addr,
  input  logic [7:0] bus_din,
  input  logic       mwtc_n,
  input  logic       mrtc_n,
  output logic       xack_n,
  output logic [7:0] bus_dout,
  // to the matcher
  output logic       mm_x,
  output logic       mm_wx,
  output logic       mm_x_valid,
  output logic       mm_undo,
  output logic       mm_a_upper,
  output logic       mm_wa_upper,
  output logic       mm_a_lower,
  output logic       mm_wa_lower,
  output logic       mm_a_valid,
  output logic       mm_bar_space,
  // from the matcher
  input  logic       mm_res_x,
  input  logic       mm_res_wx,
  // status
  output logic       busy,
  output logic       collecting,
  output logic [7:0] upc_start,
  output logic       flip
);

  logic [7:0] wdata;
  logic       wr_fifo, wr_ir, set_instr, clr_fifo, wr_undo, rd_fifo;
  logic [7:0] res_head, cur_count;

  bus_interface u_bus (
    .clk, .rst_n,
    .addr(bus_addr), .din(bus_din), .mwtc_n, .mrtc_n, .xack_n, .dout(bus_dout),
    .wdata, .wr_fifo, .wr_ir, .set_instr, .clr_fifo, .wr_undo, .rd_fifo,
    .res_fifo_data(res_head), .cur_count
  );

  logic [7:0] sf_data;
  logic       sf_empty, sf_full, sf_rd, sf_ovf, sf_udf;
  logic [3:0] sf_count;

  fifo #(.WIDTH(8), .DEPTH(8)) u_str_fifo (
    .clk, .rst_n, .clear(clr_fifo),
    .wr_en(wr_fifo), .wr_data(wdata),
    .rd_en(sf_rd), .rd_data(sf_data),
    .empty(sf_empty), .full(sf_full), .count(sf_count),
    .overflow(sf_ovf), .underflow(sf_udf)
  );

  logic x_load_count, a_load_count, load_word, shift, count_en;
  logic x_done, a_done, undo_en, coll_start;
  logic x_active, a_active, undo_active, instr_ff;

  string_controller u_ctl (
    .clk, .rst_n,
    .ir_wr(wr_ir), .ir_data(wdata[3:0]), .instr_set(set_instr),
    .fifo_empty(sf_empty), .fifo_data(sf_data), .fifo_rd(sf_rd),
    .x_load_count, .a_load_count, .load_word, .shift, .count_en,
    .x_done, .a_done, .undo_en, .coll_start,
    .flip, .bar_space(mm_bar_space), .x_active, .a_active, .undo_active,
    .instr_ff, .busy, .upc_start
  );

  logic xl_x, xl_wx;

  // the X loader owns the shared load/shift lines unless an Add is running
  logic a_mode_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            a_mode_q <= 1'b0;
    else if (x_load_count) a_mode_q <= 1'b0;
    else if (a_load_count) a_mode_q <= 1'b1;
  end


  x_string_loader #(.LEN(48)) u_xl (
    .clk, .rst_n, .flip,
    .load_count(x_load_count), .count_in(sf_data),
    .load_word(load_word && !a_mode_q), .word_in(sf_data),
    .shift(shift), .count_en(count_en && x_active),
    .x(xl_x), .wx(xl_wx), .done(x_done)
  );

  a_string_loader #(.LEN(24)) u_al (
    .clk, .rst_n, .flip,
    .load_count(a_load_count), .count_in(sf_data),
    .load_word(load_word && a_mode_q), .word_in(sf_data),
    .shift(shift), .count_en(count_en && a_active),
    .a_upper(mm_a_upper), .w_upper(mm_wa_upper),
    .a_lower(mm_a_lower), .w_lower(mm_wa_lower), .done(a_done)
  );

  logic       ud_wx;
  logic [7:0] ud_count;

  undo_counter u_undo (
    .clk, .rst_n,
    .load(wr_undo), .count_in(wdata), .count_en(undo_en),
    .wx(ud_wx), .count(ud_count)
  );

  assign mm_x       = xl_x;
  assign mm_wx      = undo_active ? ud_wx : xl_wx;
  assign mm_x_valid = x_active;
  assign mm_undo    = undo_active;
  assign mm_a_valid = a_active;

  logic [7:0] res_word;
  logic       res_valid;

  result_collector #(.DELAY(24), .LEN(48)) u_coll (
    .clk, .rst_n,
    .start(coll_start), .x(mm_res_x), .wx(mm_res_wx),
    .word(res_word), .word_valid(res_valid), .nonwild_count(cur_count),
    .busy(collecting)
  );

  logic       rf_empty, rf_full, rf_ovf, rf_udf;
  logic [3:0] rf_count;

  fifo #(.WIDTH(8), .DEPTH(8)) u_res_fifo (
    .clk, .rst_n, .clear(1'b0),
    .wr_en(res_valid), .wr_data(res_word),
    .rd_en(rd_fifo), .rd_data(res_head),
    .empty(rf_empty), .full(rf_full), .count(rf_count),
    .overflow(rf_ovf), .underflow(rf_udf)
  );

endmodule
