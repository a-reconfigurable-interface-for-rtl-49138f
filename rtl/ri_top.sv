// Top level: the two host-to-array interfaces side by side.
//
// general_interface is the configurable interface between a byte-wide host
// and a bit-sequential systolic array (input staging, memory, serialisation,
// switch network; result collection for several concurrent tasks).
// string_interface is the specific interface for a bit-serial string-matching
// array used for bar-code label reconstruction.  The two share only the clock
// and reset; each brings its own host and array ports out.  The PE array,
// the string matcher and the hosts are outside this design.
module ri_top
  import ri_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned R = 16,
  parameter int unsigned M = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // general interface: host
  input  logic [7:0]           g_host_byte,
  input  logic                 g_host_valid,
  output logic                 g_host_in_full,
  input  logic                 g_host_rd,
  output logic [N-1:0]         g_host_rd_data,
  output logic                 g_host_rd_empty,
  // general interface: array
  output logic [R-1:0]         g_array_in,
  output logic                 g_array_in_valid,
  input  logic [M-1:0]         g_array_out,
  input  logic                 g_array_out_valid,
  // general interface: status
  output logic                 g_master_reset,
  output logic                 g_in_stall,
  output logic                 g_array_starve,
  output logic                 g_out_drop,
  output logic                 g_collision,
  output logic                 g_sched_done,
  output logic                 g_sched_error,
  output logic [N-1:0]         g_stager_word,
  output logic                 g_stager_valid,
  output logic [$clog2(N)-1:0] g_stager_tag,
  // string interface: host bus
  input  logic [2:0]           s_bus_addr,
  input  logic [7:0]           s_bus_din,
  input  logic                 s_mwtc_n,
  input  logic                 s_mrtc_n,
  output logic                 s_xack_n,
  output logic [7:0]           s_bus_dout,
  // string interface: matcher
  output logic                 s_mm_x,
  output logic                 s_mm_wx,
  output logic                 s_mm_x_valid,
  output logic                 s_mm_undo,
  output logic                 s_mm_a_upper,
  output logic                 s_mm_wa_upper,
  output logic                 s_mm_a_lower,
  output logic                 s_mm_wa_lower,
  output logic                 s_mm_a_valid,
  output logic                 s_mm_bar_space,
  input  logic                 s_mm_res_x,
  input  logic                 s_mm_res_wx,
  // string interface: status
  output logic                 s_busy,
  output logic                 s_collecting,
  output logic [7:0]           s_upc_start,
  output logic                 s_flip
);

  general_interface #(.N(N), .R(R), .M(M)) u_general (
    .clk, .rst_n,
    .host_byte(g_host_byte), .host_valid(g_host_valid), .host_in_full(g_host_in_full),
    .host_rd(g_host_rd), .host_rd_data(g_host_rd_data), .host_rd_empty(g_host_rd_empty),
    .array_in(g_array_in), .array_in_valid(g_array_in_valid),
    .array_out(g_array_out), .array_out_valid(g_array_out_valid),
    .master_reset(g_master_reset), .in_stall(g_in_stall), .array_starve(g_array_starve),
    .out_drop(g_out_drop), .collision(g_collision),
    .sched_done(g_sched_done), .sched_error(g_sched_error),
    .stager_word(g_stager_word), .stager_valid(g_stager_valid), .stager_tag(g_stager_tag)
  );

  string_interface u_string (
    .clk, .rst_n,
    .bus_addr(s_bus_addr), .bus_din(s_bus_din), .mwtc_n(s_mwtc_n), .mrtc_n(s_mrtc_n),
    .xack_n(s_xack_n), .bus_dout(s_bus_dout),
    .mm_x(s_mm_x), .mm_wx(s_mm_wx), .mm_x_valid(s_mm_x_valid), .mm_undo(s_mm_undo),
    .mm_a_upper(s_mm_a_upper), .mm_wa_upper(s_mm_wa_upper),
    .mm_a_lower(s_mm_a_lower), .mm_wa_lower(s_mm_wa_lower),
    .mm_a_valid(s_mm_a_valid), .mm_bar_space(s_mm_bar_space),
    .mm_res_x(s_mm_res_x), .mm_res_wx(s_mm_res_wx),
    .busy(s_busy), .collecting(s_collecting), .upc_start(s_upc_start), .flip(s_flip)
  );

endmodule
