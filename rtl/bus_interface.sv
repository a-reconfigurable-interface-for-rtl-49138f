// Host bus interface of the string-matcher interface.
//
// The interface is memory mapped on the host's bus with a simple strobe and
// acknowledge handshake.  Seven addresses are decoded:
//   1 string FIFO (data write)        2 instruction register (write)
//   3 "instruction in" flip-flop (write sets it)
//   4 string FIFO clear (write)       5 Undo counter (write)
//   6 result FIFO (read)              7 current non-wild-card count (read)
// A write strobe (mwtc_n falling) produces a one-clock pulse on the selected
// write line with the bus data; a read strobe (mrtc_n low) drives the selected
// register onto dout, and the result FIFO is advanced when the strobe ends.
// xack_n goes low one clock after either strobe goes low and returns high
// with the strobe.  The numeric addresses follow the order the text lists the
// devices in; the signals are assumed synchronous to clk.
// wdata is the host's data bus passed on unchanged to the devices it writes.
module bus_interface (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] addr,
  input  logic [7:0] din,
  input  logic       mwtc_n,
  input  logic       mrtc_n,
  output logic       xack_n,
  output logic [7:0] dout,
  output logic [7:0] wdata,
  output logic       wr_fifo,
  output logic       wr_ir,
  output logic       set_instr,
  output logic       clr_fifo,
  output logic       wr_undo,
  output logic       rd_fifo,
  input  logic [7:0] res_fifo_data,
  input  logic [7:0] cur_count
);

  typedef enum logic [2:0] {
    A_NONE = 3'd0, A_FIFO = 3'd1, A_IR = 3'd2, A_INSTR = 3'd3,
    A_CLEAR = 3'd4, A_UNDO = 3'd5, A_RESULT = 3'd6, A_COUNT = 3'd7
  } bus_addr_t;

  logic      mwtc_q, mrtc_q;
  logic      wr_edge, rd_end;
  bus_addr_t a, a_rd;

  assign a       = bus_addr_t'(addr);
  assign wr_edge = !mwtc_n && mwtc_q;
  assign rd_end  = mrtc_n && !mrtc_q;
  assign wdata   = din;

  assign wr_fifo   = wr_edge && (a == A_FIFO);
  assign wr_ir     = wr_edge && (a == A_IR);
  assign set_instr = wr_edge && (a == A_INSTR);
  assign clr_fifo  = wr_edge && (a == A_CLEAR);
  assign wr_undo   = wr_edge && (a == A_UNDO);
  assign rd_fifo   = rd_end && (a_rd == A_RESULT);

  always_comb begin
    unique case (a)
      A_RESULT: dout = res_fifo_data;
      A_COUNT:  dout = cur_count;
      default:  dout = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mwtc_q <= 1'b1;
      mrtc_q <= 1'b1;
      xack_n <= 1'b1;
      a_rd   <= A_NONE;
    end else begin
      mwtc_q <= mwtc_n;
      mrtc_q <= mrtc_n;
      xack_n <= mwtc_n && mrtc_n;
      if (!mrtc_n) a_rd <= a;
    end
  end

endmodule
