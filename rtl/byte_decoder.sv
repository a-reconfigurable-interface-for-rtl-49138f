// Host-bus byte decoder.
//
// Data and instructions share one byte-wide bus from the host.  Every byte is
// data unless it is the all-zero byte, which acts as an escape: the byte after
// an escape is an instruction, unless it is zero too, in which case the pair
// stands for one data byte of value zero.  An instruction byte equal to
// PANIC (0xFF by default) is the "panic" code that forces the whole interface back
// to its default configuration, so the host can always regain control.
//
// States (from the decoder state diagram):
//   A  idle / last byte was data       - a byte entering A is routed to the data FIFO
//   B  escape seen
//   C  last byte was an instruction    - a byte entering C goes to the instruction register
//   R  last byte was the master reset  - entering R pulses master_reset
// Transitions: A,C,R --Eq--> B;  A,C,R --!Eq--> A;  B --Eq--> A (zero data byte);
// B --!Eq & !P--> C;  B --!Eq & P--> R.
//
// Interface: byte_valid qualifies byte_in for one clock.  The outputs are
// registered: data_valid / instr_valid / master_reset are one-clock pulses in
// the cycle after the byte was accepted.  The reset value of the panic byte
// (0xFF) and the registered outputs are this design's choices.
module byte_decoder #(
  parameter logic [7:0] PANIC = 8'hFF
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] byte_in,
  input  logic       byte_valid,
  output logic [7:0] data_out,
  output logic       data_valid,
  output logic [7:0] instr_out,
  output logic       instr_valid,
  output logic       master_reset
);

  typedef enum logic [1:0] {ST_A, ST_B, ST_C, ST_R} dec_state_t;

  dec_state_t state, state_nx;
  logic eq, panic;

  assign eq    = (byte_in == 8'h00);
  assign panic = (byte_in == PANIC);

  always_comb begin
    state_nx = state;
    if (byte_valid) begin
      unique case (state)
        ST_B:    state_nx = eq ? ST_A : (panic ? ST_R : ST_C);
        default: state_nx = eq ? ST_B : ST_A;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= ST_A;
      data_out     <= '0;
      data_valid   <= 1'b0;
      instr_out    <= '0;
      instr_valid  <= 1'b0;
      master_reset <= 1'b0;
    end else begin
      state        <= state_nx;
      data_valid   <= byte_valid && (state_nx == ST_A);
      instr_valid  <= byte_valid && (state_nx == ST_C);
      master_reset <= byte_valid && (state_nx == ST_R);
      if (byte_valid) begin
        data_out  <= byte_in;
        instr_out <= byte_in;
      end
    end
  end

endmodule
