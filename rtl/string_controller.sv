// Controller of the string-matcher interface.
//
// Runs the three instructions of the string matcher: Reset (load a new
// X-string, one character per clock), Add (load an A-string, two characters
// per clock, to be joined to the current string) and Undo (turn every
// character after the first Undo_count into a wild card).  The original unit
// is a microprogrammed sequencer (a bit-slice next-address unit, PROM and
// condition multiplexer) whose microcode is not given in full; this module is
// a hardwired state machine that issues the same control signals with the same
// timing as the routines described:
//   * wait until the "instruction in" flip-flop is set, then dispatch;
//   * the microprogram start address of the instruction (04h Reset, 74h Add,
//     FCh Undo) is formed from IR1, IR0 exactly as the address wiring does:
//     {IR1, IR0, IR0, IR0, IR1, 1, 0, 0}; it is output as upc_start;
//   * string loads: read the count byte, load the first word, give an
//     inside-out (flip) string with a count that is not a multiple of 8 its
//     initial shifts (8 - count mod 8 for X, 4 - (count mod 8) DIV 2 for A)
//     with the counters stopped, then clock characters until the length
//     counter ends, fetching the next word when the register runs out (every
//     8 clocks for X, every 4 for A, offset by the first word's length);
//   * Undo: 48 character clocks with the Undo counter enabled.
// After an Add the result collector is started.
//
// upc_start bits 2:0 are 100 for every instruction (the three start
// addresses differ only in bits 7:3), so two of its bits never change.
//
// Instruction register (4 bits): IR3 Bar/Space (1 = first character is a
// bar), IR2 = 0 for an inside-out label (flip), IR1:IR0 = 00 Reset, 01 Add,
// 1x Undo.  Words are only fetched while some of the string's ceil(count/8)
// words are still unread, so the FIFO holds exactly one string per
// instruction; that bookkeeping is this design's addition.
module string_controller (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ir_wr,
  input  logic [3:0] ir_data,
  input  logic       instr_set,
  // string FIFO
  input  logic       fifo_empty,
  input  logic [7:0] fifo_data,
  output logic       fifo_rd,
  // loaders
  output logic       x_load_count,
  output logic       a_load_count,
  output logic       load_word,
  output logic       shift,
  output logic       count_en,
  input  logic       x_done,
  input  logic       a_done,
  output logic       undo_en,
  output logic       coll_start,
  // status / matcher side
  output logic       flip,
  output logic       bar_space,
  output logic       x_active,
  output logic       a_active,
  output logic       undo_active,
  output logic       instr_ff,
  output logic       busy,
  output logic [7:0] upc_start
);

  typedef enum logic [2:0] {S_WAIT, S_COUNT, S_FIRST, S_PRESHIFT, S_RUN, S_UNDO} st_t;
  typedef enum logic [1:0] {M_X, M_A, M_UNDO} mode_t;

  st_t        st;
  mode_t      mode;
  logic [3:0] ir;
  logic [3:0] period, first_left, left, pre;
  logic [2:0] words_left;
  logic [5:0] undo_cnt;
  logic [2:0] r;
  logic       is_a, run_done, fetch;

  assign flip      = !ir[2];
  assign bar_space = ir[3];
  assign is_a      = (mode == M_A);
  assign busy      = (st != S_WAIT);
  assign run_done  = is_a ? a_done : x_done;

  assign x_active    = (st == S_RUN) && (mode == M_X) && !run_done;
  assign a_active    = (st == S_RUN) && (mode == M_A) && !run_done;
  assign undo_active = (st == S_UNDO);
  assign undo_en     = (st == S_UNDO);

  // word fetch decision in RUN / the last PRESHIFT clock
  always_comb begin
    fetch = 1'b0;
    if (words_left != 0 && !fifo_empty) begin
      if (st == S_RUN && !run_done && left == 4'd1) fetch = 1'b1;
      if (st == S_PRESHIFT && pre == 4'd1 && first_left == 4'd0) fetch = 1'b1;
    end
  end

  always_comb begin
    fifo_rd      = 1'b0;
    x_load_count = 1'b0;
    a_load_count = 1'b0;
    load_word    = 1'b0;
    shift        = 1'b0;
    count_en     = 1'b0;
    unique case (st)
      S_COUNT: if (!fifo_empty) begin
        fifo_rd      = 1'b1;
        x_load_count = !is_a;
        a_load_count = is_a;
      end
      S_FIRST: if (!fifo_empty) begin
        fifo_rd   = 1'b1;
        load_word = 1'b1;
      end
      S_PRESHIFT: begin
        load_word = fetch;
        fifo_rd   = fetch;
        shift     = !fetch;
      end
      S_RUN: if (!run_done) begin
        count_en  = 1'b1;
        load_word = fetch;
        fifo_rd   = fetch;
        shift     = !fetch;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_WAIT;
      mode       <= M_X;
      ir         <= 4'b0100;
      instr_ff   <= 1'b0;
      upc_start  <= '0;
      period     <= '0;
      first_left <= '0;
      left       <= '0;
      pre        <= '0;
      words_left <= '0;
      undo_cnt   <= '0;
      r          <= '0;
      coll_start <= 1'b0;
    end else begin
      coll_start <= 1'b0;
      if (ir_wr) ir <= ir_data;
      if (instr_set) instr_ff <= 1'b1;
      unique case (st)
        S_WAIT: if (instr_ff) begin
          instr_ff  <= 1'b0;
          upc_start <= {ir[1], ir[0], ir[0], ir[0], ir[1], 3'b100};
          if (ir[1]) begin
            mode     <= M_UNDO;
            undo_cnt <= 6'd48;
            st       <= S_UNDO;
          end else begin
            mode   <= ir[0] ? M_A : M_X;
            period <= ir[0] ? 4'd4 : 4'd8;
            st     <= S_COUNT;
          end
        end
        S_COUNT: if (!fifo_empty) begin
          r          <= fifo_data[2:0];
          words_left <= 3'((fifo_data + 8'd7) >> 3);
          if (fifo_data == 8'd0) begin
            left <= 4'd0;
            st   <= S_RUN;
          end else begin
            st <= S_FIRST;
          end
        end
        S_FIRST: if (!fifo_empty) begin
          words_left <= words_left - 1'b1;
          if (flip && r != 3'd0) begin
            first_left <= is_a ? 4'({2'b00, r[2:1]}) : 4'(r);
            pre        <= is_a ? 4'(4 - int'(r[2:1])) : 4'(8 - int'(r));
            st         <= S_PRESHIFT;
          end else begin
            left <= period;
            st   <= S_RUN;
          end
        end
        S_PRESHIFT: begin
          if (fetch) words_left <= words_left - 1'b1;
          pre <= pre - 1'b1;
          if (pre == 4'd1) begin
            left <= fetch ? period : first_left;
            st   <= S_RUN;
          end
        end
        S_RUN: begin
          if (run_done) begin
            st <= S_WAIT;
            if (is_a) coll_start <= 1'b1;
          end else if (fetch) begin
            words_left <= words_left - 1'b1;
            left       <= period;
          end else if (left != 0) begin
            left <= left - 1'b1;
          end
        end
        S_UNDO: begin
          undo_cnt <= undo_cnt - 1'b1;
          if (undo_cnt == 6'd1) st <= S_WAIT;
        end
        default: st <= S_WAIT;
      endcase
    end
  end

endmodule
