// prbs_converter -- faster serial pseudorandom/natural code converter for a
// single-track absolute position encoder (Galois implementation).
//
// The reading head delivers one bit of the n-bit pseudorandom binary sequence
// per scale step (head_bit with bit_strobe). The code assembly register keeps
// the last n bits, the read code word x(n)..x(1). On convert the word passes
// the initial adjustment XOR network and is loaded into the Galois shift
// register as the equivalent register state. The register then steps once
// per clock while the counter counts, until the initial state identification
// sees the state of the initial code word (position 0). The count at that
// moment is the position p: the number of steps from the read word to the
// initial word. Because the feedback is parallel, each step has one XOR gate
// in its loop, whatever the number of taps.
//
// Ports:   head_bit/bit_strobe  one track bit per strobe clock
//          convert              start a conversion of the current word
//          position             P(n-1)..P(0), valid from done until the next convert
//          done                 one-cycle pulse at the end of a conversion
//          busy                 conversion in progress
//          forbidden            the last convert saw the all-zero word
//          code_word            the assembled word, bit i = x(i+1)
// Timing:  a word at position p gives done p+1 clocks after the convert clock
//          (1 load clock, p shift clocks); at most 2^n-1 clocks.
//
// The structure, the n = 7 taps, the adjustment equations and the initial
// code word 1110010 (x7..x1) follow the published example; the synchronous
// control, the ports and the forbidden-word guard are this design's choices.
module prbs_converter
  import prbs_conv_pkg::*;
#(
  parameter int unsigned N         = N_DEF,
  parameter vec_t        TAPS      = TAPS_DEF,
  parameter vec_t        INIT_WORD = INIT_WORD_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_strobe,
  input  logic         head_bit,
  input  logic         convert,
  output logic [N-1:0] code_word,
  output logic [N-1:0] position,
  output logic         done,
  output logic         busy,
  output logic         forbidden
);

  // Register state of the initial code word (position 0).
  localparam logic [N-1:0] INIT_STATE = N'(adjust_word(INIT_WORD, N, TAPS));

  logic [N-1:0] adj_state;
  logic [N-1:0] reg_state;
  logic         load, shift, cnt_clear, cnt_en, match;

  code_assembly_reg #(.N(N)) u_assembly (
    .clk, .rst_n, .bit_strobe, .head_bit, .word(code_word)
  );

  code_word_adjust #(.N(N), .TAPS(TAPS)) u_adjust (
    .word(code_word), .state(adj_state)
  );

  galois_shift_reg #(.N(N), .TAPS(TAPS), .RESET_STATE(INIT_STATE)) u_galois (
    .clk, .rst_n, .load, .shift, .d(adj_state), .q(reg_state)
  );

  init_state_ident #(.N(N), .INIT_STATE(INIT_STATE)) u_ident (
    .clk, .rst_n, .start(convert), .load_zero(adj_state == '0), .state(reg_state),
    .load, .shift, .cnt_clear, .cnt_en, .match, .busy, .done, .forbidden
  );

  step_counter #(.W(N)) u_counter (
    .clk, .rst_n, .clear(cnt_clear), .en(cnt_en), .count(position)
  );

  // LOAD and SHIFT are exclusive, a conversion ends only at the initial state, and
  // the register never enters the forbidden state.
  a_load_shift_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(load && shift));
  a_done_at_initial_state: assert property (@(posedge clk) disable iff (!rst_n) done |-> match);
  a_never_zero: assert property (@(posedge clk) disable iff (!rst_n) reg_state != '0);

endmodule
