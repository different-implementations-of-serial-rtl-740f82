// code_word_adjust -- logic for initial adjustment of the read code word.
//
// Purely combinational XOR network that converts the read word x(n)..x(1)
// into the Galois shift-register state X(n)..X(1) from which the register
// emits exactly that word (see prbs_conv_pkg::adjust_word). For the default
// n = 7 taps it is
//   X7=x7, X6=x6, X5=x5, X4=x4, X3=x3^x7, X2=x2^x6^x7, X1=x1^x5^x6^x7,
// three XOR gates in all, as in the published converter. The network is
// only used at load time and is not part of the shifting loop, so it does
// not lengthen the per-step critical path.
//
// Interface: word[i] = x(i+1), state[i] = X(i+1). No clock.
module code_word_adjust
  import prbs_conv_pkg::*;
#(
  parameter int unsigned N    = N_DEF,
  parameter vec_t        TAPS = TAPS_DEF
) (
  input  logic [N-1:0] word,
  output logic [N-1:0] state
);

  always_comb begin
    state = N'(adjust_word(vec_t'(word), N, TAPS));
  end

endmodule
