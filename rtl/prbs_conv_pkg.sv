// prbs_conv_pkg -- shared constants and bit-level functions of the serial
// pseudorandom/natural code converter.
//
// Bit conventions used throughout: a code word read from the track is
// x(n)..x(1) and is held in a vector with bit i = x(i+1); the Galois shift
// register state X(n)..X(1) is held the same way (bit i = X(i+1)).
//
// galois_step() is one clock of the n-cell Galois register under the direct
// generation law: X(n) is the output stage, every cell takes the cell below
// it, and the cells selected by TAPS additionally take X(n) through one XOR:
//   X(1)' = X(n),   X(i+1)' = X(i) ^ (TAPS[i] & X(n))   for i = 1..n-1.
// The default TAPS (bits 3..0 set) gives, for n = 7, the published relations
//   X7'=X6, X6'=X5, X5'=X4, X4'=X7^X3, X3'=X7^X2, X2'=X7^X1, X1'=X7.
//
// adjust_word() is the initial adjustment of a read code word: it returns
// the one register state whose output stream X(n), X(n)', X(n)'', ... equals
// x(n), x(n-1), ..., x(1). Output k clocks after the load depends only on
// X(n-k)..X(n), so the state is found top-down, one cell at a time: with the
// lower cells still zero, the register is stepped k times and X(n-k) is set
// to x(n-k) XOR the bit that comes out. For constant TAPS this folds into a
// pure XOR network; for the default it is
//   X7=x7, X6=x6, X5=x5, X4=x4, X3=x3^x7, X2=x2^x6^x7, X1=x1^x5^x6^x7.
// The general procedure is this package's formulation of the derivation; the
// default taps, word length and initial code word follow the published n = 7
// example.
package prbs_conv_pkg;

  localparam int unsigned MAX_N = 32;
  typedef logic [MAX_N-1:0] vec_t;

  // Defaults of the n = 7 converter.
  localparam int unsigned N_DEF         = 7;
  localparam vec_t        TAPS_DEF      = vec_t'('b000_1111);  // X(4),X(3),X(2),X(1) take X(7)
  localparam vec_t        INIT_WORD_DEF = vec_t'('b111_0010);  // x7..x1 of position p = 0

  function automatic vec_t galois_step(vec_t s, int unsigned n, vec_t taps);
    vec_t nx;
    logic fb;
    nx = '0;
    fb = s[n-1];
    nx[0] = fb;
    for (int unsigned i = 1; i < n; i++) begin
      nx[i] = s[i-1] ^ (taps[i] & fb);
    end
    return nx;
  endfunction

  function automatic vec_t adjust_word(vec_t w, int unsigned n, vec_t taps);
    vec_t st;
    vec_t probe;
    st = '0;
    for (int unsigned k = 0; k < n; k++) begin
      probe = st;
      for (int unsigned j = 0; j < k; j++) begin
        probe = galois_step(probe, n, taps);
      end
      st[n-1-k] = w[n-1-k] ^ probe[n-1];
    end
    return st;
  endfunction

endpackage
