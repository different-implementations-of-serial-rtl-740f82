// galois_shift_reg -- n-cell Galois (parallel feedback) PRBS generator with
// LOAD/SHIFT control.
//
// On load the register takes the adjusted code word d. On shift it steps by
// the direct generation law (prbs_conv_pkg::galois_step): X(n) is the output
// stage, each cell takes the one below it and the tapped cells XOR in X(n),
// so every feedback path holds a single XOR gate. Default taps for n = 7:
//   X7'=X6, X6'=X5, X5'=X4, X4'=X7^X3, X3'=X7^X2, X2'=X7^X1, X1'=X7.
//
// Interface: q[i] = X(i+1). Timing: load and shift act on the rising clock
// edge, load has priority; with neither the register holds. Synchronous
// active-low reset to RESET_STATE (default: the state of the initial code
// word, so the register starts stopped). The register structure and tap equations
// follow the published converter; the hold state, the reset and the load
// priority are this design's choice.
module galois_shift_reg
  import prbs_conv_pkg::*;
#(
  parameter int unsigned N           = N_DEF,
  parameter vec_t        TAPS        = TAPS_DEF,
  parameter logic [N-1:0] RESET_STATE = N'(adjust_word(INIT_WORD_DEF, N, TAPS))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  logic [N-1:0] stepped;

  always_comb begin
    stepped = N'(galois_step(vec_t'(q), N, TAPS));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q <= RESET_STATE;
    end else if (load) begin
      q <= d;
    end else if (shift) begin
      q <= stepped;
    end
  end

endmodule
