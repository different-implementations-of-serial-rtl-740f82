// init_state_ident -- logic for initial state identification and conversion
// control (LOAD/SHIFT of the shift register, RESET/count of the counter).
//
// A conversion begins with start: the register is loaded with the adjusted
// read word and the counter is cleared. From the next clock on, the register
// shifts and the counter counts once per clock until the register equals
// INIT_STATE, the state that corresponds to the initial code word
// (position 0). That clock the conversion stops: done is high for one cycle,
// busy falls, and the counter holds the position p. A word at position p
// therefore ends with done exactly p+1 clocks after the start clock.
//
// The all-zero state is the forbidden state of the generator (it never
// leaves it). If the adjusted word is all-zero at start (load_zero) nothing
// is loaded, no conversion runs and forbidden is raised until the next
// start; a new start while busy restarts the conversion.
//
// The identification of the initial state and its role in stopping the
// shifting and counting follow the published converter, where a gate, a
// delay element and a buffer realise it asynchronously; here the stop is a
// synchronous comparison on the register output, and the start input, the
// busy/done/forbidden outputs and the forbidden-word guard are this design's
// choices.
module init_state_ident #(
  parameter int unsigned  N          = 7,
  parameter logic [N-1:0] INIT_STATE = 7'b111_0111
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,      // read the current word and begin
  input  logic         load_zero,  // adjusted word at the load input is all-zero
  input  logic [N-1:0] state,      // Galois register contents
  output logic         load,       // LOAD/SHIFT = load
  output logic         shift,      // LOAD/SHIFT = shift
  output logic         cnt_clear,  // counter RESET
  output logic         cnt_en,     // counter count enable
  output logic         match,      // register holds the initial state
  output logic         busy,
  output logic         done,
  output logic         forbidden
);

  always_comb begin
    match     = (state == INIT_STATE);
    load      = start && !load_zero;
    cnt_clear = load;
    shift     = busy && !match && !start;
    cnt_en    = shift;
    done      = busy && match && !start;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      forbidden <= 1'b0;
    end else if (start) begin
      busy      <= !load_zero;
      forbidden <= load_zero;
    end else if (done) begin
      busy      <= 1'b0;
    end
  end

endmodule
