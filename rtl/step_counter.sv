// step_counter -- counts the shifts of the Galois register; the count at the
// stop of a conversion is the natural-code position p (outputs P(W-1)..P(0)).
//
// Interface/timing: clear (the converter's counter RESET) zeroes the count on
// the next rising edge and has priority over en, which adds one per clock.
// The count wraps modulo 2^W. Synchronous active-low reset to zero. The
// W = n = 7 bit width is the published one; the clear/enable form is this
// design's choice.
module step_counter #(
  parameter int unsigned W = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count <= '0;
    end else if (clear) begin
      count <= '0;
    end else if (en) begin
      count <= count + 1'b1;
    end
  end

endmodule
