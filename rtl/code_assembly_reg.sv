// code_assembly_reg -- assembles the n-bit pseudorandom code word from the
// single reading head.
//
// Each bit_strobe shifts the head bit into the x(n) cell while the older
// bits move down one cell (x(n) -> x(n-1) -> ... -> x(1)); the bit in x(1)
// is dropped. The word is therefore the last n bits read, the newest in
// x(n). Walking the track one bit further in this direction moves the word
// one position further from the initial code word.
//
// Interface: word[i] = x(i+1). Timing: the word changes on the clock edge at
// which bit_strobe is high; synchronous active-low reset clears it.
//
// The register and the head entering at x(n) are as drawn in the published
// block diagram; the strobe and reset are this design's choice.
module code_assembly_reg #(
  parameter int unsigned N = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         bit_strobe,
  input  logic         head_bit,
  output logic [N-1:0] word
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      word <= '0;
    end else if (bit_strobe) begin
      word <= {head_bit, word[N-1:1]};
    end
  end

endmodule
