// tb_code_assembly_reg -- self-checking test of the code assembly register.
// Shifts 300 random head bits in, with random gaps in bit_strobe, and after
// every clock compares the word with a reference history of the last seven
// bits read (newest in x(7)). Also checks that the word holds without strobe
// and that reset clears it.
module tb_code_assembly_reg;
  localparam int unsigned N = 7;

  logic clk = 1'b0;
  logic rst_n, bit_strobe, head_bit;
  logic [N-1:0] word;
  int checks = 0, failures = 0;

  code_assembly_reg #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit hist[$];
  logic [N-1:0] exp_word;

  initial begin
    rst_n = 1'b0; bit_strobe = 1'b0; head_bit = 1'b0;
    @(posedge clk); @(posedge clk);
    #1;
    checks++; if (word !== '0) begin failures++; $display("reset: word=%b", word); end
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) hist.push_back(1'b0);
    for (int i = 0; i < 300; i++) begin
      bit_strobe = ($urandom_range(0, 3) != 0);
      head_bit   = 1'($urandom);
      @(posedge clk);
      if (bit_strobe) begin
        hist.push_back(head_bit);
        void'(hist.pop_front());
      end
      #1;
      // hist[N-1] is the newest bit = x(N); hist[0] the oldest = x(1)
      for (int k = 0; k < N; k++) exp_word[k] = hist[k];
      checks++;
      if (word !== exp_word) begin
        failures++;
        $display("step %0d: word=%b expected %b", i, word, exp_word);
      end
    end
    rst_n = 1'b0;
    @(posedge clk); #1;
    checks++; if (word !== '0) begin failures++; $display("second reset: word=%b", word); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
