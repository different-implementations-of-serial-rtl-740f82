// tb_code_word_adjust -- self-checking test of the initial adjustment logic.
// For all 128 seven-bit words it compares the network with the closed-form
// relations X7=x7, X6=x6, X5=x5, X4=x4, X3=x3^x7, X2=x2^x6^x7,
// X1=x1^x5^x6^x7, and checks the defining property directly: a Galois
// register (modelled here with its explicit n = 7 equations) loaded with the
// result emits x7, x6, ..., x1 on its output stage X7 over seven clocks.
// Also checks the worked example: 0110001 -> 0110011 and the initial word
// 1110010 -> 1110111 (bits written x7..x1).
module tb_code_word_adjust;
  localparam int unsigned N = 7;

  logic [N-1:0] word, state;
  int checks = 0, failures = 0;

  code_word_adjust dut (.word, .state);

  function automatic logic [6:0] g7_step(logic [6:0] s);
    // index k-1 holds X(k)
    logic [6:0] n;
    n[6] = s[5];
    n[5] = s[4];
    n[4] = s[3];
    n[3] = s[6] ^ s[2];
    n[2] = s[6] ^ s[1];
    n[1] = s[6] ^ s[0];
    n[0] = s[6];
    return n;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] exp_s, s;
    for (int w = 0; w < 128; w++) begin
      word = 7'(w);
      #1;
      exp_s[6] = word[6];
      exp_s[5] = word[5];
      exp_s[4] = word[4];
      exp_s[3] = word[3];
      exp_s[2] = word[2] ^ word[6];
      exp_s[1] = word[1] ^ word[5] ^ word[6];
      exp_s[0] = word[0] ^ word[4] ^ word[5] ^ word[6];
      checks++;
      if (state !== exp_s) begin
        failures++;
        $display("word %b: state %b expected %b", word, state, exp_s);
      end
      s = state;
      for (int k = N - 1; k >= 0; k--) begin
        checks++;
        if (s[6] !== word[k]) begin
          failures++;
          $display("word %b: output for x%0d is %b", word, k + 1, s[6]);
        end
        s = g7_step(s);
      end
    end
    word = 7'b0110001; #1;
    checks++; if (state !== 7'b0110011) begin failures++; $display("example: %b", state); end
    word = 7'b1110010; #1;
    checks++; if (state !== 7'b1110111) begin failures++; $display("initial word: %b", state); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
