// tb_galois_shift_reg -- self-checking test of the Galois shift register.
// 1. Loads 0110011 (x7..x1 order) and checks the ten published successor
//    states, ending at 1110111.
// 2. Steps 127 times from the reset state and checks every state against the
//    explicit n = 7 equations, that no state repeats or is all-zero before
//    step 127 and that step 127 returns to the start (maximal length).
// 3. Checks hold (neither load nor shift), load priority over shift and reset.
module tb_galois_shift_reg;
  localparam int unsigned N = 7;

  logic clk = 1'b0;
  logic rst_n, load, shift;
  logic [N-1:0] d, q;
  int checks = 0, failures = 0;

  galois_shift_reg dut (.*);

  always #5 clk = ~clk;

  function automatic logic [6:0] g7_step(logic [6:0] s);
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

  task automatic expect_q(logic [6:0] e, string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("%s: q=%b expected %b", what, q, e);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [6:0] paper_states [10] = '{
    7'b1100110, 7'b1000011, 7'b0001001, 7'b0010010, 7'b0100100,
    7'b1001000, 7'b0011111, 7'b0111110, 7'b1111100, 7'b1110111};

  initial begin
    logic [6:0] start_s, e;
    bit seen [128];
    rst_n = 1'b0; load = 1'b0; shift = 1'b0; d = '0;
    @(posedge clk); #1;
    expect_q(7'b1110111, "reset");
    rst_n = 1'b1;
    // 1. worked example
    load = 1'b1; d = 7'b0110011;
    @(posedge clk); #1;
    load = 1'b0;
    expect_q(7'b0110011, "load");
    shift = 1'b1;
    for (int i = 0; i < 10; i++) begin
      @(posedge clk); #1;
      expect_q(paper_states[i], $sformatf("example step %0d", i + 1));
    end
    shift = 1'b0;
    // 2. full period
    start_s = q;
    e = q;
    seen[e] = 1'b1;
    shift = 1'b1;
    for (int i = 1; i <= 127; i++) begin
      @(posedge clk); #1;
      e = g7_step(e);
      expect_q(e, $sformatf("period step %0d", i));
      if (i < 127) begin
        checks++;
        if (seen[q] || q == '0) begin failures++; $display("state %b repeats at step %0d", q, i); end
        seen[q] = 1'b1;
      end
    end
    expect_q(start_s, "period 127");
    // 3. hold, load priority, reset
    shift = 1'b0;
    repeat (3) @(posedge clk);
    #1 expect_q(start_s, "hold");
    load = 1'b1; shift = 1'b1; d = 7'b0000001;
    @(posedge clk); #1;
    expect_q(7'b0000001, "load priority");
    load = 1'b0;
    @(posedge clk); #1;
    expect_q(g7_step(7'b0000001), "shift after load");
    shift = 1'b0; rst_n = 1'b0;
    @(posedge clk); #1;
    expect_q(7'b1110111, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
