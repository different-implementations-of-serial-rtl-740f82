// tb_step_counter -- self-checking test of the step counter: reset, counting
// with random enable gaps compared with a reference count, wrap from 127 to
// 0, clear, and clear having priority over enable.
module tb_step_counter;
  localparam int unsigned W = 7;

  logic clk = 1'b0;
  logic rst_n, clear, en;
  logic [W-1:0] count;
  int checks = 0, failures = 0;
  int unsigned ref_count;

  step_counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; clear = 1'b0; en = 1'b0;
    @(posedge clk); #1;
    checks++; if (count !== '0) begin failures++; $display("reset: %0d", count); end
    rst_n = 1'b1;
    ref_count = 0;
    for (int i = 0; i < 600; i++) begin
      en    = ($urandom_range(0, 4) != 0);
      clear = ($urandom_range(0, 199) == 0);
      if (i % 250 == 249) begin clear = 1'b1; en = 1'b1; end
      @(posedge clk);
      if (clear) ref_count = 0;
      else if (en) ref_count = (ref_count + 1) % 128;
      #1;
      checks++;
      if (count !== W'(ref_count)) begin
        failures++;
        $display("cycle %0d: count=%0d expected %0d", i, count, ref_count);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
