// tb_init_state_ident -- self-checking test of the initial state
// identification and conversion control. The test drives the register state
// itself: for a chosen number of clocks k it presents states other than the
// initial one, then the initial state, and checks that the block loads and
// clears on start, shifts and counts exactly k clocks, raises done for one
// clock when the initial state appears (k+1 clocks after start), then idles.
// It also checks the forbidden-word path, a restart while busy and that the
// initial state alone does nothing while idle.
module tb_init_state_ident;
  localparam int unsigned  N    = 7;
  localparam logic [N-1:0] INIT = 7'b1110111;

  logic clk = 1'b0;
  logic rst_n, start, load_zero;
  logic [N-1:0] state;
  logic load, shift, cnt_clear, cnt_en, match, busy, done, forbidden;
  int checks = 0, failures = 0;

  init_state_ident dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One conversion of k steps; the initial state appears after k shifts.
  task automatic convert(int k);
    int shifts = 0;
    start = 1'b1; load_zero = 1'b0; state = INIT;
    #1;
    chk(load, 1'b1, "load on start");
    chk(cnt_clear, 1'b1, "clear on start");
    chk(shift, 1'b0, "no shift on start");
    @(posedge clk) #1;
    start = 1'b0;
    for (int c = 1; c <= k + 1; c++) begin
      // any non-initial states, then the initial one
      state = (c > k) ? INIT : ((7'(c) == INIT) ? 7'd0 : 7'(c));
      #1;
      chk(busy, 1'b1, $sformatf("busy k=%0d c=%0d", k, c));
      chk(load, 1'b0, "no load while busy");
      chk(match, (c > k), "match");
      chk(shift, (c <= k), $sformatf("shift k=%0d c=%0d", k, c));
      chk(cnt_en, (c <= k), "count enable");
      chk(done, (c > k), $sformatf("done k=%0d c=%0d", k, c));
      if (shift) shifts++;
      @(posedge clk) #1;
    end
    #1;
    chk(busy, 1'b0, "idle after done");
    chk(done, 1'b0, "done is one clock");
    chk(shift, 1'b0, "no shift when idle");
    checks++;
    if (shifts != k) begin failures++; $display("k=%0d: %0d shifts", k, shifts); end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; load_zero = 1'b0; state = INIT;
    @(posedge clk) #1; #1;
    rst_n = 1'b1;
    chk(busy, 1'b0, "idle after reset");
    chk(done, 1'b0, "no done after reset");
    repeat (2) @(posedge clk);
    #1 chk(done, 1'b0, "idle match gives no done");
    convert(0);
    convert(10);
    convert(126);
    // forbidden word
    start = 1'b1; load_zero = 1'b1;
    #1 chk(load, 1'b0, "no load of forbidden word");
    @(posedge clk) #1;
    start = 1'b0; load_zero = 1'b0;
    #1;
    chk(forbidden, 1'b1, "forbidden flag");
    chk(busy, 1'b0, "not busy after forbidden");
    chk(shift, 1'b0, "no shift after forbidden");
    convert(3);
    chk(forbidden, 1'b0, "forbidden cleared");
    // restart while busy
    start = 1'b1; state = INIT;
    @(posedge clk) #1;
    start = 1'b0; state = 7'd5;
    @(posedge clk) #1; @(posedge clk) #1;
    start = 1'b1;
    #1;
    chk(load, 1'b1, "restart loads");
    chk(shift, 1'b0, "restart does not shift");
    @(posedge clk) #1;
    start = 1'b0; state = INIT;
    #1 chk(done, 1'b1, "restart finishes");
    @(posedge clk) #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
