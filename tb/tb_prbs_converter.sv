// tb_prbs_converter -- end-to-end test of the seven-bit converter at its
// default parameters.
//
// Reference: the table of code words by position is built here from the
// serial (Fibonacci) form of the same sequence, independently of the Galois
// register: position 0 is the initial word 1110010 (x7..x1) and one shift
// x(k+1) <= x(k), x(1) <= x(4)^x(5)^x(6)^x(7) takes the word at position p
// to the word at p-1. Reading one more track bit into x(7) is the inverse
// step, so walking the track raises the position by one per bit.
//
// Phases:
//   A  the initial word itself (p = 0, zero-shift conversion)
//   B  walks the whole track, bit by bit, through all 127 positions and
//      back to 0, converting each; checks position, latency p+1, and for
//      p = 10 the ten published register states 1100110 ... 1110111
//   C  random words assembled with gaps in bit_strobe, with track bits read
//      while the conversion runs
//   D  the forbidden all-zero word
//   E  a new convert while a conversion is running
// Each mechanism (load, shift, stop, zero-shift and longest conversion,
// forbidden word, restart, reading during conversion) is counted; one that
// never happens counts as a failure.
module tb_prbs_converter;
  localparam int unsigned N = 7;
  localparam int unsigned PERIOD = 127;

  logic clk = 1'b0;
  logic rst_n, bit_strobe, head_bit, convert;
  logic [N-1:0] code_word, position;
  logic done, busy, forbidden;
  int checks = 0, failures = 0;

  prbs_converter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] words [PERIOD];
  int n_load = 0, n_shift = 0, n_stop = 0, n_zero = 0, n_longest = 0;
  int n_forbidden = 0, n_restart = 0, n_read_busy = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.load)  n_load++;
      if (dut.shift) n_shift++;
      if (done)      n_stop++;
      if (bit_strobe && busy) n_read_busy++;
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic tick();
    @(posedge clk) #1;
  endtask

  task automatic read_bit(logic b);
    bit_strobe = 1'b1; head_bit = b;
    tick();
    bit_strobe = 1'b0;
  endtask

  // Assemble a whole word: x(1) first, x(7) last.
  task automatic read_word(logic [N-1:0] w, bit gaps);
    for (int k = 0; k < N; k++) begin
      if (gaps) repeat ($urandom_range(0, 2)) tick();
      read_bit(w[k]);
    end
  endtask

  // Convert the current word; expect position p after p+1 clocks.
  task automatic run_convert(int p, bit read_during);
    int clocks = 0;
    convert = 1'b1;
    tick();
    convert = 1'b0;
    #1;
    clocks = 1;
    while (!done && clocks < 200) begin
      if (read_during && clocks == 3) begin
        bit_strobe = 1'b1; head_bit = 1'($urandom);
      end
      tick();
      bit_strobe = 1'b0;
      clocks++;
    end
    chk(done === 1'b1, $sformatf("p=%0d: done seen", p));
    chk(position === N'(p), $sformatf("p=%0d: position %0d", p, position));
    chk(clocks == p + 1, $sformatf("p=%0d: latency %0d clocks", p, clocks));
    if (p == 0) n_zero++;
    if (p == PERIOD - 1) n_longest++;
    tick();
    chk(done === 1'b0 && busy === 1'b0, $sformatf("p=%0d: idle after done", p));
    chk(position === N'(p), $sformatf("p=%0d: position held", p));
  endtask

  logic [N-1:0] paper_states [10] = '{
    7'b1100110, 7'b1000011, 7'b0001001, 7'b0010010, 7'b0100100,
    7'b1001000, 7'b0011111, 7'b0111110, 7'b1111100, 7'b1110111};

  initial begin
    logic [N-1:0] w, f;
    int r;
    // reference table and its properties
    words[0] = 7'b1110010;
    for (int p = 1; p < PERIOD; p++) begin
      w = words[p-1];
      words[p] = {w[0] ^ w[4] ^ w[5] ^ w[6], w[6:1]};
    end
    for (int p = 0; p < PERIOD; p++) begin
      w = words[p];
      f = {w[5:0], w[3] ^ w[4] ^ w[5] ^ w[6]};
      chk(f == words[(p + PERIOD - 1) % PERIOD], $sformatf("table step at %0d", p));
      chk(w != '0, "table has no zero word");
    end
    chk(words[10] == 7'b0110001, "published example word is at p = 10");

    rst_n = 1'b0; bit_strobe = 1'b0; head_bit = 1'b0; convert = 1'b0;
    tick(); tick();
    rst_n = 1'b1;
    chk(busy === 1'b0 && done === 1'b0, "idle after reset");

    // A: the initial word
    read_word(words[0], 1'b0);
    chk(code_word === words[0], "assembled initial word");
    run_convert(0, 1'b0);

    // B: walk the track through every position and back to 0
    for (int p = 1; p <= PERIOD; p++) begin
      w = words[p % PERIOD];
      read_bit(w[N-1]);
      chk(code_word === w, $sformatf("assembled word at p=%0d", p));
      if (p == 10) begin
        convert = 1'b1;
        tick();
        convert = 1'b0;
        #1;
        chk(dut.reg_state === 7'b0110011, "published adjusted word 0110011");
        for (int i = 0; i < 10; i++) begin
          chk(done === 1'b0, "no early stop in example");
          tick();
          chk(dut.reg_state === paper_states[i], $sformatf("example state %0d", i + 1));
        end
        chk(done === 1'b1 && position === 7'd10, "example stops with p = 10");
        tick();
      end else begin
        run_convert(p % PERIOD, 1'b0);
      end
    end

    // C: random words, with bits read during the conversion
    for (int i = 0; i < 40; i++) begin
      r = $urandom_range(0, PERIOD - 1);
      read_word(words[r], 1'b1);
      run_convert(r, (i % 2) == 1);
    end

    // D: forbidden word
    read_word('0, 1'b0);
    convert = 1'b1;
    tick();
    convert = 1'b0;
    #1;
    chk(forbidden === 1'b1 && busy === 1'b0, "forbidden word flagged, no conversion");
    if (forbidden) n_forbidden++;
    repeat (5) begin
      tick();
      chk(done === 1'b0 && busy === 1'b0, "forbidden word: stays idle");
    end
    read_word(words[77], 1'b0);
    run_convert(77, 1'b0);
    chk(forbidden === 1'b0, "forbidden flag cleared by next conversion");

    // E: restart while busy
    read_word(words[120], 1'b0);
    convert = 1'b1;
    tick();
    convert = 1'b0;
    #1;
    repeat (20) tick();
    chk(busy === 1'b1, "long conversion still busy");
    read_word(words[33], 1'b0);
    if (busy) n_restart++;
    run_convert(33, 1'b0);

    $display("mechanisms: load=%0d shift=%0d stop=%0d zero_shift=%0d longest=%0d forbidden=%0d restart=%0d read_during=%0d",
             n_load, n_shift, n_stop, n_zero, n_longest, n_forbidden, n_restart, n_read_busy);
    chk(n_load > 0, "load happened");
    chk(n_shift > 0, "shift happened");
    chk(n_stop > 0, "stop happened");
    chk(n_zero > 0, "zero-shift conversion happened");
    chk(n_longest > 0, "longest conversion happened");
    chk(n_forbidden > 0, "forbidden word happened");
    chk(n_restart > 0, "restart happened");
    chk(n_read_busy > 0, "reading during conversion happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
