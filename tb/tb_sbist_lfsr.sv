// tb_sbist_lfsr: checks the 20-stage LFSR.
//
// Compares 3000 steps against a reference built from the characteristic
// polynomial x^20 + x^17 + 1 as a Galois-free bit recurrence
// b[n] = b[n-20] ^ b[n-17] on the serial output, checks that `en` low holds
// the state, that 20 seed cycles load an arbitrary seed (and take priority
// over `en`), and that the sequence from the reset seed does not return to it
// within 2^16 steps (the full period is 2^20 - 1).
module tb_sbist_lfsr;

  logic        clk = 1'b0, rst_n = 1'b0, en = 1'b0, seed_shift = 1'b0, seed_in = 1'b0;
  logic [19:0] q;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  sbist_lfsr dut (.clk, .rst_n, .en, .seed_shift, .seed_in, .q);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit hist[$];
  logic [19:0] seed, start;
  bit back;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(q == 20'd1, "reset seed");
    // serial history: the state is the last 20 output bits, q[19] oldest
    for (int i = 19; i >= 0; i--) hist.push_back(q[i]);
    en = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      hist.push_back(hist[hist.size() - 20] ^ hist[hist.size() - 17]);
      if (n % 100 == 0 || n > 2990) begin
        logic [19:0] e;
        for (int i = 0; i < 20; i++) e[i] = hist[hist.size() - 1 - i];
        check(q == e, $sformatf("step %0d", n));
      end
    end
    en = 1'b0;
    start = q;
    repeat (5) @(negedge clk);
    check(q == start, "hold with en low");
    seed = 20'hA5C3E;
    en = 1'b1;
    seed_shift = 1'b1;
    for (int i = 19; i >= 0; i--) begin
      seed_in = seed[i];
      @(negedge clk);
    end
    seed_shift = 1'b0;
    check(q == seed, "serial seed load");
    @(negedge clk);
    check(q == {seed[18:0], seed[19] ^ seed[16]}, "first step after seed");
    // no short cycle from an arbitrary state
    start = q;
    back = 1'b0;
    for (int n = 0; n < 65536; n++) begin
      @(negedge clk);
      if (q == start || q == '0) back = 1'b1;
    end
    check(!back, "period longer than 2^16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
