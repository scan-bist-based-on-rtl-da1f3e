// tb_sbist_bit_counter_a: checks Bit counter A with CYCLES = 13.
//
// Counts with random gaps in `inc`, checks the column after every cycle, that
// End_A is high exactly at column 12, that the count wraps to 0 after it, and
// that Reset_A clears the count.
module tb_sbist_bit_counter_a;

  logic       clk = 1'b0, rst_n = 1'b0, reset_a = 1'b0, inc = 1'b0;
  logic [3:0] col;
  logic       end_a;
  int         checks = 0, failures = 0, model = 0, ends = 0;

  always #5 clk = ~clk;

  sbist_bit_counter_a #(.CYCLES(13)) dut (.clk, .rst_n, .reset_a, .inc, .col, .end_a);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      inc     = ($urandom % 4) != 0;
      reset_a = ($urandom % 60) == 0;
      checks += 2;
      if (col != 4'(model))        begin failures++; $display("FAIL col %0d exp %0d", col, model); end
      if (end_a != (model == 12))  begin failures++; $display("FAIL end_a at %0d", model); end
      if (end_a && inc && !reset_a) ends++;
      @(negedge clk);
      if (reset_a)  model = 0;
      else if (inc) model = (model == 12) ? 0 : model + 1;
    end
    checks++;
    if (ends == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
