// tb_sbist_data_input_counter: checks the Data input counter.
//
// Field widths 5 (group), 2 (sequence) and 6 (bit). Starts fields in random
// order (the reset arrives together with the flag bit that precedes a field,
// as in the decoder), feeds the field bits with random idle cycles, and checks
// that Zero_d is high on exactly the last bit of every field.
module tb_sbist_data_input_counter;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       reset_g, reset_s, reset_b, dec, zero_d;
  logic [2:0] count;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  sbist_data_input_counter #(.GW(5), .SW(2), .BW(6)) dut (
    .clk, .rst_n, .reset_g, .reset_s, .reset_b, .dec, .count, .zero_d);

  initial begin
    {reset_g, reset_s, reset_b, dec} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 60; f++) begin
      automatic int kind = $urandom % 3;
      automatic int w    = (kind == 0) ? 5 : (kind == 1) ? 2 : 6;
      reset_g = (kind == 0);
      reset_s = (kind == 1);
      reset_b = (kind == 2);
      dec     = 1'b1;        // the reset comes with the flag bit before the field
      @(negedge clk);
      {reset_g, reset_s, reset_b} = '0;
      for (int i = 0; i < w; i++) begin
        dec = 1'b0;
        repeat ($urandom % 3) begin
          @(negedge clk);
        end
        dec = 1'b1;
        checks++;
        if (zero_d !== (i == w - 1)) begin
          failures++;
          $display("FAIL field width %0d bit %0d zero_d %b", w, i, zero_d);
        end
        @(negedge clk);
      end
      dec = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
