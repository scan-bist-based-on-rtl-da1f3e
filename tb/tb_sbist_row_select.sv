// tb_sbist_row_select: checks the Row-select register and its buffer.
//
// Random Shift_r / Load_r / Select_r / Reset_r traffic against a model: the
// buffer takes Data_in MSB first, Load_r takes the LFSR number or the buffer,
// Reset_r clears the row and wins over Load_r.
module tb_sbist_row_select;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       reset_r, load_r, select_r, shift_r, data_in;
  logic [2:0] rnd, row, buf_q, m_row, m_buf;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  sbist_row_select #(.RW(3)) dut (.clk, .rst_n, .reset_r, .load_r, .select_r, .shift_r,
                                  .data_in, .rnd, .row, .buf_q);

  initial begin
    {reset_r, load_r, select_r, shift_r, data_in, rnd} = '0;
    m_row = '0; m_buf = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      reset_r  = ($urandom % 16) == 0;
      load_r   = ($urandom % 3) == 0;
      select_r = $urandom % 2;
      shift_r  = $urandom % 2;
      data_in  = $urandom % 2;
      rnd      = 3'($urandom);
      @(negedge clk);
      if (reset_r)     m_row = '0;
      else if (load_r) m_row = select_r ? rnd : m_buf;
      if (shift_r)     m_buf = {m_buf[1:0], data_in};
      checks += 2;
      if (row !== m_row)   begin failures++; $display("FAIL row %0d exp %0d", row, m_row); end
      if (buf_q !== m_buf) begin failures++; $display("FAIL buf %0d exp %0d", buf_q, m_buf); end
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
