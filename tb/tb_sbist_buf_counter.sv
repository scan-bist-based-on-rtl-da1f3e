// tb_sbist_buf_counter: checks the buffered down-counter (Group counter and
// Bit counter B).
//
// Random shift / load / dec traffic against a model: buffer filled MSB first,
// load copies the buffer, dec counts down and holds at 0, load with dec gives
// buffer - 1, zero flags a count of 0.
module tb_sbist_buf_counter;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       shift, data_in, load, dec, zero;
  logic [4:0] count, buf_q, m_cnt, m_buf;
  int         checks = 0, failures = 0, zeros = 0;

  always #5 clk = ~clk;

  sbist_buf_counter #(.W(5)) dut (.clk, .rst_n, .shift, .data_in, .load, .dec,
                                  .count, .buf_q, .zero);

  initial begin
    {shift, data_in, load, dec} = '0;
    m_cnt = '0; m_buf = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      shift   = $urandom % 2;
      data_in = $urandom % 2;
      load    = ($urandom % 8) == 0;
      dec     = ($urandom % 3) != 0;
      @(negedge clk);
      begin
        automatic logic [4:0] base = load ? m_buf : m_cnt;
        if (dec) m_cnt = (base == 0) ? 5'd0 : base - 5'd1;
        else     m_cnt = base;
      end
      if (shift) m_buf = {m_buf[3:0], data_in};
      checks += 3;
      if (count !== m_cnt)        begin failures++; $display("FAIL count %0d exp %0d", count, m_cnt); end
      if (buf_q !== m_buf)        begin failures++; $display("FAIL buf %0d exp %0d", buf_q, m_buf); end
      if (zero !== (m_cnt == 0))  begin failures++; $display("FAIL zero"); end
      if (zero) zeros++;
    end
    checks++;
    if (zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
