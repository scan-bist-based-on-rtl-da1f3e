// tb_sbist_seq_rom: checks the sequence ROM for one and for four banks.
//
// Single bank: the sequences of the first group of a small example,
// "1001", "1010", "1011", "1111" in rows 0..3, columns 0..3, followed by a
// second group "010", "111" (rows 0, 1; rows 2, 3 zero) in columns 4..6. Four
// banks: random contents, checked against the layout (r*C + c)*M + b. Columns
// past C must read 0.
module tb_sbist_seq_rom;

  // row r, column c at bit r*7 + c
  function automatic logic [27:0] small_rom();
    string s[4] = '{"1001010", "1010111", "1011000", "1111000"};
    logic [27:0] v = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 7; c++) v[r * 7 + c] = (s[r][c] == "1");
    return v;
  endfunction

  localparam logic [27:0] ROM1 = small_rom();
  localparam logic [4*5*4-1:0] ROM4 = 80'h9F3C_51A7_0E2D_B864_C1F5;

  logic [1:0] row;
  logic [3:0] col;
  logic [0:0] d1;
  logic [3:0] d4;
  int         checks = 0, failures = 0;
  string      seqs[4] = '{"1001010", "1010111", "1011000", "1111000"};

  sbist_seq_rom #(.R(4), .C(7), .M(1), .CW(4), .ROM_DATA(ROM1)) dut1 (.row, .col, .dout(d1));
  sbist_seq_rom #(.R(4), .C(5), .M(4), .CW(4), .ROM_DATA(ROM4)) dut4 (.row, .col, .dout(d4));

  initial begin
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 16; c++) begin
        logic e1;
        logic [3:0] e4;
        row = 2'(r);
        col = 4'(c);
        #1;
        e1 = (c < 7) ? (seqs[r][c] == "1") : 1'b0;
        e4 = (c < 5) ? ROM4[(r * 5 + c) * 4 +: 4] : 4'b0;
        checks += 2;
        if (d1 !== e1) begin failures++; $display("FAIL 1-bank r%0d c%0d", r, c); end
        if (d4 !== e4) begin failures++; $display("FAIL 4-bank r%0d c%0d", r, c); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
