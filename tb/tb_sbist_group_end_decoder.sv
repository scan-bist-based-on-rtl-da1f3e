// tb_sbist_group_end_decoder: checks the Group-end decoder.
//
// Groups of lengths 4, 3, 1 and 2 columns (last columns 3, 6, 7, 9; the layout
// of the four position groups of a 9-column example, x-only group last). All
// 64 column values are applied; the output must be 1 exactly on those four.
module tb_sbist_group_end_decoder;

  localparam logic [4*6-1:0] ENDS = {6'd9, 6'd7, 6'd6, 6'd3};

  logic [5:0] col;
  logic       group_end;
  int         checks = 0, failures = 0;

  sbist_group_end_decoder #(.CW(6), .NG(4), .GROUP_ENDS(ENDS)) dut (.col, .group_end);

  initial begin
    for (int c = 0; c < 64; c++) begin
      bit e;
      col = 6'(c);
      #1;
      e = (c == 3 || c == 6 || c == 7 || c == 9);
      checks++;
      if (group_end !== e) begin failures++; $display("FAIL col %0d", c); end
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
