// tb_sbist_fsm: directed test of the controller on the nine-cell example.
//
// The design is configured for a 9-cell scan chain whose cells are grouped
// as positions {1,2,3,7}, {4,5,6}, {8} and {0} (the last group is never
// specified and is not stored). The ROM holds the extracted sequences
// "1001", "1010", "1011", "1111" for the first group and "010", "111" for the
// second, "1" for the third. The cube x000011x1 is then encoded as
// sequence(0,0) flip(0), sequence(1,0) flip(2), i.e. the 16-bit stream
// 0 00 00 1 00 1 01 00 1 10, which is served on Data_in.
//
// Checks: the decoded scan data is 0001 011 1 0 (group order), the input
// parser has taken all 16 bits of each pattern and is at most one record
// ahead when the pattern is captured, the pattern is 9 shift cycles long and
// followed by one capture cycle, the whole pattern (including the initial
// wait for the first record) takes at most 16 + 9 + 2 cycles; the same cube
// applied three times in a row gives the same data (the input parser runs
// ahead into the next pattern's record); then one pseudorandom and one
// semirandom pattern check the stage multiplexing and that the row is
// reloaded at the start and at each group end in stage 2.
module tb_sbist_fsm;

  function automatic logic [31:0] rom_init();
    // row r, column c at bit r*8 + c; columns: group 0 = 0..3, 1 = 4..6, 2 = 7
    string s[4] = '{"10010101", "10101110", "10110000", "11110000"};
    logic [31:0] v = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 8; c++) v[r * 8 + c] = (s[r][c] == "1");
    return v;
  endfunction

  localparam logic [31:0] ROM  = rom_init();
  localparam logic [15:0] ENDS = {4'd8, 4'd7, 4'd6, 4'd3};

  logic       clk = 1'b0, rst_n = 1'b0, run = 1'b0, data_in;
  logic [1:0] stage = 2'd2;
  logic       input_en, scan_en, capture;
  logic [0:0] scan_in;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  sbist_top #(.L(9), .M(1), .R(4), .C(8), .NG(4), .GROUP_ENDS(ENDS), .ROM_DATA(ROM)) dut (
    .clk, .rst_n, .run, .stage, .data_in, .input_en, .scan_in, .scan_en, .capture);

  // Fig.-4-style stream, three times
  localparam logic [15:0] ENC = 16'b0_00_00_1_00_1_01_00_1_10;
  int rd = 0;
  assign data_in = (rd < 48) ? ENC[15 - (rd % 16)] : 1'b0;
  always @(posedge clk) if (input_en) rd <= rd + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // collect one pattern: scan data, shift count, cycles until capture
  logic [8:0] got;
  int         nsh, ncyc;
  task automatic get_pattern();
    got = '0; nsh = 0; ncyc = 0;
    forever begin
      @(negedge clk);
      ncyc++;
      if (scan_en) begin
        if (nsh < 9) got[nsh] = scan_in[0];
        nsh++;
      end
      if (capture) break;
    end
  endtask

  int loads;
  always @(posedge clk) if (dut.load_r && dut.select_r) loads <= loads + 1;

  initial begin
    loads = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run = 1'b1;
    for (int p = 0; p < 3; p++) begin
      get_pattern();
      check(got == 9'b0_1_110_1000, $sformatf("decoded pattern %0d: %b", p, got));
      check(nsh == 9, "decoded pattern length");
      if (p == 0) check(ncyc <= 16 + 9 + 2, $sformatf("first pattern took %0d cycles", ncyc));
      // the parser may be at most one record (16 bits) ahead
      check(rd >= 16 * (p + 1) && rd <= 16 * (p + 2), $sformatf("input bits taken %0d", rd));
    end
    // stage 1
    stage = 2'd0;
    get_pattern();
    check(nsh == 9, "pseudorandom pattern length");
    // stage 2: row reloads at the start and at the group ends in columns 3, 6, 7, 8
    stage = 2'd1;
    loads = 0;
    get_pattern();
    check(nsh == 9, "semirandom pattern length");
    check(loads == 5, $sformatf("random row loads %0d", loads));
    run = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
