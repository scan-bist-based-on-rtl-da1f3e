// tb_sbist_top: end-to-end test of sbist_top at its default parameters
// (1636-cell single scan chain, 32 groups of 4 sequences, 475 ROM columns).
//
// tb_sbist_session plays the tester and checks every scan cycle of six
// patterns in each stage of a test session (pseudorandom, semirandom,
// deterministic by decoding, deterministic by reseeding, pseudorandom again)
// against its reference model, and checks that every mechanism of the design
// occurred. The ROM contents and group boundaries are read from the design
// instance. A watchdog ends the run with a failure if the session hangs.
module tb_sbist_top;

  logic       clk = 1'b0;
  logic       rst_n, run, data_in, input_en, scan_en, capture, done;
  logic [1:0] stage;
  logic [0:0] scan_in;
  int         checks, failures;

  always #5 clk = ~clk;

  sbist_top dut (
    .clk, .rst_n, .run, .stage, .data_in, .input_en, .scan_in, .scan_en, .capture);

  // the design's default sizes; checked against the instance below
  localparam int unsigned TL = 1636, TM = 1, TR = 4, TC = 475, TNG = 32, TCW = 11;

  tb_sbist_session #(.L(TL), .M(TM), .R(TR), .C(TC), .NG(TNG), .CW(TCW), .NP(6)) u_session (
    .clk, .rst_n, .run, .stage, .data_in, .input_en, .scan_in, .scan_en, .capture,
    .rom(dut.ROM_DATA), .gends(dut.GROUP_ENDS),
    .evt_rand_row(dut.u_fsm.load_r && dut.u_fsm.select_r && dut.u_fsm.scan_en),
    .evt_rand_flip(|dut.flip_r && dut.select_random && !dut.select_flip && dut.scan_en),
    .checks, .failures, .done);

  bit size_ok;
  initial begin
    #1 size_ok = (dut.L == TL && dut.M == TM && dut.R == TR && dut.C == TC &&
                  dut.NG == TNG && dut.CW == TCW);
    if (!size_ok) $display("design sizes differ from the testbench's");
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + (size_ok ? 0 : 1));
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: session did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
