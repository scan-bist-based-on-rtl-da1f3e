// tb_sbist_top_m4: end-to-end test of sbist_top with four scan chains.
//
// A small configuration (202 scan cells in 4 chains, i.e. 51 scan cycles with
// the last cycle partly filled, 6 groups over 40 ROM columns per bank) that
// exercises the multiple-chain datapath: four ROM banks read in parallel, the
// phase shifter, and bit indices whose low two bits select the chain,
// including several flips in the same scan cycle.
// tb_sbist_session plays the tester and checks every scan cycle of six
// patterns in each stage of a test session (pseudorandom, semirandom,
// deterministic by decoding, deterministic by reseeding, pseudorandom again)
// against its reference model, and checks that every mechanism of the design
// occurred. The ROM contents and group boundaries are read from the design
// instance. A watchdog ends the run with a failure if the session hangs.
module tb_sbist_top_m4;

  logic       clk = 1'b0;
  logic       rst_n, run, data_in, input_en, scan_en, capture, done;
  logic [1:0] stage;
  logic [TM-1:0] scan_in;
  int         checks, failures;

  always #5 clk = ~clk;

  // sizes of this configuration
  localparam int unsigned TL = 202, TM = 4, TR = 4, TC = 40, TNG = 6, TCW = 6;

  sbist_top #(.L(TL), .M(TM), .R(TR), .C(TC), .NG(TNG)) dut (
    .clk, .rst_n, .run, .stage, .data_in, .input_en, .scan_in, .scan_en, .capture);

  tb_sbist_session #(.L(TL), .M(TM), .R(TR), .C(TC), .NG(TNG), .CW(TCW), .NP(12)) u_session (
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
