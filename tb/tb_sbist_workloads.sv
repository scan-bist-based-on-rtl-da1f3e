// tb_sbist_workloads: full test sessions in the sizes of two evaluated
// circuits, run side by side.
//
// A: the default configuration (s38417 shape: 1636 scan cells, 32 groups of
//    4 sequences, 475 ROM columns): 10,000 pseudorandom patterns, 10,000
//    semirandom patterns, then 71 deterministic patterns decoded from the
//    stored sequences, the numbers of the s38417 experiment.
// B: an s5378-sized configuration (179 scan cells, 8 groups, 136 stored bits
//    = 4 rows x 34 columns): 10,000 pseudorandom, 10,000 semirandom, 3 decoded
//    and 3 reseeded deterministic patterns (60 seed bits).
// The ROM contents are the design's stand-in data and the deterministic cubes
// are random, so this measures that the sessions run and are applied
// correctly (every scan cycle is checked by tb_sbist_session), not fault
// coverage. Prints the cycle count and the encoded-stream length of each run.
module tb_sbist_workloads;

  logic       clk = 1'b0;
  always #5 clk = ~clk;

  // ------------------------------------------------------------ A: s38417
  logic       a_rst_n, a_run, a_data_in, a_input_en, a_scan_en, a_capture, a_done;
  logic [1:0] a_stage;
  logic [0:0] a_scan_in;
  int         a_checks, a_failures;

  sbist_top dut_a (
    .clk, .rst_n(a_rst_n), .run(a_run), .stage(a_stage), .data_in(a_data_in),
    .input_en(a_input_en), .scan_in(a_scan_in), .scan_en(a_scan_en), .capture(a_capture));

  tb_sbist_session #(.L(1636), .M(1), .R(4), .C(475), .NG(32), .CW(11),
                     .N1(10000), .N2(10000), .N3(71), .N4(0), .N5(0)) u_a (
    .clk, .rst_n(a_rst_n), .run(a_run), .stage(a_stage), .data_in(a_data_in),
    .input_en(a_input_en), .scan_in(a_scan_in), .scan_en(a_scan_en), .capture(a_capture),
    .rom(dut_a.ROM_DATA), .gends(dut_a.GROUP_ENDS),
    .evt_rand_row(dut_a.u_fsm.load_r && dut_a.u_fsm.select_r && dut_a.u_fsm.scan_en),
    .evt_rand_flip(|dut_a.flip_r && dut_a.select_random && !dut_a.select_flip && dut_a.scan_en),
    .checks(a_checks), .failures(a_failures), .done(a_done));

  // ------------------------------------------------------------ B: s5378
  localparam int unsigned BL = 179, BNG = 8, BC = 34;
  logic       b_rst_n, b_run, b_data_in, b_input_en, b_scan_en, b_capture, b_done;
  logic [1:0] b_stage;
  logic [0:0] b_scan_in;
  int         b_checks, b_failures;

  sbist_top #(.L(BL), .NG(BNG), .C(BC)) dut_b (
    .clk, .rst_n(b_rst_n), .run(b_run), .stage(b_stage), .data_in(b_data_in),
    .input_en(b_input_en), .scan_in(b_scan_in), .scan_en(b_scan_en), .capture(b_capture));

  tb_sbist_session #(.L(BL), .M(1), .R(4), .C(BC), .NG(BNG), .CW(8),
                     .N1(10000), .N2(10000), .N3(3), .N4(3), .N5(0)) u_b (
    .clk, .rst_n(b_rst_n), .run(b_run), .stage(b_stage), .data_in(b_data_in),
    .input_en(b_input_en), .scan_in(b_scan_in), .scan_en(b_scan_en), .capture(b_capture),
    .rom(dut_b.ROM_DATA), .gends(dut_b.GROUP_ENDS),
    .evt_rand_row(dut_b.u_fsm.load_r && dut_b.u_fsm.select_r && dut_b.u_fsm.scan_en),
    .evt_rand_flip(|dut_b.flip_r && dut_b.select_random && !dut_b.select_flip && dut_b.scan_en),
    .checks(b_checks), .failures(b_failures), .done(b_done));

  longint cyc = 0, a_cyc = 0, b_cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!a_done) a_cyc = cyc;
    if (!b_done) b_cyc = cyc;
  end

  initial begin
    wait (a_done && b_done);
    $display("s38417-sized session: %0d cycles, %0d encoded bits", a_cyc, u_a.stream.size());
    $display("s5378-sized session: %0d cycles", b_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks, a_failures + b_failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks, a_failures + b_failures + 1);
    $finish;
  end

endmodule
