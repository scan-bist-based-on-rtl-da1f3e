// tb_sbist_phase_shifter: checks the phase shifter for 4 and 1 chains.
//
// Drives random LFSR states and compares each output with the tap formula:
// chain 0 is q[19]; chain i > 0 is q[19-i] ^ q[3i+1] ^ q[7i+4] (indices mod
// 20). Also checks that the four outputs are not all equal over the run.
module tb_sbist_phase_shifter;

  logic [19:0] q;
  logic [3:0]  o4;
  logic [0:0]  o1;
  int          checks = 0, failures = 0, differ = 0;

  sbist_phase_shifter #(.N(20), .M(4)) dut4 (.q, .out(o4));
  sbist_phase_shifter #(.N(20), .M(1)) dut1 (.q, .out(o1));

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [3:0] e;
      q = 20'($urandom);
      #1;
      e[0] = q[19];
      for (int i = 1; i < 4; i++) e[i] = q[19 - i] ^ q[(3 * i + 1) % 20] ^ q[(7 * i + 4) % 20];
      checks += 2;
      if (o4 !== e)     begin failures++; $display("FAIL q=%h got %b exp %b", q, o4, e); end
      if (o1 !== q[19]) begin failures++; $display("FAIL single chain"); end
      if (o4 != 4'b0000 && o4 != 4'b1111) differ++;
    end
    checks++;
    if (differ == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
