// sbist_phase_shifter: spreads the LFSR state over M scan-chain inputs.
//
// Output 0 is the LFSR's serial output q[N-1], so a single scan chain receives
// the plain LFSR sequence. Output i > 0 is the XOR of three LFSR stages,
// q[N-1-i], q[(3*i+1) % N] and q[(7*i+4) % N]; the tap choice is this design's
// own, the only requirement being that neighbouring chains do not receive
// shifted copies of the same sequence. Purely combinational.
module sbist_phase_shifter #(
  parameter int unsigned N = 20,
  parameter int unsigned M = 4
) (
  input  logic [N-1:0] q,
  output logic [M-1:0] out
);

  for (genvar i = 0; i < M; i++) begin : g_out
    if (i == 0) begin : g_ser
      assign out[i] = q[N-1];
    end else begin : g_xor
      localparam int unsigned A = (N - 1 - (i % N));
      localparam int unsigned B = ((3 * i + 1) % N);
      localparam int unsigned C = ((7 * i + 4) % N);
      assign out[i] = q[A] ^ q[B] ^ q[C];
    end
  end

endmodule
