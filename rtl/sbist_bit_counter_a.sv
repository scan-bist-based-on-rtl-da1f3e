// sbist_bit_counter_a: Bit counter A, the scan-cycle counter of a pattern.
//
// Counts the scan shift cycles of the current pattern, 0 .. CYCLES-1, and
// drives the ROM's Column_select with the count. End_A is high during the last
// shift cycle of the pattern (count == CYCLES-1). Reset_A clears the count
// (synchronously, with priority); `inc` advances it, wrapping to 0 after the
// last cycle. CYCLES is the scan-chain length divided by the number of chains,
// rounded up.
module sbist_bit_counter_a #(
  parameter int unsigned CYCLES = 1636,
  parameter int unsigned CW     = sbist_pkg::idx_w(CYCLES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          reset_a,
  input  logic          inc,
  output logic [CW-1:0] col,
  output logic          end_a
);

  assign end_a = (col == CW'(CYCLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       col <= '0;
    else if (reset_a) col <= '0;
    else if (inc)     col <= end_a ? '0 : col + CW'(1);
  end

endmodule
