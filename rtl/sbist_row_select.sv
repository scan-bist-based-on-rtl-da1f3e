// sbist_row_select: Row-select register with its input buffer.
//
// `row` addresses the ROM, i.e. picks one stored sequence of the current
// group. The buffer is a shift register filled MSB first from Data_in while
// Shift_r is high, so the next sequence index can arrive while the current
// row is in use. Load_r copies either the LFSR's random number (Select_r = 1,
// semirandom stage) or the buffer (Select_r = 0, decoding stage) into the
// row register. Reset_r clears the row register; it has priority over Load_r.
module sbist_row_select #(
  parameter int unsigned RW = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          reset_r,
  input  logic          load_r,
  input  logic          select_r,
  input  logic          shift_r,
  input  logic          data_in,
  input  logic [RW-1:0] rnd,
  output logic [RW-1:0] row,
  output logic [RW-1:0] buf_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       row <= '0;
    else if (reset_r) row <= '0;
    else if (load_r)  row <= select_r ? rnd : buf_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       buf_q <= '0;
    else if (shift_r) buf_q <= RW'({buf_q, data_in});
  end

endmodule
