// sbist_seq_rom: on-chip store of the extracted sequences.
//
// An R x C bit matrix per scan chain (M banks). Row r of a group holds the
// r-th extracted sequence of that group; groups occupy consecutive columns.
// With M chains, bank b, column j holds the sequence bit that is shifted into
// chain b in scan cycle j of the group region, so one read returns the M bits
// of one scan cycle. Bit (row r, column c, bank b) is ROM_DATA[(r*C + c)*M + b].
// Column_select may exceed C-1 (scan positions that belong to no group); the
// ROM then outputs 0. The read is combinational.
module sbist_seq_rom #(
  parameter int unsigned R  = 4,
  parameter int unsigned C  = 475,
  parameter int unsigned M  = 1,
  parameter int unsigned RW = sbist_pkg::idx_w(R),
  parameter int unsigned CW = 11,
  parameter logic [R*C*M-1:0] ROM_DATA = '0
) (
  input  logic [RW-1:0] row,
  input  logic [CW-1:0] col,
  output logic [M-1:0]  dout
);

  always_comb begin
    dout = '0;
    if (int'(col) < int'(C) && int'(row) < int'(R))
      dout = ROM_DATA[(int'(row) * int'(C) + int'(col)) * int'(M) +: M];
  end

endmodule
