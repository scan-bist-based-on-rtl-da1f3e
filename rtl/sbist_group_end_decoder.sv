// sbist_group_end_decoder: marks the last column of every group of the ROM.
//
// The stored sequences occupy columns 0 .. C-1 of the ROM, cut into NG groups
// of consecutive columns. GROUP_ENDS packs the last column of each group,
// group g in bits [g*CW +: CW], in increasing order. The output is 1 exactly
// when Column_select equals one of these columns and 0 otherwise (also for
// columns past the last group). Purely combinational logic, as in the
// architecture; the group boundaries are a property of the stored data.
module sbist_group_end_decoder #(
  parameter int unsigned CW = 11,
  parameter int unsigned NG = 32,
  parameter logic [NG*CW-1:0] GROUP_ENDS = '0
) (
  input  logic [CW-1:0] col,
  output logic          group_end
);

  always_comb begin
    group_end = 1'b0;
    for (int unsigned g = 0; g < NG; g++)
      if (col == GROUP_ENDS[g*CW +: CW]) group_end = 1'b1;
  end

endmodule
