// sbist_data_input_counter: counts the bits of the field arriving on Data_in.
//
// The encoded stream is a sequence of fields of three widths: a group index
// (GW bits), a sequence index (SW bits) and a bit index (BW bits). Reset_g,
// Reset_s and Reset_b start a field by loading width-1; every accepted input
// bit (`dec`) counts down by one. Zero_d is high while the count is 0, i.e.
// during the last bit of the field, which tells the controller that the
// buffer being filled is complete after this cycle. `count` is also an
// output: with several scan chains the controller uses it to route the low
// bits of a bit index to the chain-select buffer.
module sbist_data_input_counter #(
  parameter int unsigned GW = 5,
  parameter int unsigned SW = 2,
  parameter int unsigned BW = 4,
  parameter int unsigned DW = $clog2(((GW > SW ? GW : SW) > BW ? (GW > SW ? GW : SW) : BW) + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          reset_g,
  input  logic          reset_s,
  input  logic          reset_b,
  input  logic          dec,
  output logic [DW-1:0] count,
  output logic          zero_d
);

  assign zero_d = (count == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 count <= '0;
    else if (reset_g)           count <= DW'(GW - 1);
    else if (reset_s)           count <= DW'(SW - 1);
    else if (reset_b)           count <= DW'(BW - 1);
    else if (dec && !zero_d)    count <= count - DW'(1);
  end

endmodule
