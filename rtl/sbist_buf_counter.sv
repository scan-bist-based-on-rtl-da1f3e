// sbist_buf_counter: down-counter with a serial-in buffer (pipeline stage).
//
// Used twice in the decoder: as the Group counter (counts group ends until
// the selected group is reached) and as Bit counter B (counts scan cycles
// until the next flipped bit). The buffer is a W-bit shift register filled
// MSB first from Data_in while `shift` is high, so the next value can be
// received while the counter is still counting the current one. `load`
// copies the buffer into the counter; `dec` decrements the counter, holding
// at 0. When both are high in the same cycle the counter takes buffer - 1
// (value loaded and the first step already taken; a buffer of 0 gives 0).
// `zero` is high while the count is 0.
module sbist_buf_counter #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         data_in,
  input  logic         load,
  input  logic         dec,
  output logic [W-1:0] count,
  output logic [W-1:0] buf_q,
  output logic         zero
);

  logic [W-1:0] base;

  assign zero = (count == '0);
  assign base = load ? buf_q : count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     count <= '0;
    else if (dec && base != '0)     count <= base - W'(1);
    else if (load || dec)           count <= base;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     buf_q <= '0;
    else if (shift) buf_q <= W'({buf_q, data_in});
  end

endmodule
