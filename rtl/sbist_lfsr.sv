// sbist_lfsr: the BIST pattern generator, an N-stage Fibonacci LFSR.
//
// Advances one step per cycle while `en` is high: the register shifts toward
// the MSB and the new LSB is q[N-1] ^ q[TAP-1]. The default polynomial is
// x^20 + x^17 + 1 (primitive, so the period is 2^20 - 1); the 20-stage size
// follows the reseeding experiments of the design, the polynomial and the
// reset seed are this design's choice. While `seed_shift` is high the register
// instead shifts `seed_in` into the LSB: N such cycles replace the whole state
// with a seed delivered serially by the tester (LFSR reseeding). `seed_shift`
// has priority over `en`. The full state is an output; the top takes the
// scan-chain data, the random row number and the flip bits from it.
module sbist_lfsr #(
  parameter int unsigned N    = 20,
  parameter int unsigned TAP  = 17,
  parameter logic [N-1:0] SEED = N'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         seed_shift,
  input  logic         seed_in,
  output logic [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          q <= SEED;
    else if (seed_shift) q <= {q[N-2:0], seed_in};
    else if (en)         q <= {q[N-2:0], q[N-1] ^ q[TAP-1]};
  end

endmodule
