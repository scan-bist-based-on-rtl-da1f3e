// sbist_top: scan-BIST pattern source built around stored repeating sequences.
//
// Produces the scan-in data of a full-scan circuit for a three-stage test
// session selected by `stage` (encoding in sbist_pkg):
//   1. pseudorandom: the LFSR output (through the phase shifter) feeds the
//      scan chains (MUX I input 0);
//   2. semirandom: each group of scan positions receives one of the R stored
//      sequences of that group, picked by a random row number from the LFSR,
//      XORed with Flip_indication_R, the AND of three LFSR bits (about one bit
//      in eight is flipped);
//   3. deterministic: the tester streams a compact encoding (group, sequence
//      and bit indices, see sbist_fsm) on data_in and the stored sequences are
//      XORed with the decoded Flip_indication_D; alternatively (STAGE_RESEED)
//      the tester streams a 20-bit LFSR seed per pattern and the pattern is the
//      LFSR's expansion of it.
// The stored sequences sit in sbist_seq_rom, an R x C matrix per chain; the
// groups are consecutive column ranges whose last columns are GROUP_ENDS.
//
// Interface: `scan_in[M-1:0]` is valid in every cycle with `scan_en` high and
// must be shifted into the M scan chains in that cycle; after CYCLES such
// cycles `capture` is high for one cycle (the capture clock of the circuit
// under test), then the next pattern starts. In stage 3 the scan may pause
// (scan_en low) while data is still arriving; `input_en` high means data_in
// is taken in that cycle. `run` starts and stops pattern generation; `stage`
// may change only while run is low or in the capture cycle.
//
// Defaults follow the s38417 configuration: a 1636-cell single scan chain
// (11-bit column select), 4 sequences per group, 32 groups and 1899 stored
// bits, rounded up here to C = 475 columns. The ROM contents and the group
// boundaries are the output of an offline sequence-extraction flow for a given
// circuit and test set; the defaults below (even group split, pseudorandom
// contents) only stand in for such data and should be overridden.
module sbist_top
  import sbist_pkg::*;
#(
  parameter int unsigned L        = 1636,  // scan cells in all chains
  parameter int unsigned M        = 1,     // scan chains (ROM banks)
  parameter int unsigned R        = 4,     // sequences per group (ROM rows)
  parameter int unsigned C        = 475,   // ROM columns per bank
  parameter int unsigned NG       = 32,    // groups
  parameter int unsigned LFSR_N   = 20,
  parameter int unsigned LFSR_TAP = 17,
  parameter int unsigned CYCLES   = (L + M - 1) / M,
  parameter int unsigned CW       = idx_w(CYCLES),
  parameter logic [NG*CW-1:0]  GROUP_ENDS = even_ends(),
  parameter logic [R*C*M-1:0]  ROM_DATA   = filler_rom()
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  input  logic [1:0]   stage,
  input  logic         data_in,
  output logic         input_en,
  output logic [M-1:0] scan_in,
  output logic         scan_en,
  output logic         capture
);

  // last column of each of NG equally long groups over C columns
  function automatic logic [NG*CW-1:0] even_ends();
    logic [NG*CW-1:0] v = '0;
    for (int unsigned g = 0; g < NG; g++)
      v[g*CW +: CW] = CW'(((g + 1) * C) / NG - 1);
    return v;
  endfunction

  // stand-in ROM contents: a pseudorandom bit string
  function automatic logic [R*C*M-1:0] filler_rom();
    logic [R*C*M-1:0] v = '0;
    logic [15:0] s = 16'hACE1;
    for (int unsigned k = 0; k < R * C * M; k++) begin
      s    = {s[14:0], s[15] ^ s[13] ^ s[12] ^ s[10]};
      v[k] = s[0];
    end
    return v;
  endfunction

  // longest group, in scan cycles
  function automatic int unsigned max_group();
    int unsigned mx = 0, prev = 0, len;
    for (int unsigned g = 0; g < NG; g++) begin
      len  = int'(GROUP_ENDS[g*CW +: CW]) + 1 - prev;
      prev = int'(GROUP_ENDS[g*CW +: CW]) + 1;
      if (len > mx) mx = len;
    end
    return mx;
  endfunction

  localparam int unsigned GW  = field_w(NG);
  localparam int unsigned RW  = idx_w(R);
  localparam int unsigned BCW = idx_w(max_group());
  localparam int unsigned CHW = field_w(M);
  localparam int unsigned BFW = BCW + CHW;
  localparam int unsigned DMX = (GW > RW ? GW : RW) > BFW ? (GW > RW ? GW : RW) : BFW;
  localparam int unsigned DW  = $clog2(DMX + 1);

  // ---------------------------------------------------------------- wiring
  logic [LFSR_N-1:0] q;
  logic [M-1:0]      lfsr_bits, flip_r, flip_d, flip, rom_out;
  logic [RW-1:0]     row, row_buf;
  logic [CW-1:0]     col;
  logic              end_a, reset_a, group_end;
  logic              shift_g, load_g, dec_g, zero_g;
  logic [GW-1:0]     g_count, g_buf;
  logic              shift_b, load_b, dec_b, zero_b;
  logic [BCW-1:0]    b_count, b_buf;
  logic              reset_b, reset_g, reset_s, zero_d;
  logic [DW-1:0]     d_count;
  logic              reset_r, load_r, select_r, shift_r;
  logic              select_flip, select_random, lfsr_en, seed_shift;

  sbist_lfsr #(.N(LFSR_N), .TAP(LFSR_TAP)) u_lfsr (
    .clk, .rst_n, .en(lfsr_en), .seed_shift, .seed_in(data_in), .q);

  sbist_phase_shifter #(.N(LFSR_N), .M(M)) u_ps (.q, .out(lfsr_bits));

  // Flip_indication_R: AND of three LFSR bits per chain
  for (genvar i = 0; i < M; i++) begin : g_flip_r
    assign flip_r[i] = q[i % LFSR_N] & q[(i + 6) % LFSR_N] & q[(i + 13) % LFSR_N];
  end

  sbist_bit_counter_a #(.CYCLES(CYCLES), .CW(CW)) u_cnt_a (
    .clk, .rst_n, .reset_a, .inc(scan_en), .col, .end_a);

  sbist_group_end_decoder #(.CW(CW), .NG(NG), .GROUP_ENDS(GROUP_ENDS)) u_ged (
    .col, .group_end);

  sbist_seq_rom #(.R(R), .C(C), .M(M), .RW(RW), .CW(CW), .ROM_DATA(ROM_DATA)) u_rom (
    .row, .col, .dout(rom_out));

  sbist_row_select #(.RW(RW)) u_row (
    .clk, .rst_n, .reset_r, .load_r, .select_r, .shift_r, .data_in,
    .rnd(q[8 % LFSR_N +: RW]), .row, .buf_q(row_buf));

  sbist_buf_counter #(.W(GW)) u_grp_cnt (
    .clk, .rst_n, .shift(shift_g), .data_in, .load(load_g), .dec(dec_g),
    .count(g_count), .buf_q(g_buf), .zero(zero_g));

  sbist_buf_counter #(.W(BCW)) u_bit_cnt_b (
    .clk, .rst_n, .shift(shift_b), .data_in, .load(load_b), .dec(dec_b),
    .count(b_count), .buf_q(b_buf), .zero(zero_b));

  sbist_data_input_counter #(.GW(GW), .SW(RW), .BW(BFW), .DW(DW)) u_din_cnt (
    .clk, .rst_n, .reset_g, .reset_s, .reset_b, .dec(input_en), .count(d_count), .zero_d);

  sbist_fsm #(.M(M), .GW(GW), .BCW(BCW), .CHW(CHW), .DW(DW), .SEED_N(LFSR_N)) u_fsm (
    .clk, .rst_n, .run, .stage(stage_e'(stage)), .data_in, .input_en,
    .shift_g, .load_g, .dec_g, .g_count, .g_buf,
    .shift_b, .load_b, .dec_b, .zero_b, .b_buf,
    .reset_b, .reset_g, .reset_s, .zero_d, .d_count,
    .reset_r, .load_r, .select_r, .shift_r,
    .reset_a, .end_a, .group_end,
    .select_flip, .select_random, .flip_d, .lfsr_en, .seed_shift,
    .scan_en, .capture);

  // MUX II, XOR and MUX I
  assign flip    = select_flip ? flip_d : flip_r;
  assign scan_in = select_random ? (rom_out ^ flip) : lfsr_bits;

endmodule
