// tb_sbist_session: stimulus and reference model for a whole BIST session on
// sbist_top, shared by the end-to-end testbenches.
//
// Runs the four stage settings in the order of a test session (pseudorandom,
// semirandom, deterministic by decoding, deterministic by reseeding) and then
// a second pseudorandom run; N1..N5 patterns respectively (NP each by
// default; a segment of 0 patterns is skipped). It plays the tester: in
// the decoding stage it builds random test cubes out of the stored sequences
// (random groups, sequence indices and flipped bits), encodes them into the
// bit stream the decoder expects, and serves that stream bit by bit whenever
// input_en is high; in the reseeding stage it serves random 20-bit seeds.
//
// Every scan cycle is compared against a reference model written from the
// architecture description, not from the RTL: an x^20 + x^17 + 1 Fibonacci
// LFSR, the phase-shifter tap formula, the ROM layout (row r, column c, bank b
// at bit (r*C + c)*M + b, zero past column C-1), the AND of LFSR bits 0, 6 and
// 13 as Flip_indication_R and LFSR bits 8.. as the random row. Each pattern is
// one check for its data and one for its length (CYCLES scan cycles). The
// `evt_*` inputs are used only to count how often each mechanism happened;
// a mechanism that never happened counts as a failure.
module tb_sbist_session #(
  parameter int unsigned L  = 64,
  parameter int unsigned M  = 1,
  parameter int unsigned R  = 4,
  parameter int unsigned C  = 40,
  parameter int unsigned NG = 4,
  parameter int unsigned CW = 6,
  parameter int unsigned NP = 6,
  parameter int unsigned N1 = NP,
  parameter int unsigned N2 = NP,
  parameter int unsigned N3 = NP,
  parameter int unsigned N4 = NP,
  parameter int unsigned N5 = NP
) (
  input  logic               clk,
  output logic               rst_n,
  output logic               run,
  output logic [1:0]         stage,
  output logic               data_in,
  input  logic               input_en,
  input  logic [M-1:0]       scan_in,
  input  logic               scan_en,
  input  logic               capture,
  input  logic [R*C*M-1:0]   rom,
  input  logic [NG*CW-1:0]   gends,
  input  logic               evt_rand_row,   // row loaded from the LFSR
  input  logic               evt_rand_flip,  // Flip_indication_R active in a shift
  output int                 checks,
  output int                 failures,
  output logic               done
);

  localparam int unsigned CYCLES = (L + M - 1) / M;
  localparam int unsigned CHW    = (M <= 1) ? 0 : $clog2(M);
  localparam int unsigned GW     = (NG <= 1) ? 0 : $clog2(NG);
  localparam int unsigned RW     = (R <= 2) ? 1 : $clog2(R);

  // ------------------------------------------------------------ model helpers
  function automatic logic [19:0] step(input logic [19:0] s);
    return {s[18:0], s[19] ^ s[16]};
  endfunction

  function automatic logic [M-1:0] ps_out(input logic [19:0] s);
    logic [M-1:0] o;
    for (int i = 0; i < M; i++)
      o[i] = (i == 0) ? s[19] : s[19 - (i % 20)] ^ s[(3 * i + 1) % 20] ^ s[(7 * i + 4) % 20];
    return o;
  endfunction

  function automatic logic [M-1:0] flip_r(input logic [19:0] s);
    logic [M-1:0] o;
    for (int i = 0; i < M; i++) o[i] = s[i % 20] & s[(i + 6) % 20] & s[(i + 13) % 20];
    return o;
  endfunction

  function automatic logic [M-1:0] rom_rd(input int r, input int c);
    logic [M-1:0] o = '0;
    if (c < int'(C)) for (int b = 0; b < M; b++) o[b] = rom[(r * C + c) * M + b];
    return o;
  endfunction

  function automatic int gstart(input int g);
    return (g == 0) ? 0 : int'(gends[(g - 1) * CW +: CW]) + 1;
  endfunction

  function automatic int gend(input int g);
    return int'(gends[g * CW +: CW]);
  endfunction

  function automatic bit is_gend(input int c);
    for (int g = 0; g < NG; g++) if (gend(g) == c) return 1'b1;
    return 1'b0;
  endfunction

  // ------------------------------------------------------------ tester stream
  bit       stream[$];
  int       rd;
  assign data_in = (rd < stream.size()) ? stream[rd] : 1'b0;

  task automatic push(input int v, input int w);
    for (int i = w - 1; i >= 0; i--) stream.push_back(v[i]);
  endtask

  // expected decoded patterns
  localparam int unsigned ND = (N3 == 0) ? 1 : N3;
  logic [M-1:0] exp_dec[ND][CYCLES];
  int n_multi_rec, n_multi_flip, n_same_cycle;

  task automatic build_decode();
    for (int p = 0; p < int'(N3); p++) begin
      int ng, grp[$], prev_g, row;
      // choose 1..3 distinct groups, increasing
      ng = 1 + ($urandom % 3);
      if (ng > int'(NG)) ng = NG;
      begin
        bit used[int];
        while (grp.size() < ng) begin
          int g = $urandom % NG;
          if (!used.exists(g)) begin used[g] = 1; grp.push_back(g); end
        end
        grp.sort();
      end
      if (ng > 1) n_multi_rec++;
      // base data: row 0 until the first selected group, then the row of
      // the last selected group
      begin
        int seqs[$];
        for (int k = 0; k < ng; k++) seqs.push_back($urandom % R);
        row = 0;
        for (int t = 0; t < int'(CYCLES); t++) begin
          for (int k = 0; k < ng; k++) if (t == gstart(grp[k])) row = seqs[k];
          exp_dec[p][t] = rom_rd(row, t);
        end
        prev_g = 0;
        for (int k = 0; k < ng; k++) begin
          int len, nf, cyc[$], chn[$], prev_c;
          len = gend(grp[k]) - gstart(grp[k]) + 1;
          nf  = 1 + ($urandom % 3);
          if (nf > len * int'(M)) nf = len * M;
          // distinct (cycle, chain) pairs in increasing order
          begin
            bit used2[int];
            int keys[$];
            while (keys.size() < nf) begin
              int key = ($urandom % len) * M + ($urandom % M);
              // with several chains, often flip two chains in one scan cycle
              if (M > 1 && keys.size() == 1 && ($urandom % 2))
                key = (keys[0] / M) * M + ((keys[0] % M) + 1) % M;
              if (!used2.exists(key)) begin used2[key] = 1; keys.push_back(key); end
            end
            keys.sort();
            foreach (keys[i]) begin
              cyc.push_back(keys[i] / M);
              chn.push_back(keys[i] % M);
            end
          end
          if (nf > 1) n_multi_flip++;
          // record header
          push((k == ng - 1) ? 1 : 0, 1);
          push((k == 0) ? grp[k] : grp[k] - prev_g, GW);
          push(seqs[k], RW);
          prev_c = 0;
          for (int f = 0; f < nf; f++) begin
            int t = gstart(grp[k]) + cyc[f];
            exp_dec[p][t][chn[f]] = ~exp_dec[p][t][chn[f]];
            if (f > 0 && cyc[f] == cyc[f-1]) n_same_cycle++;
            push((f == nf - 1) ? 1 : 0, 1);
            push((f == 0) ? cyc[f] : cyc[f] - prev_c, bcw);
            if (CHW > 0) push(chn[f], CHW);
            prev_c = cyc[f];
          end
          prev_g = grp[k];
        end
      end
    end
  endtask

  // width of the scan-cycle part of a bit field (longest group)
  int bcw;
  function automatic int calc_bcw();
    int mx = 0;
    for (int g = 0; g < NG; g++) if (gend(g) - gstart(g) + 1 > mx) mx = gend(g) - gstart(g) + 1;
    return (mx <= 2) ? 1 : $clog2(mx);
  endfunction

  // ------------------------------------------------------------ checking
  logic [19:0]  mq;
  logic [RW-1:0] mrow;
  int           t, pat, seg;
  bit           ok;
  int           n_pat[4], n_stall, n_dflip, n_zero_cols, n_rand_row, n_rand_flip;
  logic [1:0]   stage_seq[5] = '{2'd0, 2'd1, 2'd2, 2'd3, 2'd0};
  int           segn[5] = '{N1, N2, N3, N4, N5};

  // a bit is taken at every clock edge with input_en high
  bit took;
  always @(posedge clk) took <= rst_n && input_en;

  initial begin
    rst_n = 0; run = 0; stage = 0; rd = 0; done = 0;
    checks = 0; failures = 0; ok = 1; t = 0; pat = 0; seg = 0;
    n_multi_rec = 0; n_multi_flip = 0; n_same_cycle = 0;
    n_stall = 0; n_dflip = 0; n_zero_cols = 0; n_rand_row = 0; n_rand_flip = 0;
    n_pat = '{default: 0};
    mq = 20'd1; mrow = '0;
    #1;
    bcw = calc_bcw();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    stage = stage_seq[0];
    run   = 1;
  end

  // sampled between clock edges: the values the DUT acts on at the next edge
  always @(negedge clk) if (rst_n && run && !done) begin
    logic [M-1:0] exp;
    if (took) rd++;
    if (evt_rand_row)  n_rand_row++;
    if (evt_rand_flip) n_rand_flip++;
    if (stage == 2'd3 && input_en) mq = {mq[18:0], (rd < stream.size()) ? stream[rd] : 1'b0};
    if (stage == 2'd2 && !scan_en && !capture && t < int'(CYCLES)) n_stall++;
    if (scan_en) begin
      unique case (stage)
        2'd0, 2'd3: begin
          exp = ps_out(mq);
          mq  = step(mq);
        end
        2'd1: begin
          if (t == 0) mrow = mq[8 +: RW];
          exp = rom_rd(mrow, t) ^ flip_r(mq);
          if (t >= int'(C)) n_zero_cols++;
          if (is_gend(t)) mrow = mq[8 +: RW];
          mq = step(mq);
        end
        default: begin
          exp = exp_dec[pat % ND][t];
          if (exp != rom_rd(0, t)) n_dflip++;
        end
      endcase
      if (t >= int'(CYCLES) || scan_in !== exp) begin
        if (ok) $display("mismatch: stage %0d pattern %0d cycle %0d got %b expected %b",
                         stage, pat, t, scan_in, exp);
        ok = 0;
      end
      t++;
    end
    if (capture) begin
      checks += 2;
      if (!ok) failures++;
      if (t != int'(CYCLES)) begin
        failures++;
        $display("pattern length %0d, expected %0d", t, CYCLES);
      end
      n_pat[stage]++;
      ok = 1; t = 0; pat++;
      if (pat == segn[seg]) begin
        pat = 0;
        seg++;
        while (seg < 5 && segn[seg] == 0) seg++;
        if (seg == 5) begin
          run = 0;
          // every mechanism must have happened
          checks += 4;
          if (n_pat[0] != N1 + N5) begin failures++; $display("stage 1 patterns %0d", n_pat[0]); end
          if (n_pat[1] != N2) begin failures++; $display("stage 2 patterns %0d", n_pat[1]); end
          if (n_pat[2] != N3) begin failures++; $display("stage 3 patterns %0d", n_pat[2]); end
          if (n_pat[3] != N4) begin failures++; $display("reseeded patterns %0d", n_pat[3]); end
          if (N3 > 0) begin
            checks += 2;
            if (n_stall == 0)      begin failures++; $display("no decoder stall"); end
            if (n_dflip == 0)      begin failures++; $display("no decoded flip"); end
          end
          if (N3 > 2) begin
            checks += 2;
            if (n_multi_rec == 0)  begin failures++; $display("no multi-group pattern"); end
            if (n_multi_flip == 0) begin failures++; $display("no multi-flip record"); end
          end
          if (N2 > 0) begin
            checks += 2;
            if (n_rand_row == 0)   begin failures++; $display("no random row load"); end
            if (n_rand_flip == 0)  begin failures++; $display("no random flip"); end
            if (L > C * M) begin
              checks++;
              if (n_zero_cols == 0) begin failures++; $display("no column past C"); end
            end
          end
          if (M > 1 && N3 > 2) begin
            checks++;
            if (n_same_cycle == 0) begin failures++; $display("no same-cycle flips"); end
          end
          $display("patterns per stage %0d %0d %0d %0d, decoder stall cycles %0d, decoded flips %0d",
                   n_pat[0], n_pat[1], n_pat[2], n_pat[3], n_stall, n_dflip);
          $display("random row loads %0d, random flips %0d, multi-group patterns %0d, multi-flip records %0d, same-cycle flips %0d",
                   n_rand_row, n_rand_flip, n_multi_rec, n_multi_flip, n_same_cycle);
          done = 1;
        end else begin
          stage = stage_seq[seg];
          if (stage == 2'd2) begin
            stream.delete();
            rd = 0;
            build_decode();
          end
          if (stage == 2'd3) begin
            stream.delete();
            rd = 0;
            for (int i = 0; i < int'(N4) * 20; i++) stream.push_back($urandom % 2);
          end
        end
      end
    end
  end

endmodule
