// sbist_fsm: controller of the scan-BIST pattern source.
//
// Frames the patterns (shift CYCLES scan cycles, then one capture cycle) and
// drives the datapath for the stage selected by the 2-bit Stage input:
//   STAGE_PSEUDO  Select_random = 0: LFSR data goes to the scan chains.
//   STAGE_SEMI    Select_random = 1, Select_flip = 0: ROM XOR Flip_indication_R;
//                 at the start of a pattern and at every Group_end the
//                 Row-select register is loaded from the LFSR (Load_r, Select_r).
//   STAGE_DECODE  Select_random = 1, Select_flip = 1: ROM XOR Flip_indication_D,
//                 which this block decodes from the encoded stream on Data_in.
//   STAGE_RESEED  SEED_N seed bits are shifted from Data_in into the LFSR
//                 (seed_shift), then the pattern is shifted out of the LFSR as
//                 in stage 1.
//
// Encoded stream (stage 3). Per pattern, one or more group records:
//   [last-group flag][group field, GW][sequence index, RW]
// each followed by one or more flip entries:
//   [last-bit flag][bit field, BCW + CHW]
// all fields MSB first. The group field is the number of group ends until the
// selected group: for the first record of a pattern it is the group index
// itself, for later records the distance from the previous selected group
// (>= 1). The upper BCW bits of the bit field count scan cycles: for the first
// flip of a record from the first cycle of the group, for later flips from
// the previous flip's cycle (>= 1 with one chain; 0 is allowed with several
// chains and flips another chain in the same cycle). The low CHW = log2(M)
// bits select the scan chain. A record therefore always holds at least one
// flip.
//
// The Group counter is watched through its count: when a group end arrives
// with a count of 1, the selected group starts in the next cycle, so the row
// and Bit counter B are loaded on that same clock edge and the first bit of
// the group already uses them.
//
// Input parsing runs ahead of the scan: while the counters work on the
// current record, the next fields are shifted into the buffers of the Group
// counter, Row-select register and Bit counter B (Input_en = 1 while a bit is
// taken; the tester must present that bit on Data_in in the same cycle). When
// a value is needed before its buffer is full, the scan stalls (scan_en = 0)
// until it is. The data input counter tells when a field is complete.
//
// Stage may only change while run is low or during the capture cycle; an
// assertion checks this.
module sbist_fsm
  import sbist_pkg::*;
#(
  parameter int unsigned M      = 1,
  parameter int unsigned GW     = 5,   // group field width
  parameter int unsigned BCW    = 4,   // scan-cycle part of the bit field
  parameter int unsigned CHW    = sbist_pkg::field_w(M),
  parameter int unsigned DW     = 4,   // data input counter width
  parameter int unsigned SEED_N = 20
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run,
  input  stage_e         stage,
  input  logic           data_in,
  output logic           input_en,
  // Group counter
  output logic           shift_g,
  output logic           load_g,
  output logic           dec_g,
  input  logic [GW-1:0]  g_count,
  input  logic [GW-1:0]  g_buf,
  // Bit counter B
  output logic           shift_b,
  output logic           load_b,
  output logic           dec_b,
  input  logic           zero_b,
  input  logic [BCW-1:0] b_buf,
  // Data input counter
  output logic           reset_b,
  output logic           reset_g,
  output logic           reset_s,
  input  logic           zero_d,
  input  logic [DW-1:0]  d_count,
  // Row-select register
  output logic           reset_r,
  output logic           load_r,
  output logic           select_r,
  output logic           shift_r,
  // Bit counter A and group-end decoder
  output logic           reset_a,
  input  logic           end_a,
  input  logic           group_end,
  // datapath
  output logic           select_flip,
  output logic           select_random,
  output logic [M-1:0]   flip_d,
  output logic           lfsr_en,
  output logic           seed_shift,
  output logic           scan_en,
  output logic           capture
);

  localparam int unsigned CHX = (CHW == 0) ? 1 : CHW;
  localparam int unsigned SNW = $clog2(SEED_N + 1);

  typedef enum logic [2:0] {E_IDLE, E_START, E_SEED, E_SHIFT, E_CAPTURE} estate_e;
  typedef enum logic [2:0] {P_LG, P_G, P_R, P_LB, P_B} pstate_e;

  estate_e        es, es_n;
  pstate_e        ps, ps_n;

  // parser side: flags and buffer-full bits
  logic           lg_buf, lb_buf;
  logic [CHX-1:0] ch_buf;
  logic           g_valid, r_valid, b_valid;
  logic           set_g, set_r, set_b;
  logic           take_g, take_r, take_b;
  logic           shift_ch;

  // engine side: state of the record being applied
  logic           cur_lg, cur_lb;
  logic [CHX-1:0] cur_ch;
  logic           armed, wait_g;
  logic           armed_n, wait_g_n, cur_lg_n, cur_lb_n;
  logic [CHX-1:0] cur_ch_n;
  logic [M-1:0]   flip_acc, flip_acc_n;
  logic [SNW-1:0] seed_cnt;

  logic           decoding;
  logic           p_in_en;

  assign input_en = p_in_en | seed_shift;
  assign decoding = (stage == STAGE_DECODE);

  function automatic logic [M-1:0] onehot(input logic [CHX-1:0] ch);
    return (CHW == 0) ? M'(1) : (M'(1) << ch);
  endfunction

  // ---------------------------------------------------------------- parser
  always_comb begin
    ps_n     = ps;
    p_in_en  = 1'b0;
    shift_g  = 1'b0;
    shift_r  = 1'b0;
    shift_b  = 1'b0;
    shift_ch = 1'b0;
    reset_g  = 1'b0;
    reset_s  = 1'b0;
    reset_b  = 1'b0;
    set_g    = 1'b0;
    set_r    = 1'b0;
    set_b    = 1'b0;
    if (run && decoding) begin
      unique case (ps)
        P_LG: if (!g_valid) begin
          p_in_en  = 1'b1;
          reset_g  = 1'b1;
          ps_n     = P_G;
        end
        P_G: begin
          p_in_en  = 1'b1;
          shift_g  = 1'b1;
          if (zero_d) begin
            set_g   = 1'b1;
            reset_s = 1'b1;
            ps_n    = P_R;
          end
        end
        P_R: if (!r_valid) begin
          p_in_en  = 1'b1;
          shift_r  = 1'b1;
          if (zero_d) begin
            set_r = 1'b1;
            ps_n  = P_LB;
          end
        end
        P_LB: if (!b_valid) begin
          p_in_en  = 1'b1;
          reset_b  = 1'b1;
          ps_n     = P_B;
        end
        P_B: begin
          p_in_en  = 1'b1;
          if (int'(d_count) >= int'(CHW)) shift_b  = 1'b1;
          else                            shift_ch = 1'b1;
          if (zero_d) begin
            set_b = 1'b1;
            ps_n  = lb_buf ? P_LG : P_LB;
          end
        end
        default: ps_n = P_LG;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ps      <= P_LG;
      lg_buf  <= 1'b0;
      lb_buf  <= 1'b0;
      ch_buf  <= '0;
      g_valid <= 1'b0;
      r_valid <= 1'b0;
      b_valid <= 1'b0;
    end else if (!decoding) begin
      ps      <= P_LG;
      g_valid <= 1'b0;
      r_valid <= 1'b0;
      b_valid <= 1'b0;
    end else begin
      ps <= ps_n;
      if (ps == P_LG && p_in_en) lg_buf <= data_in;
      if (ps == P_LB && p_in_en) lb_buf <= data_in;
      if (shift_ch)               ch_buf <= CHX'({ch_buf, data_in});
      g_valid <= set_g | (g_valid & ~take_g);
      r_valid <= set_r | (r_valid & ~take_r);
      b_valid <= set_b | (b_valid & ~take_b);
    end
  end

  // ---------------------------------------------------------------- engine
  always_comb begin
    es_n          = es;
    load_g        = 1'b0;
    dec_g         = 1'b0;
    load_b        = 1'b0;
    dec_b         = 1'b0;
    reset_r       = 1'b0;
    load_r        = 1'b0;
    select_r      = 1'b0;
    reset_a       = 1'b0;
    select_flip   = 1'b0;
    select_random = 1'b0;
    flip_d        = '0;
    lfsr_en       = 1'b0;
    seed_shift    = 1'b0;
    scan_en       = 1'b0;
    capture       = 1'b0;
    take_g        = 1'b0;
    take_r        = 1'b0;
    take_b        = 1'b0;
    armed_n       = armed;
    wait_g_n      = wait_g;
    cur_lg_n      = cur_lg;
    cur_lb_n      = cur_lb;
    cur_ch_n      = cur_ch;
    flip_acc_n    = flip_acc;

    unique case (es)
      E_IDLE: if (run) es_n = E_START;

      E_START: begin
        reset_a    = 1'b1;
        armed_n    = 1'b0;
        wait_g_n   = 1'b0;
        flip_acc_n = '0;
        if (!run) es_n = E_IDLE;
        else unique case (stage)
          STAGE_PSEUDO: es_n = E_SHIFT;
          STAGE_SEMI: begin
            load_r   = 1'b1;
            select_r = 1'b1;
            es_n     = E_SHIFT;
          end
          STAGE_RESEED: es_n = E_SEED;
          default: begin  // STAGE_DECODE: take the first group record
            reset_r = 1'b1;
            if (g_valid && (g_buf != '0 || (r_valid && b_valid))) begin
              load_g   = 1'b1;
              take_g   = 1'b1;
              cur_lg_n = lg_buf;
              if (g_buf == '0) begin
                reset_r  = 1'b0;  // the selected group is group 0
                load_r   = 1'b1;
                load_b   = 1'b1;
                take_r   = 1'b1;
                take_b   = 1'b1;
                cur_ch_n = ch_buf;
                cur_lb_n = lb_buf;
                armed_n  = 1'b1;
              end else begin
                wait_g_n = 1'b1;
              end
              es_n = E_SHIFT;
            end
          end
        endcase
      end

      E_SEED: begin
        seed_shift = 1'b1;  // Data_in goes straight into the LFSR
        if (seed_cnt == SNW'(SEED_N - 1)) es_n = E_SHIFT;
      end

      E_SHIFT: begin
        if (stage != STAGE_DECODE) begin
          scan_en       = 1'b1;
          lfsr_en       = 1'b1;
          select_random = (stage == STAGE_SEMI);
          if (stage == STAGE_SEMI && group_end) begin
            load_r   = 1'b1;
            select_r = 1'b1;
          end
        end else begin
          select_random = 1'b1;
          select_flip   = 1'b1;
          if (armed && zero_b) begin
            // a flipped bit falls in this scan cycle
            if (!cur_lb) begin
              if (b_valid) begin
                load_b   = 1'b1;
                take_b   = 1'b1;
                cur_ch_n = ch_buf;
                cur_lb_n = lb_buf;
                if (b_buf == '0) begin
                  // another chain in the same scan cycle: collect, no shift
                  flip_acc_n = flip_acc | onehot(cur_ch);
                end else begin
                  dec_b      = 1'b1;
                  scan_en    = 1'b1;
                  flip_d     = flip_acc | onehot(cur_ch);
                  flip_acc_n = '0;
                end
              end
            end else if (cur_lg) begin
              // last flip of the last record of this pattern
              armed_n    = 1'b0;
              scan_en    = 1'b1;
              flip_d     = flip_acc | onehot(cur_ch);
              flip_acc_n = '0;
            end else if (g_valid &&
                         !(group_end && g_buf == GW'(1) && !(r_valid && b_valid))) begin
              // last flip of this record: take the next group record
              load_g     = 1'b1;
              take_g     = 1'b1;
              cur_lg_n   = lg_buf;
              armed_n    = 1'b0;
              wait_g_n   = 1'b1;
              scan_en    = 1'b1;
              flip_d     = flip_acc | onehot(cur_ch);
              flip_acc_n = '0;
              if (group_end) begin
                dec_g = 1'b1;
                if (g_buf == GW'(1)) begin
                  load_r   = 1'b1;
                  load_b   = 1'b1;
                  take_r   = 1'b1;
                  take_b   = 1'b1;
                  cur_ch_n = ch_buf;
                  cur_lb_n = lb_buf;
                  armed_n  = 1'b1;
                  wait_g_n = 1'b0;
                end
              end
            end
          end else if (wait_g && group_end && g_count == GW'(1)) begin
            // the selected group starts with the next scan cycle
            if (r_valid && b_valid) begin
              dec_g    = 1'b1;
              load_r   = 1'b1;
              load_b   = 1'b1;
              take_r   = 1'b1;
              take_b   = 1'b1;
              cur_ch_n = ch_buf;
              cur_lb_n = lb_buf;
              armed_n  = 1'b1;
              wait_g_n = 1'b0;
              scan_en  = 1'b1;
            end
          end else begin
            scan_en = 1'b1;
            if (wait_g && group_end) dec_g = 1'b1;
            if (armed)               dec_b = 1'b1;
          end
        end
        if (scan_en && end_a) es_n = E_CAPTURE;
      end

      E_CAPTURE: begin
        capture = 1'b1;
        es_n    = run ? E_START : E_IDLE;
      end

      default: es_n = E_IDLE;
    endcase
  end

  // usage rules: the stage is held while a pattern is being loaded and
  // shifted, and flips are only produced in shift cycles
  a_stage_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (es == E_SEED || es == E_SHIFT) |-> $stable(stage))
    else $error("stage changed in the middle of a pattern");
  a_flip_in_shift: assert property (@(posedge clk) disable iff (!rst_n)
    (|flip_d) |-> scan_en)
    else $error("flip outside a shift cycle");
  a_one_load: assert property (@(posedge clk) disable iff (!rst_n)
    !(set_g && take_g) && !(set_r && take_r) && !(set_b && take_b))
    else $error("buffer filled and emptied in the same cycle");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      es       <= E_IDLE;
      armed    <= 1'b0;
      wait_g   <= 1'b0;
      cur_lg   <= 1'b0;
      cur_lb   <= 1'b0;
      cur_ch   <= '0;
      flip_acc <= '0;
      seed_cnt <= '0;
    end else begin
      es       <= es_n;
      armed    <= armed_n;
      wait_g   <= wait_g_n;
      cur_lg   <= cur_lg_n;
      cur_lb   <= cur_lb_n;
      cur_ch   <= cur_ch_n;
      flip_acc <= flip_acc_n;
      seed_cnt <= (es == E_SEED) ? seed_cnt + SNW'(1) : '0;
    end
  end

endmodule
