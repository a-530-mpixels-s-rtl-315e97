// lfrc_decompress_core: 5-stage pipelined restoration of semi-fixed-length coded partitions.
//
// A partition is accepted whole and decoded as three 4x4 units (luma left, luma right,
// Cb over Cr), one unit of 16 samples per cycle, i.e. 3 cycles per partition and 10.7 pixels
// per cycle. Stages, following the published 5-stage organisation:
//   1 latch the F (start points), M (modes) and D&T parts of the partition;
//   2 barrel shifters split the unit's D bits to its four 2x2 sub-blocks;
//   3 sub-blocks are split to residual codes, which are decoded independently;
//   4 trailing bits T give the sign of residuals of magnitude 2^(M-1);
//   5 inverse DPCM rebuilds the samples.
// The bit layout is defined in lfrc_pkg. An uncompressed partition (in_raw) bypasses decoding.
//
// Interface: in_valid/in_ready with in_data (coded bits, LSB first) and in_raw; out_valid /
// out_ready with out_unit (0..2) and out_samples, sample (row r, column c) of the unit at
// bits [8*(4*r+c) +: 8]. Unit 2 rows 0-1 are Cb, rows 2-3 Cr.
// Timing: first unit 4 cycles after the partition is accepted; a new partition every 3 cycles.
// A stalled output holds every stage.
module lfrc_decompress_core
  import lfrc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [PART_BITS-1:0] in_data,
  input  logic                 in_raw,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [1:0]           out_unit,
  output logic [127:0]         out_samples
);

  logic adv;
  assign adv = !out_valid || out_ready;

  // ---------------- stage 1: partition latch, unit issue ---------------------------------
  logic                 s1_valid, s1_raw;
  logic [1:0]           s1_k;
  logic [PART_BITS-1:0] s1_data;
  logic                 s1_last;

  assign s1_last  = s1_valid && (s1_k == 2'd2);
  assign in_ready = adv && (!s1_valid || s1_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_k     <= '0;
    end else if (adv) begin
      if (!s1_valid || s1_last) begin
        s1_valid <= in_valid;
        s1_k     <= '0;
      end else begin
        s1_k <= s1_k + 2'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_ready && in_valid) begin
      s1_data <= in_data;
      s1_raw  <= in_raw;
    end
  end

  // ---------------- stage 2 logic: unit and sub-block D split -----------------------------
  logic [2:0]   m_all [NSUB];
  logic [35:0]  sbd_c [4];
  logic [2:0]   sbm_c [4];
  logic [11:0]  t_c;
  logic [127:0] rawu_c;

  logic [5:0] dlen [NSUB];   // D bits of each sub-block

  always_comb begin
    int unsigned off_u, tot, off_s;
    logic [PART_BITS-1:0] unit_bits;
    for (int sb = 0; sb < NSUB; sb++) begin
      m_all[sb] = s1_data[24 + 3*sb +: 3];
      dlen[sb]  = 6'(dwidth(m_all[sb]) * nres(sb));
    end
    off_u = 0; tot = 0;
    for (int sb = 0; sb < NSUB; sb++) begin
      if (sb < 4 * int'(s1_k)) off_u = off_u + 32'(dlen[sb]);
      tot = tot + 32'(dlen[sb]);
    end
    unit_bits = s1_data >> (FM_BITS + off_u);
    t_c       = 12'(s1_data >> (FM_BITS + tot));
    off_s = 0;
    for (int s = 0; s < 4; s++) begin
      sbd_c[s] = 36'(unit_bits >> off_s);
      sbm_c[s] = m_all[4 * int'(s1_k) + s];
      off_s = off_s + 32'(dlen[4 * int'(s1_k) + s]);
    end
    for (int q = 0; q < 16; q++) begin
      int unsigned lr, lc, sb4, j;
      lr = q / 4; lc = q % 4;
      sb4 = (lr / 2) * 2 + lc / 2;
      j   = (lr % 2) * 2 + lc % 2;
      rawu_c[8*q +: 8] = s1_data[8 * samp_idx(16 * int'(s1_k) + 4 * sb4 + j) +: 8];
    end
  end

  logic         s2_valid, s2_raw;
  logic [1:0]   s2_k;
  logic [35:0]  s2_sbd [4];
  logic [2:0]   s2_m   [4];
  logic [11:0]  s2_t;
  logic [23:0]  s2_f;
  logic [127:0] s2_rawu;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_valid <= 1'b0;
    else if (adv) s2_valid <= s1_valid;
  end
  always_ff @(posedge clk) begin
    if (adv) begin
      s2_k    <= s1_k;
      s2_raw  <= s1_raw;
      s2_sbd  <= sbd_c;
      s2_m    <= sbm_c;
      s2_t    <= t_c;
      s2_f    <= s1_data[23:0];
      s2_rawu <= rawu_c;
    end
  end

  // ---------------- stage 3 logic: residual split and decode -----------------------------
  logic [8:0] res3_c [16];   // indexed 4*sub + j
  logic       ext3_c [16];

  always_comb begin
    int unsigned off, w;
    logic [8:0] code;
    code = '0;
    for (int s = 0; s < 4; s++) begin
      off = 0;
      w = dwidth(s2_m[s]);
      for (int j = 0; j < 4; j++) begin
        res3_c[4*s + j] = '0;
        ext3_c[4*s + j] = 1'b0;
        if (!is_f_pos(16 * int'(s2_k) + 4 * s + j) && w != 0) begin
          code = 9'(s2_sbd[s] >> off) & 9'((1 << w) - 1);
          off  = off + w;
          if (w == 9) begin
            res3_c[4*s + j] = code;
          end else if (code == 9'(1 << (w - 1))) begin
            res3_c[4*s + j] = code;                 // magnitude, sign from T
            ext3_c[4*s + j] = 1'b1;
          end else if (code[w - 1]) begin
            res3_c[4*s + j] = code | ~9'((1 << w) - 1);
          end else begin
            res3_c[4*s + j] = code;
          end
        end
      end
    end
  end

  logic         s3_valid, s3_raw;
  logic [1:0]   s3_k;
  logic [8:0]   s3_res [16];
  logic         s3_ext [16];
  logic [11:0]  s3_t;
  logic [23:0]  s3_f;
  logic [127:0] s3_rawu;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s3_valid <= 1'b0;
    else if (adv) s3_valid <= s2_valid;
  end
  always_ff @(posedge clk) begin
    if (adv) begin
      s3_k    <= s2_k;
      s3_raw  <= s2_raw;
      s3_res  <= res3_c;
      s3_ext  <= ext3_c;
      s3_t    <= s2_t;
      s3_f    <= s2_f;
      s3_rawu <= s2_rawu;
    end
  end

  // ---------------- stage 4 logic: trailing bit compensation -----------------------------
  logic [3:0] tacc;          // T bits used by earlier units of this partition
  logic [3:0] tnext_c;
  logic [8:0] res4_c [16];

  always_comb begin
    logic [3:0] tp;
    logic       any, sgn;
    tp = (s3_k == 2'd0) ? 4'd0 : tacc;
    for (int s = 0; s < 4; s++) begin
      any = 1'b0;
      for (int j = 0; j < 4; j++) any = any | s3_ext[4*s + j];
      sgn = s3_t[tp];
      for (int j = 0; j < 4; j++) begin
        if (s3_ext[4*s + j]) res4_c[4*s + j] = sgn ? s3_res[4*s + j] : (9'd0 - s3_res[4*s + j]);
        else                 res4_c[4*s + j] = s3_res[4*s + j];
      end
      if (any) tp = tp + 4'd1;
    end
    tnext_c = tp;
  end

  logic         s4_valid, s4_raw;
  logic [1:0]   s4_k;
  logic [8:0]   s4_res [16];
  logic [23:0]  s4_f;
  logic [127:0] s4_rawu;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s4_valid <= 1'b0;
      tacc     <= '0;
    end else if (adv) begin
      s4_valid <= s3_valid;
      if (s3_valid) tacc <= tnext_c;
    end
  end
  always_ff @(posedge clk) begin
    if (adv) begin
      s4_k    <= s3_k;
      s4_raw  <= s3_raw;
      s4_res  <= res4_c;
      s4_f    <= s3_f;
      s4_rawu <= s3_rawu;
    end
  end

  // ---------------- stage 5 logic: inverse DPCM ------------------------------------------
  logic [7:0]   ycol3 [4];   // right column of the last luma-left unit
  logic [7:0]   p_c [4][4];
  logic [127:0] samp_c;

  always_comb begin
    logic [7:0] rg [4][4];
    for (int s = 0; s < 4; s++)
      for (int j = 0; j < 4; j++)
        rg[(s / 2) * 2 + j / 2][(s % 2) * 2 + j % 2] = s4_res[4*s + j][7:0];
    for (int r = 0; r < 4; r++) begin
      if (s4_k == 2'd1)      p_c[r][0] = ycol3[r] + rg[r][0];
      else if (s4_k == 2'd0) p_c[r][0] = (r == 0) ? s4_f[7:0] : p_c[r-1][0] + rg[r][0];
      else if (r == 0)       p_c[r][0] = s4_f[15:8];
      else if (r == 2)       p_c[r][0] = s4_f[23:16];
      else                   p_c[r][0] = p_c[r-1][0] + rg[r][0];
      for (int c = 1; c < 4; c++) p_c[r][c] = p_c[r][c-1] + rg[r][c];
    end
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        samp_c[8*(4*r + c) +: 8] = s4_raw ? s4_rawu[8*(4*r + c) +: 8] : p_c[r][c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else if (adv) out_valid <= s4_valid;
  end
  always_ff @(posedge clk) begin
    if (adv && s4_valid) begin
      out_unit    <= s4_k;
      out_samples <= samp_c;
      if (s4_k == 2'd0)
        for (int r = 0; r < 4; r++) ycol3[r] <= samp_c[8*(4*r + 3) +: 8];
    end
  end

endmodule
