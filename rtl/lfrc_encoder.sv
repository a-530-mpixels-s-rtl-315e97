// lfrc_encoder: lossless compression of one partition with DPCM-based semi-fixed-length coding.
//
// Each Y, Cb and Cr block is DPCM-scanned (left neighbour, or the sample above in column 0);
// its top-left sample is kept as an 8-bit start point F. The residuals are grouped in 2x2
// sub-blocks; the smallest mode M whose range holds the sub-block's maximum and minimum residual
// is chosen, every residual is coded in M bits (D), and one trailing bit T per sub-block
// gives the sign of residuals of magnitude 2^(M-1). Field layout: see lfrc_pkg. When the
// coded size reaches 384 bits the partition is passed on uncompressed with length 384.
//
// Interface: in_* carries one uncompressed partition (valid/ready); out_* returns the coded
// bits (LSB first, zero above out_len) and the length in bits.
// Timing: two register stages (mode decision, then packing); one partition per cycle, so the
// 3 pixels/cycle needed for 4096x2160@60fps at 175 MHz are met with margin. A stalled output
// holds the whole pipeline.
module lfrc_encoder
  import lfrc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [PART_BITS-1:0] in_part,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [PART_BITS-1:0] out_data,
  output logic [LEN_W-1:0]     out_len
);

  // ---------------- stage A: DPCM, mode decision, residual codes -------------------------
  logic [8:0]  code_c [NSAMP];
  logic [2:0]  mode_c [NSUB];
  logic        tneed_c[NSUB];
  logic        tbit_c [NSUB];

  always_comb begin
    int signed r [4];
    int signed mx, mn, hi;
    logic [2:0] m;
    code_c  = '{default: '0};
    mode_c  = '{default: '0};
    tneed_c = '{default: 1'b0};
    tbit_c  = '{default: 1'b0};
    r  = '{default: 0};
    hi = 0;
    for (int sb = 0; sb < NSUB; sb++) begin
      mx = -1000; mn = 1000;
      for (int j = 0; j < 4; j++) begin
        int unsigned n, i, pi;
        n = sb * 4 + j;
        i = samp_idx(n);
        pi = pred_idx(i);
        if (pi == 255) r[j] = 0;
        else r[j] = int'(in_part[8*i +: 8]) - int'(in_part[8*pi +: 8]);
        if (!is_f_pos(n)) begin
          if (r[j] > mx) mx = r[j];
          if (r[j] < mn) mn = r[j];
        end
      end
      // smallest mode whose range [-2^(m-1), 2^(m-1)] holds the sub-block, one sign only at
      // the extreme magnitude
      m = 3'd7;
      if (mx == 0 && mn == 0) m = 3'd0;
      else begin
        for (int k = 6; k >= 1; k--) begin
          hi = 1 << (k - 1);
          if (mx <= hi && mn >= -hi && !(mx == hi && mn == -hi)) m = 3'(k);
        end
      end
      mode_c[sb]  = m;
      for (int j = 0; j < 4; j++) begin
        int unsigned n;
        n = sb * 4 + j;
        code_c[n] = 9'(r[j]);
        if (m != 3'd0 && m != 3'd7 && !is_f_pos(n)) begin
          hi = 1 << (m - 1);
          if (r[j] == hi || r[j] == -hi) begin
            code_c[n]   = 9'(hi);     // 100..0 in m bits
            tneed_c[sb] = 1'b1;
            tbit_c[sb]  = (r[j] > 0);
          end
        end
      end
    end
  end

  logic                 a_valid;
  logic [PART_BITS-1:0] a_part;
  logic [8:0]           a_code [NSAMP];
  logic [2:0]           a_mode [NSUB];
  logic                 a_tneed[NSUB];
  logic                 a_tbit [NSUB];
  logic                 adv_a, adv_b;

  assign adv_b    = !out_valid || out_ready;
  assign adv_a    = !a_valid || adv_b;
  assign in_ready = adv_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a_valid <= 1'b0;
    else if (adv_a) a_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (adv_a && in_valid) begin
      a_part  <= in_part;
      a_code  <= code_c;
      a_mode  <= mode_c;
      a_tneed <= tneed_c;
      a_tbit  <= tbit_c;
    end
  end

  // ---------------- stage B: bit packing -------------------------------------------------
  logic [STREAM_W-1:0] stream_c;
  int unsigned         len_c;

  always_comb begin
    int unsigned pos;
    stream_c = '0;
    stream_c[7:0]   = a_part[8*0  +: 8];
    stream_c[15:8]  = a_part[8*32 +: 8];
    stream_c[23:16] = a_part[8*40 +: 8];
    for (int sb = 0; sb < NSUB; sb++) stream_c[24 + 3*sb +: 3] = a_mode[sb];
    pos = FM_BITS;
    for (int n = 0; n < NSAMP; n++) begin
      int unsigned w;
      w = dwidth(a_mode[n / 4]);
      if (!is_f_pos(n) && w != 0) begin
        stream_c = stream_c | (STREAM_W'(a_code[n] & 9'((1 << w) - 1)) << pos);
        pos = pos + w;
      end
    end
    for (int sb = 0; sb < NSUB; sb++) begin
      if (a_tneed[sb]) begin
        stream_c = stream_c | (STREAM_W'(a_tbit[sb]) << pos);
        pos = pos + 1;
      end
    end
    len_c = pos;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else if (adv_b) out_valid <= a_valid;
  end

  always_ff @(posedge clk) begin
    if (adv_b && a_valid) begin
      if (len_c >= PART_BITS) begin
        out_data <= a_part;
        out_len  <= LEN_W'(PART_BITS);
      end else begin
        out_data <= stream_c[PART_BITS-1:0];
        out_len  <= LEN_W'(len_c);
      end
    end
  end

endmodule
