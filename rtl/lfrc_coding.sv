// lfrc_coding: VCR-LFRC coding component placed after the deblocking filter.
//
// Deblocked partitions arrive group by group (the 4 partitions of a group, top to bottom,
// tagged with destination frame buffer and group position). Each is compressed by lfrc_encoder;
// the coded partitions of a group are packed back to back into a group buffer (at most 12
// words). When the group is complete its used words are written to the group's fixed slot
// (end-aligned for even group rows, start-aligned for odd ones, see lfrc_addr_translate) and
// its 32-bit length record {raw3, L3 in words, L2, L1, L0} is written with a byte mask into the
// length word shared by a 2x2 array of groups.
//
// Interface: in_* valid/ready partition input; DRAM write master (mem_*); stat_* pulses.
// Timing: the encoder takes one partition per cycle; a group then spends one cycle per used
// data word plus one for the length record on the bus, so a group of 4 partitions needs 4 to
// 17 cycles against the 43 cycles per group available at 4096x2160@60fps, 175 MHz.
// The record and mapping follow the published memory mapping; the write order and the
// single-word write bursts are this design's own choices.
module lfrc_coding
  import lfrc_pkg::*;
  import dram_pkg::dram_req_t;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [dram_pkg::ADDR_W-1:0] cfg_data_base [16],
  input  logic [dram_pkg::ADDR_W-1:0] cfg_len_base  [16],
  input  logic [9:0]  cfg_groups_per_row,
  input  logic [6:0]  cfg_lines_per_row,
  input  logic        in_valid,
  output logic        in_ready,
  input  preq_t       in_tag,
  input  logic [PART_BITS-1:0] in_part,
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output dram_req_t   mem_req,
  output logic        stat_group_done,
  output logic        stat_raw_part
);
  // side information travels in a queue next to the encoder
  logic  enc_in_ready, enc_out_valid, enc_out_ready;
  logic  tag_in_ready, tag_out_valid;
  preq_t tag_head;
  logic [PART_BITS-1:0] enc_data;
  logic [LEN_W-1:0]     enc_len;

  assign in_ready = enc_in_ready && tag_in_ready;

  lfrc_encoder u_enc (
    .clk, .rst_n,
    .in_valid (in_valid && tag_in_ready), .in_ready (enc_in_ready), .in_part,
    .out_valid(enc_out_valid), .out_ready(enc_out_ready),
    .out_data (enc_data), .out_len(enc_len)
  );

  sync_fifo #(.T(preq_t), .DEPTH(4)) u_tagq (
    .clk, .rst_n,
    .in_valid (in_valid && enc_in_ready), .in_ready(tag_in_ready), .in_data(in_tag),
    .out_valid(tag_out_valid), .out_ready(enc_out_valid && enc_out_ready), .out_data(tag_head)
  );

  typedef enum logic [1:0] {S_ACC, S_DATA, S_LEN} state_t;
  state_t state;

  logic [4*PART_BITS-1:0] gbuf;
  logic [10:0]            gpos;          // bits used in the group buffer
  logic [LEN_W-1:0]       glen [3];
  preq_t                  gtag;
  logic [3:0]             wcnt;          // data words written
  logic [3:0]             used_words;
  logic [1:0]             l3w;
  logic                   raw3;
  logic [10:0]            s3;

  assign enc_out_ready = (state == S_ACC);

  always_comb begin
    s3         = 11'(glen[0]) + 11'(glen[1]) + 11'(glen[2]);
    used_words = 4'((gpos - 11'd1) >> 7) + 4'd1;
    l3w        = 2'(((gpos - 11'd1) >> 7) - (s3 >> 7));
  end

  logic [dram_pkg::ADDR_W-1:0] slot, first, laddr;
  always_comb begin
    slot  = cfg_data_base[gtag.frame]
          + dram_pkg::ADDR_W'((32'(gtag.gy[7:1]) * 32'(cfg_groups_per_row) + 32'(gtag.gx)) * 24)
          + (gtag.gy[0] ? dram_pkg::ADDR_W'(12) : '0);
    first = gtag.gy[0] ? slot : slot + dram_pkg::ADDR_W'(12 - used_words);
    laddr = cfg_len_base[gtag.frame]
          + dram_pkg::ADDR_W'((32'(gtag.gy[7:1]) * 32'(cfg_lines_per_row) + 32'(gtag.gx[8:3])) * 4)
          + dram_pkg::ADDR_W'(gtag.gx[2:1]);
  end

  glen_t rec;
  always_comb begin
    rec      = '0;
    rec.l0   = glen[0];
    rec.l1   = glen[1];
    rec.l2   = glen[2];
    rec.l3w  = l3w;
    rec.raw3 = raw3;
  end

  always_comb begin
    mem_req           = '0;
    mem_req.we        = 1'b1;
    mem_req_valid     = 1'b0;
    if (state == S_DATA) begin
      mem_req_valid = 1'b1;
      mem_req.addr  = first + dram_pkg::ADDR_W'(wcnt);
      mem_req.wdata = gbuf[128 * wcnt +: 128];
      mem_req.wmask = '1;
    end else if (state == S_LEN) begin
      mem_req_valid = 1'b1;
      mem_req.addr  = laddr;
      mem_req.wdata = {4{rec}};
      mem_req.wmask = 16'hF << (4 * {gtag.gy[0], gtag.gx[0]});
    end
  end

  assign stat_group_done = (state == S_LEN) && mem_req_ready;
  assign stat_raw_part   = enc_out_valid && enc_out_ready && (enc_len == LEN_W'(PART_BITS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_ACC;
      gpos  <= '0;
      wcnt  <= '0;
      raw3  <= 1'b0;
    end else begin
      case (state)
        S_ACC: if (enc_out_valid) begin
          gpos <= gpos + 11'(enc_len);
          if (tag_head.part == 2'd3) begin
            raw3  <= (enc_len == LEN_W'(PART_BITS));
            state <= S_DATA;
            wcnt  <= '0;
          end
        end
        S_DATA: if (mem_req_ready) begin
          wcnt <= wcnt + 4'd1;
          if (wcnt + 4'd1 == used_words) state <= S_LEN;
        end
        S_LEN: if (mem_req_ready) begin
          state <= S_ACC;
          gpos  <= '0;
        end
        default: state <= S_ACC;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_ACC && enc_out_valid) begin
      if (tag_head.part == 2'd0) gbuf <= (4*PART_BITS)'(enc_data);
      else gbuf <= gbuf | ((4*PART_BITS)'(enc_data) << gpos);
      if (tag_head.part != 2'd3) glen[tag_head.part] <= enc_len;
      gtag <= tag_head;
    end
  end
endmodule
