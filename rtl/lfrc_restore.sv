// lfrc_restore: VCR-LFRC restoring component, inserted between the MC cache and the DRAM bus.
//
// A partition request from the MC cache goes through four units joined by queues:
//   length cache      finds the group's length record (fetching a 4-word line on a miss);
//   address translate turns the request into a DRAM word range and bit offset;
//   fetch             reads the 1..4 words, aligns the partition to bit 0;
//   decompress core   restores the 48 samples, one 4x4 unit per cycle.
// The restored units leave with the request that asked for them, in request order.
//
// Interface: req_* (valid/ready, preq_t) from the MC cache; out_* (valid/ready) 4x4 units to
// the MC cache, unit 0/1 luma left/right, unit 2 Cb over Cr; two DRAM read masters, len_mem_*
// for length lines and part_mem_* for partition data. cfg_* describe the frame buffers.
// Timing: a request that hits the length cache is issued to DRAM 3 cycles after it is
// accepted; the fetch unit has one partition read outstanding. The published design names the
// units and the queues between them; queue depths and the single outstanding fetch are this
// design's own choices.
module lfrc_restore
  import lfrc_pkg::*;
  import dram_pkg::dram_req_t;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic [dram_pkg::ADDR_W-1:0] cfg_data_base [16],
  input  logic [dram_pkg::ADDR_W-1:0] cfg_len_base  [16],
  input  logic [9:0]  cfg_groups_per_row,
  input  logic [6:0]  cfg_lines_per_row,
  input  logic        req_valid,
  output logic        req_ready,
  input  preq_t       req,
  output logic        out_valid,
  input  logic        out_ready,
  output preq_t       out_req,
  output logic [1:0]  out_unit,
  output logic [127:0] out_samples,
  output logic        len_mem_req_valid,
  input  logic        len_mem_req_ready,
  output dram_req_t   len_mem_req,
  input  logic        len_mem_rsp_valid,
  input  logic [127:0] len_mem_rsp_data,
  output logic        part_mem_req_valid,
  input  logic        part_mem_req_ready,
  output dram_req_t   part_mem_req,
  input  logic        part_mem_rsp_valid,
  input  logic [127:0] part_mem_rsp_data,
  output logic        stat_len_hit,
  output logic        stat_len_miss,
  output logic        stat_raw_part
);
  // ---------------- length cache -> queue -> address translation -------------------------
  typedef struct packed { preq_t r; glen_t g; } lq_t;
  logic lc_valid, lc_ready, lq_valid, lq_ready;
  preq_t lc_req;
  glen_t lc_glen;
  lq_t   lq_head;

  length_cache u_lcache (
    .clk, .rst_n, .flush, .cfg_len_base, .cfg_lines_per_row,
    .req_valid, .req_ready, .req,
    .out_valid(lc_valid), .out_ready(lc_ready), .out_req(lc_req), .out_glen(lc_glen),
    .mem_req_valid(len_mem_req_valid), .mem_req_ready(len_mem_req_ready), .mem_req(len_mem_req),
    .mem_rsp_valid(len_mem_rsp_valid), .mem_rsp_data(len_mem_rsp_data),
    .stat_hit(stat_len_hit), .stat_miss(stat_len_miss)
  );

  sync_fifo #(.T(lq_t), .DEPTH(4)) u_lq (
    .clk, .rst_n, .in_valid(lc_valid), .in_ready(lc_ready), .in_data(lq_t'{lc_req, lc_glen}),
    .out_valid(lq_valid), .out_ready(lq_ready), .out_data(lq_head)
  );

  typedef struct packed {
    preq_t                       r;
    logic [dram_pkg::ADDR_W-1:0] addr;
    logic [1:0]                  nw;
    logic [6:0]                  off;
    logic                        raw;
  } fq_t;
  logic at_valid, at_ready, fq_valid, fq_ready;
  fq_t  at_out, fq_head;

  lfrc_addr_translate u_at (
    .clk, .rst_n, .cfg_data_base, .cfg_groups_per_row,
    .in_valid(lq_valid), .in_ready(lq_ready), .in_req(lq_head.r), .in_glen(lq_head.g),
    .out_valid(at_valid), .out_ready(at_ready), .out_req(at_out.r), .out_addr(at_out.addr),
    .out_nwords_m1(at_out.nw), .out_bitoff(at_out.off), .out_raw(at_out.raw)
  );

  sync_fifo #(.T(fq_t), .DEPTH(4)) u_fq (
    .clk, .rst_n, .in_valid(at_valid), .in_ready(at_ready), .in_data(at_out),
    .out_valid(fq_valid), .out_ready(fq_ready), .out_data(fq_head)
  );

  // ---------------- fetch and align ------------------------------------------------------
  typedef enum logic [1:0] {F_IDLE, F_REQ, F_RECV, F_DEC} fstate_t;
  fstate_t      fst;
  fq_t          cur;
  logic [511:0] wbuf;
  logic [1:0]   wcnt;
  logic         dc_in_ready, tq_in_ready;

  assign fq_ready = (fst == F_IDLE);

  always_comb begin
    part_mem_req           = '0;
    part_mem_req.addr      = cur.addr;
    part_mem_req.nwords_m1 = {2'b00, cur.nw};
    part_mem_req_valid     = (fst == F_REQ);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fst  <= F_IDLE;
      wcnt <= '0;
    end else begin
      case (fst)
        F_IDLE: if (fq_valid) fst <= F_REQ;
        F_REQ:  if (part_mem_req_ready) begin fst <= F_RECV; wcnt <= '0; end
        F_RECV: if (part_mem_rsp_valid) begin
                  wcnt <= wcnt + 2'd1;
                  if (wcnt == cur.nw) fst <= F_DEC;
                end
        F_DEC:  if (dc_in_ready && tq_in_ready) fst <= F_IDLE;
        default: fst <= F_IDLE;
      endcase
    end
  end
  always_ff @(posedge clk) begin
    if (fst == F_IDLE && fq_valid) cur <= fq_head;
    if (fst == F_RECV && part_mem_rsp_valid) wbuf[128 * wcnt +: 128] <= part_mem_rsp_data;
  end

  logic [PART_BITS-1:0] aligned;
  assign aligned = PART_BITS'(wbuf >> cur.off);

  // ---------------- decompress core and tag queue ----------------------------------------
  logic dc_out_valid, dc_out_ready, tq_valid;
  logic [1:0]   dc_unit;
  logic [127:0] dc_samples;
  preq_t        tq_head;

  lfrc_decompress_core u_dc (
    .clk, .rst_n,
    .in_valid(fst == F_DEC && tq_in_ready), .in_ready(dc_in_ready), .in_data(aligned), .in_raw(cur.raw),
    .out_valid(dc_out_valid), .out_ready(dc_out_ready), .out_unit(dc_unit), .out_samples(dc_samples)
  );

  sync_fifo #(.T(preq_t), .DEPTH(4)) u_tq (
    .clk, .rst_n, .in_valid(fst == F_DEC && dc_in_ready), .in_ready(tq_in_ready), .in_data(cur.r),
    .out_valid(tq_valid), .out_ready(dc_out_valid && dc_out_ready && dc_unit == 2'd2), .out_data(tq_head)
  );

  assign out_valid    = dc_out_valid && tq_valid;
  assign dc_out_ready = out_ready && tq_valid;
  assign out_req      = tq_head;
  assign out_unit     = dc_unit;
  assign out_samples  = dc_samples;
  assign stat_raw_part = (fst == F_DEC) && dc_in_ready && tq_in_ready && cur.raw;
endmodule
