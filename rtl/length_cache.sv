// length_cache: fully associative cache of partition lengths for VCR-LFRC reference reads.
//
// A partition request (frame, group column gx, group row gy, partition) looks up the 32-bit
// length record of its group. A cache line holds 4 DRAM words = the records of an 8x2 array of
// groups (a word holds a 2x2 array: record lane 2*(gy%2)+(gx%2) of word (gx/2)%4). NLINES
// lines (32, 2 KB) are searched in parallel; on a miss the line is read from DRAM in one
// 4-word burst and written over the oldest line (FIFO replacement). Lines of a frame are
// stored in raster order from cfg_len_base[frame], cfg_lines_per_row lines per group-row pair.
//
// Interface: req_* in, out_* (request plus its group record) out, both valid/ready; a DRAM
// read master (mem_*). flush invalidates every line (a frame buffer was rewritten).
// Timing: a hit is answered in 1 cycle; a miss costs the DRAM latency plus 4 word cycles and
// is then answered as a hit. One request in flight.
// The line format and the FIFO replacement of 32 lines follow the published design; the
// blocking miss handling and the address layout are this design's own choices.
module length_cache
  import lfrc_pkg::*;
  import dram_pkg::dram_req_t;
#(
  parameter int unsigned NLINES = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush,
  input  logic [dram_pkg::ADDR_W-1:0] cfg_len_base [16],
  input  logic [6:0]  cfg_lines_per_row,
  input  logic        req_valid,
  output logic        req_ready,
  input  preq_t       req,
  output logic        out_valid,
  input  logic        out_ready,
  output preq_t       out_req,
  output glen_t       out_glen,
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output dram_req_t   mem_req,
  input  logic        mem_rsp_valid,
  input  logic [127:0] mem_rsp_data,
  output logic        stat_hit,
  output logic        stat_miss
);
  localparam int unsigned IW = $clog2(NLINES);
  typedef logic [16:0] tag_t;   // {frame, gx/8, gy/2}

  logic [511:0] line_data [NLINES];
  tag_t         line_tag  [NLINES];
  logic         line_vld  [NLINES];
  logic [IW-1:0] fifo_ptr;

  typedef enum logic [1:0] {S_LOOK, S_REQ, S_FILL} state_t;
  state_t state;
  logic [1:0] fill_cnt;

  tag_t req_tag;
  assign req_tag = {req.frame, req.gx[8:3], req.gy[7:1]};

  logic          hit;
  logic [IW-1:0] hit_idx;
  always_comb begin
    hit = 1'b0; hit_idx = '0;
    for (int i = 0; i < NLINES; i++)
      if (line_vld[i] && line_tag[i] == req_tag) begin
        hit = 1'b1; hit_idx = IW'(i);
      end
  end

  logic take;   // request answered this cycle
  assign take      = (state == S_LOOK) && req_valid && hit && (!out_valid || out_ready);
  assign req_ready = take;
  assign stat_hit  = take;
  assign stat_miss = (state == S_LOOK) && req_valid && !hit;

  logic [dram_pkg::ADDR_W-1:0] line_addr;
  assign line_addr = cfg_len_base[req.frame]
                   + dram_pkg::ADDR_W'((32'(req.gy[7:1]) * 32'(cfg_lines_per_row) + 32'(req.gx[8:3])) * 4);

  always_comb begin
    mem_req           = '0;
    mem_req.we        = 1'b0;
    mem_req.addr      = line_addr;
    mem_req.nwords_m1 = 4'd3;
    mem_req_valid     = (state == S_REQ);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_LOOK;
      fifo_ptr <= '0;
      fill_cnt <= '0;
      line_vld <= '{default: 1'b0};
    end else begin
      case (state)
        S_LOOK: if (req_valid && !hit && !flush) state <= S_REQ;
        S_REQ:  if (mem_req_ready) begin state <= S_FILL; fill_cnt <= '0; end
        S_FILL: if (mem_rsp_valid) begin
                  fill_cnt <= fill_cnt + 2'd1;
                  if (fill_cnt == 2'd3) begin
                    line_vld[fifo_ptr] <= 1'b1;
                    fifo_ptr <= (fifo_ptr == IW'(NLINES - 1)) ? '0 : fifo_ptr + 1'b1;
                    state <= S_LOOK;
                  end
                end
        default: state <= S_LOOK;
      endcase
      if (flush) line_vld <= '{default: 1'b0};
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_REQ) line_tag[fifo_ptr] <= req_tag;
    if (state == S_FILL && mem_rsp_valid) line_data[fifo_ptr][128*fill_cnt +: 128] <= mem_rsp_data;
  end

  // output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else if (take) out_valid <= 1'b1;
    else if (out_ready) out_valid <= 1'b0;
  end
  always_ff @(posedge clk) begin
    if (take) begin
      out_req  <= req;
      out_glen <= glen_t'(line_data[hit_idx][128 * req.gx[2:1] + 32 * {req.gy[0], req.gx[0]} +: 32]);
    end
  end

endmodule
