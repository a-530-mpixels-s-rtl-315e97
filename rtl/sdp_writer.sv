// sdp_writer: stores one entropy decoder's output in the slice data package (SDP) buffer.
//
// The SDP buffer lives in DRAM as 4 independent FIFO-like sub-buffers (ring regions), one per
// value of (MB row mod 4), so that the main decoder can take MBs of 4 rows in its reordered
// scan while the ED writes them in raster order. Every 128-bit package word from the ED is
// written at the write pointer of the sub-buffer of its MB row, which then advances and wraps.
// At the start of a slice the 4 write pointers are reported (start_*) so that the host can
// tell the main decoder where the slice's packages begin. The ED is held back while the target
// sub-buffer is full, judged against the read pointers that the SDP reader reports.
//
// Interface: slice_start pulse; in_* (valid/ready) package words tagged with the MB row; DRAM
// write master mem_*; wr_ptr/rd_ptr pointers (word addresses inside each ring).
// Timing: one word per cycle when the bus accepts it.
// The 4 sub-buffers selected by row mod 4 follow the published scheme; ring placement, pointer
// reporting and flow control are this design's own choices.
module sdp_writer
  import dram_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_load,                 // (re)initialise the rings
  input  logic [ADDR_W-1:0] cfg_base [4],
  input  logic [15:0]       cfg_size [4],             // ring sizes in words
  input  logic              slice_start,
  output logic              start_valid,
  output logic [ADDR_W-1:0] start_addr [4],
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [7:0]        in_mb_row,
  input  logic [DATA_W-1:0] in_data,
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output dram_req_t         mem_req,
  output logic [15:0]       wr_ptr [4],               // word offset inside each ring
  input  logic [15:0]       rd_ptr [4]
);
  logic [1:0]  sub;
  logic [15:0] nxt;
  logic        full;
  assign sub  = in_mb_row[1:0];
  assign nxt  = (wr_ptr[sub] + 16'd1 == cfg_size[sub]) ? 16'd0 : wr_ptr[sub] + 16'd1;
  assign full = (nxt == rd_ptr[sub]);

  always_comb begin
    mem_req       = '0;
    mem_req.we    = 1'b1;
    mem_req.addr  = cfg_base[sub] + ADDR_W'(wr_ptr[sub]);
    mem_req.wdata = in_data;
    mem_req.wmask = '1;
    mem_req_valid = in_valid && !full;
    in_ready      = mem_req_ready && !full;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr      <= '{default: '0};
      start_valid <= 1'b0;
    end else begin
      start_valid <= slice_start;
      if (cfg_load) wr_ptr <= '{default: '0};
      else if (in_valid && in_ready) wr_ptr[sub] <= nxt;
    end
  end

  always_ff @(posedge clk) begin
    if (slice_start)
      for (int i = 0; i < 4; i++) start_addr[i] <= cfg_base[i] + ADDR_W'(wr_ptr[i]);
  end
endmodule
