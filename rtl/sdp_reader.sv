// sdp_reader: main-decoder side of the SDP buffer; fetches each MB's package in PMBR order.
//
// For every MB delivered by the scan-order generator the reader takes the sub-buffer of its
// row (row mod 4) and reads, at that ring's read pointer, the MB's package: a header word whose
// bits [7:0] give the number of payload words that follow, then the payload in bursts of up to
// 16 words (never across the ring's end, never past what the writer has stored). The words are
// handed to the demultiplexer through an output queue, the last one of each MB marked. The
// read pointers are reported back to the writer for its full check.
//
// Interface: cfg_load with cfg_start (absolute start addresses of the slice in the 4 rings,
// from the host); mb_* (valid/ready) from pmbr_scan; wr_ptr of the ED that decoded the slice;
// DRAM read master mem_*; out_* (valid/ready) package words.
// Timing: one read burst in flight; an MB costs the DRAM latency once for the header and once
// per payload burst. The header-word package format is this design's own choice (the published
// package is variable-length coded syntax elements, whose format is not given).
module sdp_reader
  import dram_pkg::*;
#(
  parameter int unsigned QDEPTH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_load,
  input  logic [ADDR_W-1:0] cfg_base  [4],
  input  logic [15:0]       cfg_size  [4],
  input  logic [ADDR_W-1:0] cfg_start [4],
  input  logic [15:0]       wr_ptr [4],
  output logic [15:0]       rd_ptr [4],
  input  logic              mb_valid,
  output logic              mb_ready,
  input  logic [7:0]        mb_y,
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output dram_req_t         mem_req,
  input  logic              mem_rsp_valid,
  input  logic [DATA_W-1:0] mem_rsp_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic              out_last
);
  typedef enum logic [2:0] {R_IDLE, R_HREQ, R_HRSP, R_PREQ, R_PRSP, R_DONE} state_t;
  state_t      st;
  logic [1:0]  sub;
  logic [8:0]  rem;          // payload words still to read
  logic [4:0]  burst, bcnt;
  logic [15:0] avail, to_end;
  logic [4:0]  bmax;

  typedef struct packed { logic last; logic [DATA_W-1:0] d; } q_t;
  logic q_in_valid, q_in_ready;
  q_t   q_in, q_out;
  logic [$clog2(QDEPTH):0] qcnt;

  always_comb begin
    avail  = (wr_ptr[sub] >= rd_ptr[sub]) ? wr_ptr[sub] - rd_ptr[sub]
                                          : wr_ptr[sub] + cfg_size[sub] - rd_ptr[sub];
    to_end = cfg_size[sub] - rd_ptr[sub];
    bmax   = 5'd16;
    if (9'(bmax) > rem) bmax = 5'(rem);
    if (16'(bmax) > to_end) bmax = 5'(to_end);
    if (16'(bmax) > avail) bmax = 5'(avail);
  end

  always_comb begin
    mem_req           = '0;
    mem_req.addr      = cfg_base[sub] + ADDR_W'(rd_ptr[sub]);
    mem_req.nwords_m1 = (st == R_HREQ) ? 4'd0 : 4'(bmax - 5'd1);
    mem_req_valid     = ((st == R_HREQ) && avail != 0)
                     || ((st == R_PREQ) && bmax != 0 && (QDEPTH - 32'(qcnt)) >= 32'(bmax));
  end

  assign q_in_valid = mem_rsp_valid && (st == R_HRSP || st == R_PRSP);
  assign q_in.d     = mem_rsp_data;
  assign q_in.last  = (st == R_HRSP) ? (mem_rsp_data[7:0] == 8'd0) : (rem == 9'd1);
  assign mb_ready   = (st == R_DONE);

  function automatic logic [15:0] adv(input logic [15:0] p, input logic [15:0] n, input logic [15:0] sz);
    return (p + n >= sz) ? p + n - sz : p + n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE; sub <= '0; rem <= '0; burst <= '0; bcnt <= '0;
      rd_ptr <= '{default: '0};
    end else begin
      case (st)
        R_IDLE: if (mb_valid) begin sub <= mb_y[1:0]; st <= R_HREQ; end
        R_HREQ: if (mem_req_valid && mem_req_ready) st <= R_HRSP;
        R_HRSP: if (mem_rsp_valid) begin
                  rd_ptr[sub] <= adv(rd_ptr[sub], 16'd1, cfg_size[sub]);
                  rem <= {1'b0, mem_rsp_data[7:0]};
                  st  <= (mem_rsp_data[7:0] == 8'd0) ? R_DONE : R_PREQ;
                end
        R_PREQ: if (mem_req_valid && mem_req_ready) begin
                  burst <= bmax; bcnt <= '0; st <= R_PRSP;
                end
        R_PRSP: if (mem_rsp_valid) begin
                  bcnt <= bcnt + 5'd1;
                  rem  <= rem - 9'd1;
                  rd_ptr[sub] <= adv(rd_ptr[sub], 16'd1, cfg_size[sub]);
                  if (bcnt + 5'd1 == burst) st <= (rem == 9'd1) ? R_DONE : R_PREQ;
                end
        R_DONE: st <= R_IDLE;
        default: st <= R_IDLE;
      endcase
      if (cfg_load)
        for (int i = 0; i < 4; i++) rd_ptr[i] <= 16'(cfg_start[i] - cfg_base[i]);
    end
  end

  sync_fifo #(.T(q_t), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n, .in_valid(q_in_valid), .in_ready(q_in_ready), .in_data(q_in),
    .out_valid, .out_ready, .out_data(q_out)
  );
  assign out_data = q_out.d;
  assign out_last = q_out.last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) qcnt <= '0;
    else qcnt <= qcnt + ($clog2(QDEPTH)+1)'(q_in_valid && q_in_ready) - ($clog2(QDEPTH)+1)'(out_valid && out_ready);
  end

  // the queue always has room for a word that was requested
  assert property (@(posedge clk) disable iff (!rst_n) q_in_valid |-> q_in_ready);
endmodule
