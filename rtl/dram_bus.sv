// dram_bus: the 128-bit DRAM access bus joining the decoder's DRAM masters to the DRAM interface.
//
// Masters request with valid/ready (dram_req_t). A round-robin arbiter grants one request per
// cycle to the DRAM interface port. For every granted read the master's index and burst length
// go into an order queue; since the DRAM interface returns read words in request order, each
// returned word is steered to the master at the head of that queue, which is popped after the
// last word of the burst. Writes produce no response.
//
// Interface: NM master ports m_*; one slave port s_* towards the DRAM interface.
// Timing: the grant is combinational (request to slave in the same cycle); responses are
// forwarded in the same cycle they arrive. OUTSTANDING bounds the reads in flight.
// The published chip has a 128-bit bus for DRAM access; its arbitration scheme is not
// described, so round-robin is this design's own choice.
module dram_bus
  import dram_pkg::*;
#(
  parameter int unsigned NM          = 6,
  parameter int unsigned OUTSTANDING = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              m_req_valid [NM],
  output logic              m_req_ready [NM],
  input  dram_req_t         m_req       [NM],
  output logic              m_rsp_valid [NM],
  output logic [DATA_W-1:0] m_rsp_data  [NM],
  output logic              s_req_valid,
  input  logic              s_req_ready,
  output dram_req_t         s_req,
  input  logic              s_rsp_valid,
  input  logic [DATA_W-1:0] s_rsp_data
);
  localparam int unsigned IW = (NM > 1) ? $clog2(NM) : 1;
  typedef struct packed { logic [IW-1:0] id; logic [3:0] nw; } ord_t;

  logic [IW-1:0] rr;        // highest priority master
  logic          gnt_any;
  logic [IW-1:0] gnt;
  logic          oq_in_ready, oq_valid;
  ord_t          oq_head;
  logic [3:0]    rcnt;

  always_comb begin
    gnt_any = 1'b0; gnt = '0;
    for (int k = 0; k < NM; k++) begin
      int unsigned i;
      i = (int'(rr) + k) % NM;
      if (!gnt_any && m_req_valid[i] && (m_req[i].we || oq_in_ready)) begin
        gnt_any = 1'b1; gnt = IW'(i);
      end
    end
    s_req_valid = gnt_any;
    s_req       = m_req[gnt];
    for (int i = 0; i < NM; i++) m_req_ready[i] = gnt_any && (gnt == IW'(i)) && s_req_ready;
  end

  sync_fifo #(.T(ord_t), .DEPTH(OUTSTANDING)) u_order (
    .clk, .rst_n,
    .in_valid (gnt_any && s_req_ready && !s_req.we), .in_ready(oq_in_ready),
    .in_data  (ord_t'{gnt, s_req.nwords_m1}),
    .out_valid(oq_valid), .out_ready(s_rsp_valid && rcnt == oq_head.nw), .out_data(oq_head)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr   <= '0;
      rcnt <= '0;
    end else begin
      if (gnt_any && s_req_ready) rr <= (gnt == IW'(NM - 1)) ? '0 : gnt + 1'b1;
      if (s_rsp_valid) rcnt <= (rcnt == oq_head.nw) ? '0 : rcnt + 4'd1;
    end
  end

  always_comb begin
    for (int i = 0; i < NM; i++) begin
      m_rsp_valid[i] = s_rsp_valid && oq_valid && (oq_head.id == IW'(i));
      m_rsp_data[i]  = s_rsp_data;
    end
  end

  // a response word always belongs to a read in the order queue
  assert property (@(posedge clk) disable iff (!rst_n) s_rsp_valid |-> oq_valid);
endmodule
