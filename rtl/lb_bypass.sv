// lb_bypass: deblocking-filter line buffer with the on-chip bypass enabled by PMBR.
//
// The deblocking filter keeps the bottom lines of every MB (4 luma lines and 4 lines of each
// chroma component, MB_WORDS 128-bit words) until the MB below is filtered. Under the PMBR scan
// the MB below an MB of region rows 0..N_ROWS-2 is filtered only a few MBs later, so those
// lines are kept in a small on-chip memory indexed by (column mod XSLOTS, region row). Only the
// bottom row of each region is written to the line buffer in DRAM, and only the top row of a
// region reads it back, so (N_ROWS-1)/N_ROWS of the line buffer traffic (3/4 for N = 4) stays
// on chip. With a 2-column skew per row, the MB below (x,r) is visited 2 steps after (x,r) and
// the slot is reused by (x+XSLOTS,r) only 4 steps after, so XSLOTS = 4 is enough.
//
// Interface: wr_* (valid/ready) stores the bottom lines of MB (wr_x, wr_y); rd_req_* (valid/
// ready) asks for the bottom lines of MB (rd_x, rd_y), answered by a rd_rsp_valid pulse with
// rd_rsp_data; DRAM master mem_* for the line buffer at cfg_lb_base + x*MB_WORDS.
// Timing: on-chip accesses take 1 cycle; DRAM writes one word per cycle, reads one burst.
// The bypass of 3/4 of the traffic follows the published scheme; the memory organisation is
// this design's own choice.
module lb_bypass
  import dram_pkg::*;
#(
  parameter int unsigned N_ROWS   = 4,
  parameter int unsigned XSLOTS   = 4,
  parameter int unsigned MB_WORDS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] cfg_lb_base,
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [8:0]        wr_x,
  input  logic [7:0]        wr_y,
  input  logic [MB_WORDS*DATA_W-1:0] wr_data,
  input  logic              rd_req_valid,
  output logic              rd_req_ready,
  input  logic [8:0]        rd_x,
  input  logic [7:0]        rd_y,
  output logic              rd_rsp_valid,
  output logic [MB_WORDS*DATA_W-1:0] rd_rsp_data,
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output dram_req_t         mem_req,
  input  logic              mem_rsp_valid,
  input  logic [DATA_W-1:0] mem_rsp_data,
  output logic              stat_onchip,
  output logic              stat_dram
);
  localparam int unsigned NSLOT = (N_ROWS - 1) * XSLOTS;
  localparam int unsigned SW    = $clog2(NSLOT);
  localparam int unsigned XW    = $clog2(XSLOTS);
  localparam int unsigned CW    = $clog2(MB_WORDS + 1);

  logic [MB_WORDS*DATA_W-1:0] store [NSLOT];

  typedef enum logic [2:0] {L_IDLE, L_WDRAM, L_RREQ, L_RRECV, L_RDONE} state_t;
  state_t st;
  logic [CW-1:0] cnt;
  logic [8:0]    cur_x;
  logic [MB_WORDS*DATA_W-1:0] buf_q;

  function automatic int unsigned rrow(input logic [7:0] y);
    return int'(y) % N_ROWS;
  endfunction
  function automatic logic [SW-1:0] slot(input logic [8:0] x, input logic [7:0] y);
    return SW'(rrow(y) * XSLOTS + int'(x[XW-1:0]));
  endfunction

  logic wr_chip, rd_chip;
  assign wr_chip = rrow(wr_y) != N_ROWS - 1;
  assign rd_chip = rrow(rd_y) != N_ROWS - 1;

  // writes have priority; a DRAM transfer blocks both ports
  assign wr_ready     = (st == L_IDLE);
  assign rd_req_ready = (st == L_IDLE) && !wr_valid;

  always_comb begin
    mem_req           = '0;
    mem_req.addr      = cfg_lb_base + ADDR_W'(32'(cur_x) * MB_WORDS) + ADDR_W'(cnt);
    mem_req.we        = (st == L_WDRAM);
    mem_req.wdata     = buf_q[DATA_W * cnt +: DATA_W];
    mem_req.wmask     = '1;
    mem_req.nwords_m1 = 4'(MB_WORDS - 1);
    mem_req_valid     = (st == L_WDRAM) || (st == L_RREQ);
  end

  assign stat_onchip = (wr_valid && wr_ready && wr_chip) || (rd_req_valid && rd_req_ready && rd_chip);
  assign stat_dram   = (wr_valid && wr_ready && !wr_chip) || (rd_req_valid && rd_req_ready && !rd_chip);
  assign rd_rsp_data = buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= L_IDLE; cnt <= '0; cur_x <= '0; rd_rsp_valid <= 1'b0;
    end else begin
      rd_rsp_valid <= 1'b0;
      case (st)
        L_IDLE: begin
          cnt <= '0;
          if (wr_valid) begin
            if (!wr_chip) begin st <= L_WDRAM; cur_x <= wr_x; end
          end else if (rd_req_valid) begin
            if (rd_chip) rd_rsp_valid <= 1'b1;
            else begin st <= L_RREQ; cur_x <= rd_x; end
          end
        end
        L_WDRAM: if (mem_req_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(MB_WORDS - 1)) st <= L_IDLE;
        end
        L_RREQ:  if (mem_req_ready) st <= L_RRECV;
        L_RRECV: if (mem_rsp_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(MB_WORDS - 1)) st <= L_RDONE;
        end
        L_RDONE: begin rd_rsp_valid <= 1'b1; st <= L_IDLE; end
        default: st <= L_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == L_IDLE && wr_valid) begin
      if (wr_chip) store[slot(wr_x, wr_y)] <= wr_data;
      else buf_q <= wr_data;
    end else if (st == L_IDLE && rd_req_valid && rd_chip) begin
      buf_q <= store[slot(rd_x, rd_y)];
    end else if (st == L_RRECV && mem_rsp_valid) begin
      buf_q[DATA_W * cnt +: DATA_W] <= mem_rsp_data;
    end
  end
endmodule
