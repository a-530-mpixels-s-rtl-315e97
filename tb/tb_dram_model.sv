// tb_dram_model: behavioural DRAM for the testbenches (not part of the design). NP independent
// ports share one sparse memory of 128-bit words. A port accepts a request when its random
// back-pressure allows; a read returns its words in order, one per cycle, LAT cycles after it
// was accepted; a write applies its byte mask at once. Unwritten words read as zero.
module tb_dram_model
  import dram_pkg::*;
#(
  parameter int NP  = 1,
  parameter int LAT = 12
) (
  input  logic              clk,
  input  logic              req_valid [NP],
  output logic              req_ready [NP],
  input  dram_req_t         req       [NP],
  output logic              rsp_valid [NP],
  output logic [DATA_W-1:0] rsp_data  [NP]
);
  logic [DATA_W-1:0] mem [int];
  longint cyc = 0;
  typedef struct { longint due; int addr; } pend_t;
  pend_t q [NP][$];
  int reads = 0, writes = 0;

  function automatic logic [DATA_W-1:0] rd(input int a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction
  function automatic void wr(input int a, input logic [DATA_W-1:0] d, input logic [15:0] m);
    logic [DATA_W-1:0] o;
    o = rd(a);
    for (int b = 0; b < 16; b++) if (m[b]) o[8*b +: 8] = d[8*b +: 8];
    mem[a] = o;
  endfunction

  initial for (int p = 0; p < NP; p++) begin req_ready[p] = 0; rsp_valid[p] = 0; rsp_data[p] = '0; end

  always @(posedge clk) begin
    cyc++;
    for (int p = 0; p < NP; p++) begin
      if (req_valid[p] && req_ready[p]) begin
        if (req[p].we) begin wr(int'(req[p].addr), req[p].wdata, req[p].wmask); writes++; end
        else begin
          reads++;
          for (int w = 0; w <= int'(req[p].nwords_m1); w++) begin
            pend_t e;
            e.due = cyc + LAT + w; e.addr = int'(req[p].addr) + w;
            q[p].push_back(e);
          end
        end
      end
      rsp_valid[p] <= 1'b0;
      if (q[p].size() > 0 && q[p][0].due <= cyc) begin
        pend_t e;
        e = q[p].pop_front();
        rsp_valid[p] <= 1'b1;
        rsp_data[p]  <= rd(e.addr);
      end
      req_ready[p] <= ($urandom_range(0, 4) != 0);
    end
  end
endmodule
