// tb_dram_bus: three masters issue random read bursts (1..16 words) and single-word writes
// through the arbiter to one DRAM model. Reads address a region filled beforehand, so each
// returned word is known; writes go to a separate region per master and are compared at the
// end. Checks that every master gets exactly its own responses, in order, that all writes land,
// and that every grant follows the round-robin order among the masters that are waiting.
module tb_dram_bus;
  import dram_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  localparam int NM = 3;
  logic              m_req_valid [NM], m_req_ready [NM], m_rsp_valid [NM];
  dram_req_t         m_req [NM];
  logic [DATA_W-1:0] m_rsp_data [NM];
  logic              s_req_valid, s_req_ready, s_rsp_valid;
  dram_req_t         s_req;
  logic [DATA_W-1:0] s_rsp_data;
  int checks = 0, failures = 0;

  dram_bus #(.NM(NM)) dut (.*);

  logic sv [1], sr [1], pv [1];
  dram_req_t sq [1];
  logic [DATA_W-1:0] pd [1];
  assign sv[0] = s_req_valid; assign sq[0] = s_req; assign s_req_ready = sr[0];
  assign s_rsp_valid = pv[0]; assign s_rsp_data = pd[0];
  tb_dram_model #(.NP(1)) mem (.clk, .req_valid(sv), .req_ready(sr), .req(sq), .rsp_valid(pv), .rsp_data(pd));

  function automatic logic [DATA_W-1:0] pat(input int a);
    return {32'(a), 32'(a * 7 + 3), 32'hC0DE0000 | 32'(a), 32'(a ^ 'h5a5a)};
  endfunction

  logic [DATA_W-1:0] expq [NM][$];
  int served [NM], wrote [NM];
  logic [DATA_W-1:0] wexp [int];
  bit done [NM];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // responses, compared per master
  always @(posedge clk) if (rst_n)
    for (int m = 0; m < NM; m++) if (m_rsp_valid[m]) begin
      checks++;
      if (expq[m].size() == 0) begin failures++; $display("master %0d: unexpected response", m); end
      else begin
        logic [DATA_W-1:0] e;
        e = expq[m].pop_front();
        if (m_rsp_data[m] != e) begin failures++; if (failures < 5) $display("master %0d: data %h exp %h", m, m_rsp_data[m], e); end
      end
    end

  // round-robin reference: the grant goes to the first eligible master after the last granted
  int last_gnt = NM - 1;
  always @(posedge clk) if (rst_n && s_req_valid && s_req_ready) begin
    int e, g;
    e = -1; g = -1;
    for (int k = 1; k <= NM; k++) begin
      int i;
      i = (last_gnt + k) % NM;
      if (e < 0 && m_req_valid[i] && (m_req[i].we || dut.oq_in_ready)) e = i;
    end
    for (int i = 0; i < NM; i++) if (m_req_ready[i]) g = i;
    checks++;
    if (g != e) begin failures++; if (failures < 5) $display("grant to %0d, round robin expects %0d", g, e); end
    last_gnt = g;
  end

  for (genvar g = 0; g < NM; g++) begin : g_m
    initial begin
      m_req_valid[g] = 0; m_req[g] = '0; served[g] = 0; wrote[g] = 0; done[g] = 0;
      repeat (4) @(posedge clk);
      for (int k = 0; k < 150; k++) begin
        dram_req_t r;
        @(negedge clk);
        r = '0;
        if ($urandom_range(0, 2) == 0) begin
          r.we = 1; r.addr = ADDR_W'('h10000 * (g + 1) + wrote[g]);
          r.wdata = {$urandom, $urandom, $urandom, $urandom}; r.wmask = '1;
          wexp[int'(r.addr)] = r.wdata;
          wrote[g]++;
        end else begin
          r.addr = ADDR_W'($urandom_range(0, 1000)); r.nwords_m1 = 4'($urandom_range(0, 15));
        end
        m_req[g] = r; m_req_valid[g] = 1;
        #1;
        while (!m_req_ready[g]) begin @(negedge clk); #1; end
        // accepted at the next rising edge
        if (!r.we) for (int w = 0; w <= int'(r.nwords_m1); w++) expq[g].push_back(pat(int'(r.addr) + w));
        served[g]++;
        @(negedge clk);
        m_req_valid[g] = 0;
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      done[g] = 1;
    end
  end

  initial begin
    for (int a = 0; a < 1100; a++) mem.wr(a, pat(a), '1);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    repeat (300) @(posedge clk);
    for (int m = 0; m < NM; m++) begin
      checks++;
      if (expq[m].size() != 0) begin failures++; $display("master %0d: %0d responses missing", m, expq[m].size()); end
      checks++;
      if (served[m] != 150) failures++;
    end
    foreach (wexp[a]) begin
      checks++;
      if (mem.rd(a) != wexp[a]) begin failures++; $display("write at %h lost", a); end
    end
    $display("requests served per master: %0d %0d %0d, writes %0d", served[0], served[1], served[2], wexp.num());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
