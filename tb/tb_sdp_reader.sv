// tb_sdp_reader: fills the 4 rings of a DRAM model with MB packages (header word holding the
// payload word count, then the payload) for a sequence of MBs of random rows, with the slice
// starting near the end of each ring so that packages wrap. The MBs are then requested in the
// same order through the mb_* handshake while the output is drained with random stalls.
// Checks every output word and its last flag, the read pointers at the end, and that the
// reader never reads past the write pointer (a ring whose writer lags is released gradually).
module tb_sdp_reader;
  import dram_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  localparam int SZ = 200;
  logic              cfg_load, mb_valid, mb_ready, mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic              out_valid, out_ready, out_last;
  logic [ADDR_W-1:0] cfg_base [4], cfg_start [4];
  logic [15:0]       cfg_size [4], wr_ptr [4], rd_ptr [4];
  logic [7:0]        mb_y;
  dram_req_t         mem_req;
  logic [DATA_W-1:0] mem_rsp_data, out_data;
  int checks = 0, failures = 0;

  sdp_reader dut (.*);

  logic m_rv [1], m_rr [1], m_sv [1];
  dram_req_t m_rq [1];
  logic [DATA_W-1:0] m_sd [1];
  assign m_rv[0] = mem_req_valid; assign m_rq[0] = mem_req; assign mem_req_ready = m_rr[0];
  assign mem_rsp_valid = m_sv[0]; assign mem_rsp_data = m_sd[0];
  tb_dram_model #(.NP(1)) mem (.clk, .req_valid(m_rv), .req_ready(m_rr), .req(m_rq), .rsp_valid(m_sv), .rsp_data(m_sd));

  typedef struct { logic [DATA_W-1:0] d; bit last; } w_t;
  w_t expq [$];
  int rows [$];
  int fin [4];        // final write pointer of each ring
  int start0 [4];
  int nmb = 0, nwords = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reads must stay behind the write pointer
  always @(posedge clk) if (rst_n && mem_req_valid && mem_req_ready) begin
    int s, off, used;
    s = -1;
    for (int k = 0; k < 4; k++)
      if (int'(mem_req.addr) >= int'(cfg_base[k]) && int'(mem_req.addr) < int'(cfg_base[k]) + SZ) s = k;
    checks++;
    if (s < 0) begin failures++; $display("read outside the rings"); end
    else begin
      off  = int'(mem_req.addr) - int'(cfg_base[s]);
      used = (int'(wr_ptr[s]) - off + SZ) % SZ;   // words stored ahead of the read position
      if (int'(mem_req.nwords_m1) + 1 > used) begin failures++; $display("ring %0d read beyond the writer", s); end
    end
  end

  // output side
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected word"); end
      else begin
        w_t e;
        e = expq.pop_front();
        if (out_data != e.d || out_last != e.last) begin failures++; if (failures < 5) $display("word %h/%0b exp %h/%0b", out_data, out_last, e.d, e.last); end
        nwords++;
      end
    end
    out_ready <= ($urandom_range(0, 3) != 0);
  end

  initial begin
    int p [4];
    cfg_load = 0; mb_valid = 0; mb_y = 0; out_ready = 0;
    for (int s = 0; s < 4; s++) begin
      cfg_base[s] = ADDR_W'('h400 + s * 'h100); cfg_size[s] = 16'(SZ);
      start0[s] = SZ - 5 - 3 * s; p[s] = start0[s];
      cfg_start[s] = cfg_base[s] + ADDR_W'(start0[s]);
    end
    // packages of 40 MBs of 4 region rows, 0..14 payload words each
    for (int m = 0; m < 40; m++) begin
      int r, n;
      r = $urandom_range(0, 7); n = $urandom_range(0, 14);
      if (m % 9 == 0) n = 0;
      rows.push_back(r);
      mem.wr(int'(cfg_base[r % 4]) + p[r % 4], {32'(m), 88'h0, 8'(n)}, '1);
      expq.push_back('{ {32'(m), 88'h0, 8'(n)}, n == 0 });
      p[r % 4] = (p[r % 4] + 1) % SZ;
      for (int w = 0; w < n; w++) begin
        logic [DATA_W-1:0] d;
        d = {32'(m), 32'(w), $urandom, $urandom};
        mem.wr(int'(cfg_base[r % 4]) + p[r % 4], d, '1);
        expq.push_back('{d, w == n - 1});
        p[r % 4] = (p[r % 4] + 1) % SZ;
      end
    end
    for (int s = 0; s < 4; s++) begin fin[s] = p[s]; wr_ptr[s] = 16'(start0[s]); end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); cfg_load = 1; @(negedge clk); cfg_load = 0;
    fork
      // the writer of ring 0 lags: its pointer advances one word every 4 cycles
      begin
        while (int'(wr_ptr[0]) != fin[0]) begin repeat (4) @(negedge clk); wr_ptr[0] = 16'((int'(wr_ptr[0]) + 1) % SZ); end
      end
      begin
        for (int s = 1; s < 4; s++) wr_ptr[s] = 16'(fin[s]);
        foreach (rows[i]) begin
          mb_valid = 1; mb_y = 8'(rows[i]);
          #1;
          while (!mb_ready) begin @(negedge clk); #1; end
          @(negedge clk);
          mb_valid = 0;
          nmb++;
        end
      end
    join
    repeat (200) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d words not delivered", expq.size()); end
    for (int s = 0; s < 4; s++) begin checks++; if (int'(rd_ptr[s]) != fin[s]) begin failures++; $display("ring %0d read pointer %0d exp %0d", s, rd_ptr[s], fin[s]); end end
    $display("%0d MBs, %0d words delivered", nmb, nwords);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
