// tb_sdp_writer: an ED model writes package words for MBs of random rows; a consumer model
// reads the 4 rings back from the DRAM model, in its own time, and advances the read pointers.
// Checks that every word lands in the ring of its row mod 4, in order, that the reported
// slice start addresses equal the ring positions at the slice start, and that the writer
// holds back exactly when a ring is full (size-1 words stored).
module tb_sdp_writer;
  import dram_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  localparam int SZ = 12;
  logic cfg_load, slice_start, start_valid, in_valid, in_ready, mem_req_valid, mem_req_ready;
  logic [ADDR_W-1:0] cfg_base [4];
  logic [15:0] cfg_size [4];
  logic [ADDR_W-1:0] start_addr [4];
  logic [7:0] in_mb_row;
  logic [127:0] in_data;
  dram_req_t mem_req;
  logic [15:0] wr_ptr [4], rd_ptr [4];
  int checks = 0, failures = 0, fulls = 0;

  sdp_writer dut (.*);

  logic m_rv [1], m_rr [1], m_sv [1];
  dram_req_t m_rq [1];
  logic [127:0] m_sd [1];
  assign m_rv[0] = mem_req_valid; assign m_rq[0] = mem_req; assign mem_req_ready = m_rr[0];
  tb_dram_model #(.NP(1)) mem (.clk, .req_valid(m_rv), .req_ready(m_rr), .req(m_rq), .rsp_valid(m_sv), .rsp_data(m_sd));

  logic [127:0] expq [4][$];
  // the words the writer takes, in order, per ring
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    expq[int'(in_mb_row) % 4].push_back(in_data);
    mw[int'(in_mb_row) % 4] = (mw[int'(in_mb_row) % 4] + 1) % SZ;
  end
  int mw [4], mr [4];   // model write / read pointers

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumer: pops words from the rings now and then, comparing them
  always @(posedge clk) if (rst_n) begin
    #2;
    for (int s = 0; s < 4; s++)
      if (mr[s] != mw[s] && $urandom_range(0, 5) == 0) begin
        logic [127:0] e;
        e = expq[s].pop_front();
        checks++;
        if (mem.rd(int'(cfg_base[s]) + mr[s]) != e) begin failures++; if (failures < 4) $display("ring %0d word %0d wrong: %h exp %h t=%0t", s, mr[s], mem.rd(int'(cfg_base[s]) + mr[s]), e, $time); end
        mr[s] = (mr[s] + 1) % SZ;
      end
    for (int s = 0; s < 4; s++) rd_ptr[s] = 16'(mr[s]);
  end
  // full check for the word on offer
  always @(negedge clk) if (rst_n) begin
    if (in_valid) begin
      int s;
      bit full;
      s = int'(in_mb_row) % 4;
      full = ((mw[s] + 1) % SZ == mr[s]);
      if (full) begin fulls++; checks++; if (in_ready) begin failures++; $display("accepted into a full ring"); end end
    end
  end

  initial begin
    cfg_load = 0; slice_start = 0; in_valid = 0; in_mb_row = 0; in_data = '0;
    for (int s = 0; s < 4; s++) begin cfg_base[s] = ADDR_W'('h100 + s * 'h40); cfg_size[s] = 16'(SZ); mw[s] = 0; mr[s] = 0; rd_ptr[s] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int sl = 0; sl < 6; sl++) begin
      @(negedge clk); slice_start = 1; @(negedge clk); slice_start = 0;
      checks++;
      if (!start_valid) begin failures++; $display("no start report"); end
      for (int s = 0; s < 4; s++) begin
        checks++;
        if (start_addr[s] != cfg_base[s] + ADDR_W'(mw[s])) begin failures++; if (failures < 6) $display("slice %0d start %0d wrong: %h exp %h", sl, s, start_addr[s], cfg_base[s] + ADDR_W'(mw[s])); end
      end
      for (int w = 0; w < 60; w++) begin
        logic [127:0] d;
        int row;
        row = sl * 3 + w / 8;          // MBs of consecutive rows, as an ED emits them
        d = {32'(sl), 32'(w), 32'(row), 32'($urandom)};
        // offered at a falling edge; ready is stable until the next rising edge
        in_valid = 1; in_mb_row = 8'(row); in_data = d;
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
        in_valid = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
    end
    in_valid <= 0;
    repeat (400) @(posedge clk);
    for (int s = 0; s < 4; s++) begin checks++; if (wr_ptr[s] != 16'(mw[s])) failures++; end
    checks++;
    if (fulls == 0) begin failures++; $display("ring never full"); end
    $display("full-ring stall cycles %0d", fulls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
