// tb_length_cache: DRAM model filled with a known pattern (each 32-bit lane holds a hash of its
// word address and lane). Checks the record returned for random requests, the one-cycle hit
// latency, and FIFO replacement: after 33 distinct lines the first one misses again, and
// reloading it evicts the second-oldest line, not a younger one.
module tb_length_cache;
  import lfrc_pkg::*;
  import dram_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  localparam int LPR = 4, LBASE = 'h2000;
  logic [ADDR_W-1:0] cfg_len_base [16];
  logic req_valid, req_ready, out_valid, out_ready, mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic flush, stat_hit, stat_miss;
  preq_t req, out_req;
  glen_t out_glen;
  dram_req_t mem_req;
  logic [127:0] mem_rsp_data;
  int checks = 0, failures = 0, misses = 0;

  length_cache dut (.clk, .rst_n, .flush, .cfg_len_base, .cfg_lines_per_row(7'(LPR)), .req_valid, .req_ready, .req,
    .out_valid, .out_ready, .out_req, .out_glen, .mem_req_valid, .mem_req_ready, .mem_req,
    .mem_rsp_valid, .mem_rsp_data, .stat_hit, .stat_miss);

  logic m_rv [1], m_rr [1], m_sv [1];
  dram_req_t m_rq [1];
  logic [127:0] m_sd [1];
  assign m_rv[0] = mem_req_valid; assign m_rq[0] = mem_req; assign mem_req_ready = m_rr[0];
  assign mem_rsp_valid = m_sv[0]; assign mem_rsp_data = m_sd[0];
  tb_dram_model #(.NP(1)) mem (.clk, .req_valid(m_rv), .req_ready(m_rr), .req(m_rq), .rsp_valid(m_sv), .rsp_data(m_sd));

  function automatic logic [31:0] pat(input int a, input int lane);
    return 32'(a * 2654435761 + lane * 40503 + 7);
  endfunction

  always @(posedge clk) if (stat_miss) misses++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one request, returns cycles until the answer
  task automatic lookup(input int f, input int gx, input int gy, output int cyc);
    int a, lane;
    req <= '{frame: 4'(f), gx: 9'(gx), gy: 8'(gy), part: 2'(gx % 4)};
    req_valid <= 1;
    cyc = 0;
    @(negedge clk);
    while (!req_ready) begin @(negedge clk); cyc++; end
    @(posedge clk); cyc++;
    req_valid <= 0;
    #1;
    a = LBASE + f * 1024 + ((gy / 2) * LPR + gx / 8) * 4 + (gx / 2) % 4;
    lane = (gy % 2) * 2 + gx % 2;
    checks++;
    if (!out_valid || out_glen != glen_t'(pat(a, lane)) || out_req.gx != 9'(gx) || out_req.gy != 8'(gy)) begin
      failures++;
      if (failures < 6) $display("lookup f%0d gx%0d gy%0d wrong", f, gx, gy);
    end
  endtask

  initial begin
    int cyc, m0;
    for (int f = 0; f < 16; f++) cfg_len_base[f] = ADDR_W'(LBASE + f * 1024);
    for (int a = LBASE; a < LBASE + 16 * 1024; a++)
      mem.wr(a, {pat(a, 3), pat(a, 2), pat(a, 1), pat(a, 0)}, '1);
    req_valid = 0; req = '0; out_ready = 1; flush = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random lookups
    for (int i = 0; i < 300; i++) lookup($urandom_range(0, 3), $urandom_range(0, 31), $urandom_range(0, 7), cyc);
    // hit latency: same group again
    lookup(1, 9, 3, cyc);
    lookup(1, 9, 3, cyc);
    checks++; if (cyc != 1) begin failures++; $display("hit took %0d cycles", cyc); end
    // FIFO replacement
    flush <= 1; @(posedge clk); flush <= 0;
    for (int l = 0; l < 33; l++) lookup(5 + l / 8, (l % 4) * 8, (l / 4 % 2) * 2, cyc);  // 33 distinct lines
    m0 = misses;
    lookup(5, 0, 0, cyc);           // line 0: evicted by line 32
    checks++; if (misses != m0 + 1) begin failures++; $display("oldest line not evicted"); end
    lookup(5, 16, 0, cyc);          // line 2: still cached
    checks++; if (misses != m0 + 1) begin failures++; $display("younger line evicted"); end
    lookup(5, 8, 0, cyc);           // line 1: evicted by the reload of line 0
    checks++; if (misses != m0 + 2) begin failures++; $display("FIFO order wrong"); end
    $display("misses %0d", misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
