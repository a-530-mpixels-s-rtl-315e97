// tb_lb_bypass: a deblocking-filter model walks a 13x10 MB picture in the PMBR scan (regions of
// 4 rows, 2-column skew per row). For each MB it asks for the bottom lines of the MB above and
// then stores its own bottom lines (random data). Checks that every read returns what was
// stored for that MB, and that only rows 3 of the regions are written to DRAM and only rows 0
// of the regions (below the first) read from it: 3/4 of the traffic stays on chip.
module tb_lb_bypass;
  import dram_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  localparam int W = 13, H = 10, MBW = 8;
  logic              wr_valid, wr_ready, rd_req_valid, rd_req_ready, rd_rsp_valid;
  logic [8:0]        wr_x, rd_x;
  logic [7:0]        wr_y, rd_y;
  logic [MBW*DATA_W-1:0] wr_data, rd_rsp_data;
  logic              mem_req_valid, mem_req_ready, mem_rsp_valid, stat_onchip, stat_dram;
  dram_req_t         mem_req;
  logic [DATA_W-1:0] mem_rsp_data;
  logic [ADDR_W-1:0] cfg_lb_base;
  int checks = 0, failures = 0, n_chip = 0, n_dram = 0, exp_dram = 0, exp_chip = 0;

  lb_bypass dut (.*);

  logic m_rv [1], m_rr [1], m_sv [1];
  dram_req_t m_rq [1];
  logic [DATA_W-1:0] m_sd [1];
  assign m_rv[0] = mem_req_valid; assign m_rq[0] = mem_req; assign mem_req_ready = m_rr[0];
  assign mem_rsp_valid = m_sv[0]; assign mem_rsp_data = m_sd[0];
  tb_dram_model #(.NP(1)) mem (.clk, .req_valid(m_rv), .req_ready(m_rr), .req(m_rq), .rsp_valid(m_sv), .rsp_data(m_sd));

  logic [MBW*DATA_W-1:0] lines [W][H];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (stat_onchip) n_chip++;
    if (stat_dram) n_dram++;
  end

  task automatic visit(input int x, input int y);
    if (y > 0) begin
      rd_req_valid = 1; rd_x = 9'(x); rd_y = 8'(y - 1);
      #1;
      while (!rd_req_ready) begin @(negedge clk); #1; end
      @(negedge clk);
      rd_req_valid = 0;
      while (!rd_rsp_valid) @(negedge clk);
      checks++;
      if (rd_rsp_data != lines[x][y - 1]) begin failures++; if (failures < 5) $display("MB (%0d,%0d): lines above wrong", x, y); end
      if ((y - 1) % 4 == 3) exp_dram++; else exp_chip++;
    end
    for (int k = 0; k < MBW; k++) lines[x][y][DATA_W * k +: DATA_W] = {$urandom, $urandom, $urandom, $urandom};
    wr_valid = 1; wr_x = 9'(x); wr_y = 8'(y); wr_data = lines[x][y];
    #1;
    while (!wr_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    wr_valid = 0;
    if (y % 4 == 3) exp_dram++; else exp_chip++;
  endtask

  initial begin
    wr_valid = 0; rd_req_valid = 0; wr_x = 0; wr_y = 0; rd_x = 0; rd_y = 0; wr_data = '0;
    cfg_lb_base = ADDR_W'('h8000);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int ry = 0; ry < H; ry += 4)
      for (int t = 0; t < W + 6; t++)
        for (int r = 0; r < 4; r++) begin
          int x, y;
          x = t - 2 * r; y = ry + r;
          if (x >= 0 && x < W && y < H) visit(x, y);
        end
    repeat (20) @(posedge clk);
    checks += 2;
    if (n_dram != exp_dram) begin failures++; $display("DRAM accesses %0d exp %0d", n_dram, exp_dram); end
    if (n_chip != exp_chip) begin failures++; $display("on-chip accesses %0d exp %0d", n_chip, exp_chip); end
    $display("line buffer accesses: %0d on chip, %0d to DRAM", n_chip, n_dram);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
