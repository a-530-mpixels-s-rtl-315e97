// tb_lfrc_coding: streams the partitions of a small frame (16x4 groups) into the coding
// component, group by group, with a DRAM model behind it, then compares every group slot's
// used words and every length record in DRAM with the packing worked out by the reference
// model. Counts incompressible partitions and groups whose data is end- or start-aligned.
module tb_lfrc_coding;
  import lfrc_pkg::*;
  import dram_pkg::*;
  import tb_lfrc_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  localparam int GPR = 16, GROWS = 4, LPR = 2;
  localparam int DBASE = 32'h1000, LBASE = 32'h8000;
  logic [ADDR_W-1:0] cfg_data_base [16];
  logic [ADDR_W-1:0] cfg_len_base  [16];
  logic        in_valid, in_ready, mem_req_valid, mem_req_ready;
  preq_t       in_tag;
  logic [383:0] in_part;
  dram_req_t   mem_req;
  logic        stat_group_done, stat_raw_part;
  int checks = 0, failures = 0, groups = 0, raws = 0;

  lfrc_coding dut (.clk, .rst_n, .cfg_data_base, .cfg_len_base,
    .cfg_groups_per_row(10'(GPR)), .cfg_lines_per_row(7'(LPR)),
    .in_valid, .in_ready, .in_tag, .in_part, .mem_req_valid, .mem_req_ready, .mem_req,
    .stat_group_done, .stat_raw_part);

  logic      m_rv [1], m_rr [1], m_sv [1];
  dram_req_t m_rq [1];
  logic [127:0] m_sd [1];
  assign m_rv[0] = mem_req_valid;
  assign m_rq[0] = mem_req;
  assign mem_req_ready = m_rr[0];
  tb_dram_model #(.NP(1)) mem (.clk, .req_valid(m_rv), .req_ready(m_rr), .req(m_rq), .rsp_valid(m_sv), .rsp_data(m_sd));

  logic [383:0] frame [GROWS][GPR][4];

  always @(posedge clk) begin
    if (stat_group_done) groups++;
    if (stat_raw_part) raws++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 16; f++) begin cfg_data_base[f] = ADDR_W'(DBASE + f * 4096); cfg_len_base[f] = ADDR_W'(LBASE + f * 256); end
    for (int gy = 0; gy < GROWS; gy++)
      for (int gx = 0; gx < GPR; gx++)
        for (int p = 0; p < 4; p++) begin
          int amp;
          case ((gx + gy * 3 + p) % 6) 0: amp = 0; 1: amp = 2; 2: amp = 6; 3: amp = 20; 4: amp = 2; default: amp = 150; endcase
          frame[gy][gx][p] = gen_part(amp, gx * 7 + gy * 13 + p);
        end
    in_valid = 0; in_tag = '0; in_part = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int gy = 0; gy < GROWS; gy++)
      for (int gx = 0; gx < GPR; gx++)
        for (int p = 0; p < 4; p++) begin
          in_valid <= 1;
          in_tag   <= '{frame: 4'd3, gx: 9'(gx), gy: 8'(gy), part: 2'(p)};
          in_part  <= frame[gy][gx][p];
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
    in_valid <= 0;
    repeat (200) @(posedge clk);
    checks++;
    if (groups != GPR * GROWS) begin failures++; $display("groups done %0d", groups); end
    for (int gy = 0; gy < GROWS; gy++)
      for (int gx = 0; gx < GPR; gx++) begin
        logic [1535:0] g; logic [31:0] rec, got; int used, a, la;
        used = pack_group(frame[gy][gx], g, rec);
        a = group_first(DBASE + 3 * 4096, GPR, gx, gy, used);
        for (int w = 0; w < used; w++) begin
          checks++;
          if (mem.rd(a + w) != g[128*w +: 128]) begin
            failures++;
            if (failures < 6) $display("group (%0d,%0d) word %0d differs", gx, gy, w);
          end
        end
        la  = len_word_addr(LBASE + 3 * 256, LPR, gx, gy);
        got = mem.rd(la)[32 * ((gy % 2) * 2 + gx % 2) +: 32];
        checks++;
        if (got[29:0] != rec[29:0]) begin
          failures++;
          if (failures < 6) $display("group (%0d,%0d) record %h exp %h", gx, gy, got, rec);
        end
      end
    checks++;
    if (raws == 0) begin failures++; $display("no raw partition"); end
    $display("groups %0d, raw partitions %0d", groups, raws);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
