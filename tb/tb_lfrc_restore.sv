// tb_lfrc_restore: fills a DRAM model with 16 compressed frames (16x4 groups each), packed by
// the reference model, then requests random partitions through the restoring component and
// compares every restored 4x4 unit with the original samples, in request order. The requests
// touch 64 length-cache lines, so hits, misses and FIFO evictions all occur; uncompressed
// partitions (also as partition 3 of a group) are counted.
module tb_lfrc_restore;
  import lfrc_pkg::*;
  import dram_pkg::*;
  import tb_lfrc_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  localparam int GPR = 16, GROWS = 4, LPR = 2, NF = 16, NREQ = 600;
  localparam int DBASE = 32'h1000, LBASE = 32'h80000;
  logic [ADDR_W-1:0] cfg_data_base [16];
  logic [ADDR_W-1:0] cfg_len_base  [16];
  logic        req_valid, req_ready, out_valid, out_ready;
  preq_t       req, out_req;
  logic [1:0]  out_unit;
  logic [127:0] out_samples;
  logic        lv, lr, pv, pr, lsv, psv;
  dram_req_t   lq, pq;
  logic [127:0] lsd, psd;
  logic        stat_len_hit, stat_len_miss, stat_raw_part;
  int checks = 0, failures = 0, hits = 0, misses = 0, raws = 0;

  lfrc_restore dut (.clk, .rst_n, .flush(1'b0), .cfg_data_base, .cfg_len_base,
    .cfg_groups_per_row(10'(GPR)), .cfg_lines_per_row(7'(LPR)),
    .req_valid, .req_ready, .req, .out_valid, .out_ready, .out_req, .out_unit, .out_samples,
    .len_mem_req_valid(lv), .len_mem_req_ready(lr), .len_mem_req(lq), .len_mem_rsp_valid(lsv), .len_mem_rsp_data(lsd),
    .part_mem_req_valid(pv), .part_mem_req_ready(pr), .part_mem_req(pq), .part_mem_rsp_valid(psv), .part_mem_rsp_data(psd),
    .stat_len_hit, .stat_len_miss, .stat_raw_part);

  logic m_rv [2], m_rr [2], m_sv [2];
  dram_req_t m_rq [2];
  logic [127:0] m_sd [2];
  assign m_rv = '{lv, pv};
  assign m_rq = '{lq, pq};
  assign lr = m_rr[0]; assign pr = m_rr[1];
  assign lsv = m_sv[0]; assign psv = m_sv[1];
  assign lsd = m_sd[0]; assign psd = m_sd[1];
  tb_dram_model #(.NP(2)) mem (.clk, .req_valid(m_rv), .req_ready(m_rr), .req(m_rq), .rsp_valid(m_sv), .rsp_data(m_sd));

  function automatic logic [383:0] part_of(input int f, input int gx, input int gy, input int p);
    int amp;
    case ((gx + gy * 3 + p + f) % 6) 0: amp = 0; 1: amp = 2; 2: amp = 6; 3: amp = 20; 4: amp = 1; default: amp = 150; endcase
    void'($urandom(f * 100000 + gx * 1000 + gy * 10 + p));
    return gen_part(amp, f * 31 + gx * 7 + gy * 13 + p);
  endfunction

  logic [383:0] store [NF][GROWS][GPR][4];
  preq_t reqs [NREQ];

  always @(posedge clk) begin
    if (stat_len_hit) hits++;
    if (stat_len_miss) misses++;
    if (stat_raw_part) raws++;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got;
    for (int f = 0; f < 16; f++) begin cfg_data_base[f] = ADDR_W'(DBASE + f * 4096); cfg_len_base[f] = ADDR_W'(LBASE + f * 256); end
    for (int f = 0; f < NF; f++)
      for (int gy = 0; gy < GROWS; gy++)
        for (int gx = 0; gx < GPR; gx++) begin
          logic [1535:0] g; logic [31:0] rec; int used, a, la, lane;
          logic [383:0] ps [4];
          for (int p = 0; p < 4; p++) begin ps[p] = part_of(f, gx, gy, p); store[f][gy][gx][p] = ps[p]; end
          used = pack_group(ps, g, rec);
          a = group_first(DBASE + f * 4096, GPR, gx, gy, used);
          for (int w = 0; w < used; w++) mem.wr(a + w, g[128*w +: 128], '1);
          la = len_word_addr(LBASE + f * 256, LPR, gx, gy);
          lane = (gy % 2) * 2 + gx % 2;
          mem.wr(la, 128'(rec) << (32 * lane), 16'hF << (4 * lane));
        end
    for (int i = 0; i < NREQ; i++) begin
      int f;
      f = (i / 40) % NF;   // runs of requests per frame, revisiting frames later
      reqs[i] = '{frame: 4'(f), gx: 9'($urandom_range(0, GPR - 1)), gy: 8'($urandom_range(0, GROWS - 1)), part: 2'($urandom_range(0, 3))};
    end
    req_valid = 0; req = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    got = 0;
    fork
      begin
        for (int i = 0; i < NREQ; i++) begin
          req_valid <= 1; req <= reqs[i];
          @(posedge clk);
          while (!req_ready) @(posedge clk);
        end
        req_valid <= 0;
      end
      begin
        while (got < 3 * NREQ) begin
          out_ready <= ($urandom_range(0, 5) != 0);
          @(posedge clk);
          if (out_valid && out_ready) begin
            preq_t r;
            r = reqs[got / 3];
            checks++;
            if (out_req != r || out_unit != 2'(got % 3) ||
                out_samples != unit_samples(store[r.frame][r.gy][r.gx][r.part], got % 3)) begin
              failures++;
              if (failures < 6) $display("req %0d (f%0d gx%0d gy%0d p%0d) unit %0d wrong", got / 3, r.frame, r.gx, r.gy, r.part, got % 3);
            end
            got++;
          end
        end
      end
    join
    $display("length cache hits %0d misses %0d, raw partitions %0d", hits, misses, raws);
    checks++; if (hits == 0) failures++;
    checks++; if (misses <= 32) failures++;   // 64 distinct lines: evictions must occur
    checks++; if (raws == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
