// tb_workload_lfrc: VCR-LFRC on a 4096x2160 frame geometry. The coder compresses the two
// bottom group rows of the frame (512 groups per row, group rows 134 and 135, 4096 partitions
// of mixed content) into DRAM; the restore path then serves random partition requests across
// that band. Checks every restored 4x4 unit against the original samples, that the coder keeps
// up with the 3 pixels/cycle that 4096x2160@60fps needs at 175 MHz, and reports the
// compression achieved and the length cache behaviour. Frame buffer and length table placement
// use the full frame size (512 groups per row, 64 length-cache lines per group-row pair).
module tb_workload_lfrc;
  import lfrc_pkg::*;
  import dram_pkg::*;
  import tb_lfrc_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  localparam int GPR = 512, LPR = 64, GY0 = 134, NREQ = 600;
  logic [ADDR_W-1:0] cfg_data_base [16], cfg_len_base [16];
  logic        in_valid, in_ready, req_valid, req_ready, out_valid, out_ready;
  preq_t       in_tag, req, out_req;
  logic [383:0] in_part;
  logic [1:0]  out_unit;
  logic [127:0] out_samples;
  logic        cv, cr, lv, lr, pv, pr, lsv, psv, csv;
  dram_req_t   cq, lq, pq;
  logic [127:0] lsd, psd, csd;
  logic        group_done, raw_code, hit, miss, raw_rest;
  int checks = 0, failures = 0, groups = 0, raws = 0, hits = 0, misses = 0, bits = 0;

  lfrc_coding u_code (.clk, .rst_n, .cfg_data_base, .cfg_len_base, .cfg_groups_per_row(10'(GPR)),
    .cfg_lines_per_row(7'(LPR)), .in_valid, .in_ready, .in_tag, .in_part,
    .mem_req_valid(cv), .mem_req_ready(cr), .mem_req(cq), .stat_group_done(group_done), .stat_raw_part(raw_code));

  lfrc_restore u_rest (.clk, .rst_n, .flush(1'b0), .cfg_data_base, .cfg_len_base,
    .cfg_groups_per_row(10'(GPR)), .cfg_lines_per_row(7'(LPR)),
    .req_valid, .req_ready, .req, .out_valid, .out_ready, .out_req, .out_unit, .out_samples,
    .len_mem_req_valid(lv), .len_mem_req_ready(lr), .len_mem_req(lq), .len_mem_rsp_valid(lsv), .len_mem_rsp_data(lsd),
    .part_mem_req_valid(pv), .part_mem_req_ready(pr), .part_mem_req(pq), .part_mem_rsp_valid(psv), .part_mem_rsp_data(psd),
    .stat_len_hit(hit), .stat_len_miss(miss), .stat_raw_part(raw_rest));

  logic m_rv [3], m_rr [3], m_sv [3];
  dram_req_t m_rq [3];
  logic [127:0] m_sd [3];
  assign m_rv = '{cv, lv, pv};
  assign m_rq = '{cq, lq, pq};
  assign cr = m_rr[0]; assign lr = m_rr[1]; assign pr = m_rr[2];
  assign csv = m_sv[0]; assign lsv = m_sv[1]; assign psv = m_sv[2];
  assign csd = m_sd[0]; assign lsd = m_sd[1]; assign psd = m_sd[2];
  tb_dram_model #(.NP(3)) mem (.clk, .req_valid(m_rv), .req_ready(m_rr), .req(m_rq), .rsp_valid(m_sv), .rsp_data(m_sd));

  logic [383:0] store [2][GPR][4];
  preq_t reqs [NREQ];

  always @(posedge clk) if (rst_n) begin
    if (group_done) groups++;
    if (raw_code) raws++;
    if (hit) hits++;
    if (miss) misses++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got, cyc;
    logic [511:0] tmp;
    for (int f = 0; f < 16; f++) begin
      cfg_data_base[f] = ADDR_W'('h100000 * (f + 1));
      cfg_len_base[f]  = ADDR_W'('h1000000 + 'h8000 * f);
    end
    for (int r = 0; r < 2; r++)
      for (int gx = 0; gx < GPR; gx++)
        for (int p = 0; p < 4; p++) begin
          int amp;
          case ((gx / 3 + p + r) % 6) 0: amp = 0; 1: amp = 2; 2: amp = 4; 3: amp = 9; 4: amp = 1; default: amp = 60; endcase
          store[r][gx][p] = gen_part(amp, r * 9000 + gx * 4 + p);
          bits += encode(store[r][gx][p], tmp);
        end
    for (int i = 0; i < NREQ; i++)
      reqs[i] = '{frame: 4'(3), gx: 9'($urandom_range(0, GPR - 1)), gy: 8'(GY0 + $urandom_range(0, 1)), part: 2'($urandom_range(0, 3))};
    in_valid = 0; in_tag = '0; in_part = '0; req_valid = 0; req = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // code the band, one partition per cycle when the coder is ready
    cyc = 0;
    for (int r = 0; r < 2; r++)
      for (int gx = 0; gx < GPR; gx++)
        for (int p = 0; p < 4; p++) begin
          @(negedge clk);
          in_valid = 1; in_tag = '{frame: 4'(3), gx: 9'(gx), gy: 8'(GY0 + r), part: 2'(p)}; in_part = store[r][gx][p];
          #1;
          while (!in_ready) begin @(negedge clk); cyc++; #1; end
          cyc++;
        end
    @(negedge clk); in_valid = 0;
    while (groups < 2 * GPR) begin @(negedge clk); cyc++; end
    checks++;
    // 4096 partitions x 32 pixels must take at most 1/3 cycle per pixel
    if (cyc * 3 > 2 * GPR * 4 * 32) begin failures++; $display("coding too slow"); end
    $display("coded %0d partitions (%0d pixels) in %0d cycles: %0d.%02d pixels/cycle, %0d raw",
             2 * GPR * 4, 2 * GPR * 4 * 32, cyc, 2 * GPR * 128 / cyc, (2 * GPR * 12800 / cyc) % 100, raws);
    $display("compressed to %0d%% of the original size", bits * 100 / (2 * GPR * 4 * 384));
    repeat (30) @(negedge clk);
    got = 0;
    fork
      for (int i = 0; i < NREQ; i++) begin
        @(negedge clk);
        req_valid = 1; req = reqs[i];
        #1;
        while (!req_ready) begin @(negedge clk); #1; end
        @(negedge clk);
        req_valid = 0;
      end
      while (got < 3 * NREQ) begin
        @(posedge clk);
        if (out_valid && out_ready) begin
          preq_t q;
          q = reqs[got / 3];
          checks++;
          if (out_req != q || out_unit != 2'(got % 3) ||
              out_samples != unit_samples(store[int'(q.gy) - GY0][q.gx][q.part], got % 3)) begin
            failures++;
            if (failures < 6) $display("request %0d (gx %0d gy %0d p %0d) unit %0d wrong", got / 3, q.gx, q.gy, q.part, got % 3);
          end
          got++;
        end
        out_ready <= ($urandom_range(0, 5) != 0);
      end
    join
    $display("length cache: %0d hits, %0d misses over %0d requests", hits, misses, NREQ);
    checks++;
    if (hits == 0 || misses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
