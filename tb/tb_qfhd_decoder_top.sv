// tb_qfhd_decoder_top: end-to-end test of the decoder infrastructure at its default parameters
// (two entropy decoders), on a 6x8-MB picture cut into two slices.
//   * Stream: an SPS, a PPS and two slice NAL units enter the bit stream processor; every NAL
//     unit must be reported with its buffer address and type, and the two slices must be
//     launched on the two entropy decoders (the second while the first is still busy).
//   * Entropy decoder models write one package per MB (a header word with the payload length,
//     then 0..3 payload words) in raster order into their SDP rings; engine 0's rings are small
//     so that it stalls on a full ring while the main decoder catches up.
//   * A main decoder model takes the slices in stream order from the order queue, loads the
//     SDP reader and runs the PMBR scan; the MB order and every package word are checked.
//   * A deblocking filter model follows the scan: it reads the bottom lines of the MB above
//     from the line buffer and stores its own, checking the data; on-chip and DRAM accesses are
//     counted against the region rows.
//   * In parallel, a 4x4-group frame is written through the LFRC coder and then read back at
//     random through the restore path; every restored unit is compared with the original.
// Each mechanism (parameter/slice NALUs, both EDs used, full-ring stall, scan skipping MBs of
// the other slice, line buffer on chip and in DRAM, raw and compressed partitions, length cache
// hits and misses) is counted, and one that never happened is a failure.
module tb_qfhd_decoder_top;
  import lfrc_pkg::*;
  import dram_pkg::*;
  import tb_lfrc_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  localparam int NE = 2, AW = 20;
  localparam int W = 6, H = 8, NMB = W * H;
  localparam int GPR = 4, GROWS = 4, NREQ = 200;
  localparam int DBASE = 'h20000, LBASE = 'h30000;
  localparam int S0_LAST = 27;

  logic [ADDR_W-1:0] cfg_data_base [16], cfg_len_base [16], cfg_lb_base;
  logic [9:0]        cfg_groups_per_row;
  logic [6:0]        cfg_lines_per_row;
  logic              cfg_lc_flush, cfg_sdp_load;
  logic [ADDR_W-1:0] cfg_sdp_base [NE][4];
  logic [15:0]       cfg_sdp_size [NE][4];
  logic [8:0]        cfg_mb_w;
  logic [7:0]        cfg_mb_h;
  logic              md_slice_load, md_start, md_busy, md_done;
  logic [0:0]        md_ed, ord_ed;
  logic [ADDR_W-1:0] md_sdp_start [4];
  logic [15:0]       md_first_mb, md_last_mb;
  logic              bs_valid, bs_ready, bs_eos;
  logic [7:0]        bs_byte;
  logic              nb_we;
  logic [AW-1:0]     nb_addr, nb_wptr, nal_start_addr, nal_len;
  logic [7:0]        nb_data;
  logic              nal_start_valid, nal_is_slice, nal_end_valid;
  logic [4:0]        nal_type;
  logic              ed_start [NE], ed_done [NE], ed_slice_start [NE];
  logic [AW-1:0]     ed_addr [NE];
  logic [15:0]       ed_slice [NE];
  logic              ed_sdp_valid [NE], ed_sdp_ready [NE], sdp_start_valid [NE];
  logic [7:0]        ed_sdp_row [NE];
  logic [DATA_W-1:0] ed_sdp_data [NE];
  logic [ADDR_W-1:0] sdp_start_addr [NE][4];
  logic              ord_valid, ord_ready;
  logic              md_mb_valid, md_sdp_valid, md_sdp_ready, md_sdp_last;
  logic [8:0]        md_mb_x;
  logic [7:0]        md_mb_y;
  logic [DATA_W-1:0] md_sdp_data;
  logic              lb_wr_valid, lb_wr_ready, lb_rd_valid, lb_rd_ready, lb_rsp_valid;
  logic [8:0]        lb_wr_x, lb_rd_x;
  logic [7:0]        lb_wr_y, lb_rd_y;
  logic [8*DATA_W-1:0] lb_wr_data, lb_rsp_data;
  logic              fw_valid, fw_ready, rf_req_valid, rf_req_ready, rf_out_valid, rf_out_ready;
  preq_t             fw_tag, rf_req, rf_out_req;
  logic [PART_BITS-1:0] fw_part;
  logic [1:0]        rf_out_unit;
  logic [127:0]      rf_out_samples;
  logic              dram_req_valid, dram_req_ready, dram_rsp_valid;
  dram_req_t         dram_req;
  logic [DATA_W-1:0] dram_rsp_data;
  logic              ev_len_hit, ev_len_miss, ev_raw_restore, ev_raw_code, ev_group_done,
                     ev_lb_onchip, ev_lb_dram;

  qfhd_decoder_top dut (.*);

  logic m_rv [1], m_rr [1], m_sv [1];
  dram_req_t m_rq [1];
  logic [DATA_W-1:0] m_sd [1];
  assign m_rv[0] = dram_req_valid; assign m_rq[0] = dram_req; assign dram_req_ready = m_rr[0];
  assign dram_rsp_valid = m_sv[0]; assign dram_rsp_data = m_sd[0];
  tb_dram_model #(.NP(1)) mem (.clk, .req_valid(m_rv), .req_ready(m_rr), .req(m_rq), .rsp_valid(m_sv), .rsp_data(m_sd));

  int checks = 0, failures = 0;
  int n_param = 0, n_slice = 0, n_full = 0, n_skip = 0, n_chip = 0, n_dram = 0;
  int n_hit = 0, n_miss = 0, n_rawr = 0, n_rawc = 0, n_groups = 0, n_mb = 0, n_words = 0;
  int ed_used [NE];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (ev_len_hit) n_hit++;
    if (ev_len_miss) n_miss++;
    if (ev_raw_restore) n_rawr++;
    if (ev_raw_code) n_rawc++;
    if (ev_group_done) n_groups++;
    if (ev_lb_onchip) n_chip++;
    if (ev_lb_dram) n_dram++;
    if (ed_sdp_valid[0] && dut.g_ed[0].u_wr.full) n_full++;
  end

  // ---------------- stream: NAL units into the BSP; reports checked ----------------------
  byte unsigned stream [$];
  int nal_addr [$], nal_kind [$];     // expected buffer address and type of each NAL unit
  int slice_nal_addr [$];

  task automatic add_nal(input int typ, input int len);
    stream.push_back(0); stream.push_back(0); stream.push_back(1);
    nal_addr.push_back(nb_total); nal_kind.push_back(typ);
    if (typ >= 1 && typ <= 5) slice_nal_addr.push_back(nb_total);
    stream.push_back(8'(8'h60 | typ));
    for (int i = 1; i < len; i++) stream.push_back(8'($urandom_range(2, 255)));
    nb_total += len;
  endtask
  int nb_total = 0;

  int rep_idx = 0;
  always @(posedge clk) if (rst_n && nal_start_valid) begin
    check(rep_idx < nal_addr.size() && int'(nal_start_addr) == nal_addr[rep_idx] && int'(nal_type) == nal_kind[rep_idx], "NAL unit report");
    if (nal_is_slice) n_slice++; else n_param++;
    rep_idx++;
  end

  // ---------------- entropy decoder models ----------------------------------------------
  int launches = 0;
  int slice_of_ed [NE];
  logic [ADDR_W-1:0] slice_sdp [2][4];
  bit slice_started [2], slice_written [2];
  int first_mb [2] = '{0, S0_LAST + 1};
  int last_mb  [2] = '{S0_LAST, NMB - 1};
  int npay [NMB];

  for (genvar e = 0; e < NE; e++) begin : g_edm
    initial begin
      ed_done[e] = 0; ed_slice_start[e] = 0; ed_sdp_valid[e] = 0; ed_sdp_row[e] = 0; ed_sdp_data[e] = '0;
      forever begin
        int s;
        @(posedge clk);
        if (rst_n && ed_start[e]) begin
          s = launches; launches++;
          ed_used[e]++;
          check(s < 2 && int'(ed_addr[e]) == slice_nal_addr[s], "slice launched with its NALU address");
          @(negedge clk); ed_slice_start[e] = 1; @(negedge clk); ed_slice_start[e] = 0;
          #1;
          check(sdp_start_valid[e] == 1'b1, "SDP slice start report");
          for (int k = 0; k < 4; k++) slice_sdp[s][k] = sdp_start_addr[e][k];
          slice_started[s] = 1;
          for (int m = first_mb[s]; m <= last_mb[s]; m++)
            for (int w = 0; w <= npay[m]; w++) begin
              @(negedge clk);
              ed_sdp_valid[e] = 1; ed_sdp_row[e] = 8'(m / W);
              ed_sdp_data[e] = (w == 0) ? {32'(s), 32'(m), 56'h0, 8'(npay[m])} : {32'(s), 32'(m), 32'(w), 32'hA5A5_0000 | 32'(m)};
              #1;
              while (!ed_sdp_ready[e]) begin @(negedge clk); #1; end
              @(negedge clk);
              ed_sdp_valid[e] = 0;
            end
          slice_written[s] = 1;
          @(negedge clk); ed_done[e] = 1; @(negedge clk); ed_done[e] = 0;
        end
      end
    end
  end

  // ---------------- main decoder model: PMBR scan and SDP words -------------------------
  int exp_x [$], exp_y [$], lb_x [$], lb_y [$];
  int md_slice = 0;
  bit md_all_done = 0;

  always @(posedge clk) if (rst_n && md_mb_valid) begin
    check(exp_x.size() > 0 && int'(md_mb_x) == exp_x[0] && int'(md_mb_y) == exp_y[0], "PMBR scan order");
    if (exp_x.size() > 0) begin void'(exp_x.pop_front()); void'(exp_y.pop_front()); end
    lb_x.push_back(int'(md_mb_x)); lb_y.push_back(int'(md_mb_y));
    n_mb++;
  end

  int word_mb [$], word_w [$];
  always @(posedge clk) if (rst_n) begin
    if (md_sdp_valid && md_sdp_ready) begin
      int m, w;
      m = word_mb.size() > 0 ? word_mb[0] : -1;
      w = word_w.size() > 0 ? word_w[0] : -1;
      if (word_mb.size() > 0) begin void'(word_mb.pop_front()); void'(word_w.pop_front()); end
      check(m >= 0 && int'(md_sdp_data[95:64]) == m && md_sdp_last == (w == npay[m]) &&
            (w == 0 ? md_sdp_data[7:0] == 8'(npay[m]) : int'(md_sdp_data[63:32]) == w), "SDP word to the Demux");
      n_words++;
    end
    md_sdp_ready <= ($urandom_range(0, 3) == 0);   // a slow Demux
  end

  initial begin
    md_slice_load = 0; md_start = 0; md_ed = 0; md_first_mb = 0; md_last_mb = 0; ord_ready = 0;
    for (int k = 0; k < 4; k++) md_sdp_start[k] = '0;
    repeat (6) @(posedge clk);   // past the reset
    for (int s = 0; s < 2; s++) begin
      @(negedge clk);
      while (!ord_valid) @(negedge clk);
      md_ed = ord_ed;
      ord_ready = 1; @(negedge clk); ord_ready = 0;
      while (!slice_started[s]) @(negedge clk);
      for (int k = 0; k < 4; k++) md_sdp_start[k] = slice_sdp[s][k];
      md_first_mb = 16'(first_mb[s]); md_last_mb = 16'(last_mb[s]);
      for (int rr = 0; rr < H; rr += 4)
        for (int t = 0; t < W + 6; t++)
          for (int r = 0; r < 4; r++) begin
            int x, y, a;
            x = t - 2 * r; y = rr + r; a = y * W + x;
            if (x >= 0 && x < W && y < H) begin
              if (a >= first_mb[s] && a <= last_mb[s]) begin
                exp_x.push_back(x); exp_y.push_back(y);
                for (int w = 0; w <= npay[a]; w++) begin word_mb.push_back(a); word_w.push_back(w); end
              end else n_skip++;
            end
          end
      md_slice_load = 1; @(negedge clk); md_slice_load = 0;
      md_start = 1; @(negedge clk); md_start = 0;
      while (!md_done) @(negedge clk);
      while (word_mb.size() > 0) @(negedge clk);
      check(exp_x.size() == 0, "all MBs of the slice scanned");
      md_slice = s + 1;
    end
    md_all_done = 1;
  end

  // ---------------- deblocking filter model: line buffer -----------------------------------
  logic [8*DATA_W-1:0] lines [W][H];
  int lb_done = 0;
  initial begin
    lb_wr_valid = 0; lb_rd_valid = 0; lb_wr_x = 0; lb_wr_y = 0; lb_rd_x = 0; lb_rd_y = 0; lb_wr_data = '0;
    repeat (6) @(posedge clk);   // past the reset
    forever begin
      int x, y;
      @(negedge clk);
      if (lb_x.size() > 0) begin
        x = lb_x.pop_front(); y = lb_y.pop_front();
        if (y > 0) begin
          lb_rd_valid = 1; lb_rd_x = 9'(x); lb_rd_y = 8'(y - 1);
          #1;
          while (!lb_rd_ready) begin @(negedge clk); #1; end
          @(negedge clk);
          lb_rd_valid = 0;
          while (!lb_rsp_valid) @(negedge clk);
          check(lb_rsp_data == lines[x][y - 1], "line buffer data");
        end
        for (int k = 0; k < 8; k++) lines[x][y][DATA_W * k +: DATA_W] = {$urandom, $urandom, $urandom, $urandom};
        lb_wr_valid = 1; lb_wr_x = 9'(x); lb_wr_y = 8'(y); lb_wr_data = lines[x][y];
        #1;
        while (!lb_wr_ready) begin @(negedge clk); #1; end
        @(negedge clk);
        lb_wr_valid = 0;
        lb_done++;
      end
    end
  end

  // ---------------- LFRC: write a frame, read it back ---------------------------------------
  logic [383:0] store [GROWS][GPR][4];
  bit lfrc_done = 0;
  preq_t reqs [NREQ];
  initial begin
    int got;
    fw_valid = 0; fw_tag = '0; fw_part = '0; rf_req_valid = 0; rf_req = '0; rf_out_ready = 0;
    for (int gy = 0; gy < GROWS; gy++)
      for (int gx = 0; gx < GPR; gx++)
        for (int p = 0; p < 4; p++) begin
          int amp;
          case ((gx + 3 * gy + p) % 5) 0: amp = 0; 1: amp = 3; 2: amp = 12; 3: amp = 1; default: amp = 200; endcase
          store[gy][gx][p] = gen_part(amp, gx * 7 + gy * 13 + p);
        end
    for (int i = 0; i < NREQ; i++)
      reqs[i] = '{frame: 4'(1), gx: 9'($urandom_range(0, GPR - 1)), gy: 8'($urandom_range(0, GROWS - 1)), part: 2'($urandom_range(0, 3))};
    repeat (6) @(posedge clk);   // past the reset
    for (int gy = 0; gy < GROWS; gy++)
      for (int gx = 0; gx < GPR; gx++)
        for (int p = 0; p < 4; p++) begin
          @(negedge clk);
          fw_valid = 1; fw_tag = '{frame: 4'(1), gx: 9'(gx), gy: 8'(gy), part: 2'(p)}; fw_part = store[gy][gx][p];
          #1;
          while (!fw_ready) begin @(negedge clk); #1; end
          @(negedge clk);
          fw_valid = 0;
        end
    while (n_groups < GPR * GROWS) @(negedge clk);
    repeat (50) @(negedge clk);
    got = 0;
    fork
      for (int i = 0; i < NREQ; i++) begin
        @(negedge clk);
        rf_req_valid = 1; rf_req = reqs[i];
        #1;
        while (!rf_req_ready) begin @(negedge clk); #1; end
        @(negedge clk);
        rf_req_valid = 0;
      end
      while (got < 3 * NREQ) begin
        @(posedge clk);
        if (rf_out_valid && rf_out_ready) begin
          preq_t r;
          r = reqs[got / 3];
          check(rf_out_req == r && rf_out_unit == 2'(got % 3) &&
                rf_out_samples == unit_samples(store[r.gy][r.gx][r.part], got % 3), "restored unit");
          got++;
        end
        rf_out_ready <= ($urandom_range(0, 4) != 0);
      end
    join
    lfrc_done = 1;
  end

  // ---------------- set-up and end -----------------------------------------------------------
  initial begin
    bs_valid = 0; bs_byte = 0; bs_eos = 0; cfg_lc_flush = 0; cfg_sdp_load = 0;
    cfg_mb_w = 9'(W); cfg_mb_h = 8'(H);
    cfg_groups_per_row = 10'(GPR); cfg_lines_per_row = 7'((GPR + 7) / 8);
    cfg_lb_base = ADDR_W'('h10000);
    for (int f = 0; f < 16; f++) begin cfg_data_base[f] = ADDR_W'(DBASE + f * 'h400); cfg_len_base[f] = ADDR_W'(LBASE + f * 'h40); end
    for (int e = 0; e < NE; e++)
      for (int k = 0; k < 4; k++) begin
        cfg_sdp_base[e][k] = ADDR_W'('h1000 * (e + 1) + 'h100 * k);
        cfg_sdp_size[e][k] = 16'(e == 0 ? 16 : 200);
      end
    for (int m = 0; m < NMB; m++) npay[m] = $urandom_range(0, 3);
    add_nal(7, 6); add_nal(8, 4); add_nal(5, 40); add_nal(1, 30);
    for (int e = 0; e < NE; e++) begin ed_used[e] = 0; slice_of_ed[e] = -1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); cfg_sdp_load = 1; cfg_lc_flush = 1; @(negedge clk); cfg_sdp_load = 0; cfg_lc_flush = 0;
    foreach (stream[i]) begin
      bs_valid = 1; bs_byte = stream[i];
      #1;
      while (!bs_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    bs_valid = 0; bs_eos = 1; @(negedge clk); bs_eos = 0;
    wait (md_all_done && lfrc_done && lb_x.size() == 0 && lb_done == NMB);
    repeat (20) @(negedge clk);
    check(rep_idx == 4, "all NAL units reported");
    check(n_mb == NMB && n_words == NMB + npay.sum(), "every MB and package word delivered");
    $display("NAL units: %0d parameter, %0d slice; slices per ED: %0d %0d", n_param, n_slice, ed_used[0], ed_used[1]);
    $display("PMBR: %0d MBs, %0d SDP words, %0d full-ring stall cycles, %0d MBs skipped outside a slice", n_mb, n_words, n_full, n_skip);
    $display("line buffer: %0d on chip, %0d DRAM", n_chip, n_dram);
    $display("LFRC: %0d groups coded, %0d raw partitions coded, %0d raw restored, length cache %0d hits %0d misses",
             n_groups, n_rawc, n_rawr, n_hit, n_miss);
    check(n_param > 0, "parameter NALU seen");
    check(n_slice == 2, "slice NALUs seen");
    check(ed_used[0] == 1 && ed_used[1] == 1, "both entropy decoders used");
    check(n_full > 0, "SDP ring full stall");
    check(n_skip > 0, "scan skipped MBs outside the slice");
    check(n_chip > 0 && n_dram > 0 && n_chip > 2 * n_dram, "line buffer mostly on chip");
    check(n_rawc > 0 && n_rawc < 4 * GPR * GROWS, "raw and compressed partitions coded");
    check(n_rawr > 0, "raw partitions restored");
    check(n_hit > 0 && n_miss > 0, "length cache hits and misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
