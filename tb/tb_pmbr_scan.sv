// tb_pmbr_scan: runs whole-picture and multi-slice scans on small pictures (10x7 and 13x9 MBs,
// last region shorter than 4 rows) with random back-pressure. Checks that each slice's MBs
// appear exactly once, in the expected zig-zag order, and that the left, upper-left, upper and
// upper-right neighbours inside the slice always precede an MB. Also checks the region
// property: every MB's upper neighbour in the same region was visited at most 10 MBs earlier.
module tb_pmbr_scan;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  logic        start, mb_valid, mb_ready, busy, done;
  logic [8:0]  cfg_mb_w, mb_x;
  logic [7:0]  cfg_mb_h, mb_y;
  logic [15:0] cfg_first_mb, cfg_last_mb, mb_addr;
  int checks = 0, failures = 0;

  pmbr_scan dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic scan(input int w, input int h, input int first, input int last);
    int exp_x [$], exp_y [$];
    int seen [int];
    int k, skipped;
    // expected order: regions of 4 rows, step t, row r, column t - 2r
    skipped = 0;
    for (int rr = 0; rr < h; rr += 4)
      for (int t = 0; t < w + 6; t++)
        for (int r = 0; r < 4; r++) begin
          int x, y, a;
          x = t - 2 * r; y = rr + r; a = y * w + x;
          if (x >= 0 && x < w && y < h) begin
            if (a >= first && a <= last) begin exp_x.push_back(x); exp_y.push_back(y); end
            else skipped++;
          end
        end
    cfg_mb_w <= 9'(w); cfg_mb_h <= 8'(h); cfg_first_mb <= 16'(first); cfg_last_mb <= 16'(last);
    @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    k = 0;
    while (!done) begin
      mb_ready <= ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (mb_valid && mb_ready) begin
        int x, y, a;
        x = int'(mb_x); y = int'(mb_y); a = int'(mb_addr);
        checks++;
        if (k >= exp_x.size() || x != exp_x[k] || y != exp_y[k] || a != y * w + x) begin
          failures++;
          if (failures < 6) $display("MB %0d: got (%0d,%0d)", k, x, y);
        end
        // neighbour availability
        for (int d = 0; d < 4; d++) begin
          int nx, ny, na;
          nx = x + ((d == 0) ? -1 : (d == 1) ? -1 : (d == 2) ? 0 : 1);
          ny = y + ((d == 0) ? 0 : -1);
          na = ny * w + nx;
          if (nx >= 0 && nx < w && ny >= 0 && na >= first && na <= last) begin
            checks++;
            if (!seen.exists(na)) begin failures++; $display("neighbour %0d of (%0d,%0d) not yet decoded", d, x, y); end
            else if (d == 2 && (y % 4) != 0 && k - seen[na] > 10) begin failures++; $display("upper MB too far back"); end
          end
        end
        seen[a] = k;
        k++;
      end
    end
    checks++;
    if (k != exp_x.size()) begin failures++; $display("count %0d exp %0d", k, exp_x.size()); end
    $display("scan %0dx%0d slice [%0d,%0d]: %0d MBs, %0d skipped outside slice", w, h, first, last, k, skipped);
  endtask

  int slice_skips = 0;
  initial begin
    start = 0; mb_ready = 1; cfg_mb_w = 0; cfg_mb_h = 0; cfg_first_mb = 0; cfg_last_mb = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    scan(10, 7, 0, 69);
    scan(10, 7, 13, 52);
    scan(10, 7, 53, 69);
    scan(13, 9, 0, 116);
    scan(13, 9, 40, 41);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
