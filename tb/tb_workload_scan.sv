// tb_workload_scan: runs the PMBR scan-order generator over whole pictures of the evaluated
// formats, 4096x2160 (256x135 MBs), 3840x2160 (240x135) and 1920x1080 (120x68), as one slice
// each, with the MB consumer always ready. Checks that every MB is visited exactly once, that
// its left, upper-left, upper and upper-right neighbours come first, and that the scan spends
// far less than the 64 cycles per MB that the 60 frames/s rate allows at 175 MHz (the scan
// itself takes at most a few cycles per MB, including skipped positions).
module tb_workload_scan;
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
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit seen [256][136];

  task automatic run(input int w, input int h);
    int n, cyc, bad;
    for (int x = 0; x < 256; x++) for (int y = 0; y < 136; y++) seen[x][y] = 0;
    @(negedge clk);
    cfg_mb_w = 9'(w); cfg_mb_h = 8'(h); cfg_first_mb = 0; cfg_last_mb = 16'(w * h - 1);
    start = 1; @(negedge clk); start = 0;
    n = 0; cyc = 0; bad = 0;
    while (!done) begin
      @(posedge clk);
      cyc++;
      if (mb_valid && mb_ready) begin
        int x, y;
        x = int'(mb_x); y = int'(mb_y);
        if (seen[x][y]) bad++;
        if (x > 0 && !seen[x - 1][y]) bad++;
        if (y > 0 && !seen[x][y - 1]) bad++;
        if (y > 0 && x > 0 && !seen[x - 1][y - 1]) bad++;
        if (y > 0 && x < w - 1 && !seen[x + 1][y - 1]) bad++;
        if (int'(mb_addr) != y * w + x) bad++;
        seen[x][y] = 1;
        n++;
      end
      #1;
    end
    checks++;
    if (bad != 0) begin failures++; $display("%0dx%0d MBs: %0d order errors", w, h, bad); end
    checks++;
    if (n != w * h) begin failures++; $display("%0dx%0d MBs: %0d visited", w, h, n); end
    checks++;
    if (cyc > 2 * w * h) begin failures++; $display("%0dx%0d MBs: scan too slow", w, h); end
    $display("%0dx%0d MBs: %0d MBs in %0d cycles (%0d.%02d cycles/MB; budget 64)", w, h, n, cyc,
             cyc / n, (cyc * 100 / n) % 100);
  endtask

  initial begin
    start = 0; mb_ready = 1; cfg_mb_w = 0; cfg_mb_h = 0; cfg_first_mb = 0; cfg_last_mb = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(256, 135);
    run(240, 135);
    run(120, 68);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
