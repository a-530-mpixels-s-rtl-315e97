// tb_ed_dispatch: two modelled entropy decoders take slices of random length (long I slices,
// short P/B slices). Checks that slices are launched in stream order with their addresses,
// only on idle engines and the lowest-numbered idle one, that no engine idles while a slice
// waits, and that the slice order queue names the engine of each slice. Counts the case of
// the published schedule example: an engine launched later finishes first and takes the next
// slice while the other is still busy.
module tb_ed_dispatch;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  localparam int NS = 60;
  logic slice_valid, slice_ready, ord_valid, ord_ready;
  logic [19:0] slice_addr;
  logic ed_start [2];
  logic [19:0] ed_addr [2];
  logic [15:0] ed_slice [2];
  logic ed_done [2];
  logic [1:0] ed_busy;
  logic [0:0] ord_ed;
  int checks = 0, failures = 0, takeovers = 0;

  ed_dispatch #(.N_ED(2), .NB_AW(20)) dut (.*);

  int remaining [2];
  int launched_on [$];
  int nxt_slice = 0, launched = 0, ord_seen = 0;
  int last_start [2];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // engine models, order-queue consumer and work-conservation check, all sampled mid-cycle
  always @(negedge clk) if (rst_n) begin
    if (slice_valid && remaining[0] == 0 && !ed_busy[0] && !ord_valid) begin
      checks++;
      if (!slice_ready) begin failures++; $display("idle engine not used"); end
    end
    for (int e = 0; e < 2; e++) begin
      ed_done[e] = 1'b0;
      if (ed_start[e]) begin
        checks++;
        if (remaining[e] != 0) begin failures++; $display("engine %0d started while busy", e); end
        if (int'(ed_slice[e]) != launched || ed_addr[e] != 20'(launched * 1000)) begin
          failures++; $display("slice %0d launched out of order", ed_slice[e]);
        end
        if (e == 1 && remaining[0] == 0) begin failures++; $display("engine 1 used while engine 0 idle"); end
        // published example: this engine started after the other's current slice yet is free first
        if (remaining[1 - e] > 0 && last_start[e] > last_start[1 - e]) takeovers++;
        last_start[e] = launched;
        remaining[e] = (launched % 4 == 0) ? 300 + 10 * (launched % 7) : 20 + 13 * (launched % 5);
        launched_on.push_back(e);
        launched++;
      end else if (remaining[e] > 0) begin
        remaining[e]--;
        if (remaining[e] == 0) ed_done[e] = 1'b1;
      end
    end
    ord_ready = ($urandom_range(0, 3) != 0);
    if (ord_valid && ord_ready) begin
      checks++;
      if (ord_seen >= launched_on.size() || int'(ord_ed) != launched_on[ord_seen]) begin
        failures++; $display("order entry %0d wrong: ed %0d, launched %0d size %0d at %0t", ord_seen, ord_ed, (ord_seen < launched_on.size()) ? launched_on[ord_seen] : -1, launched_on.size(), $time);
      end
      ord_seen++;
    end
  end

  initial begin
    remaining = '{0, 0}; last_start = '{-1, -1};
    ed_done = '{0, 0}; ord_ready = 1; slice_valid = 0; slice_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (nxt_slice < NS) begin
      slice_valid <= 1; slice_addr <= 20'(nxt_slice * 1000);
      @(posedge clk);
      if (slice_valid && slice_ready) nxt_slice++;
    end
    slice_valid <= 0;
    wait (remaining[0] == 0 && remaining[1] == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (ord_seen != NS || launched != NS) begin failures++; $display("%0d ord, %0d launched", ord_seen, launched); end
    checks++;
    if (takeovers == 0) begin failures++; $display("no takeover"); end
    $display("%0d slices, %0d taken by the engine that finished first", launched, takeovers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
