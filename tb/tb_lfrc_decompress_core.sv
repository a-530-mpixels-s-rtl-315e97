// tb_lfrc_decompress_core: feeds partitions coded by the reference model (every noise level,
// uncompressed ones included) to the decompress core and compares each restored 4x4 unit with
// the original samples. Checks the 4-cycle latency and, with the output never stalled, the
// rate of one partition per 3 cycles; then repeats with random stalls on both sides.
module tb_lfrc_decompress_core;
  import tb_lfrc_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  logic         in_valid, in_ready, in_raw, out_valid, out_ready;
  logic [383:0] in_data;
  logic [1:0]   out_unit;
  logic [127:0] out_samples;
  int checks = 0, failures = 0;

  lfrc_decompress_core dut (.*);

  localparam int N = 300;
  logic [383:0] q_part [N];
  logic [383:0] q_code [N];
  logic         q_raw  [N];
  int got;
  int raw_seen = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit stalls, output int cycles);
    int sent;
    sent = 0; got = 0; cycles = 0;
    fork
      begin
        while (sent < N) begin
          in_valid <= stalls ? ($urandom_range(0, 2) != 0) : 1'b1;
          in_data  <= q_code[sent];
          in_raw   <= q_raw[sent];
          @(posedge clk);
          if (in_valid && in_ready) sent++;
        end
        in_valid <= 0;
      end
      begin
        while (got < 3 * N) begin
          out_ready <= stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
          @(posedge clk);
          cycles++;
          if (out_valid && out_ready) begin
            checks++;
            if (out_unit != 2'(got % 3) || out_samples != unit_samples(q_part[got / 3], got % 3)) begin
              failures++;
              if (failures < 6) $display("unit %0d of partition %0d wrong (raw=%0d)", got % 3, got / 3, q_raw[got / 3]);
            end
            got++;
          end
        end
      end
    join
  endtask

  initial begin
    int cyc;
    for (int i = 0; i < N; i++) begin
      logic [511:0] b; int l, amp;
      case (i % 7)
        0: amp = 0; 1: amp = 1; 2: amp = 2; 3: amp = 5; 4: amp = 16; 5: amp = 60; default: amp = 200;
      endcase
      q_part[i] = gen_part(amp, i + 11);
      l = encode(q_part[i], b);
      q_raw[i]  = (l >= 384);
      q_code[i] = (l >= 384) ? q_part[i] : b[383:0];
      if (q_raw[i]) raw_seen++;
    end
    in_valid = 0; out_ready = 1; in_data = '0; in_raw = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // latency: accepted at edge 0, first unit valid after the 4th following edge
    in_valid <= 1; in_data <= q_code[0]; in_raw <= q_raw[0];
    @(posedge clk); in_valid <= 0;
    repeat (3) @(posedge clk);
    #1 checks++;
    if (out_valid) begin failures++; $display("valid too early"); end
    @(posedge clk); #1 checks++;
    if (!out_valid || out_samples != unit_samples(q_part[0], 0)) begin failures++; $display("latency/unit0 wrong"); end
    repeat (4) @(posedge clk);
    run(0, cyc);
    checks++;
    if (cyc > 3 * N + 8) begin failures++; $display("rate: %0d cycles for %0d partitions", cyc, N); end
    $display("unstalled: %0d partitions in %0d cycles, %0d uncompressed", N, cyc, raw_seen);
    run(1, cyc);
    checks++;
    if (raw_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
