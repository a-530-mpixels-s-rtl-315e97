// tb_lfrc_encoder: drives random partitions of every noise level (flat, smooth, noisy,
// incompressible) through the encoder, with random output stalls, and compares coded bits and
// length with the reference model. Checks the 2-cycle latency of an unstalled partition.
module tb_lfrc_encoder;
  import tb_lfrc_ref_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  logic         in_valid, in_ready, out_valid, out_ready;
  logic [383:0] in_part, out_data;
  logic [8:0]   out_len;
  int checks = 0, failures = 0;

  lfrc_encoder dut (.*);

  localparam int N = 400;
  logic [383:0] q_part [N];
  int sent = 0, got = 0, raw_cnt = 0, t_cnt = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      int amp;
      case (i % 6)
        0: amp = 0; 1: amp = 1; 2: amp = 3; 3: amp = 12; 4: amp = 40; default: amp = 200;
      endcase
      q_part[i] = gen_part(amp, i);
    end
    in_valid = 0; out_ready = 1; in_part = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // latency check on one partition
    in_valid <= 1; in_part <= q_part[0];
    @(posedge clk); in_valid <= 0;
    @(posedge clk); #1;
    checks++; if (out_valid !== 1'b1) begin failures++; $display("latency: not valid after 2 cycles"); end
    begin
      logic [511:0] b; int l;
      l = encode(q_part[0], b);
      checks++;
      if (out_len != 9'(l) || out_data != b[383:0]) begin failures++; $display("first partition mismatch"); end
    end
    sent = 1; got = 1;
    @(posedge clk);
    fork
      begin
        while (sent < N) begin
          in_valid <= ($urandom_range(0, 3) != 0);
          in_part  <= q_part[sent];
          @(posedge clk);
          if (in_valid && in_ready) sent++;
        end
        in_valid <= 0;
      end
      begin
        while (got < N) begin
          out_ready <= ($urandom_range(0, 3) != 0);
          @(posedge clk);
          if (out_valid && out_ready) begin
            logic [511:0] b; int l;
            l = encode(q_part[got], b);
            if (l >= 384) begin l = 384; b[383:0] = q_part[got]; raw_cnt++; end
            if (l < 384 && l > 60 + 45) t_cnt++;
            checks++;
            if (out_len != 9'(l) || out_data != b[383:0]) begin
              failures++;
              if (failures < 5) $display("mismatch part %0d len %0d exp %0d", got, out_len, l);
            end
            got++;
          end
        end
      end
    join
    checks++;
    if (raw_cnt == 0) begin failures++; $display("no incompressible partition seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
