// tb_lfrc_addr_translate: random group length records (compressed and uncompressed
// partitions) and requests; the word address, word count, bit offset and raw flag of every
// partition are compared with values worked out here from the packing rules (bit positions of
// the 4 packed partitions, slot placement of even/odd group rows). One result per cycle.
module tb_lfrc_addr_translate;
  import lfrc_pkg::*;
  import dram_pkg::*;

  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  localparam int GPR = 20;
  logic [ADDR_W-1:0] cfg_data_base [16];
  logic in_valid, in_ready, out_valid, out_ready, out_raw;
  preq_t in_req, out_req;
  glen_t in_glen;
  logic [ADDR_W-1:0] out_addr;
  logic [1:0] out_nwords_m1;
  logic [6:0] out_bitoff;
  int checks = 0, failures = 0, n_raw = 0, n_even = 0;

  lfrc_addr_translate dut (.clk, .rst_n, .cfg_data_base, .cfg_groups_per_row(10'(GPR)), .*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 16; f++) cfg_data_base[f] = ADDR_W'('h10000 + f * 'h4000);
    in_valid = 0; in_req = '0; in_glen = '0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int L [4];
      int s, p, f, gx, gy, used, slot, first, sp, ep, exp_addr, exp_nw;
      bit raw;
      glen_t g;
      for (int k = 0; k < 4; k++) L[k] = ($urandom_range(0, 4) == 0) ? 384 : int'($urandom_range(60, 383));
      f = $urandom_range(0, 15); gx = $urandom_range(0, GPR - 1); gy = $urandom_range(0, 11); p = $urandom_range(0, 3);
      s = L[0] + L[1] + L[2];
      g = '0; g.l0 = 9'(L[0]); g.l1 = 9'(L[1]); g.l2 = 9'(L[2]);
      g.l3w = 2'((s + L[3] - 1) / 128 - s / 128); g.raw3 = (L[3] == 384);
      used = (s + L[3] - 1) / 128 + 1;
      slot = 'h10000 + f * 'h4000 + ((gy / 2) * GPR + gx) * 24 + (gy % 2) * 12;
      first = (gy % 2) ? slot : slot + 12 - used;
      sp = 0; for (int k = 0; k < p; k++) sp += L[k];
      ep = sp + L[p] - 1;
      exp_addr = first + sp / 128; exp_nw = ep / 128 - sp / 128; raw = (L[p] == 384);
      in_valid <= 1; in_req <= '{frame: 4'(f), gx: 9'(gx), gy: 8'(gy), part: 2'(p)}; in_glen <= g;
      @(posedge clk); #1;
      checks++;
      if (!out_valid || out_addr != ADDR_W'(exp_addr) || out_nwords_m1 != 2'(exp_nw) ||
          out_bitoff != 7'(sp % 128) || out_raw != raw || out_req.gx != 9'(gx)) begin
        failures++;
        if (failures < 6) $display("i%0d p%0d gy%0d: addr %h/%h nw %0d/%0d off %0d/%0d", i, p, gy,
                                   out_addr, exp_addr, out_nwords_m1, exp_nw, out_bitoff, sp % 128);
      end
      if (raw) n_raw++;
      if (gy % 2 == 0) n_even++;
    end
    $display("%0d uncompressed, %0d end-aligned", n_raw, n_even);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
