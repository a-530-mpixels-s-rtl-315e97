// tb_bsp: builds a byte stream of 40 NAL units (slice and parameter types, payloads with
// emulation-prevention bytes, 3- and 4-byte start codes, trailing zero bytes), feeds it one
// byte per cycle and checks each unit's reported start address, type, class and length, and
// the NALU buffer contents. Checks that the stream is taken at one byte per cycle.
module tb_bsp;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // falling edge applies the asynchronous reset
  always #5 clk = ~clk;

  localparam int AW = 20;
  logic in_valid, in_ready, in_eos, nb_we, nal_ready, nal_start_valid, nal_is_slice, nal_end_valid;
  logic [7:0] in_byte, nb_data;
  logic [AW-1:0] nb_addr, nb_wptr, nal_start_addr, nal_len;
  logic [4:0] nal_type;
  int checks = 0, failures = 0;

  bsp #(.NB_AW(AW)) dut (.*);

  byte unsigned stream [$];
  byte unsigned nals [40][$];
  byte unsigned nbuf [int];
  int starts [$], types [$], lens [$], slices [$];

  always @(posedge clk) begin
    if (nb_we) nbuf[int'(nb_addr)] = nb_data;
    if (nal_start_valid) begin starts.push_back(int'(nal_start_addr)); types.push_back(int'(nal_type)); slices.push_back(int'(nal_is_slice)); end
    if (nal_end_valid) lens.push_back(int'(nal_len));
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, addr, nslice;
    // build NAL units: header then payload without start-code emulation
    for (int n = 0; n < 40; n++) begin
      int t, len, z;
      case (n % 5) 0: t = 7; 1: t = 8; 2: t = 5; 3: t = 1; default: t = 1; endcase
      if (n > 2 && n % 7 == 0) t = 6;
      nals[n].push_back(byte'(8'h60 | t));
      len = $urandom_range(1, 60); z = 0;
      for (int i = 0; i < len; i++) begin
        byte unsigned b;
        b = ($urandom_range(0, 2) == 0) ? 8'h00 : 8'($urandom_range(1, 255));
        if (z >= 2 && b <= 3) begin nals[n].push_back(8'h03); z = 0; end
        nals[n].push_back(b);
        z = (b == 0) ? z + 1 : 0;
      end
      if (nals[n][nals[n].size() - 1] == 8'h00) nals[n].push_back(8'h03);  // no trailing zero in a NAL
    end
    for (int n = 0; n < 40; n++) begin
      if (n % 3 == 0) stream.push_back(8'h00);                 // zero_byte
      stream.push_back(8'h00); stream.push_back(8'h00); stream.push_back(8'h01);
      foreach (nals[n][i]) stream.push_back(nals[n][i]);
      if (n % 4 == 1) begin stream.push_back(8'h00); stream.push_back(8'h00); end  // trailing zeros
    end
    in_valid = 0; in_byte = 0; in_eos = 0; nal_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cyc = 0;
    foreach (stream[i]) begin
      in_valid <= 1; in_byte <= stream[i];
      @(posedge clk); cyc++;
      if (!in_ready) begin failures++; $display("stalled"); end
    end
    in_valid <= 0; in_eos <= 1; @(posedge clk); in_eos <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (cyc != stream.size()) begin failures++; $display("rate: %0d cycles for %0d bytes", cyc, stream.size()); end
    checks++;
    if (starts.size() != 40 || lens.size() != 40) begin
      failures++; $display("%0d starts, %0d ends", starts.size(), lens.size());
    end else begin
      addr = 0; nslice = 0;
      for (int n = 0; n < 40; n++) begin
        int t;
        t = nals[n][0] & 8'h1F;
        checks++;
        if (starts[n] != addr || types[n] != t || lens[n] != nals[n].size() || slices[n] != int'(t >= 1 && t <= 5)) begin
          failures++;
          if (failures < 6) $display("NAL %0d: addr %0d/%0d len %0d/%0d type %0d/%0d", n, starts[n], addr, lens[n], nals[n].size(), types[n], t);
        end
        for (int i = 0; i < nals[n].size(); i++) begin
          checks++;
          if (!nbuf.exists(addr + i) || nbuf[addr + i] != nals[n][i]) begin failures++; if (failures < 6) $display("NAL %0d byte %0d", n, i); end
        end
        addr += nals[n].size();
        nslice += slices[n];
      end
      $display("%0d NAL units, %0d slice NAL units, %0d bytes in %0d cycles", starts.size(), nslice, stream.size(), cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
