// tb_lfrc_ref_pkg: reference model of the partition coding used by the LFRC testbenches.
// Written from the coding rules directly (plane coordinates, bit-serial appending), not from
// the RTL's index tables, so that it can be used to check the encoder and decoder.
package tb_lfrc_ref_pkg;

  // Sample value of plane pl (0 Y 8x4, 1 Cb 4x2, 2 Cr 4x2) at (row, col) in a raw partition.
  function automatic int get_s(input logic [383:0] p, input int pl, input int r, input int c);
    int idx;
    if (pl == 0) idx = r * 8 + c;
    else if (pl == 1) idx = 32 + r * 4 + c;
    else idx = 40 + r * 4 + c;
    return int'(p[8*idx +: 8]);
  endfunction

  function automatic int resid(input logic [383:0] p, input int pl, input int r, input int c);
    if (c > 0) return get_s(p, pl, r, c) - get_s(p, pl, r, c - 1);
    if (r > 0) return get_s(p, pl, r, c) - get_s(p, pl, r - 1, c);
    return 0;
  endfunction

  // Sub-block sb (0..11) residual j (0..3): plane, row, col.
  function automatic void sb_pos(input int sb, input int j, output int pl, output int r, output int c);
    int u, s;
    u = sb / 4; s = sb % 4;
    if (u < 2) begin
      pl = 0; r = (s / 2) * 2 + j / 2; c = u * 4 + (s % 2) * 2 + j % 2;
    end else begin
      pl = (s < 2) ? 1 : 2; r = j / 2; c = (s % 2) * 2 + j % 2;
    end
  endfunction

  // Reference encoder: returns the coded length; bits in 'bits' (LSB first).
  function automatic int encode(input logic [383:0] p, output logic [511:0] bits);
    int pos, pl, r, c, mx, mn, m, hi;
    int modes [12];
    int tneed [12];
    int tsign [12];
    bits = '0;
    pos = 0;
    for (int k = 0; k < 3; k++) begin
      int v;
      v = get_s(p, k, 0, 0);
      for (int b = 0; b < 8; b++) begin bits[pos] = v[b]; pos++; end
    end
    for (int sb = 0; sb < 12; sb++) begin
      mx = -999; mn = 999;
      for (int j = 0; j < 4; j++) begin
        sb_pos(sb, j, pl, r, c);
        if (!(r == 0 && c == 0)) begin
          int v;
          v = resid(p, pl, r, c);
          if (v > mx) mx = v;
          if (v < mn) mn = v;
        end
      end
      m = 7;
      if (mx == 0 && mn == 0) m = 0;
      else
        for (int k = 1; k <= 6; k++) begin
          hi = 1 << (k - 1);
          if (m == 7 && mx <= hi && mn >= -hi && !(mx == hi && mn == -hi)) m = k;
        end
      modes[sb] = m; tneed[sb] = 0; tsign[sb] = 0;
      for (int b = 0; b < 3; b++) begin bits[pos] = m[b]; pos++; end
    end
    for (int sb = 0; sb < 12; sb++) begin
      int w;
      m = modes[sb];
      w = (m == 7) ? 9 : m;
      for (int j = 0; j < 4; j++) begin
        sb_pos(sb, j, pl, r, c);
        if (!(r == 0 && c == 0) && w > 0) begin
          int v, code;
          v = resid(p, pl, r, c);
          code = v;
          if (m >= 1 && m <= 6 && (v == (1 << (m - 1)) || v == -(1 << (m - 1)))) begin
            code = 1 << (m - 1);
            tneed[sb] = 1; tsign[sb] = (v > 0) ? 1 : 0;
          end
          for (int b = 0; b < w; b++) begin bits[pos] = code[b]; pos++; end
        end
      end
    end
    for (int sb = 0; sb < 12; sb++)
      if (tneed[sb] != 0) begin bits[pos] = tsign[sb][0]; pos++; end
    return pos;
  endfunction

  // Test partition generator: a smooth ramp plus noise of amplitude 'amp' (0 = flat).
  function automatic logic [383:0] gen_part(input int amp, input int seed);
    logic [383:0] p;
    int base, v;
    base = (seed * 37) % 256;
    for (int i = 0; i < 48; i++) begin
      v = base + ((i % 8) * (seed % 5));
      if (amp > 0) v = v + int'($urandom_range(0, 2 * amp)) - amp;
      p[8*i +: 8] = 8'(v);
    end
    return p;
  endfunction

  // The 16 samples of unit u of a raw partition, as the decompressor emits them.
  function automatic logic [127:0] unit_samples(input logic [383:0] p, input int u);
    logic [127:0] o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        int v;
        if (u < 2) v = get_s(p, 0, r, u * 4 + c);
        else if (r < 2) v = get_s(p, 1, r, c);
        else v = get_s(p, 2, r - 2, c);
        o[8*(4*r + c) +: 8] = 8'(v);
      end
    return o;
  endfunction

  // Packs the 4 partitions of a group as stored in DRAM: coded bits back to back (an
  // incompressible partition stored raw with length 384); returns used words, the group bits
  // and the 32-bit length record.
  function automatic int pack_group(input logic [383:0] parts [4], output logic [1535:0] g,
                                    output logic [31:0] rec);
    int pos, s3, l;
    logic [511:0] b;
    g = '0; pos = 0; rec = '0; s3 = 0;
    for (int k = 0; k < 4; k++) begin
      l = encode(parts[k], b);
      if (l >= 384) begin l = 384; b = '0; b[383:0] = parts[k]; end
      for (int i = 0; i < l; i++) g[pos + i] = b[i];
      if (k < 3) rec[9*k +: 9] = 9'(l);
      if (k == 3) begin
        rec[28:27] = 2'((pos + l - 1) / 128 - pos / 128);
        rec[29]    = (l == 384);
      end
      pos += l;
    end
    return (pos - 1) / 128 + 1;
  endfunction

  // Word address of the first used word of a group slot (layout of the frame buffer).
  function automatic int group_first(input int base, input int gpr, input int gx, input int gy, input int used);
    int slot;
    slot = base + ((gy / 2) * gpr + gx) * 24 + (gy % 2) * 12;
    return (gy % 2 == 1) ? slot : slot + 12 - used;
  endfunction

  function automatic int len_word_addr(input int lbase, input int lpr, input int gx, input int gy);
    return lbase + ((gy / 2) * lpr + gx / 8) * 4 + (gx / 2) % 4;
  endfunction

endpackage
