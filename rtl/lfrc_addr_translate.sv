// lfrc_addr_translate: maps a partition request into the compressed domain of VCR-LFRC storage.
//
// Every group (4 vertically adjacent partitions, 8x16 luma pixels) keeps its full-size slot of
// 12 DRAM words, so groups stay randomly addressable. Inside the slot the compressed partitions
// are packed back to back; partition p starts at bit S_p = L0 + ... + L(p-1). Each vertical
// pair of group slots is stored consecutively (slot of the even group row, then the odd one),
// and the even group's data is aligned to the end of its slot and the odd group's to the start,
// so that the two meet and can be read as one run.
// Output: the first word address and word count of the partition, the bit offset of its first
// bit in the first word, and whether it is stored uncompressed (length 384, or the raw3 flag for
// partition 3, whose length is only recorded as a word count).
//
// Interface: in_* (request plus group length record) and out_*, valid/ready; one register
// stage, a request per cycle. Slot placement is this design's own choice; packing, symmetric
// pair alignment and the length record follow the published memory mapping.
module lfrc_addr_translate
  import lfrc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [dram_pkg::ADDR_W-1:0] cfg_data_base [16],
  input  logic [9:0]  cfg_groups_per_row,
  input  logic        in_valid,
  output logic        in_ready,
  input  preq_t       in_req,
  input  glen_t       in_glen,
  output logic        out_valid,
  input  logic        out_ready,
  output preq_t       out_req,
  output logic [dram_pkg::ADDR_W-1:0] out_addr,
  output logic [1:0]  out_nwords_m1,
  output logic [6:0]  out_bitoff,
  output logic        out_raw
);
  logic [10:0] s1, s2, s3, sp, ep;
  logic [3:0]  used_words;
  logic [dram_pkg::ADDR_W-1:0] slot, first;
  logic [1:0]  nw_c;
  logic        raw_c;

  always_comb begin
    s1 = 11'(in_glen.l0);
    s2 = s1 + 11'(in_glen.l1);
    s3 = s2 + 11'(in_glen.l2);
    used_words = 4'(s3[10:7]) + 4'(in_glen.l3w) + 4'd1;
    slot = cfg_data_base[in_req.frame]
         + dram_pkg::ADDR_W'((32'(in_req.gy[7:1]) * 32'(cfg_groups_per_row) + 32'(in_req.gx)) * 24)
         + (in_req.gy[0] ? dram_pkg::ADDR_W'(12) : '0);
    first = in_req.gy[0] ? slot : slot + dram_pkg::ADDR_W'(12 - used_words);
    case (in_req.part)
      2'd0: begin sp = 11'd0; ep = s1 - 11'd1; raw_c = (in_glen.l0 == LEN_W'(PART_BITS)); end
      2'd1: begin sp = s1;    ep = s2 - 11'd1; raw_c = (in_glen.l1 == LEN_W'(PART_BITS)); end
      2'd2: begin sp = s2;    ep = s3 - 11'd1; raw_c = (in_glen.l2 == LEN_W'(PART_BITS)); end
      default: begin sp = s3; ep = s3 + {2'b0, in_glen.l3w, 7'd0}; raw_c = in_glen.raw3; end
    endcase
    nw_c = 2'(ep[10:7] - sp[10:7]);
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else if (in_ready) out_valid <= in_valid;
  end
  always_ff @(posedge clk) begin
    if (in_ready && in_valid) begin
      out_req       <= in_req;
      out_addr      <= first + dram_pkg::ADDR_W'(sp[10:7]);
      out_nwords_m1 <= nw_c;
      out_bitoff    <= sp[6:0];
      out_raw       <= raw_c;
    end
  end
endmodule
