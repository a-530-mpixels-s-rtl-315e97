// qfhd_decoder_top: DRAM-side and stream-side infrastructure of a 4096x2160@60fps H.264/AVC
// high-profile decoder, built around two DRAM bandwidth techniques:
//   * partial MB reordering (PMBR): entropy decoders (EDs) write their per-MB slice data
//     packages (SDP) in raster order into 4 DRAM sub-buffers chosen by MB row mod 4, while the
//     main decoder reads them in a zig-zag order over 4-row regions (pmbr_scan, sdp_writer,
//     sdp_reader), which also lets 3/4 of the deblocking line buffer stay on chip (lb_bypass);
//   * variable-compression-ratio lossless frame recompression (VCR-LFRC): deblocked frames are
//     compressed per partition before they are written (lfrc_coding) and restored between the
//     MC cache and DRAM (lfrc_restore).
// Stream side: the bit stream processor (bsp) splits NAL units into the NALU buffer; slice NALUs
// are scheduled onto N_ED entropy decoders in parallel (ed_dispatch). All DRAM masters share a
// 128-bit bus (dram_bus) towards the DRAM interface.
//
// The entropy decoder engines, the main decoder's computational units (Demux, IQ/IT, intra,
// MC cache, interpolation, reconstruction, deblocking filter), the host and the DRAM controller
// with its PHY sit outside this module; their connections are the ports below, grouped by
// counterpart. Bus master order: SDP writers (one per ED), SDP reader, LFRC coding, length
// cache, partition fetch, line buffer.
module qfhd_decoder_top
  import lfrc_pkg::*;
  import dram_pkg::*;
#(
  parameter int unsigned N_ED  = 2,
  parameter int unsigned NB_AW = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  // ---- host: configuration ----
  input  logic [ADDR_W-1:0] cfg_data_base [16],
  input  logic [ADDR_W-1:0] cfg_len_base  [16],
  input  logic [9:0]        cfg_groups_per_row,
  input  logic [6:0]        cfg_lines_per_row,
  input  logic [ADDR_W-1:0] cfg_lb_base,
  input  logic              cfg_lc_flush,
  input  logic              cfg_sdp_load,
  input  logic [ADDR_W-1:0] cfg_sdp_base [N_ED][4],
  input  logic [15:0]       cfg_sdp_size [N_ED][4],
  input  logic [8:0]        cfg_mb_w,
  input  logic [7:0]        cfg_mb_h,
  input  logic              md_slice_load,          // per slice: main decoder set-up
  input  logic [$clog2(N_ED > 1 ? N_ED : 2)-1:0] md_ed,
  input  logic [ADDR_W-1:0] md_sdp_start [4],
  input  logic [15:0]       md_first_mb,
  input  logic [15:0]       md_last_mb,
  input  logic              md_start,
  output logic              md_busy,
  output logic              md_done,
  // ---- bit stream input ----
  input  logic              bs_valid,
  output logic              bs_ready,
  input  logic [7:0]        bs_byte,
  input  logic              bs_eos,
  // ---- NALU buffer write port and NAL unit reports to the host ----
  output logic              nb_we,
  output logic [NB_AW-1:0]  nb_addr,
  output logic [7:0]        nb_data,
  output logic [NB_AW-1:0]  nb_wptr,
  output logic              nal_start_valid,
  output logic [NB_AW-1:0]  nal_start_addr,
  output logic [4:0]        nal_type,
  output logic              nal_is_slice,
  output logic              nal_end_valid,
  output logic [NB_AW-1:0]  nal_len,
  // ---- entropy decoder engines ----
  output logic              ed_start [N_ED],
  output logic [NB_AW-1:0]  ed_addr  [N_ED],
  output logic [15:0]       ed_slice [N_ED],
  input  logic              ed_done  [N_ED],
  input  logic              ed_slice_start [N_ED],
  input  logic              ed_sdp_valid [N_ED],
  output logic              ed_sdp_ready [N_ED],
  input  logic [7:0]        ed_sdp_row   [N_ED],
  input  logic [DATA_W-1:0] ed_sdp_data  [N_ED],
  output logic              sdp_start_valid [N_ED],
  output logic [ADDR_W-1:0] sdp_start_addr  [N_ED][4],
  output logic              ord_valid,
  input  logic              ord_ready,
  output logic [$clog2(N_ED > 1 ? N_ED : 2)-1:0] ord_ed,
  // ---- main decoder: MB order and SDP words to the Demux ----
  output logic              md_mb_valid,
  output logic [8:0]        md_mb_x,
  output logic [7:0]        md_mb_y,
  output logic              md_sdp_valid,
  input  logic              md_sdp_ready,
  output logic [DATA_W-1:0] md_sdp_data,
  output logic              md_sdp_last,
  // ---- deblocking filter: line buffer and LFRC coding input ----
  input  logic              lb_wr_valid,
  output logic              lb_wr_ready,
  input  logic [8:0]        lb_wr_x,
  input  logic [7:0]        lb_wr_y,
  input  logic [8*DATA_W-1:0] lb_wr_data,
  input  logic              lb_rd_valid,
  output logic              lb_rd_ready,
  input  logic [8:0]        lb_rd_x,
  input  logic [7:0]        lb_rd_y,
  output logic              lb_rsp_valid,
  output logic [8*DATA_W-1:0] lb_rsp_data,
  input  logic              fw_valid,
  output logic              fw_ready,
  input  preq_t             fw_tag,
  input  logic [PART_BITS-1:0] fw_part,
  // ---- MC cache: reference partition requests and restored units ----
  input  logic              rf_req_valid,
  output logic              rf_req_ready,
  input  preq_t             rf_req,
  output logic              rf_out_valid,
  input  logic              rf_out_ready,
  output preq_t             rf_out_req,
  output logic [1:0]        rf_out_unit,
  output logic [127:0]      rf_out_samples,
  // ---- DRAM interface ----
  output logic              dram_req_valid,
  input  logic              dram_req_ready,
  output dram_req_t         dram_req,
  input  logic              dram_rsp_valid,
  input  logic [DATA_W-1:0] dram_rsp_data,
  // ---- event counters' strobes ----
  output logic              ev_len_hit,
  output logic              ev_len_miss,
  output logic              ev_raw_restore,
  output logic              ev_raw_code,
  output logic              ev_group_done,
  output logic              ev_lb_onchip,
  output logic              ev_lb_dram
);
  localparam int unsigned NM = N_ED + 5;
  localparam int unsigned M_SDPRD = N_ED, M_CODE = N_ED + 1, M_LEN = N_ED + 2,
                          M_PART = N_ED + 3, M_LB = N_ED + 4;

  logic              m_req_valid [NM];
  logic              m_req_ready [NM];
  dram_req_t         m_req       [NM];
  logic              m_rsp_valid [NM];
  logic [DATA_W-1:0] m_rsp_data  [NM];

  // ---------------- stream side: BSP, slice queue, ED dispatch ----------------------------
  logic             sq_in_ready, sq_valid, sq_ready;
  logic [NB_AW-1:0] sq_addr;

  bsp #(.NB_AW(NB_AW)) u_bsp (
    .clk, .rst_n, .in_valid(bs_valid), .in_ready(bs_ready), .in_byte(bs_byte), .in_eos(bs_eos),
    .nb_we, .nb_addr, .nb_data, .nb_wptr, .nal_ready(sq_in_ready),
    .nal_start_valid, .nal_start_addr, .nal_type, .nal_is_slice, .nal_end_valid, .nal_len
  );

  sync_fifo #(.T(logic [NB_AW-1:0]), .DEPTH(8)) u_sliceq (
    .clk, .rst_n, .in_valid(nal_start_valid && nal_is_slice), .in_ready(sq_in_ready),
    .in_data(nal_start_addr), .out_valid(sq_valid), .out_ready(sq_ready), .out_data(sq_addr)
  );

  logic [N_ED-1:0] ed_busy;
  ed_dispatch #(.N_ED(N_ED), .NB_AW(NB_AW)) u_disp (
    .clk, .rst_n, .slice_valid(sq_valid), .slice_ready(sq_ready), .slice_addr(sq_addr),
    .ed_start, .ed_addr, .ed_slice, .ed_done, .ed_busy, .ord_valid, .ord_ready, .ord_ed
  );

  // ---------------- PMBR: SDP writers, scan order, SDP reader -----------------------------
  logic [15:0] wr_ptr [N_ED][4];
  logic [15:0] rd_ptr_seen [N_ED][4];
  logic [15:0] rd_ptr_rd [4];

  for (genvar e = 0; e < N_ED; e++) begin : g_ed
    sdp_writer u_wr (
      .clk, .rst_n, .cfg_load(cfg_sdp_load), .cfg_base(cfg_sdp_base[e]), .cfg_size(cfg_sdp_size[e]),
      .slice_start(ed_slice_start[e]), .start_valid(sdp_start_valid[e]), .start_addr(sdp_start_addr[e]),
      .in_valid(ed_sdp_valid[e]), .in_ready(ed_sdp_ready[e]), .in_mb_row(ed_sdp_row[e]), .in_data(ed_sdp_data[e]),
      .mem_req_valid(m_req_valid[e]), .mem_req_ready(m_req_ready[e]), .mem_req(m_req[e]),
      .wr_ptr(wr_ptr[e]), .rd_ptr(rd_ptr_seen[e])
    );
    // the reader's pointers count for the ED whose slice it reads; others keep the last seen
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) rd_ptr_seen[e] <= '{default: '0};
      else if (cfg_sdp_load) rd_ptr_seen[e] <= '{default: '0};
      else if (md_ed == ($clog2(N_ED > 1 ? N_ED : 2))'(e)) rd_ptr_seen[e] <= rd_ptr_rd;
    end
  end

  logic       sc_valid, sc_ready;
  logic [8:0] sc_x;
  logic [7:0] sc_y;
  logic [15:0] sc_addr;

  pmbr_scan u_scan (
    .clk, .rst_n, .start(md_start), .cfg_mb_w, .cfg_mb_h, .cfg_first_mb(md_first_mb),
    .cfg_last_mb(md_last_mb), .mb_valid(sc_valid), .mb_ready(sc_ready), .mb_x(sc_x), .mb_y(sc_y),
    .mb_addr(sc_addr), .busy(md_busy), .done(md_done)
  );

  sdp_reader u_rd (
    .clk, .rst_n, .cfg_load(md_slice_load), .cfg_base(cfg_sdp_base[md_ed]), .cfg_size(cfg_sdp_size[md_ed]),
    .cfg_start(md_sdp_start), .wr_ptr(wr_ptr[md_ed]), .rd_ptr(rd_ptr_rd),
    .mb_valid(sc_valid), .mb_ready(sc_ready), .mb_y(sc_y),
    .mem_req_valid(m_req_valid[M_SDPRD]), .mem_req_ready(m_req_ready[M_SDPRD]), .mem_req(m_req[M_SDPRD]),
    .mem_rsp_valid(m_rsp_valid[M_SDPRD]), .mem_rsp_data(m_rsp_data[M_SDPRD]),
    .out_valid(md_sdp_valid), .out_ready(md_sdp_ready), .out_data(md_sdp_data), .out_last(md_sdp_last)
  );

  assign md_mb_valid = sc_valid && sc_ready;
  assign md_mb_x     = sc_x;
  assign md_mb_y     = sc_y;

  // ---------------- deblocking line buffer ------------------------------------------------
  lb_bypass u_lb (
    .clk, .rst_n, .cfg_lb_base,
    .wr_valid(lb_wr_valid), .wr_ready(lb_wr_ready), .wr_x(lb_wr_x), .wr_y(lb_wr_y), .wr_data(lb_wr_data),
    .rd_req_valid(lb_rd_valid), .rd_req_ready(lb_rd_ready), .rd_x(lb_rd_x), .rd_y(lb_rd_y),
    .rd_rsp_valid(lb_rsp_valid), .rd_rsp_data(lb_rsp_data),
    .mem_req_valid(m_req_valid[M_LB]), .mem_req_ready(m_req_ready[M_LB]), .mem_req(m_req[M_LB]),
    .mem_rsp_valid(m_rsp_valid[M_LB]), .mem_rsp_data(m_rsp_data[M_LB]),
    .stat_onchip(ev_lb_onchip), .stat_dram(ev_lb_dram)
  );

  // ---------------- VCR-LFRC coding and restoring -----------------------------------------
  lfrc_coding u_code (
    .clk, .rst_n, .cfg_data_base, .cfg_len_base, .cfg_groups_per_row, .cfg_lines_per_row,
    .in_valid(fw_valid), .in_ready(fw_ready), .in_tag(fw_tag), .in_part(fw_part),
    .mem_req_valid(m_req_valid[M_CODE]), .mem_req_ready(m_req_ready[M_CODE]), .mem_req(m_req[M_CODE]),
    .stat_group_done(ev_group_done), .stat_raw_part(ev_raw_code)
  );

  lfrc_restore u_rest (
    .clk, .rst_n, .flush(cfg_lc_flush), .cfg_data_base, .cfg_len_base, .cfg_groups_per_row, .cfg_lines_per_row,
    .req_valid(rf_req_valid), .req_ready(rf_req_ready), .req(rf_req),
    .out_valid(rf_out_valid), .out_ready(rf_out_ready), .out_req(rf_out_req), .out_unit(rf_out_unit),
    .out_samples(rf_out_samples),
    .len_mem_req_valid(m_req_valid[M_LEN]), .len_mem_req_ready(m_req_ready[M_LEN]), .len_mem_req(m_req[M_LEN]),
    .len_mem_rsp_valid(m_rsp_valid[M_LEN]), .len_mem_rsp_data(m_rsp_data[M_LEN]),
    .part_mem_req_valid(m_req_valid[M_PART]), .part_mem_req_ready(m_req_ready[M_PART]), .part_mem_req(m_req[M_PART]),
    .part_mem_rsp_valid(m_rsp_valid[M_PART]), .part_mem_rsp_data(m_rsp_data[M_PART]),
    .stat_len_hit(ev_len_hit), .stat_len_miss(ev_len_miss), .stat_raw_part(ev_raw_restore)
  );

  // ---------------- 128-bit DRAM bus -------------------------------------------------------
  dram_bus #(.NM(NM)) u_bus (
    .clk, .rst_n, .m_req_valid, .m_req_ready, .m_req, .m_rsp_valid, .m_rsp_data,
    .s_req_valid(dram_req_valid), .s_req_ready(dram_req_ready), .s_req(dram_req),
    .s_rsp_valid(dram_rsp_valid), .s_rsp_data(dram_rsp_data)
  );
endmodule
