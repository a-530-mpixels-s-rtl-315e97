// bsp: bit stream processor. Splits an H.264/AVC byte stream into NAL units at one byte per
// cycle and writes them into the NALU buffer.
//
// A start code is two or more zero bytes followed by 0x01. Bytes between start codes are
// written to consecutive NALU buffer addresses; zero bytes are written as they come, and when
// they turn out to belong to the next start code the write pointer is moved back over them and
// the finished NAL unit's length excludes them, so no byte ever waits. The byte after a start
// code is the NAL header: its nal_unit_type classifies the unit as a slice NALU (types 1 to 5,
// handled by the entropy decoders) or a parameter NALU (handled by host software).
//
// Interface: in_* (valid/ready) stream bytes, in_eos closes the last unit; nb_* NALU buffer
// byte write port; nal_start_* reports a unit's address and type as soon as its header byte is
// stored (so an ED can start before the unit is complete), nal_end_* its length; both wait
// for nal_ready. nb_wptr tells readers how far the buffer is filled.
// Timing: one byte per cycle. The one-byte-per-cycle search and the slice/parameter split
// follow the published design; the buffer addressing and reporting are this design's choices.
module bsp #(
  parameter int unsigned NB_AW = 20    // NALU buffer byte address width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [7:0]       in_byte,
  input  logic             in_eos,
  output logic             nb_we,
  output logic [NB_AW-1:0] nb_addr,
  output logic [7:0]       nb_data,
  output logic [NB_AW-1:0] nb_wptr,
  input  logic             nal_ready,
  output logic             nal_start_valid,
  output logic [NB_AW-1:0] nal_start_addr,
  output logic [4:0]       nal_type,
  output logic             nal_is_slice,
  output logic             nal_end_valid,
  output logic [NB_AW-1:0] nal_len
);
  logic             in_nal, hdr_next;
  logic [7:0]       zrun;
  logic [NB_AW-1:0] wptr, sptr;
  logic             take, is_sc;

  assign in_ready = nal_ready;
  assign take     = in_valid && in_ready;
  assign is_sc    = (in_byte == 8'h01) && (zrun >= 8'd2);
  assign nb_wptr  = wptr;

  always_comb begin
    nb_we   = take && !is_sc && (in_nal || hdr_next);
    nb_addr = wptr;
    nb_data = in_byte;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_nal <= 1'b0; hdr_next <= 1'b0; zrun <= '0; wptr <= '0; sptr <= '0;
      nal_start_valid <= 1'b0; nal_end_valid <= 1'b0;
      nal_start_addr <= '0; nal_type <= '0; nal_is_slice <= 1'b0; nal_len <= '0;
    end else begin
      nal_start_valid <= 1'b0;
      nal_end_valid   <= 1'b0;
      if (take) begin
        if (is_sc) begin
          if (in_nal) begin
            nal_end_valid <= 1'b1;
            nal_len       <= wptr - NB_AW'(zrun) - sptr;
            wptr          <= wptr - NB_AW'(zrun);
          end
          in_nal   <= 1'b0;
          hdr_next <= 1'b1;
          zrun     <= '0;
        end else begin
          zrun <= (in_byte != 8'h00) ? 8'd0 : ((zrun == 8'hFF) ? zrun : zrun + 8'd1);
          if (hdr_next) begin
            hdr_next        <= 1'b0;
            in_nal          <= 1'b1;
            sptr            <= wptr;
            wptr            <= wptr + 1'b1;
            nal_start_valid <= 1'b1;
            nal_start_addr  <= wptr;
            nal_type        <= in_byte[4:0];
            nal_is_slice    <= (in_byte[4:0] >= 5'd1) && (in_byte[4:0] <= 5'd5);
          end else if (in_nal) begin
            wptr <= wptr + 1'b1;
          end
        end
      end else if (in_eos && in_nal && nal_ready) begin
        nal_end_valid <= 1'b1;
        nal_len       <= wptr - NB_AW'(zrun) - sptr;
        wptr          <= wptr - NB_AW'(zrun);
        in_nal        <= 1'b0;
        zrun          <= '0;
      end
    end
  end
endmodule
