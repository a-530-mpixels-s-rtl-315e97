// ed_dispatch: NAL/slice-parallel scheduling of slice NAL units onto N_ED entropy decoders.
//
// Slice NALUs are taken in stream order and each is launched on an idle entropy decoder
// engine (the lowest-numbered one), as soon as its start is known, without waiting for the
// other engines: an engine that finishes a short slice early takes the next slice at once.
// Every launch is also recorded, in stream order, in the slice order queue (ord_*), which tells
// the main decoder, which always follows the standard slice order, whose SDP sub-buffers hold
// each slice.
//
// Interface: slice_* (valid/ready) slice NALU start addresses; ed_start[i] pulses with
// ed_addr[i]/ed_slice[i]; ed_done[i] pulses when engine i finishes; ord_* (valid/ready).
// Timing: a launch takes one cycle; at most one launch per cycle.
// N_ED = 2 and the first-free assignment follow the published design.
module ed_dispatch #(
  parameter int unsigned N_ED  = 2,
  parameter int unsigned NB_AW = 20
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             slice_valid,
  output logic             slice_ready,
  input  logic [NB_AW-1:0] slice_addr,
  output logic             ed_start [N_ED],
  output logic [NB_AW-1:0] ed_addr  [N_ED],
  output logic [15:0]      ed_slice [N_ED],
  input  logic             ed_done  [N_ED],
  output logic [N_ED-1:0]  ed_busy,
  output logic             ord_valid,
  input  logic             ord_ready,
  output logic [$clog2(N_ED > 1 ? N_ED : 2)-1:0] ord_ed
);
  localparam int unsigned EW = $clog2(N_ED > 1 ? N_ED : 2);
  logic          free_any;
  logic [EW-1:0] free_id;
  logic [15:0]   seq;
  logic          launch;

  always_comb begin
    free_any = 1'b0; free_id = '0;
    for (int i = N_ED - 1; i >= 0; i--)
      if (!ed_busy[i]) begin free_any = 1'b1; free_id = EW'(i); end
  end

  assign launch      = slice_valid && free_any && (!ord_valid || ord_ready);
  assign slice_ready = launch;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ed_busy   <= '0;
      seq       <= '0;
      ord_valid <= 1'b0;
      ord_ed    <= '0;
      for (int i = 0; i < N_ED; i++) begin ed_start[i] <= 1'b0; ed_addr[i] <= '0; ed_slice[i] <= '0; end
    end else begin
      for (int i = 0; i < N_ED; i++) begin
        ed_start[i] <= 1'b0;
        if (ed_done[i]) ed_busy[i] <= 1'b0;
      end
      if (ord_valid && ord_ready) ord_valid <= 1'b0;
      if (launch) begin
        ed_busy[free_id]  <= 1'b1;
        ed_start[free_id] <= 1'b1;
        ed_addr[free_id]  <= slice_addr;
        ed_slice[free_id] <= seq;
        seq               <= seq + 16'd1;
        ord_valid         <= 1'b1;
        ord_ed            <= free_id;
      end
    end
  end
endmodule
