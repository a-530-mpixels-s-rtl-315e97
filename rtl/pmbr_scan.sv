// pmbr_scan: macroblock scan order of the main decoder under partial MB reordering (PMBR).
//
// The picture is cut into regions of N_ROWS macroblock rows. Inside a region the MBs are
// visited in a zig-zag that steps down the region's rows with a lag of SKEW columns per row:
// at step t the MB of local row r is column x = t - SKEW*r. With SKEW = 2 the left, upper-left,
// upper and upper-right neighbours of every MB (needed by intra and MV prediction) come before
// it, while vertically adjacent MBs are processed within a few steps of each other, so the MC
// cache and the line buffer can reuse data across rows. MBs outside the current slice
// [cfg_first_mb, cfg_last_mb] (raster addresses) are skipped; rows below the picture in the
// last region are skipped.
//
// Interface: start (pulse) begins a slice scan with the cfg_* values; mb_* (valid/ready)
// gives each MB's column, row and raster address; done pulses after the last MB.
// Timing: one candidate position per cycle, N_ROWS*(W + SKEW*(N_ROWS-1)) candidates per region,
// i.e. about one MB per cycle against the 64 cycles the pipeline spends on each MB.
// The region height N = 4 and the zig-zag inside each region follow the published scheme;
// the skew of 2 columns per row is this design's reading of the zig-zag order.
module pmbr_scan #(
  parameter int unsigned N_ROWS = 4,
  parameter int unsigned SKEW   = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [8:0]  cfg_mb_w,      // MBs per row (256 for 4096 pixels)
  input  logic [7:0]  cfg_mb_h,      // MB rows (135 for 2160 lines)
  input  logic [15:0] cfg_first_mb,
  input  logic [15:0] cfg_last_mb,
  output logic        mb_valid,
  input  logic        mb_ready,
  output logic [8:0]  mb_x,
  output logic [7:0]  mb_y,
  output logic [15:0] mb_addr,
  output logic        busy,
  output logic        done
);
  localparam int unsigned RW = $clog2(N_ROWS) > 0 ? $clog2(N_ROWS) : 1;

  logic [7:0]    region_row;   // first MB row of the current region
  logic [9:0]    t;
  logic [RW-1:0] r;
  logic [7:0]    last_row;

  logic signed [11:0] xc;
  logic [7:0]  yc;
  logic [15:0] ac;
  logic        cand_ok, last_cand, region_end;

  always_comb begin
    xc = 12'(signed'({2'b0, t})) - 12'(SKEW * r);
    yc = region_row + 8'(r);
    ac = 16'(yc) * 16'(cfg_mb_w) + 16'(xc);
    cand_ok = (xc >= 0) && (xc < 12'(cfg_mb_w)) && (yc < cfg_mb_h)
           && (ac >= cfg_first_mb) && (ac <= cfg_last_mb);
    region_end = (r == RW'(N_ROWS - 1)) && (t == 10'(cfg_mb_w) + 10'(SKEW * (N_ROWS - 1)) - 10'd1);
    last_cand  = region_end && (region_row + 8'(N_ROWS) > last_row);
  end

  assign mb_valid = busy && cand_ok;
  assign mb_x     = 9'(xc);
  assign mb_y     = yc;
  assign mb_addr  = ac;

  logic step;
  assign step = busy && (!cand_ok || mb_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0;
      region_row <= '0; t <= '0; r <= '0; last_row <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy       <= 1'b1;
        // region holding the slice's first MB
        region_row <= 8'((32'(cfg_first_mb) / 32'(cfg_mb_w)) / N_ROWS * N_ROWS);
        last_row   <= 8'(32'(cfg_last_mb) / 32'(cfg_mb_w));
        t <= '0; r <= '0;
      end else if (step) begin
        if (last_cand) begin
          busy <= 1'b0; done <= 1'b1;
        end else if (r == RW'(N_ROWS - 1)) begin
          r <= '0;
          if (region_end) begin
            t <= '0;
            region_row <= region_row + 8'(N_ROWS);
          end else t <= t + 10'd1;
        end else r <= r + 1'b1;
      end
    end
  end
endmodule
