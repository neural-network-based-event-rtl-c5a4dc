// hitmap_compressor: 1/3 area extraction and hit-map compression for the MLP.
//
// The classified hit map (one bit per cell, set for cells the GBDT kept) covers the full
// circumference of the chamber. It is cut into N_REGIONS azimuthal areas of REGION_COLS cells
// each, and every area is compressed by clustering: the area is tiled with CL_H x CL_W blocks
// (layers x cells) and each block is replaced by the number of kept hits inside it. The counts
// are flattened row-group first (index = row_group * (REGION_COLS/CL_W) + col_group) into the
// 16-bit MLP input vector, 24 values at the default sizes (18/3 row groups x 64/16 column
// groups).
//
// The map is captured when map_valid is high; the areas are then sent one per clock, area 0
// first, with x_region telling which one and x_last marking the final one. A new map must not
// arrive while areas are still being sent (busy high); an assertion checks this.
// Timing: area r leaves r+2 clocks after map_valid, so a map takes N_REGIONS clocks.
// Follows the design description: 1/3 areas, compression by hit clustering into counts.
// Own choices: the area width, the 3x16 cluster shape (one of the searched shapes that gives
// 24 inputs) and sending the three areas through one MLP in turn.
module hitmap_compressor
  import comet_trig_pkg::*;
#(
  parameter int unsigned LAYERS  = N_LAYERS,
  parameter int unsigned REGIONS = N_REGIONS,
  parameter int unsigned RCOLS   = REGION_COLS,
  parameter int unsigned CH      = CL_H,
  parameter int unsigned CW      = CL_W,
  parameter int unsigned NX      = (LAYERS / CH) * (RCOLS / CW)
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic                                    map_valid,
  input  logic [LAYERS-1:0][REGIONS*RCOLS-1:0]    hit_map,
  output logic                                    busy,
  output logic                                    x_valid,
  output logic [NX-1:0][X_W-1:0]                  x,
  output logic [$clog2(REGIONS+1)-1:0]            x_region,
  output logic                                    x_last
);

  localparam int unsigned NRG = LAYERS / CH;
  localparam int unsigned NCG = RCOLS / CW;
  localparam int unsigned RW  = $clog2(REGIONS + 1);

  logic [LAYERS-1:0][REGIONS*RCOLS-1:0] map_r;
  logic [RW-1:0]                        region;
  logic [NX-1:0][X_W-1:0]               cnt;

  // cluster counts of the area being sent
  always_comb begin
    for (int rg = 0; rg < NRG; rg++) begin
      for (int cg = 0; cg < NCG; cg++) begin
        logic [X_W-1:0] s;
        s = '0;
        for (int dy = 0; dy < CH; dy++)
          for (int dx = 0; dx < CW; dx++)
            s += X_W'(map_r[rg*CH + dy][int'(region)*RCOLS + cg*CW + dx]);
        cnt[rg*NCG + cg] = s;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      map_r    <= '0;
      region   <= '0;
      busy     <= 1'b0;
      x_valid  <= 1'b0;
      x        <= '0;
      x_region <= '0;
      x_last   <= 1'b0;
    end else begin
      x_valid <= busy;
      x_last  <= busy && (region == RW'(REGIONS - 1));
      if (busy) begin
        x        <= cnt;
        x_region <= region;
      end
      if (map_valid) begin
        map_r  <= hit_map;
        region <= '0;
        busy   <= 1'b1;
      end else if (busy) begin
        if (region == RW'(REGIONS - 1)) busy <= 1'b0;
        region <= region + 1'b1;
      end
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) map_valid |-> !busy)
    else $error("hitmap_compressor: new map while areas are still being sent");

endmodule
