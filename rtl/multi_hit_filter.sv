// multi_hit_filter: first step of CDC hit classification, "one hit per cell".
//
// The drift chamber readout delivers, every 100 ns time bin of an event window, a 2-bit charge
// code per cell (0 = no hit in that bin). A cell can fire in several bins of the same event
// (late drift electrons, after-pulses); only the first hit of each cell is kept, so that the
// GBDT sees one charge per cell. The filter holds a charge map that is cleared by evt_start
// and in which each cell takes the charge of its first non-zero bin. evt_end copies the map
// (including a bin presented in the same cycle) into the output register and raises map_valid
// for one cycle; the next event can start while the output is being used.
//
// Timing: map_valid and map_q follow evt_end by one clock. evt_start and bin_valid in the same
// cycle make that bin the first one of the new event.
// Follows the design description: keep the first hit per cell over 100 ns bins. Own choices:
// the parallel per-cell interface and the 0 = no-hit charge encoding.
module multi_hit_filter
  import comet_trig_pkg::*;
#(
  parameter int unsigned LAYERS = N_LAYERS,
  parameter int unsigned COLS   = N_COLS
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   evt_start,
  input  logic                                   bin_valid,
  input  logic [LAYERS-1:0][COLS-1:0][Q_W-1:0]   bin_q,
  input  logic                                   evt_end,
  output logic                                   map_valid,
  output logic [LAYERS-1:0][COLS-1:0][Q_W-1:0]   map_q
);

  logic [LAYERS-1:0][COLS-1:0][Q_W-1:0] held, held_nxt;

  // one small cell per wire: clear on evt_start, then take the first non-zero charge
  for (genvar l = 0; l < LAYERS; l++) begin : g_layer
    for (genvar c = 0; c < COLS; c++) begin : g_cell
      logic [Q_W-1:0] base;
      assign base = evt_start ? '0 : held[l][c];
      assign held_nxt[l][c] = (bin_valid && base == '0) ? bin_q[l][c] : base;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held      <= '0;
      map_q     <= '0;
      map_valid <= 1'b0;
    end else begin
      held      <= held_nxt;
      map_valid <= evt_end;
      if (evt_end) map_q <= held_nxt;
    end
  end

endmodule
