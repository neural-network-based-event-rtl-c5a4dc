// gbdt_hit_classifier: second step of CDC hit classification, per-cell GBDT scoring.
//
// The GBDT looks at four local features of a cell: its own 2-bit charge, the 2-bit charges of
// its left and right neighbours in the same layer, and its layer ID (radial position). These
// are 3*2 bits plus the layer, so for every layer the trained tree ensemble is a function of
// only 64 charge patterns. The classifier therefore holds the ensemble's output as a score
// table, one 8-bit score (value = code/256) per (layer, pattern), written over the
// configuration port, which keeps the algorithm modifiable without rebuilding the firmware.
// Each cycle the table is compared with the score threshold (reset value 192 = 0.75), giving
// 64 pass bits per layer; every cell then selects its pass bit with its own charge pattern.
// A cell without charge is never kept. All cells of the map are scored in parallel.
//
// Pattern index = {q_left, q_centre, q_right}; left is column c-1, right is column c+1, and the
// row wraps around (the map covers the full circumference). Table address = layer*64 + pattern.
// Timing: hit_valid/hit_map follow map_valid by one clock; fully pipelined.
// Follows the design description: features and threshold 0.75. Own choices: the exact table
// form of the ensemble, the 8-bit score and the column wrap-around.
module gbdt_hit_classifier
  import comet_trig_pkg::*;
#(
  parameter int unsigned LAYERS = N_LAYERS,
  parameter int unsigned COLS   = N_COLS
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // configuration: score table and threshold
  input  logic                                   tab_we,
  input  logic [15:0]                            tab_addr,
  input  logic [SCORE_W-1:0]                     tab_wdata,
  input  logic                                   thr_we,
  input  logic [SCORE_W-1:0]                     thr_wdata,
  // filtered charge map in
  input  logic                                   map_valid,
  input  logic [LAYERS-1:0][COLS-1:0][Q_W-1:0]   map_q,
  // classified hit map out
  output logic                                   hit_valid,
  output logic [LAYERS-1:0][COLS-1:0]            hit_map
);

  localparam int unsigned ENTRIES = LAYERS * N_PAT;

  logic [SCORE_W-1:0] score [ENTRIES];
  logic [SCORE_W-1:0] thr;
  logic [LAYERS-1:0][N_PAT-1:0] pass;
  logic [LAYERS-1:0][COLS-1:0]  sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thr <= SCORE_W'(192);
      for (int i = 0; i < ENTRIES; i++) score[i] <= '0;
    end else begin
      if (thr_we) thr <= thr_wdata;
      if (tab_we && tab_addr < 16'(ENTRIES)) score[tab_addr] <= tab_wdata;
    end
  end

  // pass bit of every (layer, pattern) entry
  for (genvar l = 0; l < LAYERS; l++) begin : g_pass_l
    for (genvar p = 0; p < N_PAT; p++) begin : g_pass_p
      assign pass[l][p] = (score[l*N_PAT + p] >= thr);
    end
  end

  // every cell looks up its pattern in its layer's pass bits
  for (genvar l = 0; l < LAYERS; l++) begin : g_layer
    for (genvar c = 0; c < COLS; c++) begin : g_cell
      localparam int unsigned CL = (c + COLS - 1) % COLS;
      localparam int unsigned CR = (c + 1) % COLS;
      logic [PAT_W-1:0] pat;
      assign pat = {map_q[l][CL], map_q[l][c], map_q[l][CR]};
      assign sel[l][c] = (map_q[l][c] != '0) && pass[l][pat];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_valid <= 1'b0;
      hit_map   <= '0;
    end else begin
      hit_valid <= map_valid;
      if (map_valid) hit_map <= sel;
    end
  end

endmodule
