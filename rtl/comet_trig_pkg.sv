// comet_trig_pkg: sizes, fixed-point formats and the configuration address map shared by the
// CDC neural-network trigger.
//
// The event selection works on a hit map of the cylindrical drift chamber (CDC): one row per
// layer, one column per cell, split into three azimuthal areas of equal size. Each area is
// compressed into cluster hit counts that feed a small quantized MLP (24-50-26-1, 4-bit
// weights, ReLU hidden layers, sigmoid output).
//
// Numbers taken from the design description: 24 MLP inputs of 16 bits, hidden layers of 50
// and 26 neurons, 4-bit weights, GBDT score threshold 0.75, 2-bit charges, three 1/3 areas,
// 64 hodoscope counter pairs per end. Choices of this implementation: an 18-layer by 192-cell
// map (64 cells per area) clustered in 3x16 blocks, 8-bit GBDT scores, 8-bit ReLU outputs
// with 3 fraction bits, 8-bit sigmoid output, and a 16-bit write-only configuration bus.
package comet_trig_pkg;

  // ---- hit map geometry ----
  parameter int unsigned N_LAYERS    = 18;   // rows of the hit map
  parameter int unsigned N_REGIONS   = 3;    // 1/3 area extraction
  parameter int unsigned REGION_COLS = 64;   // cells per row inside one area
  parameter int unsigned N_COLS      = N_REGIONS * REGION_COLS;
  parameter int unsigned N_WIRES     = N_LAYERS * N_COLS;
  parameter int unsigned CL_H        = 3;    // cluster height (layers)
  parameter int unsigned CL_W        = 16;   // cluster width (cells)
  parameter int unsigned N_INPUTS    = (N_LAYERS / CL_H) * (REGION_COLS / CL_W);  // 24

  // ---- charges and GBDT ----
  parameter int unsigned Q_W         = 2;    // charge code, 0 = no hit in that cell
  parameter int unsigned LAYER_W     = 5;
  parameter int unsigned PAT_W       = 3 * Q_W;           // {left, centre, right}
  parameter int unsigned N_PAT       = 1 << PAT_W;        // 64 patterns per layer
  parameter int unsigned SCORE_W     = 8;    // GBDT score, value = code / 256
  parameter int unsigned GBDT_ENTRIES = N_LAYERS * N_PAT;

  // ---- QMLP ----
  parameter int unsigned X_W         = 16;   // MLP input precision
  parameter int unsigned W_W         = 4;    // weight and bias precision
  parameter int unsigned W_FRAC      = 3;    // weight value = code / 8
  parameter int unsigned A_W         = 8;    // ReLU output precision
  parameter int unsigned A_FRAC      = 3;    // ReLU output value = code / 8
  parameter int unsigned N_H1        = 50;
  parameter int unsigned N_H2        = 26;
  parameter int unsigned N_H3        = 1;   
  parameter int unsigned Z_W         = 16;   // output neuron pre-activation
  parameter int unsigned Z_FRAC      = A_FRAC + W_FRAC;   // 6
  parameter int unsigned S_W         = 8;    // sigmoid output, value = code / 256

  // ---- CTH ----
  parameter int unsigned N_CTH       = 64;

  // ---- configuration bus ----
  parameter int unsigned CFG_AW      = 16;
  parameter int unsigned CFG_DW      = 16;
  typedef logic [CFG_AW-1:0] cfg_addr_t;
  typedef logic [CFG_DW-1:0] cfg_data_t;

  // address map, upper nibble selects the target
  parameter logic [3:0] CFG_SEL_GBDT  = 4'h0;  // 0x0000 + layer*64 + pattern : score
  parameter logic [3:0] CFG_SEL_CTRL  = 4'hF;  // 0xF000 thresholds
  parameter logic [3:0] CFG_SEL_L1    = 4'h1;  // weights o*N_IN+i, then biases
  parameter logic [3:0] CFG_SEL_L2    = 4'h2;
  parameter logic [3:0] CFG_SEL_L3    = 4'h3;
  parameter cfg_addr_t  CFG_GBDT_THR  = 16'hF000;
  parameter cfg_addr_t  CFG_NN_THR    = 16'hF001;

  // one hit-map row of charges and of classified hits
  typedef logic [N_COLS-1:0][Q_W-1:0] q_row_t;
  typedef logic [N_COLS-1:0]          hit_row_t;

endpackage
