// comet_nn_trigger: neural-network event selection for the COMET Phase-I cylindrical detector.
//
// Signal events are single 105 MeV electrons that leave a helical track in the drift chamber
// (CDC) and fire the trigger hodoscope (CTH); most triggers come from low-energy electrons and
// protons. The chain below decides, within a fraction of a microsecond of the end of an event
// window, whether the event is kept:
//   multi_hit_filter     keep the first hit of each cell over the 100 ns time bins
//   gbdt_hit_classifier  score every cell from its and its neighbours' charges and its layer,
//                        keep cells at or above the score threshold
//   hitmap_compressor    cut the kept-hit map into three 1/3 areas, count hits per 3x16 cluster
//   qmlp                 24-50-26-1 quantized MLP with sigmoid output, one area per clock
//   trigger_decision     trigger = some area's score >= cut AND a CTH 4-fold coincidence
//   cth_coincidence      4-fold coincidence of the hodoscope, every time bin
//
// Interface: evt_start opens an event window; every 100 ns bin presents bin_q (2-bit charge
// code per cell, 0 = no hit, [layer][cell]) and the hodoscope counters with bin_valid;
// evt_end closes the window. dec_valid then pulses with the decision. The configuration port
// writes the GBDT score table (0x0000 + layer*64 + {qL,qC,qR}), the MLP weights and biases
// (0x1000/0x2000/0x3000 + index), the GBDT threshold (0xF000) and the score cut (0xF001).
// Timing: dec_valid comes 11 clocks after evt_end. A new event window may open right after
// evt_end; evt_end pulses must be at least N_REGIONS clocks apart.
module comet_nn_trigger
  import comet_trig_pkg::*;
(
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   cfg_we,
  input  cfg_addr_t                              cfg_addr,
  input  cfg_data_t                              cfg_wdata,
  input  logic                                   evt_start,
  input  logic                                   bin_valid,
  input  logic [N_LAYERS-1:0][N_COLS-1:0][Q_W-1:0] bin_q,
  input  logic [N_CTH-1:0]                       cth_up_inner,
  input  logic [N_CTH-1:0]                       cth_up_outer,
  input  logic [N_CTH-1:0]                       cth_dn_inner,
  input  logic [N_CTH-1:0]                       cth_dn_outer,
  input  logic                                   evt_end,
  output logic                                   dec_valid,
  output logic                                   trigger,
  output logic                                   nn_accept,
  output logic                                   cth_seen,
  output logic [S_W-1:0]                         best_score,
  output logic [1:0]                             best_region,
  output logic                                   busy
);

  localparam int unsigned RW = $clog2(N_REGIONS + 1);

  logic                                     map_valid, hit_valid, x_valid, x_last, s_valid;
  logic [N_LAYERS-1:0][N_COLS-1:0][Q_W-1:0] map_q;
  logic [N_LAYERS-1:0][N_COLS-1:0]          hit_map;
  logic [N_INPUTS-1:0][X_W-1:0]             x;
  logic [RW-1:0]                            x_region, s_region;
  logic [S_W-1:0]                           s;
  logic                                     cth_valid, cth_coinc;
  logic [N_CTH-1:0]                         seg_up, seg_dn;
  logic                                     tab_we, gthr_we, nthr_we;

  assign tab_we  = cfg_we && cfg_addr[15:12] == CFG_SEL_GBDT;
  assign gthr_we = cfg_we && cfg_addr == CFG_GBDT_THR;
  assign nthr_we = cfg_we && cfg_addr == CFG_NN_THR;

  multi_hit_filter u_filter (
    .clk, .rst_n, .evt_start, .bin_valid, .bin_q, .evt_end,
    .map_valid, .map_q
  );

  gbdt_hit_classifier u_gbdt (
    .clk, .rst_n,
    .tab_we, .tab_addr({4'h0, cfg_addr[11:0]}), .tab_wdata(cfg_wdata[SCORE_W-1:0]),
    .thr_we(gthr_we), .thr_wdata(cfg_wdata[SCORE_W-1:0]),
    .map_valid, .map_q,
    .hit_valid, .hit_map
  );

  hitmap_compressor u_comp (
    .clk, .rst_n,
    .map_valid(hit_valid), .hit_map,
    .busy, .x_valid, .x, .x_region, .x_last
  );

  qmlp #(.TAG_W(RW)) u_qmlp (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata,
    .x_valid, .x, .x_tag(x_region),
    .s_valid, .s, .s_tag(s_region)
  );

  cth_coincidence u_cth (
    .clk, .rst_n, .bin_valid,
    .up_inner(cth_up_inner), .up_outer(cth_up_outer),
    .dn_inner(cth_dn_inner), .dn_outer(cth_dn_outer),
    .coinc_valid(cth_valid), .coinc(cth_coinc), .seg_up, .seg_dn
  );

  trigger_decision u_dec (
    .clk, .rst_n,
    .thr_we(nthr_we), .thr_wdata(cfg_wdata[S_W-1:0]),
    .evt_start, .cth_valid, .cth_coinc,
    .s_valid, .s, .s_region,
    .dec_valid, .trigger, .nn_accept, .cth_seen, .best_score, .best_region
  );

endmodule
