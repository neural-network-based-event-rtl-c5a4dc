// qmlp: the quantized multilayer perceptron that classifies one compressed hit map.
//
// Structure (inputs -> outputs): 24 inputs of 16 bits -> dense 50 (4-bit weights) -> ReLU
// (8 bits) -> dense 26 (4-bit weights) -> ReLU (8 bits) -> dense 1 (4-bit weights) ->
// sigmoid (8 bits). Each layer is fully parallel and registered, as a latency-oriented
// high-level-synthesis flow would unroll it, so the network accepts one input vector per clock
// and its score appears four clocks later. A tag travels with each vector (the area number).
//
// Configuration: one write port. cfg_addr[15:12] selects the layer (1, 2, 3) and
// cfg_addr[11:0] is the index inside it (weights o*N_IN+i first, then the biases); the low
// 4 bits of cfg_wdata are the two's complement weight (value = code/8).
// Follows the design description: layer sizes 24-50-26-1, 4-bit dense layers, ReLU and sigmoid.
// Own choices: activation widths and fraction positions (see qdense_layer, sigmoid_act).
module qmlp
  import comet_trig_pkg::*;
#(
  parameter int unsigned NX    = N_INPUTS,
  parameter int unsigned NH1   = N_H1,
  parameter int unsigned NH2   = N_H2,
  parameter int unsigned TAG_W = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_we,
  input  cfg_addr_t                cfg_addr,
  input  cfg_data_t                cfg_wdata,
  input  logic                     x_valid,
  input  logic [NX-1:0][X_W-1:0]   x,
  input  logic [TAG_W-1:0]         x_tag,
  output logic                     s_valid,
  output logic [S_W-1:0]           s,
  output logic [TAG_W-1:0]         s_tag
);

  logic                        h1_valid, h2_valid, z_valid;
  logic [NH1-1:0][A_W-1:0]     h1;
  logic [NH2-1:0][A_W-1:0]     h2;
  logic [0:0][Z_W-1:0]         z;
  logic [TAG_W-1:0]            h1_tag, h2_tag, z_tag;
  logic                        we1, we2, we3;

  assign we1 = cfg_we && cfg_addr[15:12] == CFG_SEL_L1;
  assign we2 = cfg_we && cfg_addr[15:12] == CFG_SEL_L2;
  assign we3 = cfg_we && cfg_addr[15:12] == CFG_SEL_L3;

  qdense_layer #(
    .N_IN(NX), .N_OUT(NH1), .IN_W(X_W), .IN_FRAC(0),
    .OUT_W(A_W), .OUT_FRAC(A_FRAC), .RELU(1'b1), .TAG_W(TAG_W)
  ) u_l1 (
    .clk, .rst_n,
    .cfg_we(we1), .cfg_idx({4'h0, cfg_addr[11:0]}), .cfg_wdata(cfg_wdata[W_W-1:0]),
    .x_valid, .x, .x_tag,
    .y_valid(h1_valid), .y(h1), .y_tag(h1_tag)
  );

  qdense_layer #(
    .N_IN(NH1), .N_OUT(NH2), .IN_W(A_W), .IN_FRAC(A_FRAC),
    .OUT_W(A_W), .OUT_FRAC(A_FRAC), .RELU(1'b1), .TAG_W(TAG_W)
  ) u_l2 (
    .clk, .rst_n,
    .cfg_we(we2), .cfg_idx({4'h0, cfg_addr[11:0]}), .cfg_wdata(cfg_wdata[W_W-1:0]),
    .x_valid(h1_valid), .x(h1), .x_tag(h1_tag),
    .y_valid(h2_valid), .y(h2), .y_tag(h2_tag)
  );

  qdense_layer #(
    .N_IN(NH2), .N_OUT(1), .IN_W(A_W), .IN_FRAC(A_FRAC),
    .OUT_W(Z_W), .OUT_FRAC(Z_FRAC), .RELU(1'b0), .TAG_W(TAG_W)
  ) u_l3 (
    .clk, .rst_n,
    .cfg_we(we3), .cfg_idx({4'h0, cfg_addr[11:0]}), .cfg_wdata(cfg_wdata[W_W-1:0]),
    .x_valid(h2_valid), .x(h2), .x_tag(h2_tag),
    .y_valid(z_valid), .y(z), .y_tag(z_tag)
  );

  sigmoid_act #(.ZW(Z_W), .ZF(Z_FRAC), .SW(S_W), .TAG_W(TAG_W)) u_sig (
    .clk, .rst_n,
    .z_valid, .z(z[0]), .z_tag,
    .s_valid, .s, .s_tag
  );

endmodule
