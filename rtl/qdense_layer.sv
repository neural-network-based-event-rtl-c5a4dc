// qdense_layer: one fully parallel dense layer of the quantized MLP.
//
// All N_OUT neurons are computed in the same clock: every neuron multiplies all N_IN inputs by
// its own 4-bit weight, adds them and its bias, and the result is registered. With weights this
// narrow each product is a small shift-and-add that maps onto LUTs rather than DSP blocks,
// which is what makes a fully parallel layer affordable on the target FPGA.
//
// Number formats (fixed point, value = code / 2^FRAC):
//   inputs   unsigned IN_W bits, IN_FRAC fraction bits
//   weights  signed   W_W  bits, WF fraction bits (4 bits, value in [-1, 0.875])
//   biases   signed   W_W  bits, WF fraction bits, aligned to the accumulator
//   accumulator  IN_FRAC+WF fraction bits, wide enough never to overflow
//   output   RELU = 1: unsigned OUT_W bits, max(0, acc) truncated to OUT_FRAC fraction bits and
//                      saturated (quantized ReLU)
//            RELU = 0: signed OUT_W bits, acc truncated to OUT_FRAC fraction bits, saturated
// Weights and biases are registers written over the configuration port: index o*N_IN+i is the
// weight from input i to neuron o, index N_IN*N_OUT+o the bias of neuron o. They reset to 0.
// Timing: y/y_valid/y_tag follow x/x_valid/x_tag by one clock; a new vector every clock.
// Follows the design description: 4-bit weights, ReLU, fully parallel (LUT) arithmetic.
// Own choices: the fraction positions, truncation and saturation, and the register port.
module qdense_layer
  import comet_trig_pkg::*;
#(
  parameter int unsigned N_IN     = 24,
  parameter int unsigned N_OUT    = 50,
  parameter int unsigned IN_W     = 16,
  parameter int unsigned IN_FRAC  = 0,
  parameter int unsigned WW       = W_W,
  parameter int unsigned WF       = W_FRAC,
  parameter int unsigned OUT_W    = 8,
  parameter int unsigned OUT_FRAC = 3,
  parameter bit          RELU     = 1'b1,
  parameter int unsigned TAG_W    = 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          cfg_we,
  input  logic [15:0]                   cfg_idx,
  input  logic [WW-1:0]                 cfg_wdata,
  input  logic                          x_valid,
  input  logic [N_IN-1:0][IN_W-1:0]     x,
  input  logic [TAG_W-1:0]              x_tag,
  output logic                          y_valid,
  output logic [N_OUT-1:0][OUT_W-1:0]   y,
  output logic [TAG_W-1:0]              y_tag
);

  localparam int unsigned NW    = N_IN * N_OUT;
  localparam int unsigned ACC_W = IN_W + WW + $clog2(N_IN + 1) + IN_FRAC + 2;
  localparam int unsigned SHIFT = IN_FRAC + WF - OUT_FRAC;

  logic signed [WW-1:0] w [NW];
  logic signed [WW-1:0] b [N_OUT];
  logic [N_OUT-1:0][OUT_W-1:0] y_nxt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NW; i++) w[i] <= '0;
      for (int o = 0; o < N_OUT; o++) b[o] <= '0;
    end else if (cfg_we) begin
      if (cfg_idx < 16'(NW)) w[cfg_idx] <= cfg_wdata;
      else if (cfg_idx < 16'(NW + N_OUT)) b[cfg_idx - 16'(NW)] <= cfg_wdata;
    end
  end

  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      logic signed [ACC_W-1:0] acc, q;
      acc = ACC_W'(b[o]) <<< IN_FRAC;
      for (int i = 0; i < N_IN; i++)
        acc += $signed({1'b0, x[i]}) * ACC_W'(w[o*N_IN + i]);
      q = acc >>> SHIFT;
      if (RELU) begin
        if (q < 0)                              y_nxt[o] = '0;
        else if (q > ACC_W'((1 << OUT_W) - 1))  y_nxt[o] = '1;
        else                                    y_nxt[o] = q[OUT_W-1:0];
      end else begin
        if (q > ACC_W'((1 << (OUT_W - 1)) - 1))       y_nxt[o] = {1'b0, {(OUT_W-1){1'b1}}};
        else if (q < -ACC_W'(1 << (OUT_W - 1)))       y_nxt[o] = {1'b1, {(OUT_W-1){1'b0}}};
        else                                          y_nxt[o] = q[OUT_W-1:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y       <= '0;
      y_tag   <= '0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) begin
        y     <= y_nxt;
        y_tag <= x_tag;
      end
    end
  end

endmodule
