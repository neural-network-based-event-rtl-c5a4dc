// sigmoid_act: output activation of the MLP, a quantized logistic sigmoid.
//
// The output neuron's pre-activation z (signed, Z_W bits, ZF fraction bits) is turned into an
// event score in [0, 1) coded on S_W bits (score = code / 2^S_W, 1.0 saturates to all ones).
// The sigmoid is evaluated with the piecewise-linear PLAN approximation, whose slopes are
// powers of two, so no multiplier and no table is needed:
//     |z| >= 5           y = 1
//     2.375 <= |z| < 5   y = |z|/32 + 0.84375
//     1 <= |z| < 2.375   y = |z|/8  + 0.625
//     |z| < 1            y = |z|/4  + 0.5
//     z < 0              y = 1 - y(|z|)
// Its largest error against the exact sigmoid is about 0.019, below one step of a 6-bit score.
// y is formed exactly with ZF+5 fraction bits and truncated to S_W bits.
// Timing: s/s_valid/s_tag follow z/z_valid/z_tag by one clock; a new value every clock.
// Follows the design description: sigmoid output with a few bits of precision. Own choice:
// the PLAN approximation and the 8-bit output.
module sigmoid_act
  import comet_trig_pkg::*;
#(
  parameter int unsigned ZW    = Z_W,
  parameter int unsigned ZF    = Z_FRAC,
  parameter int unsigned SW    = S_W,
  parameter int unsigned TAG_W = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    z_valid,
  input  logic signed [ZW-1:0]    z,
  input  logic [TAG_W-1:0]        z_tag,
  output logic                    s_valid,
  output logic [SW-1:0]           s,
  output logic [TAG_W-1:0]        s_tag
);

  localparam int unsigned YF = ZF + 5;          // fraction bits of the exact result
  localparam int unsigned YW = ZW + 8;          // room for |z| * 8 and the constants

  logic [YW-1:0] ax, ypos, y, ys;
  logic [SW-1:0] s_nxt;

  always_comb begin
    ax = z[ZW-1] ? YW'(-z) : YW'(z);
    if (ax >= (YW'(5) << ZF))             ypos = YW'(32) << ZF;
    else if (ax >= (YW'(19) << ZF) >> 3)  ypos = ax + (YW'(27) << ZF);
    else if (ax >= (YW'(1) << ZF))        ypos = (ax << 2) + (YW'(20) << ZF);
    else                                  ypos = (ax << 3) + (YW'(16) << ZF);
    y  = z[ZW-1] ? (YW'(32) << ZF) - ypos : ypos;
    ys = y >> (YF - SW);
    s_nxt = (ys > YW'((1 << SW) - 1)) ? '1 : ys[SW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      s       <= '0;
      s_tag   <= '0;
    end else begin
      s_valid <= z_valid;
      if (z_valid) begin
        s     <= s_nxt;
        s_tag <= z_tag;
      end
    end
  end

endmodule
