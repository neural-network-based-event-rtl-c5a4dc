// cth_coincidence: 4-fold coincidence of the cylindrical trigger hodoscope (CTH).
//
// The hodoscope has N_SEG counter pairs at each end of the chamber, upstream and downstream;
// each pair is an inner and an outer plastic scintillator at the same azimuth. A charged
// track crossing the hodoscope normally fires two neighbouring pairs, so a coincidence of the
// inner and outer counters of pair i and of pair i+1 (four counters, the ring wraps around) is
// required. Single accidental hits then rarely make a trigger. seg_up[i] / seg_dn[i] flag a
// coincidence of pairs i and i+1 at that end; coinc is their OR.
// Timing: all outputs are registered and follow bin_valid by one clock; coinc_valid marks
// them. Follows the design description: 64 pairs per end, 4-fold coincidence. Own choice:
// which four counters form the coincidence (two layers times two neighbouring pairs).
module cth_coincidence
  import comet_trig_pkg::*;
#(
  parameter int unsigned N_SEG = N_CTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bin_valid,
  input  logic [N_SEG-1:0]  up_inner,
  input  logic [N_SEG-1:0]  up_outer,
  input  logic [N_SEG-1:0]  dn_inner,
  input  logic [N_SEG-1:0]  dn_outer,
  output logic              coinc_valid,
  output logic              coinc,
  output logic [N_SEG-1:0]  seg_up,
  output logic [N_SEG-1:0]  seg_dn
);

  logic [N_SEG-1:0] up_pair, dn_pair, up_4f, dn_4f;

  always_comb begin
    up_pair = up_inner & up_outer;
    dn_pair = dn_inner & dn_outer;
    for (int i = 0; i < N_SEG; i++) begin
      up_4f[i] = up_pair[i] && up_pair[(i + 1) % N_SEG];
      dn_4f[i] = dn_pair[i] && dn_pair[(i + 1) % N_SEG];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coinc_valid <= 1'b0;
      coinc       <= 1'b0;
      seg_up      <= '0;
      seg_dn      <= '0;
    end else begin
      coinc_valid <= bin_valid;
      if (bin_valid) begin
        seg_up <= up_4f;
        seg_dn <= dn_4f;
        coinc  <= (|up_4f) || (|dn_4f);
      end else begin
        coinc  <= 1'b0;
      end
    end
  end

endmodule
