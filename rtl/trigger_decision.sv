// trigger_decision: final event selection from the MLP scores and the hodoscope.
//
// An event is a signal candidate when the hodoscope saw a 4-fold coincidence during the event
// window and the MLP score of at least one of the three 1/3 areas reaches the score cut. The
// cut (8 bits, score = code/256) is a configuration register: it is the knob that sets the
// trigger rate (the network was operated at the cut giving 26 kHz). Reset value 128 (0.5).
//
// evt_start clears the event state. cth_valid/cth_coinc are sampled every time bin and ORed
// into cth_seen. s_valid/s/s_region deliver one score per area; when the score of the last
// area (s_region == REGIONS-1) arrives, dec_valid pulses one clock later with nn_accept, the
// hodoscope flag, their AND as trigger, and the best score with its area.
// Follows the design description: score cut on a sigmoid output, CTH 4-fold coincidence as
// part of the signal definition. Own choices: OR over areas, reset value of the cut.
module trigger_decision
  import comet_trig_pkg::*;
#(
  parameter int unsigned REGIONS = N_REGIONS,
  parameter int unsigned RW      = $clog2(REGIONS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              thr_we,
  input  logic [S_W-1:0]    thr_wdata,
  input  logic              evt_start,
  input  logic              cth_valid,
  input  logic              cth_coinc,
  input  logic              s_valid,
  input  logic [S_W-1:0]    s,
  input  logic [RW-1:0]     s_region,
  output logic              dec_valid,
  output logic              trigger,
  output logic              nn_accept,
  output logic              cth_seen,
  output logic [S_W-1:0]    best_score,
  output logic [RW-1:0]     best_region
);

  logic [S_W-1:0] thr;
  logic           cth_acc, nn_acc;
  logic [S_W-1:0] best;
  logic [RW-1:0]  best_r;
  logic           nn_now, cth_now, newbest;
  logic [S_W-1:0] best_now;
  logic [RW-1:0]  best_r_now;

  always_comb begin
    cth_now    = cth_acc || (cth_valid && cth_coinc);
    newbest    = s_valid && (s_region == '0 || s > best);
    best_now   = newbest ? s : best;
    best_r_now = newbest ? s_region : best_r;
    nn_now     = (s_valid && s_region != '0 && nn_acc) || (s_valid && s >= thr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      thr         <= S_W'(128);
      cth_acc     <= 1'b0;
      nn_acc      <= 1'b0;
      best        <= '0;
      best_r      <= '0;
      dec_valid   <= 1'b0;
      trigger     <= 1'b0;
      nn_accept   <= 1'b0;
      cth_seen    <= 1'b0;
      best_score  <= '0;
      best_region <= '0;
    end else begin
      if (thr_we) thr <= thr_wdata;
      cth_acc <= evt_start ? (cth_valid && cth_coinc) : cth_now;
      if (s_valid) begin
        nn_acc <= nn_now;
        best   <= best_now;
        best_r <= best_r_now;
      end
      dec_valid <= s_valid && s_region == RW'(REGIONS - 1);
      if (s_valid && s_region == RW'(REGIONS - 1)) begin
        nn_accept   <= nn_now;
        cth_seen    <= cth_now;
        trigger     <= nn_now && cth_now;
        best_score  <= best_now;
        best_region <= best_r_now;
      end
    end
  end

endmodule
