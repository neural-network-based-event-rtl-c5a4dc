// tb_comet_nn_trigger: end-to-end test of the CDC/CTH neural-network trigger at full size.
//
// The trigger is built with its default sizes (18 x 192 cells, 64 hodoscope pairs, 24-50-26-1
// MLP). The test writes a random GBDT score table, random 4-bit MLP weights and both
// thresholds through the configuration port, then plays events: each event window has several
// 100 ns bins with random cell hits (cells may fire repeatedly) and hodoscope hits, with a
// density that changes from event to event. A reference model written here from the
// algorithm (first hit per cell, table lookup and threshold, 3x16 cluster counts per 1/3 area,
// the MLP in real arithmetic with the same quantization, sigmoid approximation, cut and
// hodoscope coincidence) predicts every decision. The decision must come 11 clocks after
// evt_end. The score cut is changed half-way.
// Mechanisms counted, each must happen at least once: repeated hits removed by the filter,
// charged cells rejected and kept by the GBDT, hodoscope 4-fold coincidences, events accepted,
// events rejected by the MLP, events rejected for lack of a coincidence, a cut change.
module tb_comet_nn_trigger;
  import comet_trig_pkg::*;
  localparam int L = N_LAYERS, C = N_COLS, R = N_REGIONS, RC = REGION_COLS;
  localparam int NX = N_INPUTS, H1 = N_H1, H2 = N_H2, NE = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we, evt_start, bin_valid, evt_end, dec_valid, trigger, nn_accept, cth_seen, busy;
  logic [15:0] cfg_addr, cfg_wdata;
  logic [L-1:0][C-1:0][1:0] bin_q;
  logic [N_CTH-1:0] ui, uo, di, dout;
  logic [7:0] best_score;
  logic [1:0] best_region;

  comet_nn_trigger dut (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .evt_start, .bin_valid, .bin_q,
    .cth_up_inner(ui), .cth_up_outer(uo), .cth_dn_inner(di), .cth_dn_outer(dout),
    .evt_end, .dec_valid, .trigger, .nn_accept, .cth_seen, .best_score, .best_region, .busy);

  // configuration held by the reference
  int gs [L*64]; int gthr, nthr;
  int w1 [H1][NX]; int b1 [H1];
  int w2 [H2][H1]; int b2 [H2];
  int w3 [H2];     int b3;

  // mechanism counters
  int n_multi = 0, n_gbdt_rej = 0, n_gbdt_keep = 0, n_coinc = 0;
  int n_acc = 0, n_rej_nn = 0, n_rej_cth = 0, n_cut_change = 0;

  function automatic int sx4(int v);
    return (v >= 8) ? v - 16 : v;
  endfunction

  function automatic real clampq(real v, real step, real lo, real hi);
    real q;
    q = $floor(v / step) * step;
    if (q < lo) q = lo;
    if (q > hi) q = hi;
    return q;
  endfunction

  function automatic int plan8(real z);
    real az, y, q;
    az = (z < 0) ? -z : z;
    if (az >= 5.0)        y = 1.0;
    else if (az >= 2.375) y = az / 32.0 + 0.84375;
    else if (az >= 1.0)   y = az / 8.0 + 0.625;
    else                  y = az / 4.0 + 0.5;
    if (z < 0) y = 1.0 - y;
    q = $floor(y * 256.0);
    return (q > 255.0) ? 255 : int'(q);
  endfunction

  function automatic int mlp_ref(int xv [NX]);
    real h1 [H1]; real h2 [H2]; real z;
    for (int o = 0; o < H1; o++) begin
      real a;
      a = sx4(b1[o]) / 8.0;
      for (int i = 0; i < NX; i++) a += real'(xv[i]) * sx4(w1[o][i]) / 8.0;
      h1[o] = clampq(a, 0.125, 0.0, 255.0 / 8.0);
    end
    for (int o = 0; o < H2; o++) begin
      real a;
      a = sx4(b2[o]) / 8.0;
      for (int i = 0; i < H1; i++) a += h1[i] * sx4(w2[o][i]) / 8.0;
      h2[o] = clampq(a, 0.125, 0.0, 255.0 / 8.0);
    end
    z = sx4(b3) / 8.0;
    for (int i = 0; i < H2; i++) z += h2[i] * sx4(w3[i]) / 8.0;
    z = clampq(z, 1.0 / 64.0, -512.0, 32767.0 / 64.0);
    return plan8(z);
  endfunction

  task automatic wr(int addr, int data);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 16'(addr); cfg_wdata = 16'(data);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int first_q [L][C];
  bit kept [L][C];

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; evt_start = 0; bin_valid = 0; evt_end = 0;
    bin_q = '0; ui = '0; uo = '0; di = '0; dout = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // GBDT table: scores grow with the centre charge, some randomness
    for (int i = 0; i < L*64; i++) begin
      gs[i] = ((i % 64) / 4 % 4) * 55 + $urandom_range(0, 80);
      wr(i, gs[i]);
    end
    gthr = 150; wr('hF000, gthr);
    for (int o = 0; o < H1; o++)
      for (int i = 0; i < NX; i++) begin w1[o][i] = $urandom_range(0, 15); wr('h1000 + o*NX + i, w1[o][i]); end
    for (int o = 0; o < H1; o++) begin b1[o] = $urandom_range(0, 15); wr('h1000 + H1*NX + o, b1[o]); end
    for (int o = 0; o < H2; o++)
      for (int i = 0; i < H1; i++) begin w2[o][i] = $urandom_range(0, 15); wr('h2000 + o*H1 + i, w2[o][i]); end
    for (int o = 0; o < H2; o++) begin b2[o] = $urandom_range(0, 15); wr('h2000 + H2*H1 + o, b2[o]); end
    for (int i = 0; i < H2; i++) begin w3[i] = $urandom_range(0, 15); wr('h3000 + i, w3[i]); end
    b3 = $urandom_range(0, 15); wr('h3000 + H2, b3);
    nthr = 128; wr('hF001, nthr);
    @(negedge clk); cfg_we = 0;

    for (int e = 0; e < NE; e++) begin
      int nb, dens, sc_best, sc_r, t_end, lat;
      bit ecth, enn;
      if (e == NE / 2) begin
        nthr = 200; wr('hF001, nthr); @(negedge clk); cfg_we = 0; n_cut_change++;
      end
      nb = $urandom_range(2, 8);
      dens = $urandom_range(1, 40);      // cell occupancy per bin, in 1/1000
      for (int l = 0; l < L; l++) for (int c = 0; c < C; c++) first_q[l][c] = 0;
      ecth = 0;
      for (int b = 0; b < nb; b++) begin
        @(negedge clk);
        evt_start = (b == 0); bin_valid = 1;
        for (int l = 0; l < L; l++)
          for (int c = 0; c < C; c++) begin
            int q;
            q = ($urandom_range(0, 999) < dens) ? $urandom_range(1, 3) : 0;
            bin_q[l][c] = 2'(q);
            if (q != 0 && first_q[l][c] != 0) n_multi++;
            if (q != 0 && first_q[l][c] == 0) first_q[l][c] = q;
          end
        for (int i = 0; i < N_CTH; i++) begin
          ui[i] = $urandom_range(0, 9) < 3; uo[i] = $urandom_range(0, 9) < 3;
          di[i] = $urandom_range(0, 9) < 2; dout[i] = $urandom_range(0, 9) < 2;
        end
        for (int i = 0; i < N_CTH; i++) begin
          int j;
          j = (i + 1) % N_CTH;
          if (ui[i] && uo[i] && ui[j] && uo[j]) begin ecth = 1; n_coinc++; end
          if (di[i] && dout[i] && di[j] && dout[j]) begin ecth = 1; n_coinc++; end
        end
      end
      @(negedge clk);
      evt_start = 0; bin_valid = 0; bin_q = '0; ui = '0; uo = '0; di = '0; dout = '0;
      evt_end = 1;
      // reference: GBDT, compression, MLP per area
      for (int l = 0; l < L; l++)
        for (int c = 0; c < C; c++) begin
          int p;
          p = first_q[l][(c + C - 1) % C] * 16 + first_q[l][c] * 4 + first_q[l][(c + 1) % C];
          kept[l][c] = (first_q[l][c] != 0) && (gs[l*64 + p] >= gthr);
          if (first_q[l][c] != 0) begin
            if (kept[l][c]) n_gbdt_keep++; else n_gbdt_rej++;
          end
        end
      enn = 0; sc_best = -1; sc_r = 0;
      for (int r = 0; r < R; r++) begin
        int xv [NX]; int s;
        for (int k = 0; k < NX; k++) begin
          int rg, cg;
          rg = k / (RC / CL_W); cg = k % (RC / CL_W);
          xv[k] = 0;
          for (int dy = 0; dy < CL_H; dy++)
            for (int dx = 0; dx < CL_W; dx++)
              xv[k] += int'(kept[rg*CL_H + dy][r*RC + cg*CL_W + dx]);
        end
        s = mlp_ref(xv);
        if (s >= nthr) enn = 1;
        if (s > sc_best) begin sc_best = s; sc_r = r; end
      end
      @(negedge clk);
      evt_end = 0;
      lat = 1;
      while (!dec_valid && lat < 40) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 11) begin failures++; $display("event %0d: decision after %0d clocks, expected 11", e, lat); end
      checks++;
      if (nn_accept != enn || cth_seen != ecth || trigger != (enn && ecth) ||
          int'(best_score) != sc_best || int'(best_region) != sc_r) begin
        failures++;
        $display("event %0d: got nn=%0b cth=%0b trg=%0b best=%0d/%0d, expected %0b %0b %0b %0d/%0d",
                 e, nn_accept, cth_seen, trigger, best_score, best_region, enn, ecth, enn && ecth, sc_best, sc_r);
      end
      if (enn && ecth) n_acc++;
      else if (!enn) n_rej_nn++;
      else n_rej_cth++;
      repeat (2) @(negedge clk);
    end
    $display("filtered repeats %0d, gbdt kept %0d rejected %0d, 4-fold coincidences %0d",
             n_multi, n_gbdt_keep, n_gbdt_rej, n_coinc);
    $display("events accepted %0d, rejected by MLP %0d, rejected by CTH %0d, cut changes %0d",
             n_acc, n_rej_nn, n_rej_cth, n_cut_change);
    checks++; if (n_multi == 0)      begin failures++; $display("no repeated hit"); end
    checks++; if (n_gbdt_keep == 0)  begin failures++; $display("no GBDT keep"); end
    checks++; if (n_gbdt_rej == 0)   begin failures++; $display("no GBDT rejection"); end
    checks++; if (n_coinc == 0)      begin failures++; $display("no coincidence"); end
    checks++; if (n_acc == 0)        begin failures++; $display("no accepted event"); end
    checks++; if (n_rej_nn == 0)     begin failures++; $display("no MLP rejection"); end
    checks++; if (n_rej_cth == 0)    begin failures++; $display("no CTH rejection"); end
    checks++; if (n_cut_change == 0) begin failures++; $display("no cut change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
