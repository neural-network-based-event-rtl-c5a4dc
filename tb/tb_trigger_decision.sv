// tb_trigger_decision: self-checking test of the final trigger decision.
//
// Random events are played: evt_start, a few time bins with or without a hodoscope
// coincidence, then the three area scores on consecutive clocks (sometimes with gaps). The
// score cut is changed now and then through its register. The reference computes, per event,
// nn_accept = any score >= cut, cth_seen = any coincidence, trigger = both, and the best score
// with its area (lowest area on a tie). The decision must arrive one clock after the last
// score. All four combinations of the two conditions must occur.
module tb_trigger_decision;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int seen [4];

  logic thr_we, evt_start, cth_valid, cth_coinc, s_valid, dec_valid, trigger, nn_accept, cth_seen;
  logic [7:0] thr_wdata, s, best_score;
  logic [1:0] s_region, best_region;

  trigger_decision dut (.clk, .rst_n, .thr_we, .thr_wdata, .evt_start, .cth_valid, .cth_coinc,
                        .s_valid, .s, .s_region, .dec_valid, .trigger, .nn_accept, .cth_seen,
                        .best_score, .best_region);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int thr;
    thr_we = 0; thr_wdata = 0; evt_start = 0; cth_valid = 0; cth_coinc = 0; s_valid = 0; s = 0; s_region = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    thr = 128;
    for (int e = 0; e < 400; e++) begin
      int sc [3];
      bit ecth, enn;
      int best, bestr;
      if (e % 50 == 49) begin
        @(negedge clk);
        thr = $urandom_range(20, 240);
        thr_we = 1; thr_wdata = 8'(thr);
        @(negedge clk);
        thr_we = 0;
      end
      @(negedge clk);
      evt_start = 1; ecth = 0;
      for (int b = 0; b < 4; b++) begin
        cth_valid = 1;
        cth_coinc = ($urandom_range(0, 7) == 0);
        if (cth_coinc) ecth = 1;
        @(negedge clk);
        evt_start = 0;
      end
      cth_valid = 0; cth_coinc = 0;
      // a coincidence flag without cth_valid must not count
      cth_coinc = 1; @(negedge clk); cth_coinc = 0;
      enn = 0; best = -1; bestr = 0;
      for (int r = 0; r < 3; r++) begin
        sc[r] = $urandom_range(0, 255);
        if (sc[r] >= thr) enn = 1;
        if (sc[r] > best) begin best = sc[r]; bestr = r; end
        s_valid = 1; s = 8'(sc[r]); s_region = 2'(r);
        @(negedge clk);
        if (r < 2 && $urandom_range(0, 3) == 0) begin s_valid = 0; @(negedge clk); end
        checks++;
        if (dec_valid != (r == 2)) begin failures++; $display("event %0d: dec_valid timing", e); end
      end
      s_valid = 0;
      checks++;
      if (nn_accept != enn || cth_seen != ecth || trigger != (enn && ecth) ||
          int'(best_score) != best || int'(best_region) != bestr) begin
        failures++;
        if (failures < 6) $display("event %0d: got nn=%0b cth=%0b trg=%0b best=%0d/%0d exp %0b %0b %0d/%0d",
          e, nn_accept, cth_seen, trigger, best_score, best_region, enn, ecth, best, bestr);
      end
      seen[{enn, ecth}]++;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("case nn=%0d cth=%0d never occurred", k / 2, k % 2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
