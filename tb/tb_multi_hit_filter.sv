// tb_multi_hit_filter: self-checking test of the one-hit-per-cell filter.
//
// Random events of 1 to 12 time bins are sent to a 4-layer by 12-cell filter; cells fire in
// several bins with different charges. A reference keeps the charge of each cell's first
// non-zero bin. The output map must appear exactly one clock after evt_end and must match.
// Events alternate between evt_end after the last bin and evt_end together with it, and some
// events start in the same clock as the first bin, so that every way of framing is used.
module tb_multi_hit_filter;
  localparam int L = 4, C = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic evt_start, bin_valid, evt_end, map_valid;
  logic [L-1:0][C-1:0][1:0] bin_q, map_q;
  logic [L-1:0][C-1:0][1:0] refm, last;

  multi_hit_filter #(.LAYERS(L), .COLS(C)) dut (
    .clk, .rst_n, .evt_start, .bin_valid, .bin_q, .evt_end, .map_valid, .map_q);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_bin();
    for (int l = 0; l < L; l++)
      for (int c = 0; c < C; c++) begin
        bin_q[l][c] = ($urandom_range(0, 3) == 0) ? 2'($urandom_range(1, 3)) : 2'b00;
        if (refm[l][c] == 0) refm[l][c] = bin_q[l][c];
      end
  endtask

  initial begin
    evt_start = 0; bin_valid = 0; evt_end = 0; bin_q = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 200; e++) begin
      int nb;
      nb = $urandom_range(1, 12);
      refm = '0;
      @(negedge clk);
      evt_start = 1;
      if (e % 2 == 0) begin  // first bin together with evt_start
        bin_valid = 1; apply_bin(); nb--;
      end
      for (int b = 0; b < nb; b++) begin
        @(negedge clk);
        evt_start = 0; bin_valid = 1; apply_bin();
        if (e % 3 == 0 && b == nb - 1) evt_end = 1;
      end
      if (!(e % 3 == 0 && nb > 0)) begin
        @(negedge clk);
        evt_start = 0; bin_valid = 0; bin_q = '0; evt_end = 1;
      end
      @(negedge clk);
      evt_start = 0; bin_valid = 0; bin_q = '0; evt_end = 0;
      // evt_end was sampled at the previous posedge: map_valid high now
      checks++;
      if (!map_valid || map_q !== refm) begin
        failures++;
        if (failures < 6) $display("event %0d: valid=%0b map mismatch", e, map_valid);
      end
      @(negedge clk);
      checks++;
      if (map_valid) begin failures++; $display("map_valid longer than one clock"); end
      // noise between events must not disturb the held output
      last = refm;
      bin_valid = 1; apply_bin();
      @(negedge clk);
      bin_valid = 0; bin_q = '0;
      checks++;
      if (map_q !== last) begin failures++; $display("output map changed between events"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
