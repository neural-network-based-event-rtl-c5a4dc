// tb_hitmap_compressor: self-checking test of the 1/3 area extraction and cluster counting.
//
// The compressor runs at its default sizes (18 layers, three areas of 64 cells, 3x16 clusters,
// 24 counts per area). Random hit maps of varying density, including empty and full maps, are
// applied; for each, the three areas must come out on consecutive clocks, area 0 first, the
// first one two clocks after map_valid, with x_last on the third, and every count must equal
// the number of set bits in its cluster, counted by the reference.
module tb_hitmap_compressor;
  localparam int L = 18, R = 3, RC = 64, CH = 3, CW = 16, NX = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic map_valid, busy, x_valid, x_last;
  logic [L-1:0][R*RC-1:0] hit_map;
  logic [NX-1:0][15:0] x;
  logic [1:0] x_region;

  hitmap_compressor dut (.clk, .rst_n, .map_valid, .hit_map, .busy, .x_valid, .x, .x_region, .x_last);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_count(logic [L-1:0][R*RC-1:0] m, int r, int k);
    int rg, cg, n;
    rg = k / (RC / CW); cg = k % (RC / CW); n = 0;
    for (int y = 0; y < CH; y++)
      for (int xx = 0; xx < CW; xx++)
        n += int'(m[rg*CH + y][r*RC + cg*CW + xx]);
    return n;
  endfunction

  initial begin
    logic [L-1:0][R*RC-1:0] m;
    map_valid = 0; hit_map = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 120; t++) begin
      int dens;
      dens = $urandom_range(0, 8);
      for (int l = 0; l < L; l++)
        for (int c = 0; c < R*RC; c++)
          m[l][c] = (t == 1) ? 1'b1 : (t == 0) ? 1'b0 : ($urandom_range(0, 7) < dens);
      @(negedge clk);
      hit_map = m; map_valid = 1;
      @(negedge clk);
      map_valid = 0; hit_map = ~m;   // input changes must not matter once captured
      checks++;
      if (x_valid) begin failures++; $display("output one clock early"); end
      for (int r = 0; r < R; r++) begin
        @(negedge clk);
        checks++;
        if (!x_valid || x_region != 2'(r) || x_last != (r == R - 1)) begin
          failures++;
          if (failures < 6) $display("map %0d area %0d: valid=%0b region=%0d last=%0b", t, r, x_valid, x_region, x_last);
        end
        for (int k = 0; k < NX; k++) begin
          checks++;
          if (int'(x[k]) != ref_count(m, r, k)) begin
            failures++;
            if (failures < 6) $display("map %0d area %0d count %0d: got %0d exp %0d", t, r, k, x[k], ref_count(m, r, k));
          end
        end
      end
      @(negedge clk);
      checks++;
      if (x_valid || busy) begin failures++; $display("more than three areas sent"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
