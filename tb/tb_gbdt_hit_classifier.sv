// tb_gbdt_hit_classifier: self-checking test of the per-cell GBDT scoring.
//
// A 3-layer by 10-cell classifier gets a random score table (three layers x 64 patterns) and a
// sequence of thresholds, including the reset value 192 (0.75). Random charge maps are applied
// and every cell's decision is compared with a reference that forms the pattern
// {left, centre, right} with wrap-around, looks up the score and applies the threshold; cells
// without charge must never be kept. The result must follow map_valid by one clock.
module tb_gbdt_hit_classifier;
  localparam int L = 3, C = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tab_we, thr_we, map_valid, hit_valid;
  logic [15:0] tab_addr;
  logic [7:0] tab_wdata, thr_wdata;
  logic [L-1:0][C-1:0][1:0] map_q;
  logic [L-1:0][C-1:0] hit_map, refh;
  int sc [L*64];
  int thr;

  gbdt_hit_classifier #(.LAYERS(L), .COLS(C)) dut (
    .clk, .rst_n, .tab_we, .tab_addr, .tab_wdata, .thr_we, .thr_wdata,
    .map_valid, .map_q, .hit_valid, .hit_map);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nkept;
    tab_we = 0; thr_we = 0; tab_addr = 0; tab_wdata = 0; thr_wdata = 0; map_valid = 0; map_q = '0;
    nkept = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    thr = 192;
    for (int i = 0; i < L*64; i++) begin
      @(negedge clk);
      sc[i] = $urandom_range(0, 255);
      tab_we = 1; tab_addr = 16'(i); tab_wdata = 8'(sc[i]);
    end
    @(negedge clk); tab_we = 0;
    for (int t = 0; t < 400; t++) begin
      if (t % 100 == 99) begin
        thr = $urandom_range(0, 255);
        thr_we = 1; thr_wdata = 8'(thr);
        @(negedge clk); thr_we = 0;
      end
      for (int l = 0; l < L; l++)
        for (int c = 0; c < C; c++)
          map_q[l][c] = ($urandom_range(0, 1) == 0) ? 2'b00 : 2'($urandom_range(1, 3));
      for (int l = 0; l < L; l++)
        for (int c = 0; c < C; c++) begin
          int p;
          p = int'(map_q[l][(c + C - 1) % C]) * 16 + int'(map_q[l][c]) * 4 + int'(map_q[l][(c + 1) % C]);
          refh[l][c] = (map_q[l][c] != 0) && (sc[l*64 + p] >= thr);
          if (refh[l][c]) nkept++;
        end
      map_valid = 1;
      @(negedge clk);
      map_valid = 0;
      map_q = '0;
      checks++;
      if (!hit_valid || hit_map !== refh) begin
        failures++;
        if (failures < 6) $display("map %0d: valid=%0b got %h exp %h", t, hit_valid, hit_map, refh);
      end
      @(negedge clk);
      checks++;
      if (hit_valid) begin failures++; $display("hit_valid longer than one clock"); end
    end
    checks++;
    if (nkept == 0) begin failures++; $display("no cell was ever kept"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
