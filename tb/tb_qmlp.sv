// tb_qmlp: self-checking test of the complete quantized MLP (24-50-26-1, sigmoid output).
//
// Random 4-bit weights and biases are written through the configuration port with the layer
// selected by address bits 15:12. Random cluster-count vectors (0..48 per input) are streamed
// one per clock with a tag. A reference network in real arithmetic applies the same rules per
// layer (sum of x*w/8 + b/8, truncation to 1/8, ReLU clamp to 8 bits; output layer truncated to
// 1/64 and saturated to 16 bits; piecewise-linear sigmoid truncated to 8 bits). Each score must
// appear exactly four clocks after its vector, with its tag.
module tb_qmlp;
  localparam int NX = 24, H1 = 50, H2 = 26;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_we, x_valid, s_valid;
  logic [15:0] cfg_addr, cfg_wdata;
  logic [NX-1:0][15:0] x;
  logic [1:0] x_tag, s_tag;
  logic [7:0] s;

  qmlp dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .x_valid, .x, .x_tag, .s_valid, .s, .s_tag);

  int w1 [H1][NX]; int b1 [H1];
  int w2 [H2][H1]; int b2 [H2];
  int w3 [H2];     int b3;

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

  function automatic int ref_score(logic [NX-1:0][15:0] xv);
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

  int expq[$];
  int tagq[$];
  int lat [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lo_seen = 0, hi_seen = 0;
  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; x_valid = 0; x = '0; x_tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int o = 0; o < H1; o++) begin
      for (int i = 0; i < NX; i++) begin w1[o][i] = $urandom_range(0, 15); wr('h1000 + o*NX + i, w1[o][i]); end
    end
    for (int o = 0; o < H1; o++) begin b1[o] = $urandom_range(0, 15); wr('h1000 + H1*NX + o, b1[o]); end
    for (int o = 0; o < H2; o++)
      for (int i = 0; i < H1; i++) begin w2[o][i] = $urandom_range(0, 15); wr('h2000 + o*H1 + i, w2[o][i]); end
    for (int o = 0; o < H2; o++) begin b2[o] = $urandom_range(0, 15); wr('h2000 + H2*H1 + o, b2[o]); end
    for (int i = 0; i < H2; i++) begin w3[i] = $urandom_range(0, 15); wr('h3000 + i, w3[i]); end
    b3 = $urandom_range(0, 15); wr('h3000 + H2, b3);
    @(negedge clk); cfg_we = 0;
    for (int v = 0; v < 400; v++) begin
      @(negedge clk);
      for (int i = 0; i < NX; i++) x[i] = 16'($urandom_range(0, (v % 4 == 0) ? 48 : 3));
      x_valid = 1; x_tag = 2'(v % 3);
      expq.push_back(ref_score(x)); tagq.push_back(v % 3); lat.push_back(cyc);
      if (v % 5 == 4) begin @(negedge clk); x_valid = 0; end
    end
    @(negedge clk); x_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d scores missing", expq.size()); end
    checks++;
    if (lo_seen == 0 || hi_seen == 0) begin failures++; $display("scores never spread: lo %0d hi %0d", lo_seen, hi_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && s_valid) begin
      int e, t, c0;
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected score"); end
      else begin
        e = expq.pop_front(); t = tagq.pop_front(); c0 = lat.pop_front();
        if (int'(s) != e || int'(s_tag) != t) begin
          failures++;
          if (failures < 8) $display("score got %0d tag %0d exp %0d tag %0d", s, s_tag, e, t);
        end
        checks++;
        if (cyc - c0 != 4) begin failures++; $display("latency %0d, expected 4", cyc - c0); end
        if (e < 100) lo_seen++;
        if (e > 155) hi_seen++;
      end
    end
  end
endmodule
