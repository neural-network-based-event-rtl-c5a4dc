// tb_qdense_layer: self-checking test of the quantized dense layer.
//
// Two instances are tested: a ReLU layer with integer 16-bit inputs (the MLP's first layer,
// 24 -> 50) and a linear layer with 8-bit inputs carrying 3 fraction bits (26 -> 1, the output
// layer). Weights and biases are loaded with random 4-bit values over the configuration port,
// random vectors are applied one per clock, and every output is compared with a reference that
// works in real numbers: value = sum(x * w/8) + b/8, then truncation to the output grid,
// ReLU clamp and saturation. The one-clock latency is checked by lining outputs up with a
// queue of expected results.
module tb_qdense_layer;
  localparam int NI1 = 24, NO1 = 50;
  localparam int NI2 = 26, NO2 = 1;
  localparam int NVEC = 300;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic cfg_we1, cfg_we2;
  logic [15:0] cfg_idx;
  logic [3:0]  cfg_wdata;
  logic xv;
  logic [NI1-1:0][15:0] x1;
  logic [NI2-1:0][7:0]  x2;
  logic yv1, yv2;
  logic [NO1-1:0][7:0]  y1;
  logic [NO2-1:0][15:0] y2;
  logic [7:0] t1, t2, tag;

  qdense_layer #(.N_IN(NI1), .N_OUT(NO1), .IN_W(16), .IN_FRAC(0), .OUT_W(8), .OUT_FRAC(3),
                 .RELU(1'b1), .TAG_W(8)) dut1 (
    .clk, .rst_n, .cfg_we(cfg_we1), .cfg_idx, .cfg_wdata,
    .x_valid(xv), .x(x1), .x_tag(tag), .y_valid(yv1), .y(y1), .y_tag(t1));

  qdense_layer #(.N_IN(NI2), .N_OUT(NO2), .IN_W(8), .IN_FRAC(3), .OUT_W(16), .OUT_FRAC(6),
                 .RELU(1'b0), .TAG_W(8)) dut2 (
    .clk, .rst_n, .cfg_we(cfg_we2), .cfg_idx, .cfg_wdata,
    .x_valid(xv), .x(x2), .x_tag(tag), .y_valid(yv2), .y(y2), .y_tag(t2));

  int w1 [NO1][NI1]; int b1 [NO1];
  int w2 [NO2][NI2]; int b2 [NO2];

  function automatic int sx4(int v);  // 4-bit two's complement to int
    return (v >= 8) ? v - 16 : v;
  endfunction

  // reference: real-valued sum, truncated to 2^-of grid, clamped
  function automatic longint ref_out(real acc, int of, bit relu, int ow);
    real q; longint qi, lo, hi;
    q = $floor(acc * (2.0 ** of));
    qi = longint'(q);
    if (relu) begin lo = 0; hi = (longint'(1) << ow) - 1; end
    else begin lo = -(longint'(1) << (ow - 1)); hi = (longint'(1) << (ow - 1)) - 1; end
    if (qi < lo) qi = lo;
    if (qi > hi) qi = hi;
    return qi;
  endfunction

  typedef struct { longint e1 [NO1]; longint e2; logic [7:0] tag; } exp_t;
  exp_t expq[$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we1 = 0; cfg_we2 = 0; cfg_idx = 0; cfg_wdata = 0; xv = 0; x1 = '0; x2 = '0; tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load layer 1
    for (int o = 0; o < NO1; o++) for (int i = 0; i < NI1; i++) w1[o][i] = $urandom_range(0, 15);
    for (int o = 0; o < NO1; o++) b1[o] = $urandom_range(0, 15);
    for (int o = 0; o < NO2; o++) for (int i = 0; i < NI2; i++) w2[o][i] = $urandom_range(0, 15);
    for (int o = 0; o < NO2; o++) b2[o] = $urandom_range(0, 15);
    for (int k = 0; k < NI1 * NO1 + NO1; k++) begin
      @(negedge clk);
      cfg_we1 = 1; cfg_idx = 16'(k);
      cfg_wdata = 4'((k < NI1 * NO1) ? w1[k / NI1][k % NI1] : b1[k - NI1 * NO1]);
    end
    for (int k = 0; k < NI2 * NO2 + NO2; k++) begin
      @(negedge clk);
      cfg_we1 = 0; cfg_we2 = 1; cfg_idx = 16'(k);
      cfg_wdata = 4'((k < NI2 * NO2) ? w2[k / NI2][k % NI2] : b2[k - NI2 * NO2]);
    end
    @(negedge clk); cfg_we1 = 0; cfg_we2 = 0;
    // stream vectors
    for (int v = 0; v < NVEC; v++) begin
      exp_t e;
      @(negedge clk);
      xv = 1; tag = 8'(v);
      for (int i = 0; i < NI1; i++)
        x1[i] = (v % 3 == 0) ? 16'($urandom_range(0, 65535)) : 16'($urandom_range(0, 48));
      for (int i = 0; i < NI2; i++) x2[i] = 8'($urandom_range(0, 255));
      for (int o = 0; o < NO1; o++) begin
        real acc;
        acc = sx4(b1[o]) / 8.0;
        for (int i = 0; i < NI1; i++) acc += real'(x1[i]) * sx4(w1[o][i]) / 8.0;
        e.e1[o] = ref_out(acc, 3, 1'b1, 8);
      end
      begin
        real acc;
        acc = sx4(b2[0]) / 8.0;
        for (int i = 0; i < NI2; i++) acc += (real'(x2[i]) / 8.0) * sx4(w2[0][i]) / 8.0;
        e.e2 = ref_out(acc, 6, 1'b0, 16);
      end
      e.tag = tag;
      expq.push_back(e);
      if (v % 7 == 6) begin @(negedge clk); xv = 0; end
    end
    @(negedge clk); xv = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("missing %0d outputs", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // check outputs: one clock after each input
  logic xv_d;
  always @(posedge clk) begin
    xv_d <= rst_n && xv;
    if (rst_n) begin
      checks++;
      if (yv1 !== xv_d || yv2 !== xv_d) begin
        failures++; $display("valid timing mismatch");
      end
      if (yv1 && expq.size() > 0) begin
        exp_t e;
        e = expq.pop_front();
        checks++;
        if (t1 != e.tag || t2 != e.tag) begin failures++; $display("tag mismatch"); end
        for (int o = 0; o < NO1; o++) begin
          checks++;
          if (longint'(y1[o]) != e.e1[o]) begin
            failures++;
            if (failures < 10) $display("L1 tag %0d o %0d got %0d exp %0d", e.tag, o, y1[o], e.e1[o]);
          end
        end
        checks++;
        if (longint'($signed(y2[0])) != e.e2) begin
          failures++;
          if (failures < 10) $display("L2 tag %0d got %0d exp %0d", e.tag, $signed(y2[0]), e.e2);
        end
      end
    end
  end
endmodule
