// tb_sigmoid_act: self-checking test of the quantized sigmoid.
//
// Every 16-bit pre-activation code (6 fraction bits) is applied, one per clock. Each output is
// compared with the piecewise-linear sigmoid evaluated in real numbers and truncated to 8 bits,
// and also with the exact logistic function (allowed error 0.025). The output must follow its
// input by exactly one clock, and the tag must travel with it.
module tb_sigmoid_act;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic zv, sv;
  logic signed [15:0] z;
  logic [7:0] s;
  logic [15:0] zt, st;

  sigmoid_act #(.ZW(16), .ZF(6), .SW(8), .TAG_W(16)) dut (
    .clk, .rst_n, .z_valid(zv), .z, .z_tag(zt), .s_valid(sv), .s, .s_tag(st));

  function automatic int plan_ref(int zc);
    real x, ax, y, q;
    x = zc / 64.0;
    ax = (x < 0) ? -x : x;
    if (ax >= 5.0)        y = 1.0;
    else if (ax >= 2.375) y = ax / 32.0 + 0.84375;
    else if (ax >= 1.0)   y = ax / 8.0 + 0.625;
    else                  y = ax / 4.0 + 0.5;
    if (x < 0) y = 1.0 - y;
    q = $floor(y * 256.0);
    if (q > 255.0) q = 255.0;
    return int'(q);
  endfunction

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pend_z;
  bit pend;
  initial begin
    zv = 0; z = 0; zt = 0; pend = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k <= 65536; k++) begin
      @(negedge clk);
      // check the value applied in the previous clock
      if (pend) begin
        real ex, err;
        checks++;
        if (!sv || st != 16'(pend_z) || int'(s) != plan_ref(pend_z)) begin
          failures++;
          if (failures < 10) $display("z=%0d got v=%0b s=%0d exp %0d", pend_z, sv, s, plan_ref(pend_z));
        end
        ex = 1.0 / (1.0 + $exp(-pend_z / 64.0));
        err = s / 256.0 - ex;
        if (err < 0) err = -err;
        checks++;
        if (err > 0.025) begin
          failures++;
          if (failures < 10) $display("z=%0d s=%0d far from sigmoid %f", pend_z, s, ex);
        end
      end
      if (k < 65536) begin
        zv = 1; z = 16'(k - 32768); zt = z; pend_z = k - 32768; pend = 1;
      end else begin
        zv = 0; pend = 0;
      end
    end
    @(negedge clk);
    checks++;
    if (sv) begin failures++; $display("valid stuck high"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
