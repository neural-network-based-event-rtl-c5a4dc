// tb_cth_coincidence: self-checking test of the hodoscope 4-fold coincidence.
//
// Random counter patterns of varying occupancy are applied at the default 64 pairs per end,
// plus directed cases: a single complete pair (no coincidence), two neighbouring complete
// pairs, the wrap-around pair 63/0, and three of four counters. The per-segment flags and
// their OR are compared with a reference one clock later.
module tb_cth_coincidence;
  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, ncoinc = 0;

  logic bin_valid, coinc_valid, coinc;
  logic [N-1:0] ui, uo, di, dout, seg_up, seg_dn, eu, ed;

  cth_coincidence dut (.clk, .rst_n, .bin_valid, .up_inner(ui), .up_outer(uo), .dn_inner(di),
                       .dn_outer(dout), .coinc_valid, .coinc, .seg_up, .seg_dn);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_check();
    for (int i = 0; i < N; i++) begin
      int j;
      j = (i + 1) % N;
      eu[i] = ui[i] & uo[i] & ui[j] & uo[j];
      ed[i] = di[i] & dout[i] & di[j] & dout[j];
    end
    bin_valid = 1;
    @(negedge clk);
    bin_valid = 0;
    checks++;
    if (!coinc_valid || seg_up !== eu || seg_dn !== ed || coinc !== ((|eu) | (|ed))) begin
      failures++;
      if (failures < 6) $display("mismatch up %h/%h dn %h/%h", seg_up, eu, seg_dn, ed);
    end
    if (coinc) ncoinc++;
  endtask

  initial begin
    bin_valid = 0; ui = '0; uo = '0; di = '0; dout = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    ui = '0; uo = '0; di = '0; dout = '0; ui[5] = 1; uo[5] = 1; apply_check();
    ui[6] = 1; uo[6] = 1; apply_check();
    ui = '0; uo = '0; di[63] = 1; dout[63] = 1; di[0] = 1; apply_check();
    dout[0] = 1; apply_check();
    for (int t = 0; t < 500; t++) begin
      int occ;
      occ = $urandom_range(1, 6);
      for (int i = 0; i < N; i++) begin
        ui[i] = $urandom_range(0, 9) < occ; uo[i] = $urandom_range(0, 9) < occ;
        di[i] = $urandom_range(0, 9) < occ; dout[i] = $urandom_range(0, 9) < occ;
      end
      apply_check();
    end
    checks++;
    if (ncoinc == 0) begin failures++; $display("no coincidence seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
