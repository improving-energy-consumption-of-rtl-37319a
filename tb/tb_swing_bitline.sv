// tb_swing_bitline: self-checking testbench for the swing_bitline model.
//
// Two instances: one with the characterised bit-error rates, one with the
// low-swing error rate raised to 5 % so that errors are observable. For each,
// random data are driven at full swing and then at low swing, and the testbench
// checks: no errors at full swing; the error fraction at low swing (about 5 %,
// and about 0 at the characterised 3.8e-6); the model's transition counters
// against transitions counted here; the energy ratio low/full swing per
// transition (152/527, about 0.29, i.e. close to 70 % saving).
module tb_swing_bitline;
  import approx_noc_pkg::*;

  localparam int N = 20000;

  logic in_a = 1'b0, in_b = 1'b0, sel = 1'b1;
  logic out_a, out_b;
  int checks = 0, failures = 0;

  swing_bitline #(.BER_LOW(0.05)) dut_a (.in(in_a), .sel(sel), .out(out_a));
  swing_bitline                   dut_b (.in(in_b), .sel(sel), .out(out_b));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR %s", what);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int err_a, err_b, tog;
    longint unsigned hs0;
    real frac, e_ratio;
    #1;
    // ---- full swing
    sel = 1'b1;
    err_a = 0; tog = 0;
    for (int i = 0; i < N; i++) begin
      logic v;
      v = 1'($urandom);
      if (v != in_a) tog++;
      in_a = v; in_b = v;
      #1;
      if (out_a != in_a) err_a++;
      if (out_b != in_b) err_a++;
    end
    check(err_a == 0, $sformatf("%0d errors at full swing", err_a));
    check(dut_a.hs_toggles == longint'(tog), $sformatf("full-swing transitions %0d, expected %0d",
          dut_a.hs_toggles, tog));
    check(dut_a.ls_toggles == 0, "low-swing transitions counted at full swing");
    hs0 = dut_a.hs_toggles;
    // ---- low swing
    sel = 1'b0;
    #1;
    err_a = 0; err_b = 0; tog = 0;
    for (int i = 0; i < N; i++) begin
      logic v;
      v = ~in_a;             // toggle every step: one fresh draw per step
      tog++;
      in_a = v; in_b = v;
      #1;
      if (out_a != in_a) err_a++;
      if (out_b != in_b) err_b++;
    end
    frac = real'(err_a) / real'(N);
    $display("low-swing error fraction %f (model BER 0.05), characterised-model errors %0d", frac, err_b);
    check(frac > 0.035 && frac < 0.065, $sformatf("error fraction %f not near 0.05", frac));
    check(err_b <= 3, $sformatf("%0d errors in %0d bits at BER 3.8e-6", err_b, N));
    check(dut_a.ls_toggles == longint'(tog), $sformatf("low-swing transitions %0d, expected %0d",
          dut_a.ls_toggles, tog));
    check(dut_a.hs_toggles == hs0, "full-swing transitions counted at low swing");
    check(dut_a.errors >= longint'(err_a), "error counter below observed errors");
    e_ratio = E_LS_FJ / E_HS_FJ;
    check(e_ratio > 0.25 && e_ratio < 0.35, "energy ratio");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
