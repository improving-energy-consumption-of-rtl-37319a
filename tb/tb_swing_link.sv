// tb_swing_link: self-checking testbench for the swing_link model.
//
// A 32-bit link with its low-swing error rate raised to 2 %. Random words are
// sent at full swing (every word must arrive intact, bit for bit) and then at
// low swing (about 2 % of the bits must arrive inverted). The link's transition
// totals are checked against bit transitions counted here, and the energy of
// the run is compared with a conventional full-swing link.
module tb_swing_link;
  import approx_noc_pkg::*;

  localparam int W = 32;
  localparam int N = 4000;

  logic [W-1:0] tx = '0, rx;
  logic         sel = 1'b1;
  int checks = 0, failures = 0;

  swing_link #(.W(W), .BER_LOW(0.02)) dut (.tx(tx), .sel(sel), .rx(rx));

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
    longint unsigned tog_hs, tog_ls, bad_bits;
    int bad_words;
    real e_conf, e_conv;
    tog_hs = 0; tog_ls = 0; bad_bits = 0; bad_words = 0;
    #1;
    for (int i = 0; i < N; i++) begin
      logic [W-1:0] v;
      v = $urandom;
      tog_hs += $countones(v ^ tx);
      tx = v;
      #1;
      if (rx != tx) bad_words++;
    end
    check(bad_words == 0, $sformatf("%0d words corrupted at full swing", bad_words));
    check(dut.hs_total() == tog_hs, $sformatf("full-swing transitions %0d, expected %0d",
          dut.hs_total(), tog_hs));
    sel = 1'b0;
    #1;
    for (int i = 0; i < N; i++) begin
      logic [W-1:0] v;
      v = ~tx;                  // every bit toggles: one fresh draw per bit
      tog_ls += longint'(W);
      tx = v;
      #1;
      bad_bits += $countones(rx ^ tx);
    end
    $display("low-swing bit errors %0d of %0d", bad_bits, N * W);
    check(real'(bad_bits) / real'(N * W) > 0.015 && real'(bad_bits) / real'(N * W) < 0.025,
          "low-swing error fraction not near 0.02");
    check(dut.ls_total() == tog_ls, $sformatf("low-swing transitions %0d, expected %0d",
          dut.ls_total(), tog_ls));
    check(dut.err_total() >= bad_bits, "error total below observed bit errors");
    e_conf = real'(dut.hs_total()) * E_HS_FJ + real'(dut.ls_total()) * E_LS_FJ;
    e_conv = real'(tog_hs + tog_ls) * E_CONV_FJ;
    $display("energy: reconfigurable %0.1f pJ, conventional %0.1f pJ", e_conf / 1000.0, e_conv / 1000.0);
    check(e_conf < e_conv, "reconfigurable link not cheaper over a half low-swing run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
