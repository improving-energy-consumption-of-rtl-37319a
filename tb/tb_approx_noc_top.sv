// tb_approx_noc_top: end-to-end testbench of the whole NoC, at default parameters.
//
// Runs a four-stage image-pipeline workload on the 2x3 mesh, shaped like a
// pipelined JPEG encoder mapped with one stage per core:
//   core 0 "level shift": load Y1 block, y = x - 128,      store Y1   (memory 0)
//   core 1 "DCT":         load Y1 block, y = 3x + 1,       store Y1   (memory 0)
//   core 2 "quantize":    load Y1 block, load Ilqt table,
//                         t = y ^ q,                       store Temp (memory 0)
//   core 3 "entropy":     load Temp block, o = t + 7,      store out  (memory 1)
// The arithmetic is a stand-in for the real kernels, which run as software on
// the cores; only the data flows matter to the NoC. The nine flows, in this
// order (1 load Y1 by level shift ... 9 store out by entropy), are the
// candidates for approximation. The stages run concurrently over NBLK blocks of
// 64 words, synchronised through per-word write counters of the memory models.
//
// Runs: baseline NoC (approx_en = 0, flows 1..9 marked resilient: nothing may go
// low swing), then configurations 0..9 (flows 1..k resilient) and "opt" (flows
// 1-6 and 9) on the approximate NoC, then each flow approximated on its own
// (sensitivity runs). Checks:
//   * every packet completes (no lost or misrouted packet, no deadlock);
//   * every header crosses every router output at full swing, and every data
//     flit at the swing its packet asks for;
//   * baseline and configuration 0 produce exactly the reference output;
//   * link energy, normalised to the baseline's conventional links (512 fJ per
//     transition), is about 1.03 for configuration 0 (full-swing overhead of the
//     reconfigurable line) and falls with every added approximate flow; opt is
//     below configuration 6; each flow alone saves energy against configuration 0;
//   * each mechanism happens: low-swing flits, approximate loads (RESP_APPROX)
//     and stores (APPROX), back-pressure stalls, headers waiting for a busy
//     output, and bit errors on low-swing links.
module tb_approx_noc_top;
  import approx_noc_pkg::*;

  localparam int NBLK  = 16;   // 64-word blocks per run
  localparam int BLK   = 64;
  localparam int NN    = 6;
  localparam int A_Y1  = 0;
  localparam int A_QT  = 'h1000;
  localparam int A_TMP = 'h2000;
  localparam int A_OUT = 0;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              approx_en = 1'b0;
  logic              core_req_valid   [4];
  logic              core_req_ready   [4];
  core_req_t         core_req         [4];
  logic              core_wdata_valid [4];
  logic              core_wdata_ready [4];
  logic [DATA_W-1:0] core_wdata       [4];
  logic              core_rsp_valid   [4];
  logic              core_rsp_ready   [4];
  logic [DATA_W-1:0] core_rsp_data    [4];
  logic              core_rsp_last    [4];
  logic              core_rsp_approx  [4];
  logic              mem_req          [2];
  logic              mem_we           [2];
  logic [ADDR_W-1:0] mem_addr         [2];
  logic [DATA_W-1:0] mem_wdata        [2];
  logic [DATA_W-1:0] mem_rdata        [2];

  approx_noc_top dut (.*);

  always #1 clk = ~clk;   // 500 ps period would be 2 GHz; time units are arbitrary here

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR %s", what);
    end
  endtask

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------ external memories
  logic [DATA_W-1:0] mem0 [1 << ADDR_W];
  logic [DATA_W-1:0] mem1 [1 << ADDR_W];
  int                gen0 [1 << ADDR_W];   // writes seen per word
  int                gen1 [1 << ADDR_W];

  always @(posedge clk) begin
    if (mem_req[0] && mem_we[0]) begin mem0[mem_addr[0]] <= mem_wdata[0]; gen0[mem_addr[0]]++; end
    if (mem_req[0] && !mem_we[0]) mem_rdata[0] <= mem0[mem_addr[0]];
    if (mem_req[1] && mem_we[1]) begin mem1[mem_addr[1]] <= mem_wdata[1]; gen1[mem_addr[1]]++; end
    if (mem_req[1] && !mem_we[1]) mem_rdata[1] <= mem1[mem_addr[1]];
  end

  logic [DATA_W-1:0] image [NBLK * BLK];
  logic [DATA_W-1:0] qtab  [BLK];

  function automatic logic [DATA_W-1:0] ref_out(int i);
    logic [DATA_W-1:0] y;
    y = image[i] - 32'd128;
    y = y * 32'd3 + 32'd1;
    y = y ^ qtab[i % BLK];
    return y + 32'd7;
  endfunction

  // --------------------------------------------------------- core models
  logic [9:1] resil;          // flows marked resilient in this run
  bit         go = 1'b0;
  int         done_cores = 0;
  int         n_ld_appr = 0, n_st_appr = 0;

  task automatic core_load(int c, bit m, int addr, bit r, ref logic [DATA_W-1:0] d[BLK]);
    core_req_t q;
    q = '{store: 1'b0, mem: m, addr: ADDR_W'(addr), len_m1: LEN_W'(BLK - 1), resilient: r};
    @(negedge clk);
    core_req_valid[c] = 1'b1;
    core_req[c] = q;
    @(posedge clk);
    while (!core_req_ready[c]) @(posedge clk);
    @(negedge clk);
    core_req_valid[c] = 1'b0;
    for (int k = 0; k < BLK; k++) begin
      @(posedge clk);
      while (!(core_rsp_valid[c] && core_rsp_ready[c])) @(posedge clk);
      d[k] = core_rsp_data[c];
      check(core_rsp_last[c] == (k == BLK - 1), "response length");
      check(core_rsp_approx[c] == r, "response approx flag differs from the load's marking");
    end
    if (r) n_ld_appr++;
  endtask

  task automatic core_store(int c, bit m, int addr, bit r, ref logic [DATA_W-1:0] d[BLK]);
    core_req_t q;
    q = '{store: 1'b1, mem: m, addr: ADDR_W'(addr), len_m1: LEN_W'(BLK - 1), resilient: r};
    @(negedge clk);
    core_req_valid[c] = 1'b1;
    core_req[c] = q;
    @(posedge clk);
    while (!core_req_ready[c]) @(posedge clk);
    @(negedge clk);
    core_req_valid[c] = 1'b0;
    for (int k = 0; k < BLK; k++) begin
      core_wdata_valid[c] = 1'b1;
      core_wdata[c] = d[k];
      @(posedge clk);
      while (!core_wdata_ready[c]) @(posedge clk);
      @(negedge clk);
    end
    core_wdata_valid[c] = 1'b0;
    if (r) n_st_appr++;
  endtask

  task automatic wait_gen(bit m, int base, int g);
    forever begin
      int mn;
      mn = 1 << 30;
      for (int k = 0; k < BLK; k++) begin
        int v;
        v = m ? gen1[base + k] : gen0[base + k];
        if (v < mn) mn = v;
      end
      if (mn >= g) break;
      @(posedge clk);
    end
  endtask

  for (genvar c = 0; c < 4; c++) begin : g_core
    initial begin
      core_req_valid[c]   = 1'b0;
      core_req[c]         = '0;
      core_wdata_valid[c] = 1'b0;
      core_wdata[c]       = '0;
      core_rsp_ready[c]   = 1'b1;
      forever begin
        logic [DATA_W-1:0] d[BLK], q[BLK];
        wait (go);
        for (int b = 0; b < NBLK; b++) begin
          case (c)
            0: begin
              core_load(0, 1'b0, A_Y1 + b * BLK, resil[1], d);
              foreach (d[k]) d[k] = d[k] - 32'd128;
              core_store(0, 1'b0, A_Y1 + b * BLK, resil[2], d);
            end
            1: begin
              wait_gen(1'b0, A_Y1 + b * BLK, 1);
              core_load(1, 1'b0, A_Y1 + b * BLK, resil[3], d);
              foreach (d[k]) d[k] = d[k] * 32'd3 + 32'd1;
              core_store(1, 1'b0, A_Y1 + b * BLK, resil[4], d);
            end
            2: begin
              wait_gen(1'b0, A_Y1 + b * BLK, 2);
              core_load(2, 1'b0, A_Y1 + b * BLK, resil[5], d);
              core_load(2, 1'b0, A_QT, resil[6], q);
              foreach (d[k]) d[k] = d[k] ^ q[k];
              core_store(2, 1'b0, A_TMP + b * BLK, resil[7], d);
            end
            default: begin
              wait_gen(1'b0, A_TMP + b * BLK, 1);
              core_load(3, 1'b0, A_TMP + b * BLK, resil[8], d);
              foreach (d[k]) d[k] = d[k] + 32'd7;
              core_store(3, 1'b1, A_OUT + b * BLK, resil[9], d);
            end
          endcase
        end
        done_cores++;
        wait (!go);
      end
    end
  end

  // -------------------------------------------------- router output monitors
  int n_low_flits = 0, n_stall = 0, n_hol = 0, n_swing_err = 0;
  logic pkt_appr [NN][NPORTS];

  for (genvar n = 0; n < NN; n++) begin : g_mon
    for (genvar o = 0; o < NPORTS; o++) begin : g_port
      always @(posedge clk) if (rst_n) begin
        if (dut.g_node[n].u_router.out_valid[o]) begin
          flit_t f;
          header_t h;
          f = dut.g_node[n].u_router.out_flit[o];
          h = header_t'(f.data);
          if (!dut.g_node[n].u_router.out_ready[o]) n_stall++;
          if (is_head(f.ftype)) begin
            pkt_appr[n][o] = h.approx;
            if (!dut.g_node[n].u_router.out_sel[o]) n_swing_err++;
          end else if (dut.g_node[n].u_router.out_sel[o] != !(approx_en && pkt_appr[n][o])) begin
            n_swing_err++;
          end
          if (!dut.g_node[n].u_router.out_sel[o] && dut.g_node[n].u_router.out_ready[o]) n_low_flits++;
        end
        // a header at an input buffer front that cannot leave this cycle
        if (dut.g_node[n].u_router.buf_valid[o] && !dut.g_node[n].u_router.buf_pop[o] &&
            is_head(dut.g_node[n].u_router.buf_flit[o].ftype)) n_hol++;
      end
    end
  end

  // ------------------------------------------------------- link energy probe
  localparam int NL = NN * NPORTS;
  longint unsigned l_hs [NL];
  longint unsigned l_ls [NL];
  longint unsigned l_er [NL];
  logic snap = 1'b0;

  for (genvar n = 0; n < NN; n++) begin : g_lk
    always @(posedge snap) begin
      l_hs[n * NPORTS] = dut.g_node[n].u_ej_link.hs_total();
      l_ls[n * NPORTS] = dut.g_node[n].u_ej_link.ls_total();
      l_er[n * NPORTS] = dut.g_node[n].u_ej_link.err_total();
    end
    for (genvar p = 1; p < NPORTS; p++) begin : g_p
      localparam int X = n % 3, Y = n / 3;
      localparam bit HAS = (p == P_EAST) ? (X < 2) : (p == P_WEST) ? (X > 0) :
                           (p == P_SOUTH) ? (Y < 1) : (Y > 0);
      if (HAS) begin : g_has
        always @(posedge snap) begin
          l_hs[n * NPORTS + p] = dut.g_node[n].g_port[p].g_link.u_link.hs_total();
          l_ls[n * NPORTS + p] = dut.g_node[n].g_port[p].g_link.u_link.ls_total();
          l_er[n * NPORTS + p] = dut.g_node[n].g_port[p].g_link.u_link.err_total();
        end
      end else begin : g_none
        initial begin
          l_hs[n * NPORTS + p] = 0;
          l_ls[n * NPORTS + p] = 0;
          l_er[n * NPORTS + p] = 0;
        end
      end
    end
  end

  task automatic sample(output longint unsigned hs, output longint unsigned ls, output longint unsigned er);
    snap = 1'b1;
    #1;
    snap = 1'b0;
    hs = 0; ls = 0; er = 0;
    for (int i = 0; i < NL; i++) begin
      hs += l_hs[i];
      ls += l_ls[i];
      er += l_er[i];
    end
  endtask

  // ------------------------------------------------------------- one run
  task automatic run(bit en, logic [9:1] flows, output real e_fj, output longint unsigned tog,
                     output int bad_words, output longint unsigned errs, output int cycles);
    longint unsigned hs0, ls0, er0, hs1, ls1, er1;
    int t0;
    // fresh memory contents
    for (int a = 0; a < (1 << ADDR_W); a++) begin
      gen0[a] = 0;
      gen1[a] = 0;
    end
    for (int i = 0; i < NBLK * BLK; i++) mem0[A_Y1 + i] = image[i];
    for (int k = 0; k < BLK; k++) mem0[A_QT + k] = qtab[k];
    @(negedge clk);
    approx_en = en;
    resil = flows;
    sample(hs0, ls0, er0);
    t0 = 0;
    done_cores = 0;
    go = 1'b1;
    while (done_cores < 4) begin
      @(posedge clk);
      t0++;
      if (t0 > 100000) begin
        failures++;
        $display("ERROR run did not complete within 100000 cycles");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
    go = 1'b0;
    repeat (20) @(posedge clk);
    cycles = t0;
    sample(hs1, ls1, er1);
    e_fj = real'(hs1 - hs0) * E_HS_FJ + real'(ls1 - ls0) * E_LS_FJ;
    tog  = (hs1 - hs0) + (ls1 - ls0);
    errs = er1 - er0;
    bad_words = 0;
    for (int i = 0; i < NBLK * BLK; i++)
      if (mem1[A_OUT + i] != ref_out(i)) bad_words++;
  endtask

  initial begin
    real e_base, e, en_prev, en_cfg [11];
    longint unsigned tog, errs, errs_all;
    int bad, cyc;
    logic [9:1] flows;
    for (int i = 0; i < NBLK * BLK; i++) image[i] = 32'($urandom_range(0, 255));
    for (int k = 0; k < BLK; k++) qtab[k] = 32'($urandom_range(1, 99));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    errs_all = 0;

    // baseline: everything marked, but links must stay at full swing
    run(1'b0, 9'h1ff, e, tog, bad, errs, cyc);
    e_base = real'(tog) * E_CONV_FJ;
    $display("baseline     : %0d cycles, %0d link transitions, wrong words %0d", cyc, tog, bad);
    check(bad == 0, "baseline output differs from the reference");
    check(n_low_flits == 0, "low-swing flit in the baseline NoC");

    en_prev = 10.0;
    for (int cfg = 0; cfg <= 10; cfg++) begin
      real nrm;
      flows = '0;
      if (cfg <= 9) begin
        for (int f = 1; f <= cfg; f++) flows[f] = 1'b1;
      end else begin
        flows = 9'b1_0011_1111;  // opt: flows 1-6 and 9
      end
      run(1'b1, flows, e, tog, bad, errs, cyc);
      errs_all += errs;
      nrm = e / e_base;
      en_cfg[cfg] = nrm;
      $display("config %-5s: %0d cycles, normalised link energy %0.3f, bit errors %0d, wrong output words %0d",
               (cfg == 10) ? "opt" : $sformatf("%0d", cfg), cyc, nrm, errs, bad);
      if (cfg == 0) begin
        check(bad == 0, "configuration 0 output differs from the reference");
        check(nrm > 1.02 && nrm < 1.04, $sformatf("configuration 0 energy %0.3f, expected about 527/512", nrm));
      end
      if (cfg >= 1 && cfg <= 9)
        check(nrm < en_prev, $sformatf("energy did not fall from configuration %0d to %0d", cfg - 1, cfg));
      if (cfg <= 9) en_prev = nrm;
      check(n_swing_err == 0, "a flit crossed a router output at the wrong swing");
    end
    check(en_cfg[10] < en_cfg[6], "opt not below configuration 6 in energy");

    // sensitivity runs: each flow approximated on its own
    for (int f = 1; f <= 9; f++) begin
      real nrm;
      flows = '0;
      flows[f] = 1'b1;
      run(1'b1, flows, e, tog, bad, errs, cyc);
      errs_all += errs;
      nrm = e / e_base;
      $display("flow %0d alone: normalised link energy %0.3f, bit errors %0d, wrong output words %0d",
               f, nrm, errs, bad);
      check(nrm < en_cfg[0], $sformatf("approximating flow %0d alone saved no energy", f));
      check(n_swing_err == 0, "a flit crossed a router output at the wrong swing");
    end
    check(n_low_flits > 0, "no low-swing flit seen");
    check(n_ld_appr > 0 && n_st_appr > 0, "no approximate load or store");
    check(n_stall > 0, "no back-pressure stall seen");
    check(n_hol > 0, "no header ever waited for an output");
    check(errs_all > 0, "no bit error on a low-swing link");
    $display("low-swing flit transfers %0d, approximate loads %0d, approximate stores %0d",
             n_low_flits, n_ld_appr, n_st_appr);
    $display("stall cycles %0d, header wait cycles %0d, link bit errors %0d", n_stall, n_hol, errs_all);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
