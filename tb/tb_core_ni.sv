// tb_core_ni: self-checking testbench for core_ni.
//
// The interface sits at node (1,0). The testbench issues random loads and
// stores (random memory, address, length and RESILIENT flag, random store-data
// gaps and router back-pressure) and checks every injected flit: a load is one
// SINGLE flit with APPROX = 0 and RESP_APPROX = RESILIENT; a store is a HEAD with
// APPROX = RESILIENT followed by the store words, the last one a TAIL; source and
// destination coordinates match the node and the chosen memory controller.
// In parallel it feeds load-response packets into the ejection port and checks
// that the data words, rsp_last and rsp_approx reach the core.
module tb_core_ni;
  import approx_noc_pkg::*;

  localparam int NX_ = 1, NY_ = 0;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              req_valid = 1'b0;
  logic              req_ready;
  core_req_t         req = '0;
  logic              wdata_valid = 1'b0;
  logic              wdata_ready;
  logic [DATA_W-1:0] wdata = '0;
  logic              rsp_valid;
  logic              rsp_ready = 1'b0;
  logic [DATA_W-1:0] rsp_data;
  logic              rsp_last;
  logic              rsp_approx;
  logic              inj_valid;
  logic              inj_ready = 1'b0;
  flit_t             inj_flit;
  logic              ej_valid = 1'b0;
  logic              ej_ready;
  flit_t             ej_flit = '{ftype: FLIT_SINGLE, data: '0};

  core_ni #(.X(NX_), .Y(NY_)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  flit_t exp_inj[$];
  logic [DATA_W+1:0] exp_rsp[$];   // {approx, last, data}
  int n_ld = 0, n_st = 0, n_rsp = 0;
  bit tx_done = 1'b0, rx_done = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    inj_ready = ($urandom_range(0, 3) != 0);
    rsp_ready = ($urandom_range(0, 3) != 0);
  end

  // injected flits against the expected sequence
  always @(posedge clk) if (rst_n && inj_valid && inj_ready) begin
    check(exp_inj.size() > 0, "unexpected injected flit");
    if (exp_inj.size() > 0) begin
      check(inj_flit == exp_inj[0], $sformatf("injected flit %0h, expected %0h", inj_flit, exp_inj[0]));
      void'(exp_inj.pop_front());
    end
  end

  // core-side responses
  always @(posedge clk) if (rst_n && rsp_valid && rsp_ready) begin
    check(exp_rsp.size() > 0, "unexpected response word");
    if (exp_rsp.size() > 0) begin
      check({rsp_approx, rsp_last, rsp_data} == exp_rsp[0], "response word, last or approx flag");
      void'(exp_rsp.pop_front());
      n_rsp++;
    end
  end

  // ---- request side
  initial begin
    wait (rst_n);
    for (int t = 0; t < 150; t++) begin
      core_req_t r;
      header_t h;
      int len;
      @(negedge clk);
      r.store     = 1'($urandom);
      r.mem       = 1'($urandom);
      r.addr      = ADDR_W'($urandom);
      len         = $urandom_range(1, 8);
      r.len_m1    = LEN_W'(len - 1);
      r.resilient = 1'($urandom);
      h = '0;
      h.kind        = r.store ? PKT_ST_REQ : PKT_LD_REQ;
      h.approx      = r.store & r.resilient;
      h.resp_approx = !r.store & r.resilient;
      h.src_x = COORD_W'(NX_); h.src_y = COORD_W'(NY_);
      h.dst_x = 2'd2;          h.dst_y = COORD_W'(r.mem);
      h.len_m1 = r.len_m1;     h.addr  = r.addr;
      exp_inj.push_back('{ftype: r.store ? FLIT_HEAD : FLIT_SINGLE, data: h});
      req_valid = 1'b1;
      req = r;
      @(posedge clk);
      while (!req_ready) @(posedge clk);
      @(negedge clk);
      req_valid = 1'b0;
      if (r.store) begin
        n_st++;
        for (int k = 0; k < len; k++) begin
          logic [DATA_W-1:0] d;
          d = $urandom;
          exp_inj.push_back('{ftype: (k == len - 1) ? FLIT_TAIL : FLIT_BODY, data: d});
          while ($urandom_range(0, 2) == 0) @(negedge clk);
          wdata_valid = 1'b1;
          wdata = d;
          @(posedge clk);
          while (!wdata_ready) @(posedge clk);
          @(negedge clk);
          wdata_valid = 1'b0;
        end
      end else n_ld++;
    end
    tx_done = 1'b1;
  end

  // ---- response side
  initial begin
    wait (rst_n);
    for (int t = 0; t < 80; t++) begin
      header_t h;
      int len;
      h = '0;
      h.kind   = PKT_LD_RSP;
      h.approx = 1'($urandom);
      h.dst_x  = COORD_W'(NX_); h.dst_y = COORD_W'(NY_);
      len      = $urandom_range(1, 8);
      h.len_m1 = LEN_W'(len - 1);
      for (int k = 0; k <= len; k++) begin
        flit_t f;
        if (k == 0) f = '{ftype: FLIT_HEAD, data: h};
        else begin
          f = '{ftype: (k == len) ? FLIT_TAIL : FLIT_BODY, data: $urandom};
          exp_rsp.push_back({h.approx, (k == len), f.data});
        end
        @(negedge clk);
        ej_valid = 1'b1;
        ej_flit  = f;
        @(posedge clk);
        while (!ej_ready) @(posedge clk);
        @(negedge clk);
        ej_valid = 1'b0;
      end
    end
    rx_done = 1'b1;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (tx_done && rx_done);
    repeat (10) @(negedge clk);
    check(exp_inj.size() == 0, "injected flits missing");
    check(exp_rsp.size() == 0, "response words missing");
    check(n_ld > 0 && n_st > 0 && n_rsp > 0, "coverage");
    $display("loads %0d, stores %0d, response words %0d", n_ld, n_st, n_rsp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
