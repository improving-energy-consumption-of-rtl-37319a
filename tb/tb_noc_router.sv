// tb_noc_router: self-checking testbench for noc_router.
//
// The router sits at (1,1). Each of its five inputs sends random packets to
// random destinations in a 3x3 coordinate range, so XY routing uses all five
// outputs; outputs accept flits with random back-pressure. Every packet carries a
// unique id in its header and body data. The testbench checks, per output:
// the packet arrived at the XY-routed port, its flits arrive contiguously and in
// order with intact payload, and SEL is full swing for the header and for data
// of exact packets, low swing for data of approximate packets when approx_en = 1.
// It also checks that all packets arrive, and the two-cycle latency of a header
// through an empty router.
module tb_noc_router;
  import approx_noc_pkg::*;

  localparam int RX = 1, RY = 1;
  localparam int NPKT = 60;   // packets per input

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               approx_en = 1'b1;
  logic  [NPORTS-1:0] in_valid = '0;
  logic  [NPORTS-1:0] in_ready;
  flit_t              in_flit [NPORTS];
  logic  [NPORTS-1:0] out_valid;
  logic  [NPORTS-1:0] out_ready = '0;
  flit_t              out_flit [NPORTS];
  logic  [NPORTS-1:0] out_sel;

  noc_router #(.X(RX), .Y(RY)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int delivered = 0, n_low = 0, n_stall = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR %s", what);
    end
  endtask

  // expected packets by id
  flit_t exp_flits [int][$];
  int    exp_port  [int];
  logic  exp_appr  [int];

  function automatic int xy(int dx, int dy);
    if (dx > RX) return P_EAST;
    if (dx < RX) return P_WEST;
    if (dy > RY) return P_SOUTH;
    if (dy < RY) return P_NORTH;
    return P_LOCAL;
  endfunction

  function automatic void make_pkt(int id, ref flit_t q[$]);
    header_t h;
    int nd;
    h = '0;
    h.kind   = PKT_ST_REQ;
    h.approx = 1'($urandom);
    h.dst_x  = COORD_W'($urandom_range(0, 2));
    h.dst_y  = COORD_W'($urandom_range(0, 2));
    h.addr   = ADDR_W'(id);
    nd = $urandom_range(0, 5);
    h.len_m1 = LEN_W'(nd == 0 ? 0 : nd - 1);
    q = {};
    q.push_back('{ftype: (nd == 0) ? FLIT_SINGLE : FLIT_HEAD, data: h});
    for (int k = 0; k < nd; k++)
      q.push_back('{ftype: (k == nd - 1) ? FLIT_TAIL : FLIT_BODY, data: {id[15:0], 16'(k)}});
    exp_port[id] = xy(int'(h.dst_x), int'(h.dst_y));
    exp_appr[id] = h.approx;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- one driver per input
  for (genvar i = 0; i < NPORTS; i++) begin : g_drv
    initial begin
      in_flit[i] = '{ftype: FLIT_SINGLE, data: '0};
      wait (rst_n);
      @(negedge clk);
      for (int p = 0; p < NPKT; p++) begin
        flit_t q[$];
        int id;
        id = i * 1000 + p;
        make_pkt(id, q);
        exp_flits[id] = q;
        foreach (q[k]) begin
          while ($urandom_range(0, 3) == 0) @(negedge clk);
          in_valid[i] = 1'b1;
          in_flit[i]  = q[k];
          @(posedge clk);
          while (!in_ready[i]) @(posedge clk);
          @(negedge clk);
          in_valid[i] = 1'b0;
        end
      end
    end
  end

  // ---- output monitors
  int cur_id [NPORTS];
  int cur_k  [NPORTS];
  for (genvar o = 0; o < NPORTS; o++) begin : g_mon
    initial cur_id[o] = -1;
    always @(negedge clk) out_ready[o] = ($urandom_range(0, 3) != 0);
    always @(posedge clk) if (rst_n && out_valid[o] && !out_ready[o]) n_stall++;
    always @(posedge clk) begin
      if (rst_n && out_valid[o] && out_ready[o]) begin
        flit_t f;
        f = out_flit[o];
        if (is_head(f.ftype)) begin
          header_t h;
          h = header_t'(f.data);
          check(cur_id[o] < 0, $sformatf("port %0d: header inside a packet", o));
          cur_id[o] = int'(h.addr);
          cur_k[o]  = 0;
          check(exp_flits.exists(cur_id[o]), $sformatf("port %0d: unknown packet %0d", o, cur_id[o]));
          check(exp_port[cur_id[o]] == o, $sformatf("packet %0d on port %0d, expected %0d",
                cur_id[o], o, exp_port[cur_id[o]]));
          check(out_sel[o] == 1'b1, "header not at full swing");
        end else begin
          check(cur_id[o] >= 0, $sformatf("port %0d: data flit outside a packet", o));
          check(out_sel[o] == !(approx_en && exp_appr[cur_id[o]]),
                $sformatf("port %0d: SEL %0b for packet %0d", o, out_sel[o], cur_id[o]));
          if (!out_sel[o]) n_low++;
        end
        if (cur_id[o] >= 0 && exp_flits.exists(cur_id[o])) begin
          check(f == exp_flits[cur_id[o]][cur_k[o]],
                $sformatf("port %0d packet %0d flit %0d wrong", o, cur_id[o], cur_k[o]));
          cur_k[o]++;
        end
        if (is_last(f.ftype)) begin
          delivered++;
          cur_id[o] = -1;
        end
      end
    end
  end

  initial begin
    int t0;
    header_t h;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (delivered == NPORTS * NPKT);
    repeat (5) @(negedge clk);
    check(in_valid == '0 && out_valid == '0, "router not idle at the end");
    check(n_low > 0 && n_stall > 0, $sformatf("coverage: low-swing flits %0d, stalls %0d", n_low, n_stall));
    // ---- latency of one header through the empty router (approx_en = 0 too)
    approx_en = 1'b0;
    h = '0; h.dst_x = COORD_W'(RX + 1); h.dst_y = COORD_W'(RY);
    force out_ready = '1;
    @(negedge clk);
    force in_valid = 5'b00001;
    force in_flit[0] = '{ftype: FLIT_SINGLE, data: h};
    t0 = 0;
    @(negedge clk);
    release in_valid;
    release in_flit[0];
    in_valid = '0;
    while (!out_valid[P_EAST] && t0 < 10) begin
      @(negedge clk);
      t0++;
    end
    check(t0 == 1, $sformatf("header latency %0d cycles after acceptance, expected 1 (output register 2 edges after input)", t0));
    $display("delivered %0d packets, %0d low-swing flits, %0d stalls", delivered, n_low, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
