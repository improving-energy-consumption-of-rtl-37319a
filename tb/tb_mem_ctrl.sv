// tb_mem_ctrl: self-checking testbench for mem_ctrl.
//
// A memory model (1-cycle read latency) sits behind the controller. The
// testbench plays the network: it sends random store packets (checking every
// word lands in the memory) and load requests with random RESP_APPROX (checking
// the response header goes back to the requester with APPROX = RESP_APPROX, and
// that the data flits hold the memory words), with random back-pressure on the
// response. It also checks the controller's data rate: with no back-pressure the
// tail of an L-word response is accepted 3L cycles after its header.
module tb_mem_ctrl;
  import approx_noc_pkg::*;

  localparam int MX = 2, MY = 1;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              inj_valid;
  logic              inj_ready = 1'b0;
  flit_t             inj_flit;
  logic              ej_valid = 1'b0;
  logic              ej_ready;
  flit_t             ej_flit = '{ftype: FLIT_SINGLE, data: '0};
  logic              mem_req, mem_we;
  logic [ADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0] mem_wdata;
  logic [DATA_W-1:0] mem_rdata;

  mem_ctrl #(.X(MX), .Y(MY)) dut (.*);

  logic [DATA_W-1:0] mem   [1 << ADDR_W];
  logic [DATA_W-1:0] shadow[1 << ADDR_W];

  always @(posedge clk) begin
    if (mem_req && mem_we) mem[mem_addr] <= mem_wdata;
    if (mem_req && !mem_we) mem_rdata <= mem[mem_addr];
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ld_appr = 0, n_ld_exact = 0, n_st = 0;
  bit free_run = 1'b0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("ERROR %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) inj_ready = free_run ? 1'b1 : ($urandom_range(0, 2) != 0);

  task automatic send(flit_t f);
    @(negedge clk);
    ej_valid = 1'b1;
    ej_flit  = f;
    @(posedge clk);
    while (!ej_ready) @(posedge clk);
    @(negedge clk);
    ej_valid = 1'b0;
  endtask

  task automatic recv(output flit_t f, output int cyc);
    cyc = 0;
    @(posedge clk);
    while (!(inj_valid && inj_ready)) begin
      @(posedge clk);
      cyc++;
    end
    f = inj_flit;
  endtask

  initial begin
    for (int a = 0; a < (1 << ADDR_W); a++) begin
      mem[a] = $urandom;
      shadow[a] = mem[a];
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 120; t++) begin
      header_t h;
      int len;
      h = '0;
      h.src_x = COORD_W'($urandom_range(0, 1));
      h.src_y = COORD_W'($urandom_range(0, 1));
      h.dst_x = COORD_W'(MX);
      h.dst_y = COORD_W'(MY);
      h.addr  = ADDR_W'($urandom);
      len     = $urandom_range(1, 12);
      h.len_m1 = LEN_W'(len - 1);
      if ($urandom_range(0, 1) == 0) begin
        // store
        h.kind   = PKT_ST_REQ;
        h.approx = 1'($urandom);
        send('{ftype: FLIT_HEAD, data: h});
        for (int k = 0; k < len; k++) begin
          logic [DATA_W-1:0] d;
          d = $urandom;
          shadow[h.addr + ADDR_W'(k)] = d;
          send('{ftype: (k == len - 1) ? FLIT_TAIL : FLIT_BODY, data: d});
        end
        repeat (2) @(negedge clk);
        for (int k = 0; k < len; k++)
          check(mem[h.addr + ADDR_W'(k)] == shadow[h.addr + ADDR_W'(k)],
                $sformatf("store word %0d at %0h", k, h.addr + ADDR_W'(k)));
        n_st++;
      end else begin
        // load
        flit_t f;
        header_t rh;
        int cyc, total;
        h.kind        = PKT_LD_REQ;
        h.resp_approx = 1'($urandom);
        free_run      = (t % 4 == 0);
        fork
          send('{ftype: FLIT_SINGLE, data: h});
          begin
            recv(f, cyc);
          end
        join
        total = 0;
        rh = header_t'(f.data);
        check(f.ftype == FLIT_HEAD, "response does not start with a header");
        check(rh.kind == PKT_LD_RSP && rh.dst_x == h.src_x && rh.dst_y == h.src_y &&
              rh.src_x == COORD_W'(MX) && rh.src_y == COORD_W'(MY) && rh.len_m1 == h.len_m1,
              "response header fields");
        check(rh.approx == h.resp_approx, "response APPROX differs from request RESP_APPROX");
        if (rh.approx) n_ld_appr++; else n_ld_exact++;
        for (int k = 0; k < len; k++) begin
          recv(f, cyc);
          total += cyc + 1;
          check(f.ftype == ((k == len - 1) ? FLIT_TAIL : FLIT_BODY), "response flit type");
          check(f.data == shadow[h.addr + ADDR_W'(k)], $sformatf("load word %0d", k));
        end
        if (free_run) check(total == 3 * len, $sformatf("load of %0d words: tail %0d cycles after the header, expected %0d",
                                                     len, total, 3 * len));
        free_run = 1'b0;
      end
    end
    check(n_ld_appr > 0 && n_ld_exact > 0 && n_st > 0, "coverage of loads and stores");
    $display("stores %0d, exact loads %0d, approximate loads %0d", n_st, n_ld_exact, n_ld_appr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
