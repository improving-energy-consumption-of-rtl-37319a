// approx_noc_top: 2x3 mesh NoC with approximate (low-voltage-swing) communication.
//
// Six nodes in two rows of three, each with a noc_router. Four nodes hold the
// processing cores of a pipelined application, each behind a core_ni, and the
// third column holds two memory controllers (mem_ctrl), each in front of an
// external memory:
//        x=0            x=1            x=2
//   y=0  core 0         core 1         memory controller 0 -> memory 0
//   y=1  core 2         core 3         memory controller 1 -> memory 1
// (for the JPEG encoder mapping: core 0 level shift, core 1 DCT, core 2
// quantizer, core 3 entropy encoder).
// Every router output, towards a neighbour or towards its own node, drives a
// swing_link whose SEL comes from that output's swing controller: header flits
// always travel at full swing; the data flits of a packet marked approximate
// travel at low swing, saving link energy at the cost of a higher bit-error rate.
// The flit type and the valid/ready wires are on nominal wires. Injection from a
// node into its router is a short local connection without swing control.
// approx_en = 0 turns the NoC into the baseline in which all links stay at full
// swing; approx_en = 1 is the approximate NoC.
//
// Interface: per core c (0..3) a request channel (core_req_*), a store-data
// channel (core_wdata_*) and a load-response channel (core_rsp_*), as in
// core_ni; per memory m (0..1) the synchronous memory port of mem_ctrl (read
// data one cycle after the request). All channels are valid/ready.
// The mesh size, the placement of cores and memory controllers and the swing
// rule follow the application mapping this design implements; everything inside
// the routers, interfaces and controllers is this design's own choice.
module approx_noc_top
  import approx_noc_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 4,        // flits per router input buffer
  parameter real         BER_HIGH  = 1.3e-17,  // bit-error rate at full swing
  parameter real         BER_LOW   = 3.8e-6    // bit-error rate at low swing
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              approx_en,
  // processing cores
  input  logic              core_req_valid   [4],
  output logic              core_req_ready   [4],
  input  core_req_t         core_req         [4],
  input  logic              core_wdata_valid [4],
  output logic              core_wdata_ready [4],
  input  logic [DATA_W-1:0] core_wdata       [4],
  output logic              core_rsp_valid   [4],
  input  logic              core_rsp_ready   [4],
  output logic [DATA_W-1:0] core_rsp_data    [4],
  output logic              core_rsp_last    [4],
  output logic              core_rsp_approx  [4],
  // external memories
  output logic              mem_req          [2],
  output logic              mem_we           [2],
  output logic [ADDR_W-1:0] mem_addr         [2],
  output logic [DATA_W-1:0] mem_wdata        [2],
  input  logic [DATA_W-1:0] mem_rdata        [2]
);

  localparam int unsigned NX = 3;
  localparam int unsigned NY = 2;
  localparam int unsigned NN = NX * NY;

  logic  [NPORTS-1:0] r_in_valid  [NN];
  logic  [NPORTS-1:0] r_in_ready  [NN];
  flit_t              r_in_flit   [NN][NPORTS];
  logic  [NPORTS-1:0] r_out_valid [NN];
  logic  [NPORTS-1:0] r_out_ready [NN];
  flit_t              r_out_flit  [NN][NPORTS];
  logic  [NPORTS-1:0] r_out_sel   [NN];

  for (genvar n = 0; n < NN; n++) begin : g_node
    localparam int unsigned X = n % NX;
    localparam int unsigned Y = n / NX;

    noc_router #(.X(X), .Y(Y), .BUF_DEPTH(BUF_DEPTH)) u_router (
      .clk      (clk),
      .rst_n    (rst_n),
      .approx_en(approx_en),
      .in_valid (r_in_valid[n]),
      .in_ready (r_in_ready[n]),
      .in_flit  (r_in_flit[n]),
      .out_valid(r_out_valid[n]),
      .out_ready(r_out_ready[n]),
      .out_flit (r_out_flit[n]),
      .out_sel  (r_out_sel[n])
    );

    // ---- links arriving at this router's four mesh inputs
    for (genvar p = 1; p < NPORTS; p++) begin : g_port
      // neighbour in direction p and the port it drives towards us
      localparam int NBX = (p == P_EAST) ? int'(X) + 1 : (p == P_WEST)  ? int'(X) - 1 : int'(X);
      localparam int NBY = (p == P_SOUTH) ? int'(Y) + 1 : (p == P_NORTH) ? int'(Y) - 1 : int'(Y);
      localparam int unsigned OPP = (p == P_NORTH) ? P_SOUTH : (p == P_SOUTH) ? P_NORTH :
                                    (p == P_EAST)  ? P_WEST  : P_EAST;
      if (NBX >= 0 && NBX < int'(NX) && NBY >= 0 && NBY < int'(NY)) begin : g_link
        localparam int unsigned M = unsigned'(NBY) * NX + unsigned'(NBX);
        logic [DATA_W-1:0] rx;
        swing_link #(.W(DATA_W), .BER_HIGH(BER_HIGH), .BER_LOW(BER_LOW)) u_link (
          .tx (r_out_flit[M][OPP].data),
          .sel(r_out_sel[M][OPP]),
          .rx (rx)
        );
        assign r_in_valid[n][p]   = r_out_valid[M][OPP];
        assign r_in_flit[n][p]    = '{ftype: r_out_flit[M][OPP].ftype, data: rx};
        assign r_out_ready[M][OPP] = r_in_ready[n][p];
      end else begin : g_edge
        // mesh edge: nothing arrives, and XY routing never sends a flit out here
        assign r_in_valid[n][p]  = 1'b0;
        assign r_in_flit[n][p]   = '{ftype: FLIT_SINGLE, data: '0};
        assign r_out_ready[n][p] = 1'b1;
      end
    end

    // ---- ejection link from the router to its node
    logic [DATA_W-1:0] ej_rx;
    flit_t             ej_flit;
    swing_link #(.W(DATA_W), .BER_HIGH(BER_HIGH), .BER_LOW(BER_LOW)) u_ej_link (
      .tx (r_out_flit[n][P_LOCAL].data),
      .sel(r_out_sel[n][P_LOCAL]),
      .rx (ej_rx)
    );
    assign ej_flit = '{ftype: r_out_flit[n][P_LOCAL].ftype, data: ej_rx};

    if (X == NX - 1) begin : g_mc
      localparam int unsigned MI = Y;
      mem_ctrl #(.X(X), .Y(Y)) u_mc (
        .clk      (clk),
        .rst_n    (rst_n),
        .inj_valid(r_in_valid[n][P_LOCAL]),
        .inj_ready(r_in_ready[n][P_LOCAL]),
        .inj_flit (r_in_flit[n][P_LOCAL]),
        .ej_valid (r_out_valid[n][P_LOCAL]),
        .ej_ready (r_out_ready[n][P_LOCAL]),
        .ej_flit  (ej_flit),
        .mem_req  (mem_req[MI]),
        .mem_we   (mem_we[MI]),
        .mem_addr (mem_addr[MI]),
        .mem_wdata(mem_wdata[MI]),
        .mem_rdata(mem_rdata[MI])
      );
    end else begin : g_core
      localparam int unsigned CI = Y * (NX - 1) + X;
      core_ni #(.X(X), .Y(Y), .MC0_X(NX - 1), .MC0_Y(0), .MC1_X(NX - 1), .MC1_Y(1)) u_ni (
        .clk        (clk),
        .rst_n      (rst_n),
        .req_valid  (core_req_valid[CI]),
        .req_ready  (core_req_ready[CI]),
        .req        (core_req[CI]),
        .wdata_valid(core_wdata_valid[CI]),
        .wdata_ready(core_wdata_ready[CI]),
        .wdata      (core_wdata[CI]),
        .rsp_valid  (core_rsp_valid[CI]),
        .rsp_ready  (core_rsp_ready[CI]),
        .rsp_data   (core_rsp_data[CI]),
        .rsp_last   (core_rsp_last[CI]),
        .rsp_approx (core_rsp_approx[CI]),
        .inj_valid  (r_in_valid[n][P_LOCAL]),
        .inj_ready  (r_in_ready[n][P_LOCAL]),
        .inj_flit   (r_in_flit[n][P_LOCAL]),
        .ej_valid   (r_out_valid[n][P_LOCAL]),
        .ej_ready   (r_out_ready[n][P_LOCAL]),
        .ej_flit    (ej_flit)
      );
    end
  end

endmodule
