// core_ni: network interface of a processing core.
//
// Turns the loads and stores of a core into NoC packets and hands the load
// responses back. A request (core_req_t) names the memory (0 or 1), the first
// word address, the number of words and whether the data are error tolerant
// (RESILIENT, set for data structures the programmer has marked resilient).
//   * Load: a one-flit request packet (SINGLE) to the memory controller. Its
//     APPROX flag is always 0, so the request travels at full swing: it carries
//     the address and size. RESP_APPROX = RESILIENT tells the memory controller
//     to send the response data at low swing.
//   * Store: a HEAD flit with APPROX = RESILIENT, then LEN data flits taken from
//     the wdata channel, the last one a TAIL. The data flits may travel at low
//     swing, the header never does.
//   * Load responses from the network: the header is absorbed, each data flit is
//     presented on rsp_* with rsp_last on the tail and rsp_approx telling whether
//     the data travelled on low-swing links.
// The two flags and the rule for requests follow the approximate-communication
// scheme; packet formats and channel handshakes are this design's own.
//
// Interface: valid/ready channels req_*, wdata_*, rsp_*, inj_* (towards the
// router's local input) and ej_* (from the router's local output). req_ready is
// given in the cycle the header is accepted by the router. One flit per cycle in
// each direction; no state is shared between the two directions.
module core_ni
  import approx_noc_pkg::*;
#(
  parameter int unsigned X     = 0,  // this node's column
  parameter int unsigned Y     = 0,  // this node's row
  parameter int unsigned MC0_X = 2,  // memory controller 0 position
  parameter int unsigned MC0_Y = 0,
  parameter int unsigned MC1_X = 2,  // memory controller 1 position
  parameter int unsigned MC1_Y = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // core side
  input  logic              req_valid,
  output logic              req_ready,
  input  core_req_t         req,
  input  logic              wdata_valid,
  output logic              wdata_ready,
  input  logic [DATA_W-1:0] wdata,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output logic [DATA_W-1:0] rsp_data,
  output logic              rsp_last,
  output logic              rsp_approx,
  // network side
  output logic              inj_valid,
  input  logic              inj_ready,
  output flit_t             inj_flit,
  input  logic              ej_valid,
  output logic              ej_ready,
  input  flit_t             ej_flit
);

  // ------------------------------------------------------------ request path
  typedef enum logic {TX_HEAD, TX_DATA} tx_state_e;
  tx_state_e         tx_q;
  logic [LEN_W-1:0]  left_q;   // data flits still to send - 1
  header_t           hdr;

  always_comb begin
    hdr             = '0;
    hdr.kind        = req.store ? PKT_ST_REQ : PKT_LD_REQ;
    hdr.approx      = req.store && req.resilient;
    hdr.resp_approx = !req.store && req.resilient;
    hdr.src_x       = COORD_W'(X);
    hdr.src_y       = COORD_W'(Y);
    hdr.dst_x       = req.mem ? COORD_W'(MC1_X) : COORD_W'(MC0_X);
    hdr.dst_y       = req.mem ? COORD_W'(MC1_Y) : COORD_W'(MC0_Y);
    hdr.len_m1      = req.len_m1;
    hdr.addr        = req.addr;

    if (tx_q == TX_HEAD) begin
      inj_valid   = req_valid;
      inj_flit    = '{ftype: req.store ? FLIT_HEAD : FLIT_SINGLE, data: hdr};
      req_ready   = inj_ready;
      wdata_ready = 1'b0;
    end else begin
      inj_valid   = wdata_valid;
      inj_flit    = '{ftype: (left_q == '0) ? FLIT_TAIL : FLIT_BODY, data: wdata};
      req_ready   = 1'b0;
      wdata_ready = inj_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_q   <= TX_HEAD;
      left_q <= '0;
    end else if (tx_q == TX_HEAD) begin
      if (req_valid && inj_ready && req.store) begin
        tx_q   <= TX_DATA;
        left_q <= req.len_m1;
      end
    end else if (wdata_valid && inj_ready) begin
      if (left_q == '0) tx_q <= TX_HEAD;
      else              left_q <= left_q - 1'b1;
    end
  end

  // ----------------------------------------------------------- response path
  header_t ej_hdr;
  assign ej_hdr    = header_t'(ej_flit.data);
  assign rsp_valid = ej_valid && !is_head(ej_flit.ftype);
  assign rsp_data  = ej_flit.data;
  assign rsp_last  = is_last(ej_flit.ftype);
  assign ej_ready  = is_head(ej_flit.ftype) ? 1'b1 : rsp_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                      rsp_approx <= 1'b0;
    else if (ej_valid && is_head(ej_flit.ftype))     rsp_approx <= ej_hdr.approx;
  end

endmodule
