// noc_router: five-port wormhole mesh router with per-output voltage-swing control.
//
// This is a conventional input-buffered wormhole router augmented, on each of its
// five output links, with a swing_ctrl that sets the link's SEL line: header
// flits always leave at full swing, and the body and tail flits of a packet
// whose header APPROX flag is set leave at low swing when approx_en = 1.
//
// How it works. Each input port has a flit_fifo. When a header reaches the front
// of an input buffer, its output port is computed by dimension-order XY routing
// (first along x, then along y; y grows southwards) and remembered for the rest of
// the packet. Each output port has a round-robin arbiter among the inputs whose
// front flit is a header routed to it; the winner holds the output until its tail
// flit has passed (wormhole switching). Each output has a one-flit output
// register; a flit moves from an input buffer into it when the register is empty
// or is being emptied in the same cycle. The register drives the link and SEL
// together.
//
// Interface: per port p (0 local, 1 north, 2 east, 3 south, 4 west) a valid/ready
// input channel in_* and output channel out_* carrying flit_t, plus out_sel[p]
// for the link. A transfer happens when valid && ready at a rising clock edge.
// in_ready is "input buffer not full" and does not depend on in_valid.
// Timing: a flit accepted at an input in cycle t can be in the output register,
// and on the link, from cycle t+2 (buffer write, then switch traversal); one flit
// per output per cycle at full throughput.
// The scheme this design implements names the router but does not describe its
// insides; routing, buffering, arbitration and flow control are this design's
// own choices, the per-output swing control is the scheme's.
module noc_router
  import approx_noc_pkg::*;
#(
  parameter int unsigned X         = 0,  // this router's column
  parameter int unsigned Y         = 0,  // this router's row
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              approx_en,
  input  logic  [NPORTS-1:0] in_valid,
  output logic  [NPORTS-1:0] in_ready,
  input  flit_t              in_flit  [NPORTS],
  output logic  [NPORTS-1:0] out_valid,
  input  logic  [NPORTS-1:0] out_ready,
  output flit_t              out_flit [NPORTS],
  output logic  [NPORTS-1:0] out_sel
);

  localparam int unsigned PSEL_W = $clog2(NPORTS);

  // ---------------------------------------------------------------- input side
  logic  [NPORTS-1:0] buf_valid;
  logic  [NPORTS-1:0] buf_pop;
  flit_t              buf_flit   [NPORTS];
  logic  [PSEL_W-1:0] route_q    [NPORTS];  // output of the packet in progress
  logic  [PSEL_W-1:0] route_req  [NPORTS];  // output wanted by the front flit

  function automatic logic [PSEL_W-1:0] xy_route(header_t h);
    if (h.dst_x > COORD_W'(X))       return PSEL_W'(P_EAST);
    else if (h.dst_x != COORD_W'(X)) return PSEL_W'(P_WEST);
    else if (h.dst_y > COORD_W'(Y))  return PSEL_W'(P_SOUTH);
    else if (h.dst_y != COORD_W'(Y)) return PSEL_W'(P_NORTH);
    else                             return PSEL_W'(P_LOCAL);
  endfunction

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    flit_fifo #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk       (clk),
      .rst_n     (rst_n),
      .push_valid(in_valid[i]),
      .push_ready(in_ready[i]),
      .push_flit (in_flit[i]),
      .pop_valid (buf_valid[i]),
      .pop_ready (buf_pop[i]),
      .pop_flit  (buf_flit[i])
    );

    assign route_req[i] = is_head(buf_flit[i].ftype) ? xy_route(header_t'(buf_flit[i].data))
                                                      : route_q[i];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                                           route_q[i] <= '0;
      else if (buf_pop[i] && is_head(buf_flit[i].ftype))    route_q[i] <= route_req[i];
    end
  end

  // ------------------------------------------------------- allocation / switch
  logic  [NPORTS-1:0] lock_q;                 // output held by a packet
  logic  [PSEL_W-1:0] owner_q [NPORTS];       // input holding the output
  logic  [PSEL_W-1:0] rr_q    [NPORTS];       // round-robin start position
  logic  [NPORTS-1:0] out_can;                // output register can take a flit
  logic  [NPORTS-1:0] out_load;               // output register takes a flit now
  logic  [PSEL_W-1:0] out_src [NPORTS];       // input feeding it

  always_comb begin
    logic [PSEL_W-1:0] c;
    c       = '0;
    buf_pop = '0;
    for (int o = 0; o < NPORTS; o++) begin
      out_can[o]  = !out_valid[o] || out_ready[o];
      out_load[o] = 1'b0;
      out_src[o]  = owner_q[o];
      if (lock_q[o]) begin
        if (out_can[o] && buf_valid[owner_q[o]] && route_req[owner_q[o]] == PSEL_W'(o)) begin
          out_load[o] = 1'b1;
        end
      end else if (out_can[o]) begin
        for (int k = 0; k < NPORTS; k++) begin
          c = PSEL_W'((int'(rr_q[o]) + k) % NPORTS);
          if (!out_load[o] && buf_valid[c] && is_head(buf_flit[c].ftype) &&
              route_req[c] == PSEL_W'(o)) begin
            out_load[o] = 1'b1;
            out_src[o]  = c;
          end
        end
      end
      if (out_load[o]) buf_pop[out_src[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_q    <= '0;
      out_valid <= '0;
      for (int o = 0; o < NPORTS; o++) begin
        owner_q[o]  <= '0;
        rr_q[o]     <= '0;
        out_flit[o] <= '{ftype: FLIT_SINGLE, data: '0};
      end
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        if (out_load[o]) begin
          out_valid[o] <= 1'b1;
          out_flit[o]  <= buf_flit[out_src[o]];
          if (is_head(buf_flit[out_src[o]].ftype)) begin
            owner_q[o] <= out_src[o];
            rr_q[o]    <= PSEL_W'((int'(out_src[o]) + 1) % NPORTS);
          end
          lock_q[o] <= !is_last(buf_flit[out_src[o]].ftype);
        end else if (out_ready[o]) begin
          out_valid[o] <= 1'b0;   // flit delivered; payload held to avoid toggling
        end
      end
    end
  end

  // ------------------------------------------------------ swing control per link
  for (genvar o = 0; o < NPORTS; o++) begin : g_swing
    header_t hdr;
    assign hdr = header_t'(buf_flit[out_src[o]].data);
    swing_ctrl u_swing (
      .clk        (clk),
      .rst_n      (rst_n),
      .approx_en  (approx_en),
      .load       (out_load[o]),
      .ftype      (buf_flit[out_src[o]].ftype),
      .head_approx(hdr.approx),
      .sel        (out_sel[o])
    );
  end

  // A flit must stay stable on an output until it is accepted.
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     out_valid[o] && !out_ready[o] |=> out_valid[o] && $stable(out_flit[o]));
  end

endmodule
