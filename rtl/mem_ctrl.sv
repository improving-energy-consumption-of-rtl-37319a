// mem_ctrl: memory controller core, the NoC end point in front of one memory.
//
// Serves the load and store request packets of the processing cores, one packet
// at a time:
//   * Store request (HEAD + LEN data flits): each data flit is written to the
//     memory at addr, addr+1, ... No response is sent (posted write).
//   * Load request (SINGLE): the controller sends a load-response packet back
//     to the requester: a header whose APPROX flag is the request's RESP_APPROX
//     flag, then LEN data flits read from addr, addr+1, ... The header always
//     travels at full swing; the data flits travel at low swing when APPROX is
//     set, which is how the programmer's resilient marking of a loaded data
//     structure reaches the links on the response path.
// Copying RESP_APPROX into the response follows the approximate-communication
// scheme; the rest (posted stores, one word in flight) is this design's choice.
//
// Memory port: a synchronous single-port memory. mem_req with mem_we = 1 writes
// mem_wdata at mem_addr; with mem_we = 0 it reads, and mem_rdata is valid in the
// next cycle. Network port: valid/ready channels inj_* (to the router's local
// input) and ej_* (from its local output).
// Timing: a store takes one cycle per data flit. A load returns one data word
// every three cycles (read, wait, send): without back-pressure the tail of an
// L-word response is accepted 3L cycles after its header.
module mem_ctrl
  import approx_noc_pkg::*;
#(
  parameter int unsigned X = 2,  // this node's column
  parameter int unsigned Y = 0   // this node's row
) (
  input  logic              clk,
  input  logic              rst_n,
  // network side
  output logic              inj_valid,
  input  logic              inj_ready,
  output flit_t             inj_flit,
  input  logic              ej_valid,
  output logic              ej_ready,
  input  flit_t             ej_flit,
  // memory side
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata
);

  typedef enum logic [2:0] {
    S_IDLE,      // wait for a request header
    S_ST_DATA,   // write store data flits
    S_RSP_HEAD,  // send the load-response header
    S_RD,        // issue a memory read
    S_RD_WAIT,   // memory data arrives
    S_RSP_DATA   // send one response data flit
  } state_e;

  state_e            st_q;
  header_t           hdr_q;
  logic [LEN_W-1:0]  cnt_q;    // words done
  logic [DATA_W-1:0] rdata_q;
  header_t           ej_hdr;
  header_t           rsp_hdr;

  assign ej_hdr = header_t'(ej_flit.data);

  always_comb begin
    rsp_hdr             = '0;
    rsp_hdr.kind        = PKT_LD_RSP;
    rsp_hdr.approx      = hdr_q.resp_approx;
    rsp_hdr.src_x       = COORD_W'(X);
    rsp_hdr.src_y       = COORD_W'(Y);
    rsp_hdr.dst_x       = hdr_q.src_x;
    rsp_hdr.dst_y       = hdr_q.src_y;
    rsp_hdr.len_m1      = hdr_q.len_m1;
    rsp_hdr.addr        = hdr_q.addr;

    ej_ready  = (st_q == S_IDLE) || (st_q == S_ST_DATA);
    inj_valid = (st_q == S_RSP_HEAD) || (st_q == S_RSP_DATA);
    inj_flit  = (st_q == S_RSP_HEAD)
              ? '{ftype: FLIT_HEAD, data: rsp_hdr}
              : '{ftype: (cnt_q == hdr_q.len_m1) ? FLIT_TAIL : FLIT_BODY, data: rdata_q};
    mem_req   = (st_q == S_RD) || (st_q == S_ST_DATA && ej_valid);
    mem_we    = (st_q == S_ST_DATA);
    mem_addr  = hdr_q.addr + ADDR_W'(cnt_q);
    mem_wdata = ej_flit.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      hdr_q   <= '0;
      cnt_q   <= '0;
      rdata_q <= '0;
    end else begin
      unique case (st_q)
        S_IDLE: if (ej_valid && is_head(ej_flit.ftype)) begin
          hdr_q <= ej_hdr;
          cnt_q <= '0;
          if (ej_hdr.kind == PKT_LD_REQ)                               st_q <= S_RSP_HEAD;
          else if (ej_hdr.kind == PKT_ST_REQ && !is_last(ej_flit.ftype)) st_q <= S_ST_DATA;
        end
        S_ST_DATA: if (ej_valid) begin
          cnt_q <= cnt_q + 1'b1;
          if (is_last(ej_flit.ftype)) st_q <= S_IDLE;
        end
        S_RSP_HEAD: if (inj_ready) st_q <= S_RD;
        S_RD:       st_q <= S_RD_WAIT;
        S_RD_WAIT: begin
          rdata_q <= mem_rdata;
          st_q    <= S_RSP_DATA;
        end
        S_RSP_DATA: if (inj_ready) begin
          if (cnt_q == hdr_q.len_m1) st_q <= S_IDLE;
          else begin
            cnt_q <= cnt_q + 1'b1;
            st_q  <= S_RD;
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  // A response flit must stay stable until the router accepts it.
  assert property (@(posedge clk) disable iff (!rst_n)
                   inj_valid && !inj_ready |=> inj_valid && $stable(inj_flit));

endmodule
