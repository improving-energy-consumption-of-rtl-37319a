// approx_noc_pkg: types and constants shared by the approximate-communication NoC.
//
// A packet is a sequence of flits. Every flit carries a 2-bit type on nominal
// sideband wires and a DATA_W-bit payload on the reconfigurable-swing bit-lines.
// The first flit of a packet (HEAD, or SINGLE for one-flit packets) is a header
// whose payload holds routing and control fields, among them the APPROX flag
// that lets the rest of the packet travel on low-swing links, and, in a load
// request, the RESP_APPROX flag telling the memory controller how to send the
// response. The header field layout, the payload width and the packet kinds are
// this design's own choices; the two flags and the rule that the header always
// travels at full swing follow the approximate-communication scheme.
package approx_noc_pkg;

  localparam int unsigned DATA_W  = 32;  // payload bit-lines per link
  localparam int unsigned COORD_W = 2;   // bits per mesh coordinate
  localparam int unsigned LEN_W   = 6;   // packet data length field (words - 1)
  localparam int unsigned ADDR_W  = 14;  // word address inside one memory

  // Characterised cost of one bit-line transition (femtojoules): full swing on the
  // reconfigurable line, low swing on it, and a conventional single-swing line.
  localparam real E_HS_FJ   = 527.0;
  localparam real E_LS_FJ   = 152.0;
  localparam real E_CONV_FJ = 512.0;

  // Router port numbering. y grows southwards (row 0 is the top row).
  localparam int unsigned NPORTS  = 5;
  localparam int unsigned P_LOCAL = 0;
  localparam int unsigned P_NORTH = 1;
  localparam int unsigned P_EAST  = 2;
  localparam int unsigned P_SOUTH = 3;
  localparam int unsigned P_WEST  = 4;

  typedef enum logic [1:0] {
    FLIT_HEAD   = 2'd0,  // first flit of a multi-flit packet
    FLIT_BODY   = 2'd1,
    FLIT_TAIL   = 2'd2,  // last flit of a multi-flit packet
    FLIT_SINGLE = 2'd3   // header-only packet
  } flit_type_e;

  typedef enum logic [1:0] {
    PKT_LD_REQ = 2'd0,   // load request: header only
    PKT_ST_REQ = 2'd1,   // store request: header + LEN data flits
    PKT_LD_RSP = 2'd2,   // load response: header + LEN data flits
    PKT_RSVD   = 2'd3
  } pkt_kind_e;

  typedef struct packed {
    pkt_kind_e            kind;         // [31:30]
    logic                 approx;       // [29] non-header flits may use low swing
    logic                 resp_approx;  // [28] load request: response to use low swing
    logic [COORD_W-1:0]   src_x;        // [27:26]
    logic [COORD_W-1:0]   src_y;        // [25:24]
    logic [COORD_W-1:0]   dst_x;        // [23:22]
    logic [COORD_W-1:0]   dst_y;        // [21:20]
    logic [LEN_W-1:0]     len_m1;       // [19:14] data words - 1
    logic [ADDR_W-1:0]    addr;         // [13:0] first word address
  } header_t;

  typedef struct packed {
    flit_type_e           ftype;
    logic [DATA_W-1:0]    data;
  } flit_t;

  // A load or store issued by a processing core to its network interface.
  typedef struct packed {
    logic                 store;      // 1: store, 0: load
    logic                 mem;        // memory (controller) index: 0 or 1
    logic [ADDR_W-1:0]    addr;       // first word address
    logic [LEN_W-1:0]     len_m1;     // words - 1
    logic                 resilient;  // data are error tolerant (low swing allowed)
  } core_req_t;

  function automatic logic is_head(flit_type_e t);
    return (t == FLIT_HEAD) || (t == FLIT_SINGLE);
  endfunction

  function automatic logic is_last(flit_type_e t);
    return (t == FLIT_TAIL) || (t == FLIT_SINGLE);
  endfunction

endpackage
