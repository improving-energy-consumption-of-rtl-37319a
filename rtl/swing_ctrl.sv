// swing_ctrl: voltage-swing select for one router output link.
//
// The reconfigurable link has one select line, SEL: 1 = full (VDDH) swing, the
// reliable mode; 0 = low (VDDL) swing, the low-energy, higher bit-error-rate mode.
// This controller sits next to the output register of a router port and computes
// SEL for the flit being loaded into that register, so SEL and the flit reach the
// link in the same cycle:
//   * a header flit (HEAD or SINGLE) is always sent at full swing, because it
//     carries control information, and its APPROX flag is remembered;
//   * the following BODY/TAIL flits of the packet are sent at low swing when the
//     remembered flag is set and low-swing operation is enabled (approx_en = 1).
// approx_en = 0 gives the baseline NoC, in which every link stays at full swing.
// With no flit loaded SEL keeps its value, so an idle link does not toggle.
//
// Interface: load is the cycle's "output register takes a flit" strobe, ftype and
// head_approx describe that flit. sel is registered (one flop), aligned with the
// output register. Reset puts the link in full-swing mode.
// The header-flag rule follows the scheme this design implements; holding SEL
// while idle and the approx_en switch are this design's own choices.
module swing_ctrl
  import approx_noc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       approx_en,   // 0: baseline NoC, all links at full swing
  input  logic       load,        // a flit is loaded into the output register
  input  flit_type_e ftype,       // type of that flit
  input  logic       head_approx, // APPROX flag of that flit's header (if a header)
  output logic       sel          // 1: full swing, 0: low swing (registered)
);

  logic pkt_approx;  // the packet in progress is marked approximate

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel        <= 1'b1;
      pkt_approx <= 1'b0;
    end else if (load) begin
      if (is_head(ftype)) begin
        sel        <= 1'b1;
        pkt_approx <= head_approx;
      end else begin
        sel        <= !(approx_en && pkt_approx);
      end
    end
  end

  // A header always leaves at full swing.
  assert property (@(posedge clk) disable iff (!rst_n) load && is_head(ftype) |=> sel);

endmodule
