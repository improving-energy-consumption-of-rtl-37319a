// swing_link: behavioural model of a reconfigurable-voltage-swing NoC link.
//
// Behavioural model: one swing_bitline per payload bit, all sharing the SEL
// line of the link, so a whole flit travels either at full swing (sel = 1) or at
// low swing (sel = 0). The flit type and valid/ready flow-control wires are not
// part of this model: they are control information and in this design always
// travel on nominal-swing wires, as the header flit does.
//
// Ports: tx (payload from the driving router's output register), sel, rx
// (payload seen by the receiving input buffer). No delay, no clock.
module swing_link #(
  parameter int unsigned W        = 32,
  parameter real         BER_HIGH = 1.3e-17,
  parameter real         BER_LOW  = 3.8e-6
) (
  input  logic [W-1:0] tx,
  input  logic         sel,
  output logic [W-1:0] rx
);

  // Per-bit model counters, gathered for energy and error accounting.
  longint unsigned hs_vec [W];
  longint unsigned ls_vec [W];
  longint unsigned err_vec[W];

  for (genvar b = 0; b < W; b++) begin : g_bit
    swing_bitline #(.BER_HIGH(BER_HIGH), .BER_LOW(BER_LOW)) u_bl (
      .in (tx[b]),
      .sel(sel),
      .out(rx[b])
    );
    assign hs_vec[b]  = u_bl.hs_toggles;
    assign ls_vec[b]  = u_bl.ls_toggles;
    assign err_vec[b] = u_bl.errors;
  end

  // Totals over the link: full-swing transitions, low-swing transitions, errors.
  function automatic longint unsigned hs_total();
    longint unsigned s = 0;
    for (int i = 0; i < int'(W); i++) s += hs_vec[i];
    return s;
  endfunction

  function automatic longint unsigned ls_total();
    longint unsigned s = 0;
    for (int i = 0; i < int'(W); i++) s += ls_vec[i];
    return s;
  endfunction

  function automatic longint unsigned err_total();
    longint unsigned s = 0;
    for (int i = 0; i < int'(W); i++) s += err_vec[i];
    return s;
  endfunction

endmodule
