// swing_bitline: behavioural model of one reconfigurable-voltage-swing bit-line.
//
// This is a behavioural model (not synthesizable logic): the real part is a
// full-custom analog circuit. Its structure is: a demultiplexer steered by SEL
// feeds either a high-swing tapered driver (VDDH) or a low-swing driver whose
// output stage runs at VDDL; each driver reaches the transmission line through a
// transmission-gate tristate buffer, enabled by SEL and by SEL-bar respectively, so
// the unused path is disconnected; a level-restorer receiver at the far end
// brings the signal back to full swing. SEL = 1 selects the full-swing path.
//
// What is modelled: the logic function (OUT follows IN), the bit-error rate of
// each mode, and the energy of each transition of the line. On every change of
// IN or SEL the model draws a random number; in low-swing mode OUT is IN with its
// value inverted with probability BER_LOW, in full-swing mode with probability
// BER_HIGH. Defaults are the characterised values of a 2.8 mm Metal-7 line in a
// 45 nm process: BER 1.3e-17 at VDDH = 1.1 V and 3.8e-6 at VDDL = 0.6 V, average
// energy per transition 527 fJ (full swing) and 152 fJ (low swing), 512 fJ for a
// conventional single-swing line. The line's worst-case delay (410 ps) is below
// one 2 GHz clock period, so the model has no delay: the receiving register
// samples OUT at the next clock edge.
//
// Ports: in, sel (1 = full swing), out. The counters hs_toggles / ls_toggles /
// errors are model state for energy and error accounting by a testbench.
module swing_bitline #(
  parameter real BER_HIGH = 1.3e-17,
  parameter real BER_LOW  = 3.8e-6
) (
  input  logic in,
  input  logic sel,
  output logic out
);

  longint unsigned hs_toggles;  // transitions driven on the full-swing path
  longint unsigned ls_toggles;  // transitions driven on the low-swing path
  longint unsigned errors;      // events whose received value was wrong
  logic            in_prev;

  function automatic logic draw(real p);
    real u;
    u = real'($urandom) / 4294967296.0;
    return u < p;
  endfunction

  initial begin
    hs_toggles = 0;
    ls_toggles = 0;
    errors     = 0;
    in_prev    = 1'b0;
    out        = 1'b0;
  end

  always @(in or sel) begin
    logic flip;
    flip = sel ? draw(BER_HIGH) : draw(BER_LOW);
    if (in != in_prev) begin
      if (sel) hs_toggles = hs_toggles + 1;
      else     ls_toggles = ls_toggles + 1;
    end
    in_prev = in;
    if (flip) errors = errors + 1;
    out = in ^ flip;
  end

endmodule
