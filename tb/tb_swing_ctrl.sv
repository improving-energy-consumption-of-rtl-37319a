// tb_swing_ctrl: self-checking testbench for swing_ctrl.
//
// Sends 400 random packets (random length, APPROX flag and approx_en, random
// idle gaps) through the controller and checks SEL one cycle after every load
// against the rule: header at full swing; body and tail at low swing only when
// the packet is approximate and approx_en = 1; SEL held while idle.
module tb_swing_ctrl;
  import approx_noc_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       approx_en = 1'b0;
  logic       load = 1'b0;
  flit_type_e ftype = FLIT_SINGLE;
  logic       head_approx = 1'b0;
  logic       sel;

  int checks = 0, failures = 0;
  int n_low = 0, n_full_body = 0;

  swing_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(flit_type_e t, logic ha, logic exp_sel);
    @(negedge clk);
    load = 1'b1; ftype = t; head_approx = ha;
    @(negedge clk);
    load = 1'b0;
    checks++;
    if (sel !== exp_sel) begin
      failures++;
      $display("ERROR type=%0d en=%0b ha=%0b sel=%0b expected %0b", t, approx_en, ha, sel, exp_sel);
    end
    if (!exp_sel) n_low++;
    else if (!is_head(t)) n_full_body++;
    // idle cycles keep SEL
    repeat ($urandom_range(0, 2)) begin
      @(negedge clk);
      checks++;
      if (sel !== exp_sel) begin
        failures++;
        $display("ERROR SEL changed while idle");
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (sel !== 1'b1) begin failures++; $display("ERROR SEL not full swing after reset"); end
    for (int p = 0; p < 400; p++) begin
      logic a;
      int   nb;
      a  = 1'($urandom);
      nb = $urandom_range(0, 4);
      approx_en = 1'($urandom_range(0, 3) != 0);
      if (nb == 0 && $urandom_range(0, 1) == 0) begin
        send(FLIT_SINGLE, a, 1'b1);
      end else begin
        send(FLIT_HEAD, a, 1'b1);
        for (int b = 0; b < nb; b++) send(FLIT_BODY, 1'($urandom), !(approx_en && a));
        send(FLIT_TAIL, 1'($urandom), !(approx_en && a));
      end
    end
    checks++;
    if (n_low == 0 || n_full_body == 0) begin
      failures++;
      $display("ERROR coverage: low-swing flits %0d, full-swing body flits %0d", n_low, n_full_body);
    end
    $display("low-swing flits %0d, full-swing body flits %0d", n_low, n_full_body);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
