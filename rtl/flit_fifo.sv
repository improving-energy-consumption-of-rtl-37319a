// flit_fifo: synchronous first-in first-out buffer for flits (router input buffer).
//
// DEPTH entries held in a register array with read and write pointers and an
// occupancy counter. Push when push_valid && push_ready; pop when pop_valid &&
// pop_ready. push_ready = not full and pop_valid = not empty, both from registers
// only, so ready never depends on the sender's valid in the same cycle. A flit
// pushed in cycle t can be popped in cycle t+1. The buffer depth is this design's
// choice; the routers of the scheme are not described at this level.
module flit_fifo
  import approx_noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push_valid,
  output logic  push_ready,
  input  flit_t push_flit,
  output logic  pop_valid,
  input  logic  pop_ready,
  output flit_t pop_flit
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t             mem [DEPTH];
  logic [PW-1:0]     wr_ptr, rd_ptr;
  logic [PW:0]       count;
  logic              do_push, do_pop;

  assign push_ready = (count != (PW+1)'(DEPTH));
  assign pop_valid  = (count != '0);
  assign pop_flit   = mem[rd_ptr];
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_flit;
  end

endmodule
