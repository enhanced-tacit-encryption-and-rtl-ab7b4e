// flit_fifo: synchronous first-in first-out buffer of flits (router input
// buffer). DEPTH entries, first-word fall-through: `head` shows the oldest
// entry whenever `valid` is high. `ready` (not full) is a registered signal,
// so it can be used as back-pressure towards the upstream router without a
// combinational path. push and pop may happen in the same cycle.
module flit_fifo
  import etacit_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  flit_t din,
  output logic  ready,
  input  logic  pop,
  output logic  valid,
  output flit_t head
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t       mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   count;
  logic          do_push, do_pop;

  assign do_push = push && (count != (PW+1)'(DEPTH));
  assign do_pop  = pop && (count != '0);
  assign ready   = (count != (PW+1)'(DEPTH));
  assign valid   = (count != '0);
  assign head    = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

endmodule
