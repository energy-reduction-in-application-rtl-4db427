// vc_buffer: flit buffer of one virtual channel (the "input buffer" of a
// switching element).
//
// A first-in first-out queue of DEPTH flits held in a register array with a
// read and a write pointer. push writes in_flit at the tail; pop removes the
// flit shown on front_flit. Both may happen in the same cycle. The queue never
// overflows in the network because the upstream switch only sends a flit
// against a credit, one credit per free slot; an assertion checks that.
// front_flit is valid whenever empty is low (first-word fall-through), so the
// routing and allocation logic can look at the header flit without a read
// delay. The depth is a parameter; its default of 4 flits is this design's
// choice.
module vc_buffer
  import noc_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  flit_t in_flit,
  input  logic  pop,
  output flit_t front_flit,
  output logic  empty,
  output logic  full
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t           mem_q [DEPTH];
  logic [AW-1:0]   rd_ptr_q, wr_ptr_q;
  logic [AW:0]     count_q;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + AW'(1);
  endfunction

  assign empty      = (count_q == '0);
  assign full       = (int'(count_q) == DEPTH);
  assign front_flit = mem_q[rd_ptr_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr_q <= '0;
      wr_ptr_q <= '0;
      count_q  <= '0;
    end else begin
      if (push) wr_ptr_q <= next_ptr(wr_ptr_q);
      if (pop)  rd_ptr_q <= next_ptr(rd_ptr_q);
      if (push && !pop) count_q <= count_q + 1'b1;
      else if (pop && !push) count_q <= count_q - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem_q[wr_ptr_q] <= in_flit;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("vc_buffer: flit written into a full buffer");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("vc_buffer: read from an empty buffer");

endmodule
