// rr_arbiter: round-robin arbiter used by the virtual-channel and switch
// allocators.
//
// Among the asserted bits of req it grants the first one at or after the
// priority pointer (one-hot grant, combinational). When advance is high and a
// grant is given, the pointer moves to the position after the winner on the
// next clock edge, so the winner has the lowest priority next time. Reset puts
// the pointer at requester 0. The fairness policy is this design's choice.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant,
  output logic         any_grant
);
  localparam int IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr_q;
  logic [IW-1:0] win_idx;
  logic [IW:0]   idx;

  always_comb begin
    grant     = '0;
    win_idx   = '0;
    any_grant = 1'b0;
    idx       = '0;
    for (int k = 0; k < N; k++) begin
      idx = {1'b0, ptr_q} + (IW + 1)'(k);
      if (int'(idx) >= N) idx = idx - (IW + 1)'(N);
      if (!any_grant && req[idx[IW-1:0]]) begin
        any_grant           = 1'b1;
        grant[idx[IW-1:0]]  = 1'b1;
        win_idx             = idx[IW-1:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr_q <= '0;
    end else if (advance && any_grant) begin
      ptr_q <= (int'(win_idx) == N - 1) ? '0 : win_idx + IW'(1);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);

endmodule
