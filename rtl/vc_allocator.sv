// vc_allocator: virtual-channel allocation for one switching element.
//
// A header flit at the front of an input virtual channel asks for a virtual
// channel on the output physical channel its route selects. The allocator
// keeps a busy bit for every output virtual channel. For each output port a
// round-robin arbiter picks one of the requesting input virtual channels, as
// long as that port has a free virtual channel, and gives it the lowest-numbered
// free one. A header that finds no free virtual channel simply keeps asking:
// it waits until a virtual channel of the selected output becomes free.
// release marks an output virtual channel free again once the tail flit of
// the packet holding it has left the switch.
//
// Timing: request to grant is combinational; the busy bit is set on the clock
// edge that accepts the grant. At most one grant per output port per cycle.
// Input virtual channel i is port i / NUM_VC, channel i % NUM_VC. Waiting for
// a free virtual channel follows the switch description; the arbitration
// policy and the lowest-free choice are this design's own.
module vc_allocator
  import noc_pkg::*;
#(
  parameter int NUM_VC = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NUM_PORTS*NUM_VC-1:0] req,
  input  port_e                       req_port [NUM_PORTS*NUM_VC],
  input  logic [NUM_VC-1:0]           release_vc [NUM_PORTS],
  output logic [NUM_PORTS*NUM_VC-1:0] grant,
  output logic [VC_ID_W-1:0]          grant_vc [NUM_PORTS*NUM_VC],
  output logic [NUM_VC-1:0]           vc_busy [NUM_PORTS]
);
  localparam int NI = NUM_PORTS * NUM_VC;

  logic [NUM_VC-1:0]  busy_q   [NUM_PORTS];
  logic [NI-1:0]      port_req [NUM_PORTS];
  logic [NI-1:0]      port_gnt [NUM_PORTS];
  logic               port_any [NUM_PORTS];
  logic               has_free [NUM_PORTS];
  logic [VC_ID_W-1:0] free_vc  [NUM_PORTS];

  // lowest free output virtual channel of every port
  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      has_free[o] = 1'b0;
      free_vc[o]  = '0;
      for (int v = NUM_VC - 1; v >= 0; v--) begin
        if (!busy_q[o][v]) begin
          has_free[o] = 1'b1;
          free_vc[o]  = VC_ID_W'(v);
        end
      end
      for (int i = 0; i < NI; i++) begin
        port_req[o][i] = req[i] && (int'(req_port[i]) == o) && has_free[o];
      end
    end
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_arb
    rr_arbiter #(.N(NI)) u_arb (
      .clk       (clk),
      .rst_n     (rst_n),
      .req       (port_req[o]),
      .advance   (1'b1),
      .grant     (port_gnt[o]),
      .any_grant (port_any[o])
    );
  end

  always_comb begin
    grant = '0;
    for (int i = 0; i < NI; i++) grant_vc[i] = '0;
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int i = 0; i < NI; i++) begin
        if (port_gnt[o][i]) begin
          grant[i]    = 1'b1;
          grant_vc[i] = free_vc[o];
        end
      end
    end
  end

  logic [NUM_VC-1:0] set_vc [NUM_PORTS];

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      set_vc[o] = '0;
      for (int v = 0; v < NUM_VC; v++) begin
        if (port_any[o] && (int'(free_vc[o]) == v)) set_vc[o][v] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NUM_PORTS; o++) busy_q[o] <= '0;
    end else begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        busy_q[o] <= (busy_q[o] & ~release_vc[o]) | set_vc[o];
      end
    end
  end

  assign vc_busy = busy_q;

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) (release_vc[o] & ~busy_q[o]) == '0)
      else $error("vc_allocator: release of a free virtual channel");
  end

endmodule
