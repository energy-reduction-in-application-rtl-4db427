// switch_allocator: shares each physical channel among its virtual channels,
// one flit per physical channel per cycle.
//
// Two round-robin stages (a separable, input-first allocator). First every
// input port picks one of its virtual channels that holds a flit, owns an
// output virtual channel and has a credit for it. Then every output port picks
// one of the input ports whose chosen virtual channel is routed to it. The
// winning input virtual channel sends one flit through the crossbar this
// cycle. Arbiter pointers advance only for a grant that is used, so
// virtual channels that share a physical channel take turns flit by flit.
//
// Timing: combinational from req to grant; pointer state changes on the
// clock edge. in_grant is one-hot per input port, out_sel gives for each
// output port the input port it listens to when out_valid is high. The
// time-multiplexing follows the switch description; the two-stage round-robin
// structure is this design's choice.
module switch_allocator
  import noc_pkg::*;
#(
  parameter int NUM_VC = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_VC-1:0] req      [NUM_PORTS],
  input  port_e             req_port [NUM_PORTS][NUM_VC],
  output logic [NUM_VC-1:0] in_grant [NUM_PORTS],
  output logic [PORT_W-1:0] out_sel  [NUM_PORTS],
  output logic              out_valid[NUM_PORTS]
);
  logic [NUM_VC-1:0]    s1_gnt  [NUM_PORTS];
  logic                 s1_any  [NUM_PORTS];
  port_e                s1_port [NUM_PORTS];
  logic [NUM_PORTS-1:0] s2_req  [NUM_PORTS];
  logic [NUM_PORTS-1:0] s2_gnt  [NUM_PORTS];
  logic                 s2_any  [NUM_PORTS];
  logic                 in_won  [NUM_PORTS];

  // stage 1: one virtual channel per input port
  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    rr_arbiter #(.N(NUM_VC)) u_arb (
      .clk       (clk),
      .rst_n     (rst_n),
      .req       (req[p]),
      .advance   (in_won[p]),
      .grant     (s1_gnt[p]),
      .any_grant (s1_any[p])
    );
  end

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      s1_port[p] = PORT_LOCAL;
      for (int v = 0; v < NUM_VC; v++) begin
        if (s1_gnt[p][v]) s1_port[p] = req_port[p][v];
      end
    end
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        s2_req[o][p] = s1_any[p] && (int'(s1_port[p]) == o);
      end
    end
  end

  // stage 2: one input port per output port
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .clk       (clk),
      .rst_n     (rst_n),
      .req       (s2_req[o]),
      .advance   (1'b1),
      .grant     (s2_gnt[o]),
      .any_grant (s2_any[o])
    );
  end

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) in_won[p] = 1'b0;
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_valid[o] = s2_any[o];
      out_sel[o]   = '0;
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (s2_gnt[o][p]) begin
          out_sel[o] = PORT_W'(p);
          in_won[p]  = 1'b1;
        end
      end
    end
    for (int p = 0; p < NUM_PORTS; p++) begin
      in_grant[p] = in_won[p] ? s1_gnt[p] : '0;
    end
  end

endmodule
