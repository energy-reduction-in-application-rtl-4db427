// crossbar: 5x5 crossbar switch of a switching element.
//
// Every output port has a multiplexer that connects the flit of the input
// port named by sel[o] to it; out_valid[o] follows en[o]. The switch
// allocator guarantees that an input feeds at most one output. The virtual
// channel field of the flit is replaced by out_vc[o], the virtual channel the
// packet holds on the outgoing link. Purely combinational.
// The crossbar that connects a flit's incoming channel to the output the
// router selected follows the switch description; doing the virtual-channel
// rewrite here is this design's choice.
module crossbar
  import noc_pkg::*;
(
  input  flit_t              in_flit  [NUM_PORTS],
  input  logic [PORT_W-1:0]  sel      [NUM_PORTS],
  input  logic               en       [NUM_PORTS],
  input  logic [VC_ID_W-1:0] out_vc   [NUM_PORTS],
  output flit_t              out_flit [NUM_PORTS],
  output logic               out_valid[NUM_PORTS]
);
  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_flit[o]    = in_flit[0];
      for (int p = 1; p < NUM_PORTS; p++) begin
        if (int'(sel[o]) == p) out_flit[o] = in_flit[p];
      end
      out_flit[o].vc = out_vc[o];
      out_valid[o]   = en[o];
    end
  end
endmodule
