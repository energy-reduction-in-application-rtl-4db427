// noc_mesh: MESH_X x MESH_Y mesh network-on-chip (default 4x4).
//
// One noc_router per node. Node (x, y) has index y*MESH_X + x; its east
// output feeds the west input of (x+1, y) and its north output feeds the
// south input of (x, y+1), with the credits of each link running the other
// way. Links that would leave the mesh are tied off: nothing arrives on them
// and XY routing never selects them for a destination inside the mesh.
//
// The local physical channel of every node is brought out as ports, where the
// node's processing element (not part of this RTL) injects and receives
// packets with the same flit/credit protocol as the links:
//   inj_*  processor to network: inj_valid_i/inj_flit_i, credits back on
//          inj_credit_o/inj_credit_vc_o (one per flit that left the local
//          input buffer of that virtual channel, BUF_DEPTH credits per virtual
//          channel after reset);
//   ej_*   network to processor: ej_valid_o/ej_flit_o, and the processor
//          returns a credit on ej_credit_i/ej_credit_vc_i for each flit it
//          takes out of its own receive buffer (BUF_DEPTH flits per virtual
//          channel assumed).
//
// The 4x4 mesh, 5 physical channels per node and NUM_VC virtual channels per
// physical channel follow the network described; NUM_VC = 4 is the
// configuration used for the medium-traffic region (2 and 6 are the other
// choices). Coordinates start at 0 here.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int MESH_X    = 4,
  parameter int MESH_Y    = 4,
  parameter int NUM_VC    = 4,
  parameter int BUF_DEPTH = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               inj_valid_i    [MESH_X*MESH_Y],
  input  flit_t              inj_flit_i     [MESH_X*MESH_Y],
  output logic               inj_credit_o   [MESH_X*MESH_Y],
  output logic [VC_ID_W-1:0] inj_credit_vc_o[MESH_X*MESH_Y],
  output logic               ej_valid_o     [MESH_X*MESH_Y],
  output flit_t              ej_flit_o      [MESH_X*MESH_Y],
  input  logic               ej_credit_i    [MESH_X*MESH_Y],
  input  logic [VC_ID_W-1:0] ej_credit_vc_i [MESH_X*MESH_Y]
);
  localparam int NN = MESH_X * MESH_Y;

  logic               rx_valid    [NN][NUM_PORTS];
  flit_t              rx_flit     [NN][NUM_PORTS];
  logic               rx_credit   [NN][NUM_PORTS];
  logic [VC_ID_W-1:0] rx_credit_vc[NN][NUM_PORTS];
  logic               tx_valid    [NN][NUM_PORTS];
  flit_t              tx_flit     [NN][NUM_PORTS];
  logic               tx_credit   [NN][NUM_PORTS];
  logic [VC_ID_W-1:0] tx_credit_vc[NN][NUM_PORTS];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;

      noc_router #(
        .NUM_VC    (NUM_VC),
        .BUF_DEPTH (BUF_DEPTH),
        .X_POS     (x),
        .Y_POS     (y)
      ) u_router (
        .clk            (clk),
        .rst_n          (rst_n),
        .rx_valid_i     (rx_valid[N]),
        .rx_flit_i      (rx_flit[N]),
        .rx_credit_o    (rx_credit[N]),
        .rx_credit_vc_o (rx_credit_vc[N]),
        .tx_valid_o     (tx_valid[N]),
        .tx_flit_o      (tx_flit[N]),
        .tx_credit_i    (tx_credit[N]),
        .tx_credit_vc_i (tx_credit_vc[N])
      );

      // local physical channel
      assign rx_valid[N][PORT_LOCAL]     = inj_valid_i[N];
      assign rx_flit[N][PORT_LOCAL]      = inj_flit_i[N];
      assign inj_credit_o[N]             = rx_credit[N][PORT_LOCAL];
      assign inj_credit_vc_o[N]          = rx_credit_vc[N][PORT_LOCAL];
      assign ej_valid_o[N]               = tx_valid[N][PORT_LOCAL];
      assign ej_flit_o[N]                = tx_flit[N][PORT_LOCAL];
      assign tx_credit[N][PORT_LOCAL]    = ej_credit_i[N];
      assign tx_credit_vc[N][PORT_LOCAL] = ej_credit_vc_i[N];

      // north input / output: neighbour (x, y+1), its south port
      if (y + 1 < MESH_Y) begin : g_n
        localparam int M = (y + 1) * MESH_X + x;
        assign rx_valid[N][PORT_NORTH]     = tx_valid[M][PORT_SOUTH];
        assign rx_flit[N][PORT_NORTH]      = tx_flit[M][PORT_SOUTH];
        assign tx_credit[N][PORT_NORTH]    = rx_credit[M][PORT_SOUTH];
        assign tx_credit_vc[N][PORT_NORTH] = rx_credit_vc[M][PORT_SOUTH];
      end else begin : g_n_edge
        assign rx_valid[N][PORT_NORTH]     = 1'b0;
        assign rx_flit[N][PORT_NORTH]      = '0;
        assign tx_credit[N][PORT_NORTH]    = 1'b0;
        assign tx_credit_vc[N][PORT_NORTH] = '0;
      end

      // south: neighbour (x, y-1), its north port
      if (y > 0) begin : g_s
        localparam int M = (y - 1) * MESH_X + x;
        assign rx_valid[N][PORT_SOUTH]     = tx_valid[M][PORT_NORTH];
        assign rx_flit[N][PORT_SOUTH]      = tx_flit[M][PORT_NORTH];
        assign tx_credit[N][PORT_SOUTH]    = rx_credit[M][PORT_NORTH];
        assign tx_credit_vc[N][PORT_SOUTH] = rx_credit_vc[M][PORT_NORTH];
      end else begin : g_s_edge
        assign rx_valid[N][PORT_SOUTH]     = 1'b0;
        assign rx_flit[N][PORT_SOUTH]      = '0;
        assign tx_credit[N][PORT_SOUTH]    = 1'b0;
        assign tx_credit_vc[N][PORT_SOUTH] = '0;
      end

      // east: neighbour (x+1, y), its west port
      if (x + 1 < MESH_X) begin : g_e
        localparam int M = y * MESH_X + x + 1;
        assign rx_valid[N][PORT_EAST]     = tx_valid[M][PORT_WEST];
        assign rx_flit[N][PORT_EAST]      = tx_flit[M][PORT_WEST];
        assign tx_credit[N][PORT_EAST]    = rx_credit[M][PORT_WEST];
        assign tx_credit_vc[N][PORT_EAST] = rx_credit_vc[M][PORT_WEST];
      end else begin : g_e_edge
        assign rx_valid[N][PORT_EAST]     = 1'b0;
        assign rx_flit[N][PORT_EAST]      = '0;
        assign tx_credit[N][PORT_EAST]    = 1'b0;
        assign tx_credit_vc[N][PORT_EAST] = '0;
      end

      // west: neighbour (x-1, y), its east port
      if (x > 0) begin : g_w
        localparam int M = y * MESH_X + x - 1;
        assign rx_valid[N][PORT_WEST]     = tx_valid[M][PORT_EAST];
        assign rx_flit[N][PORT_WEST]      = tx_flit[M][PORT_EAST];
        assign tx_credit[N][PORT_WEST]    = rx_credit[M][PORT_EAST];
        assign tx_credit_vc[N][PORT_WEST] = rx_credit_vc[M][PORT_EAST];
      end else begin : g_w_edge
        assign rx_valid[N][PORT_WEST]     = 1'b0;
        assign rx_flit[N][PORT_WEST]      = '0;
        assign tx_credit[N][PORT_WEST]    = 1'b0;
        assign tx_credit_vc[N][PORT_WEST] = '0;
      end
    end
  end

endmodule
