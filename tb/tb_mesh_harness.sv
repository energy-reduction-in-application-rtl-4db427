// tb_mesh_harness: a noc_mesh with a tb_traffic_node on every local port and
// the nodes' statistics summed, for the workload testbenches.
module tb_mesh_harness
  import noc_pkg::*;
#(
  parameter int MESH_X    = 4,
  parameter int MESH_Y    = 4,
  parameter int NUM_VC    = 4,
  parameter int BUF_DEPTH = 4,
  parameter int PKT_LEN   = 32
) (
  input  logic   clk,
  input  logic   rst_n,
  input  int     rate_ppm,
  input  logic   measure,
  input  int     cycle,
  output int     generated,
  output int     delivered,
  output int     errors,
  output longint lat_sum,
  output int     lat_count
);
  localparam int NN = MESH_X * MESH_Y;

  logic               inj_valid    [NN];
  flit_t              inj_flit     [NN];
  logic               inj_credit   [NN];
  logic [VC_ID_W-1:0] inj_credit_vc[NN];
  logic               ej_valid     [NN];
  flit_t              ej_flit      [NN];
  logic               ej_credit    [NN];
  logic [VC_ID_W-1:0] ej_credit_vc [NN];

  int     n_gen [NN], n_del [NN], n_err [NN], n_lat [NN], n_int [NN];
  longint n_sum [NN];

  noc_mesh #(
    .MESH_X(MESH_X), .MESH_Y(MESH_Y), .NUM_VC(NUM_VC), .BUF_DEPTH(BUF_DEPTH)
  ) u_mesh (
    .clk             (clk),
    .rst_n           (rst_n),
    .inj_valid_i     (inj_valid),
    .inj_flit_i      (inj_flit),
    .inj_credit_o    (inj_credit),
    .inj_credit_vc_o (inj_credit_vc),
    .ej_valid_o      (ej_valid),
    .ej_flit_o       (ej_flit),
    .ej_credit_i     (ej_credit),
    .ej_credit_vc_i  (ej_credit_vc)
  );

  for (genvar n = 0; n < NN; n++) begin : g_node
    tb_traffic_node #(
      .MESH_X(MESH_X), .MESH_Y(MESH_Y),
      .NUM_VC(NUM_VC), .BUF_DEPTH(BUF_DEPTH), .PKT_LEN(PKT_LEN)
    ) u_node (
      .clk           (clk),
      .rst_n         (rst_n),
      .node          (n),
      .rate_ppm      (rate_ppm),
      .measure       (measure),
      .cycle         (cycle),
      .inj_valid     (inj_valid[n]),
      .inj_flit      (inj_flit[n]),
      .inj_credit    (inj_credit[n]),
      .inj_credit_vc (inj_credit_vc[n]),
      .ej_valid      (ej_valid[n]),
      .ej_flit       (ej_flit[n]),
      .ej_credit     (ej_credit[n]),
      .ej_credit_vc  (ej_credit_vc[n]),
      .generated     (n_gen[n]),
      .delivered     (n_del[n]),
      .errors        (n_err[n]),
      .lat_sum       (n_sum[n]),
      .lat_count     (n_lat[n]),
      .interleaved   (n_int[n])
    );
  end

  always_comb begin
    generated = 0;
    delivered = 0;
    errors    = 0;
    lat_sum   = 0;
    lat_count = 0;
    for (int n = 0; n < NN; n++) begin
      generated += n_gen[n];
      delivered += n_del[n];
      errors    += n_err[n];
      lat_sum   += n_sum[n];
      lat_count += n_lat[n];
    end
  end
endmodule
