// tb_noc_mesh: end-to-end test of the 4x4 mesh at its default parameters
// (4 virtual channels per physical channel, 4-flit buffers).
//
// Every node runs a tb_traffic_node: random packets of 32 flits with uniform
// random destinations, generated per node at a fixed rate. Three phases:
// light load (0.010 packets per node per cycle), heavy load (0.030, beyond
// saturation, so headers wait for virtual channels and buffers fill), then no
// new packets until the network drains. Checked: every generated packet is
// delivered exactly once to its destination, complete and in order (the sink
// checks each flit); no assertion fires; and each mechanism of the switching
// element happened at least once somewhere in the mesh: a header waiting for
// a free virtual channel, a flit waiting for a credit, two flits contending
// for one output, and packets time-multiplexed on one physical channel. The
// average packet delivery time (generation to arrival of the tail flit) at
// light load must lie between one and three packet lengths and below the
// heavy-load one.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int MESH_X = 4, MESH_Y = 4, NN = 16;
  localparam int NUM_VC = 4, BUF_DEPTH = 4, PKT_LEN = 32;
  localparam int PHASE = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  int   cycle = 0;
  int   rate_ppm = 0;
  logic measure = 1'b0;

  logic               inj_valid    [NN];
  flit_t              inj_flit     [NN];
  logic               inj_credit   [NN];
  logic [VC_ID_W-1:0] inj_credit_vc[NN];
  logic               ej_valid     [NN];
  flit_t              ej_flit      [NN];
  logic               ej_credit    [NN];
  logic [VC_ID_W-1:0] ej_credit_vc [NN];

  int     generated [NN], delivered [NN], errors [NN], lat_count [NN], interleaved [NN];
  longint lat_sum [NN];

  noc_mesh dut (
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

  logic vc_wait [NN], credit_wait [NN], conflict [NN];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;
      tb_traffic_node #(
        .MESH_X(MESH_X), .MESH_Y(MESH_Y),
        .NUM_VC(NUM_VC), .BUF_DEPTH(BUF_DEPTH), .PKT_LEN(PKT_LEN)
      ) u_node (
        .clk           (clk),
        .rst_n         (rst_n),
        .node          (N),
        .rate_ppm      (rate_ppm),
        .measure       (measure),
        .cycle         (cycle),
        .inj_valid     (inj_valid[N]),
        .inj_flit      (inj_flit[N]),
        .inj_credit    (inj_credit[N]),
        .inj_credit_vc (inj_credit_vc[N]),
        .ej_valid      (ej_valid[N]),
        .ej_flit       (ej_flit[N]),
        .ej_credit     (ej_credit[N]),
        .ej_credit_vc  (ej_credit_vc[N]),
        .generated     (generated[N]),
        .delivered     (delivered[N]),
        .errors        (errors[N]),
        .lat_sum       (lat_sum[N]),
        .lat_count     (lat_count[N]),
        .interleaved   (interleaved[N])
      );
      assign vc_wait[N]     = dut.g_y[y].g_x[x].u_router.evt_vc_wait;
      assign credit_wait[N] = dut.g_y[y].g_x[x].u_router.evt_credit_wait;
      assign conflict[N]    = dut.g_y[y].g_x[x].u_router.evt_sw_conflict;
    end
  end

  always #5 clk = ~clk;

  int n_vc_wait = 0, n_credit_wait = 0, n_conflict = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      for (int n = 0; n < NN; n++) begin
        if (vc_wait[n])     n_vc_wait++;
        if (credit_wait[n]) n_credit_wait++;
        if (conflict[n])    n_conflict++;
      end
    end
  end

  int checks = 0, failures = 0;
  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int total(int a [NN]);
    int s;
    s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  function automatic real avg_latency();
    longint s;
    int c;
    s = 0;
    c = 0;
    for (int n = 0; n < NN; n++) begin
      s += lat_sum[n];
      c += lat_count[n];
    end
    return (c == 0) ? 0.0 : real'(s) / real'(c);
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real light, heavy;
    longint light_sum;
    int light_cnt;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // light load
    rate_ppm = 10000;
    measure = 1'b1;
    repeat (PHASE) @(posedge clk);
    rate_ppm = 0;
    repeat (3000) @(posedge clk);
    light = avg_latency();
    check(total(delivered) == total(generated), "light load fully delivered");
    light_sum = 0;
    light_cnt = 0;
    for (int n = 0; n < NN; n++) begin
      light_sum += lat_sum[n];
      light_cnt += lat_count[n];
    end
    $display("light load: %0d packets, average delivery time %0.1f cycles",
             total(delivered), light);

    // heavy load
    rate_ppm = 30000;
    repeat (PHASE) @(posedge clk);
    rate_ppm = 0;
    begin
      int n;
      n = 0;
      while (total(delivered) != total(generated) && n < 60000) begin
        @(posedge clk);
        n++;
      end
    end
    repeat (100) @(posedge clk);
    begin
      longint s;
      int c;
      s = -light_sum;
      c = -light_cnt;
      for (int n = 0; n < NN; n++) begin
        s += lat_sum[n];
        c += lat_count[n];
      end
      heavy = real'(s) / real'(c);
    end
    $display("heavy load: %0d packets in both phases, average delivery time %0.1f cycles",
             total(delivered), heavy);

    check(total(delivered) == total(generated), "every packet delivered");
    check(total(errors) == 0, "sinks saw no misrouted, mixed or broken packet");
    check(light > real'(PKT_LEN), "light-load delivery time above packet length");
    check(light < real'(3 * PKT_LEN), "light-load delivery time below three packet lengths");
    check(heavy > light, "heavy load slower than light load");
    check(n_vc_wait > 0, "header waited for a free virtual channel");
    check(n_credit_wait > 0, "flit waited for a credit");
    check(n_conflict > 0, "flits contended for an output");
    check(total(interleaved) > 0, "packets interleaved on a physical channel");
    $display("events (router-cycles): vc_wait %0d credit_wait %0d conflict %0d; interleavings %0d",
             n_vc_wait, n_credit_wait, n_conflict, total(interleaved));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
