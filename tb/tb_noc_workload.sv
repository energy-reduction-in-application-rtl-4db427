// tb_noc_workload: average packet delivery time of the 4x4 mesh against the
// packet generation rate, one rate from each traffic region (light 0.010,
// medium 0.017, heavy 0.020 packets per node per cycle).
//
// The mesh runs with NUM_VC virtual channels per physical channel (4, the
// design's default); set NUM_VC to 2 or 6 below to compare configurations.
//
// Workload: every node generates 32-flit packets at a fixed rate (random
// arrivals) to uniformly random destinations. For each rate, packets keep
// being generated until 21000 have been generated in the network; statistics
// start once 1000 packets have been delivered, and the network is then
// drained, so at least 20000 packets are counted. The delivery time of a
// packet runs from its generation to the arrival of its tail flit.
//
// Checked: every packet is delivered intact; at least 20000 packets are
// measured per rate; the delivery time grows with the rate; at the medium
// rate (0.017) it stays below 310 cycles, the maximum acceptable delivery
// time of the example application against which the supply voltage is
// chosen. The results are printed.
module tb_noc_workload;
  localparam int NCFG = 1;
  localparam int NRATE = 3;
  localparam int RATES [NRATE] = '{10000, 17000, 20000};  // ppm, one rate per traffic region
  localparam int VCS   [NCFG]  = '{4};
  localparam int LIMIT [NRATE] = '{0, 310, 0};  // cycles, 0: no limit

  logic clk = 1'b0, rst_n = 1'b0;
  int   cycle = 0;
  int   rate_ppm = 0;
  logic measure = 1'b0;

  int     generated [NCFG], delivered [NCFG], errors [NCFG], lat_count [NCFG];
  longint lat_sum [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    tb_mesh_harness #(.NUM_VC(VCS[c])) u_h (
      .clk       (clk),
      .rst_n     (rst_n),
      .rate_ppm  (rate_ppm),
      .measure   (measure),
      .cycle     (cycle),
      .generated (generated[c]),
      .delivered (delivered[c]),
      .errors    (errors[c]),
      .lat_sum   (lat_sum[c]),
      .lat_count (lat_count[c])
    );
  end

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  int checks = 0, failures = 0;
  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real result [NRATE][NCFG];

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NRATE; r++) begin
      int     gen0 [NCFG], del0 [NCFG], cnt0 [NCFG];
      longint sum0 [NCFG];
      logic   done;
      for (int c = 0; c < NCFG; c++) begin
        gen0[c] = generated[c];
        del0[c] = delivered[c];
        sum0[c] = lat_sum[c];
        cnt0[c] = lat_count[c];
      end
      rate_ppm = RATES[r];
      // warm-up: the first 1000 packets of the slowest configuration
      while (delivered[0] - del0[0] < 1000) @(posedge clk);
      measure = 1'b1;
      done = 1'b0;
      while (!done) begin
        @(posedge clk);
        // stop generating in each configuration's mesh at the same moment,
        // once the first one has generated 21000 packets
        done = (generated[0] - gen0[0] >= 21000);
      end
      rate_ppm = 0;
      done = 1'b0;
      while (!done) begin
        @(posedge clk);
        done = 1'b1;
        for (int c = 0; c < NCFG; c++) if (delivered[c] != generated[c]) done = 1'b0;
      end
      measure = 1'b0;
      @(posedge clk);
      for (int c = 0; c < NCFG; c++) begin
        result[r][c] = real'(lat_sum[c] - sum0[c]) / real'(lat_count[c] - cnt0[c]);
        check(lat_count[c] - cnt0[c] >= 19000, "enough packets measured");
      end
      $display("rate %0.3f packets/node/cycle, %0d VCs: average delivery time %0.1f cycles over %0d packets",
               real'(RATES[r]) / 1.0e6, VCS[0], result[r][0], lat_count[0] - cnt0[0]);
      if (LIMIT[r] > 0) check(result[r][0] < real'(LIMIT[r]), "delivery time below the acceptable maximum");
    end

    for (int c = 0; c < NCFG; c++) begin
      check(errors[c] == 0, "no misrouted or broken packet");
      check(delivered[c] == generated[c], "every packet delivered");
      for (int r = 1; r < NRATE; r++)
        check(result[r][c] >= result[r-1][c] * 0.97, "delivery time grows with the rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
