// tb_switch_allocator: self-checking test of switch allocation.
//
// Random requests (input port, virtual channel, output port) every cycle.
// Checked: every grant answers a request; at most one virtual channel per
// input port and one input port per output port are granted; out_sel and
// out_valid agree with the granted requests; an output port that some input
// port's only request targets is not left idle. A directed phase puts all
// NUM_VC virtual channels of one input on one output and checks that they are
// served in turn, one flit per cycle (time-multiplexing of the physical
// channel), and that two input ports contending for one output alternate.
module tb_switch_allocator;
  import noc_pkg::*;

  localparam int NUM_VC = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_VC-1:0] req      [NUM_PORTS];
  port_e             req_port [NUM_PORTS][NUM_VC];
  logic [NUM_VC-1:0] in_grant [NUM_PORTS];
  logic [PORT_W-1:0] out_sel  [NUM_PORTS];
  logic              out_valid[NUM_PORTS];

  int checks = 0, failures = 0;

  switch_allocator #(.NUM_VC(NUM_VC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear();
    for (int p = 0; p < NUM_PORTS; p++) begin
      req[p] = '0;
      for (int v = 0; v < NUM_VC; v++) req_port[p][v] = PORT_LOCAL;
    end
  endtask

  initial begin
    clear();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      for (int p = 0; p < NUM_PORTS; p++) begin
        for (int v = 0; v < NUM_VC; v++) begin
          req[p][v]      = ($urandom_range(0, 99) < 30);
          req_port[p][v] = port_e'($urandom_range(0, NUM_PORTS - 1));
        end
      end
      #1;
      for (int p = 0; p < NUM_PORTS; p++) begin
        check($onehot0(in_grant[p]), "one VC per input port");
        check((in_grant[p] & ~req[p]) == '0, "grant without request");
      end
      for (int o = 0; o < NUM_PORTS; o++) begin
        int n;
        logic sole;
        n = 0;
        for (int p = 0; p < NUM_PORTS; p++)
          for (int v = 0; v < NUM_VC; v++)
            if (in_grant[p][v] && req_port[p][v] == o) begin
              n++;
              check(out_valid[o] && int'(out_sel[o]) == p, "out_sel matches grant");
            end
        check(n <= 1, "one input per output port");
        check(out_valid[o] == (n == 1), "out_valid matches grant");
        // an input port whose requests all target o must not leave o idle
        sole = 1'b0;
        for (int p = 0; p < NUM_PORTS; p++) begin
          logic all_o;
          all_o = (req[p] != '0);
          for (int v = 0; v < NUM_VC; v++)
            if (req[p][v] && req_port[p][v] != o) all_o = 1'b0;
          if (all_o) sole = 1'b1;
        end
        if (sole) check(out_valid[o], "output idle although requested");
      end
    end

    // time-multiplexing of one physical channel among the VCs of an input
    @(negedge clk);
    clear();
    req[PORT_NORTH] = '1;
    for (int v = 0; v < NUM_VC; v++) req_port[PORT_NORTH][v] = PORT_SOUTH;
    begin
      int seen [NUM_VC];
      for (int v = 0; v < NUM_VC; v++) seen[v] = 0;
      for (int n = 0; n < 2 * NUM_VC; n++) begin
        #1;
        check(out_valid[PORT_SOUTH] && out_sel[PORT_SOUTH] == PORT_W'(PORT_NORTH),
              "physical channel used every cycle");
        for (int v = 0; v < NUM_VC; v++) if (in_grant[PORT_NORTH][v]) seen[v]++;
        @(negedge clk);
      end
      for (int v = 0; v < NUM_VC; v++) check(seen[v] == 2, "VCs share the channel in turn");
    end

    // two input ports contending for one output alternate
    clear();
    req[PORT_EAST][0] = 1'b1; req_port[PORT_EAST][0] = PORT_LOCAL;
    req[PORT_WEST][1] = 1'b1; req_port[PORT_WEST][1] = PORT_LOCAL;
    begin
      int last, alternations;
      last = -1;
      alternations = 0;
      for (int n = 0; n < 10; n++) begin
        #1;
        if (last >= 0 && int'(out_sel[PORT_LOCAL]) != last) alternations++;
        last = int'(out_sel[PORT_LOCAL]);
        @(negedge clk);
      end
      check(alternations == 9, "contending inputs alternate");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
