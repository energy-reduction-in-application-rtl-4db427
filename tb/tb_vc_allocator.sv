// tb_vc_allocator: self-checking test of virtual-channel allocation.
//
// A model keeps the busy state of every output virtual channel. Each cycle
// random input virtual channels request random output ports and random busy
// output virtual channels are released. Checked every cycle: a grant goes only
// to a requester; it carries the lowest free virtual channel of the requested
// port; at most one grant per output port; a port with a free virtual channel
// and a requester grants someone (a header waits only when no virtual channel
// is free); vc_busy matches the model. A directed phase then has all inputs
// ask for the same port and checks round-robin fairness: 20 consecutive
// grants reach 20 different inputs.
module tb_vc_allocator;
  import noc_pkg::*;

  localparam int NUM_VC = 4;
  localparam int NI = NUM_PORTS * NUM_VC;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NI-1:0]      req = '0;
  port_e              req_port [NI];
  logic [NUM_VC-1:0]  release_vc [NUM_PORTS];
  logic [NI-1:0]      grant;
  logic [VC_ID_W-1:0] grant_vc [NI];
  logic [NUM_VC-1:0]  vc_busy [NUM_PORTS];

  logic [NUM_VC-1:0]  model [NUM_PORTS];
  int checks = 0, failures = 0;
  int waits = 0;

  vc_allocator #(.NUM_VC(NUM_VC)) dut (.*);

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

  initial begin
    for (int i = 0; i < NI; i++) req_port[i] = PORT_LOCAL;
    for (int o = 0; o < NUM_PORTS; o++) begin
      release_vc[o] = '0;
      model[o] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        req[i]      = ($urandom_range(0, 99) < 40);
        req_port[i] = port_e'($urandom_range(0, NUM_PORTS - 1));
      end
      for (int o = 0; o < NUM_PORTS; o++) begin
        for (int v = 0; v < NUM_VC; v++)
          release_vc[o][v] = model[o][v] && ($urandom_range(0, 99) < 25);
      end
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        int ngrant, lowest;
        logic any_req;
        check(vc_busy[o] == model[o], "busy state");
        lowest = -1;
        for (int v = NUM_VC - 1; v >= 0; v--) if (!model[o][v]) lowest = v;
        ngrant = 0;
        any_req = 1'b0;
        for (int i = 0; i < NI; i++) begin
          if (req[i] && req_port[i] == o) any_req = 1'b1;
          if (grant[i] && req_port[i] == o) begin
            ngrant++;
            check(req[i], "grant without request");
            check(lowest >= 0 && int'(grant_vc[i]) == lowest, "granted VC is lowest free");
          end
        end
        check(ngrant <= 1, "one grant per output port");
        if (any_req && lowest >= 0) check(ngrant == 1, "free VC left unused");
        if (any_req && lowest < 0) waits++;
      end
      // model update for the clock edge
      for (int o = 0; o < NUM_PORTS; o++) model[o] = model[o] & ~release_vc[o];
      for (int i = 0; i < NI; i++) begin
        if (grant[i]) model[req_port[i]][grant_vc[i]] = 1'b1;
      end
    end
    check(waits > 0, "a header had to wait for a free VC at least once");

    // fairness: everybody asks for the east port, the granted VC is released
    // in the next cycle so one VC is always free
    @(negedge clk);
    req = '0;
    for (int o = 0; o < NUM_PORTS; o++) release_vc[o] = model[o];
    @(negedge clk);
    for (int o = 0; o < NUM_PORTS; o++) begin
      release_vc[o] = '0;
      model[o] = '0;
    end
    begin
      int seen [NI];
      for (int i = 0; i < NI; i++) begin
        seen[i] = 0;
        req_port[i] = PORT_EAST;
      end
      req = '1;
      for (int n = 0; n < NI; n++) begin
        #1;
        for (int i = 0; i < NI; i++) if (grant[i]) seen[i]++;
        for (int i = 0; i < NI; i++) if (grant[i]) model[PORT_EAST][grant_vc[i]] = 1'b1;
        @(negedge clk);
        release_vc[PORT_EAST] = model[PORT_EAST];
        model[PORT_EAST] = '0;
      end
      for (int i = 0; i < NI; i++) check(seen[i] == 1, "round-robin: each input granted once");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
