// tb_noc_router: self-checking test of one switching element.
//
// The router sits at node (1,1) of a 4x4 mesh. The testbench plays the five
// neighbours. As upstream senders it opens packets on free virtual channels,
// interleaves up to NUM_VC packets per input link and sends a flit only
// against a credit. As downstream receivers it records every flit and returns
// credits after a random delay.
//
// Checked:
//  - every packet leaves on the output port that XY routing gives for its
//    destination, complete, in order, with its payload intact, and all of it
//    on one outgoing virtual channel, never mixed with another packet;
//  - every flit sent in is answered by one credit on the right virtual channel;
//  - latency without contention: a header flit is seen on the output link 4
//    clock edges after the edge that put it on the input link (link, buffer
//    write, VC allocation, switch allocation into the output register), and
//    the data flits behind it stream at one flit per cycle with the same
//    latency;
//  - with credits held back on one output, the NUM_VC+1-th header routed there
//    waits for a free virtual channel and proceeds after a tail frees one;
//  - credit back-pressure and switch conflicts both occur.
module tb_noc_router;
  import noc_pkg::*;

  localparam int NUM_VC    = 4;
  localparam int BUF_DEPTH = 4;
  localparam int X0 = 1, Y0 = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic               rx_valid_i    [NUM_PORTS];
  flit_t              rx_flit_i     [NUM_PORTS];
  logic               rx_credit_o   [NUM_PORTS];
  logic [VC_ID_W-1:0] rx_credit_vc_o[NUM_PORTS];
  logic               tx_valid_o    [NUM_PORTS];
  flit_t              tx_flit_o     [NUM_PORTS];
  logic               tx_credit_i   [NUM_PORTS];
  logic [VC_ID_W-1:0] tx_credit_vc_i[NUM_PORTS];

  noc_router #(.NUM_VC(NUM_VC), .BUF_DEPTH(BUF_DEPTH), .X_POS(X0), .Y_POS(Y0)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // --------------------------------------------------------------- packets
  typedef struct {
    int dx, dy, len, in_port, exp_port;
  } pkt_t;

  pkt_t pkts [int];          // by sequence number
  int   next_seq = 0;
  int   queue_in [NUM_PORTS][$];   // packets waiting to be sent on each input

  function automatic int xy_port(int dx, int dy);
    if (dx > X0) return PORT_EAST;
    if (dx < X0) return PORT_WEST;
    if (dy > Y0) return PORT_NORTH;
    if (dy < Y0) return PORT_SOUTH;
    return PORT_LOCAL;
  endfunction

  // a packet may not come back out of the port it arrived on under XY
  // routing from a neighbour; pick destinations consistent with the input
  function automatic void add_packet(int in_port, int dx, int dy, int len);
    pkt_t p;
    p.dx = dx; p.dy = dy; p.len = len; p.in_port = in_port;
    p.exp_port = xy_port(dx, dy);
    pkts[next_seq] = p;
    queue_in[in_port].push_back(next_seq);
    next_seq++;
  endfunction

  function automatic flit_t make_flit(int seq, int idx);
    flit_t f;
    pkt_t p;
    p = pkts[seq];
    if (p.len == 1)             f.ftype = FLIT_HEADTAIL;
    else if (idx == 0)          f.ftype = FLIT_HEAD;
    else if (idx == p.len - 1)  f.ftype = FLIT_TAIL;
    else                        f.ftype = FLIT_BODY;
    f.vc = '0;
    if (idx == 0) f.data = {16'(seq), 8'(p.in_port), 4'(p.dy), 4'(p.dx)};
    else          f.data = {16'(seq), 16'(idx)};
    return f;
  endfunction

  // ---------------------------------------------------- upstream senders
  int  up_credit [NUM_PORTS][NUM_VC];
  int  up_seq    [NUM_PORTS][NUM_VC];   // packet on this VC, -1 if free
  int  up_idx    [NUM_PORTS][NUM_VC];
  int  send_pct  = 100;
  int  cycle = 0;
  int  send_cycle [int];                // seq*64+idx -> cycle sent
  int  flits_sent [NUM_PORTS][NUM_VC];
  int  credits_back [NUM_PORTS][NUM_VC];

  // ------------------------------------------------- downstream receivers
  int  dn_seq [NUM_PORTS][NUM_VC];
  int  dn_idx [NUM_PORTS][NUM_VC];
  int  pending_credit [NUM_PORTS][$];
  logic block_credit [NUM_PORTS];
  int  credit_pct = 100;
  int  delivered = 0;
  int  lat_head [$], lat_body [$];

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      // credits from the router for our upstream senders
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (rx_credit_o[p]) begin
          up_credit[p][rx_credit_vc_o[p]]++;
          credits_back[p][rx_credit_vc_o[p]]++;
          check(up_credit[p][rx_credit_vc_o[p]] <= BUF_DEPTH, "credit count above depth");
        end
      end
      // flits leaving the router
      for (int o = 0; o < NUM_PORTS; o++) begin
        if (tx_valid_o[o]) begin
          flit_t f, exp_f;
          int v, seq;
          f = tx_flit_o[o];
          v = int'(f.vc);
          seq = int'(f.data[31:16]);
          check(v < NUM_VC, "outgoing VC in range");
          if (is_head(f)) begin
            check(dn_seq[o][v] == -1, "header on a VC that holds a packet");
            check(pkts.exists(seq), "unknown packet");
            if (pkts.exists(seq)) check(pkts[seq].exp_port == o, "XY output port");
            dn_seq[o][v] = seq;
            dn_idx[o][v] = 0;
            if (send_cycle.exists(seq * 64)) lat_head.push_back(cycle - send_cycle[seq * 64]);
          end else begin
            check(dn_seq[o][v] == seq, "flit of another packet on a held VC");
            check(int'(f.data[15:0]) == dn_idx[o][v], "flit order");
            if (send_cycle.exists(seq * 64 + dn_idx[o][v]))
              lat_body.push_back(cycle - send_cycle[seq * 64 + dn_idx[o][v]]);
          end
          if (pkts.exists(seq)) begin
            exp_f = make_flit(seq, dn_idx[o][v]);
            check(f.ftype == exp_f.ftype && f.data == exp_f.data, "payload and flit type");
            check(is_tail(f) == (dn_idx[o][v] == pkts[seq].len - 1), "tail position");
          end
          dn_idx[o][v]++;
          if (is_tail(f)) begin
            dn_seq[o][v] = -1;
            delivered++;
          end
          pending_credit[o].push_back(v);
        end
      end
      // credits back into the router, at most one per port per cycle
      for (int o = 0; o < NUM_PORTS; o++) begin
        tx_credit_i[o] <= 1'b0;
        if (!block_credit[o] && pending_credit[o].size() > 0 &&
            $urandom_range(0, 99) < credit_pct) begin
          tx_credit_i[o]    <= 1'b1;
          tx_credit_vc_i[o] <= VC_ID_W'(pending_credit[o].pop_front());
        end
      end
      // upstream senders: one flit per input link per cycle
      for (int p = 0; p < NUM_PORTS; p++) begin
        int cand [$];
        cand.delete();
        rx_valid_i[p] <= 1'b0;
        // open a new packet on a free VC
        if (queue_in[p].size() > 0) begin
          for (int v = 0; v < NUM_VC; v++) begin
            if (up_seq[p][v] == -1 && queue_in[p].size() > 0 && $urandom_range(0, 1)) begin
              up_seq[p][v] = queue_in[p].pop_front();
              up_idx[p][v] = 0;
            end
          end
        end
        for (int v = 0; v < NUM_VC; v++)
          if (up_seq[p][v] != -1 && up_credit[p][v] > 0) cand.push_back(v);
        if (cand.size() > 0 && $urandom_range(0, 99) < send_pct) begin
          int v, seq;
          flit_t f;
          v = cand[$urandom_range(0, cand.size() - 1)];
          seq = up_seq[p][v];
          f = make_flit(seq, up_idx[p][v]);
          f.vc = VC_ID_W'(v);
          rx_valid_i[p] <= 1'b1;
          rx_flit_i[p]  <= f;
          send_cycle[seq * 64 + up_idx[p][v]] = cycle;
          up_credit[p][v]--;
          flits_sent[p][v]++;
          up_idx[p][v]++;
          if (up_idx[p][v] == pkts[seq].len) up_seq[p][v] = -1;
        end
      end
    end
  end

  // ------------------------------------------------------- observation
  int n_vc_wait = 0, n_credit_wait = 0, n_conflict = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.evt_vc_wait)     n_vc_wait++;
      if (dut.evt_credit_wait) n_credit_wait++;
      if (dut.evt_sw_conflict) n_conflict++;
    end
  end

  initial begin
    #3000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_idle(int limit);
    int n;
    n = 0;
    while (n < limit) begin
      logic busy;
      @(posedge clk);
      busy = 1'b0;
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (queue_in[p].size() > 0) busy = 1'b1;
        for (int v = 0; v < NUM_VC; v++) if (up_seq[p][v] != -1 || dn_seq[p][v] != -1) busy = 1'b1;
      end
      if (!busy && delivered == next_seq) break;
      n++;
    end
    check(n < limit, "traffic drained");
  endtask

  initial begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      rx_valid_i[p] = 1'b0;
      rx_flit_i[p] = '0;
      tx_credit_i[p] = 1'b0;
      tx_credit_vc_i[p] = '0;
      block_credit[p] = 1'b0;
      for (int v = 0; v < NUM_VC; v++) begin
        up_credit[p][v] = BUF_DEPTH;
        up_seq[p][v] = -1;
        dn_seq[p][v] = -1;
        flits_sent[p][v] = 0;
        credits_back[p][v] = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. latency of one packet alone: west input to east output
    add_packet(PORT_WEST, 3, 1, 8);
    wait_idle(200);
    check(lat_head.size() == 1 && lat_head[0] == 4, "header latency 4 edges");
    check(lat_body.size() == 7, "all data flits seen");
    // data flits queue one cycle behind the header and then stream at one
    // flit per cycle, so each of them also takes 4 edges
    foreach (lat_body[i]) check(lat_body[i] == 4, "data flit latency 4 edges");
    lat_head.delete();
    lat_body.delete();

    // 2. virtual-channel wait: hold the east credits, send NUM_VC+1 packets east
    block_credit[PORT_EAST] = 1'b1;
    for (int i = 0; i <= NUM_VC; i++) add_packet(i % 2 ? PORT_SOUTH : PORT_LOCAL, 2 + i % 2, i % 4, 3 + BUF_DEPTH);
    repeat (100) @(posedge clk);
    begin
      int open_pk;
      open_pk = 0;
      for (int v = 0; v < NUM_VC; v++) if (dn_seq[PORT_EAST][v] != -1) open_pk++;
      check(open_pk == NUM_VC, "all east VCs held while credits blocked");
      check(dut.evt_vc_wait, "last header waits for a VC");
    end
    block_credit[PORT_EAST] = 1'b0;
    wait_idle(2000);

    // 3. random traffic from all inputs, random credit delays
    send_pct = 70;
    credit_pct = 60;
    for (int i = 0; i < 600; i++) begin
      int ip, dx, dy;
      ip = $urandom_range(0, NUM_PORTS - 1);
      // destinations an XY-routed packet entering on ip can have
      dx = $urandom_range(0, 3);
      dy = $urandom_range(0, 3);
      if (ip == PORT_EAST)  dx = $urandom_range(0, 1) ? X0 : $urandom_range(X0 + 1, 3);
      if (ip == PORT_WEST)  dx = $urandom_range(0, 1) ? X0 : 0;
      if (ip == PORT_NORTH) begin dx = X0; dy = $urandom_range(0, Y0); end
      if (ip == PORT_SOUTH) begin dx = X0; dy = $urandom_range(Y0, 3); end
      if (ip == PORT_EAST && dx != X0) dx = $urandom_range(X0 + 1, 3);
      if (ip == PORT_WEST && dx != X0) dx = 0;
      add_packet(ip, dx, dy, $urandom_range(1, 12));
    end
    wait_idle(100000);

    check(delivered == next_seq, "every packet delivered");
    for (int p = 0; p < NUM_PORTS; p++)
      for (int v = 0; v < NUM_VC; v++)
        check(credits_back[p][v] == flits_sent[p][v], "one credit per flit");
    check(n_vc_wait > 0, "virtual-channel wait occurred");
    check(n_credit_wait > 0, "credit back-pressure occurred");
    check(n_conflict > 0, "switch conflict occurred");
    $display("delivered %0d packets; vc_wait %0d credit_wait %0d conflict %0d cycles",
             delivered, n_vc_wait, n_credit_wait, n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
