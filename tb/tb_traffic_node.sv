// tb_traffic_node: traffic source and sink for the local port of one mesh node,
// used by the network testbenches in place of the processing element.
//
// Source: in every cycle a new packet is generated with probability
// rate_ppm / 1e6 (a discrete-time approximation of Poisson arrivals), with a
// uniformly random destination other than the node itself, and queued
// without limit. Packets are PKT_LEN flits long. Queued packets are opened on
// free virtual channels of the local input link, up to NUM_VC at once, and
// their flits are sent only against credits, one flit per cycle.
//
// Flit contents: header data = {generation cycle[19:0], source[3:0],
// dest y[3:0], dest x[3:0]}; other flits = {source[7:0], generation
// cycle[11:0], flit index[11:0]}.
//
// Sink: accepts one flit per cycle from the ejection link and returns its
// credit on the next cycle. Checks that the packet is addressed to this node,
// that its flits arrive in order on one virtual channel without another
// packet in between, and that the tail is where the length says. The packet
// delivery time is the time from generation to the arrival of the tail flit;
// it is summed while measure is high.
module tb_traffic_node
  import noc_pkg::*;
#(
  parameter int MESH_X    = 4,
  parameter int MESH_Y    = 4,
  parameter int NUM_VC    = 4,
  parameter int BUF_DEPTH = 4,
  parameter int PKT_LEN   = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  int                 node,       // this node's index, y*MESH_X + x
  input  int                 rate_ppm,
  input  logic               measure,
  input  int                 cycle,
  // to the network
  output logic               inj_valid,
  output flit_t              inj_flit,
  input  logic               inj_credit,
  input  logic [VC_ID_W-1:0] inj_credit_vc,
  input  logic               ej_valid,
  input  flit_t              ej_flit,
  output logic               ej_credit,
  output logic [VC_ID_W-1:0] ej_credit_vc,
  // statistics
  output int                 generated,
  output int                 delivered,
  output int                 errors,
  output longint             lat_sum,
  output int                 lat_count,
  output int                 interleaved
);
  localparam int NN = MESH_X * MESH_Y;

  typedef struct {
    int dst;
    int gen;
  } pkt_t;

  pkt_t queue [$];
  int   credit  [NUM_VC];
  logic open_q  [NUM_VC];
  pkt_t open_pk [NUM_VC];
  int   idx     [NUM_VC];

  // sink state per virtual channel
  logic rx_open [NUM_VC];
  int   rx_src  [NUM_VC];
  int   rx_gen  [NUM_VC];
  int   rx_idx  [NUM_VC];
  int   last_vc;

  function automatic flit_t build(pkt_t p, int i, int v);
    flit_t f;
    if (PKT_LEN == 1)          f.ftype = FLIT_HEADTAIL;
    else if (i == 0)           f.ftype = FLIT_HEAD;
    else if (i == PKT_LEN - 1) f.ftype = FLIT_TAIL;
    else                       f.ftype = FLIT_BODY;
    f.vc = VC_ID_W'(v);
    if (i == 0) f.data = {20'(p.gen), 4'(node), 4'(p.dst / MESH_X), 4'(p.dst % MESH_X)};
    else        f.data = {8'(node), 12'(p.gen), 12'(i)};
    return f;
  endfunction

  initial begin
    inj_valid = 1'b0;
    inj_flit  = '0;
    ej_credit = 1'b0;
    ej_credit_vc = '0;
    generated = 0;
    delivered = 0;
    errors = 0;
    lat_sum = 0;
    lat_count = 0;
    interleaved = 0;
    last_vc = -1;
    for (int v = 0; v < NUM_VC; v++) begin
      credit[v] = BUF_DEPTH;
      open_q[v] = 1'b0;
      rx_open[v] = 1'b0;
      idx[v] = 0;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      int cand [$];
      cand.delete();
      // generation
      if (rate_ppm > 0 && $urandom_range(0, 999999) < rate_ppm) begin
        pkt_t p;
        p.dst = $urandom_range(0, NN - 2);
        if (p.dst >= node) p.dst++;
        p.gen = cycle;
        queue.push_back(p);
        generated++;
      end
      // credits from the local input buffer
      if (inj_credit) credit[inj_credit_vc]++;
      // open packets on free virtual channels
      for (int v = 0; v < NUM_VC; v++) begin
        if (!open_q[v] && queue.size() > 0) begin
          open_pk[v] = queue.pop_front();
          open_q[v] = 1'b1;
          idx[v] = 0;
        end
      end
      // send one flit
      inj_valid <= 1'b0;
      for (int v = 0; v < NUM_VC; v++) if (open_q[v] && credit[v] > 0) cand.push_back(v);
      if (cand.size() > 0) begin
        int v;
        v = cand[$urandom_range(0, cand.size() - 1)];
        inj_valid <= 1'b1;
        inj_flit  <= build(open_pk[v], idx[v], v);
        credit[v]--;
        idx[v]++;
        if (idx[v] == PKT_LEN) open_q[v] = 1'b0;
      end

      // sink
      ej_credit <= 1'b0;
      if (ej_valid) begin
        int v;
        v = int'(ej_flit.vc);
        ej_credit    <= 1'b1;
        ej_credit_vc <= ej_flit.vc;
        if (last_vc >= 0 && last_vc != v && rx_open[last_vc]) interleaved++;
        last_vc = v;
        if (is_head(ej_flit)) begin
          int dst;
          dst = int'(ej_flit.data[7:4]) * MESH_X + int'(ej_flit.data[3:0]);
          if (rx_open[v]) errors++;
          if (dst != node) begin
            errors++;
            $display("FAIL node %0d got a packet for node %0d", node, dst);
          end
          rx_open[v] = 1'b1;
          rx_src[v]  = int'(ej_flit.data[11:8]);
          rx_gen[v]  = int'(ej_flit.data[31:12]);
          rx_idx[v]  = 0;
        end else begin
          if (!rx_open[v] || int'(ej_flit.data[11:0]) != rx_idx[v] ||
              int'(ej_flit.data[31:24]) != rx_src[v] ||
              ej_flit.data[23:12] != 12'(rx_gen[v])) begin
            errors++;
            $display("FAIL node %0d: flit out of order or mixed on VC %0d", node, v);
          end
        end
        if (is_tail(ej_flit) != (rx_idx[v] == PKT_LEN - 1)) begin
          errors++;
          $display("FAIL node %0d: tail at flit %0d", node, rx_idx[v]);
        end
        rx_idx[v]++;
        if (is_tail(ej_flit)) begin
          rx_open[v] = 1'b0;
          delivered++;
          if (measure) begin
            lat_sum += longint'(cycle - rx_gen[v]);
            lat_count++;
          end
        end
      end
    end
  end
endmodule
