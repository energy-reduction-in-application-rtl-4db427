// noc_router: switching element of one mesh node.
//
// Five physical channels (local processor, north, east, south, west), each
// shared by NUM_VC virtual channels. Wormhole switching: a header flit is
// routed with XY routing, then waits for a free virtual channel of the chosen
// output physical channel; once it has one, it and the rest of its packet
// cross the crossbar flit by flit whenever the switch allocator grants the
// physical channel and the downstream buffer has room. The tail flit frees
// the output virtual channel.
//
// Structure: per input port, NUM_VC input buffers (vc_buffer) with a small
// state machine each (IDLE: waiting for a header; ACTIVE: owns an output
// virtual channel); one xy_route per input virtual channel; vc_allocator;
// switch_allocator; crossbar; per output port one registered output stage
// (the output buffer, one flit deep) driving the link, and per output virtual
// channel a credit counter that starts at BUF_DEPTH, the depth of the
// downstream input buffer.
//
// Link protocol (per direction): tx_valid_o/tx_flit_o carry one flit per
// cycle; the flit's vc field names the virtual channel. The receiver returns
// a credit (tx_credit_i with tx_credit_vc_i) for every flit it removes from
// that virtual channel's buffer. The rx_* ports are the same protocol seen
// from the receiving side.
//
// Timing with no contention: a header flit written into an input buffer on
// clock edge t is allocated a virtual channel on edge t+1 and is driven on the
// output link from edge t+2; the data flits behind it follow one per cycle.
// (A data flit whose packet already holds its path leaves on edge t+1.) The
// credit for a flit is driven upstream from the same edge on which the flit
// appears on the output link.
//
// Wormhole switching, XY routing, the 5 physical channels, the virtual
// channels, the input and output buffers and the crossbar follow the node
// description; credit flow control, the pipeline, the buffer depths and the
// arbitration are this design's choices.
module noc_router
  import noc_pkg::*;
#(
  parameter int NUM_VC    = 4,
  parameter int BUF_DEPTH = 4,
  parameter int X_POS     = 0,
  parameter int Y_POS     = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  // incoming physical channels
  input  logic               rx_valid_i    [NUM_PORTS],
  input  flit_t              rx_flit_i     [NUM_PORTS],
  output logic               rx_credit_o   [NUM_PORTS],
  output logic [VC_ID_W-1:0] rx_credit_vc_o[NUM_PORTS],
  // outgoing physical channels
  output logic               tx_valid_o    [NUM_PORTS],
  output flit_t              tx_flit_o     [NUM_PORTS],
  input  logic               tx_credit_i   [NUM_PORTS],
  input  logic [VC_ID_W-1:0] tx_credit_vc_i[NUM_PORTS]
);
  localparam int NI = NUM_PORTS * NUM_VC;
  localparam int CW = $clog2(BUF_DEPTH + 1);

  if (NUM_VC < 1 || NUM_VC > (1 << VC_ID_W)) begin : g_bad_vc
    $error("noc_router: NUM_VC out of range");
  end

  typedef enum logic {VC_IDLE, VC_ACTIVE} vc_state_e;

  // ---------------------------------------------------------------- input side
  flit_t              front    [NUM_PORTS][NUM_VC];
  logic               empty    [NUM_PORTS][NUM_VC];
  logic               full     [NUM_PORTS][NUM_VC];
  logic               push     [NUM_PORTS][NUM_VC];
  logic               pop      [NUM_PORTS][NUM_VC];
  port_e              route    [NUM_PORTS][NUM_VC];
  vc_state_e          state_q  [NUM_PORTS][NUM_VC];
  port_e              route_q  [NUM_PORTS][NUM_VC];
  logic [VC_ID_W-1:0] outvc_q  [NUM_PORTS][NUM_VC];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      assign push[p][v] = rx_valid_i[p] && (int'(rx_flit_i[p].vc) == v);

      vc_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
        .clk        (clk),
        .rst_n      (rst_n),
        .push       (push[p][v]),
        .in_flit    (rx_flit_i[p]),
        .pop        (pop[p][v]),
        .front_flit (front[p][v]),
        .empty      (empty[p][v]),
        .full       (full[p][v])
      );

      xy_route u_route (
        .cur_x    (COORD_W'(X_POS)),
        .cur_y    (COORD_W'(Y_POS)),
        .dst_x    (dest_x(front[p][v])),
        .dst_y    (dest_y(front[p][v])),
        .out_port (route[p][v])
      );
    end
  end

  // ------------------------------------------------- virtual-channel allocation
  logic [NI-1:0]      va_req;
  port_e              va_port  [NI];
  logic [NI-1:0]      va_gnt;
  logic [VC_ID_W-1:0] va_vc    [NI];
  logic [NUM_VC-1:0]  release_vc [NUM_PORTS];
  logic [NUM_VC-1:0]  vc_busy  [NUM_PORTS];

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      for (int v = 0; v < NUM_VC; v++) begin
        va_req[p*NUM_VC+v]  = (state_q[p][v] == VC_IDLE) && !empty[p][v] && is_head(front[p][v]);
        va_port[p*NUM_VC+v] = route[p][v];
      end
    end
  end

  vc_allocator #(.NUM_VC(NUM_VC)) u_va (
    .clk        (clk),
    .rst_n      (rst_n),
    .req        (va_req),
    .req_port   (va_port),
    .release_vc (release_vc),
    .grant      (va_gnt),
    .grant_vc   (va_vc),
    .vc_busy    (vc_busy)
  );

  // ------------------------------------------------------- switch allocation
  logic [CW-1:0]       credit_q [NUM_PORTS][NUM_VC];
  logic [NUM_VC-1:0]   sa_req   [NUM_PORTS];
  port_e               sa_port  [NUM_PORTS][NUM_VC];
  logic [NUM_VC-1:0]   sa_gnt   [NUM_PORTS];
  logic [PORT_W-1:0]   out_sel  [NUM_PORTS];
  logic                out_en   [NUM_PORTS];

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      for (int v = 0; v < NUM_VC; v++) begin
        sa_req[p][v]  = (state_q[p][v] == VC_ACTIVE) && !empty[p][v] &&
                        (credit_q[route_q[p][v]][outvc_q[p][v]] != '0);
        sa_port[p][v] = route_q[p][v];
      end
    end
  end

  switch_allocator #(.NUM_VC(NUM_VC)) u_sa (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (sa_req),
    .req_port  (sa_port),
    .in_grant  (sa_gnt),
    .out_sel   (out_sel),
    .out_valid (out_en)
  );

  // flit and outgoing virtual channel presented by every input port
  flit_t              xb_in     [NUM_PORTS];
  logic [VC_ID_W-1:0] xb_in_vc  [NUM_PORTS];
  logic               in_won    [NUM_PORTS];
  logic [VC_ID_W-1:0] in_won_vc [NUM_PORTS];

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      xb_in[p]     = front[p][0];
      xb_in_vc[p]  = outvc_q[p][0];
      in_won[p]    = 1'b0;
      in_won_vc[p] = '0;
      for (int v = 0; v < NUM_VC; v++) begin
        pop[p][v] = sa_gnt[p][v];
        if (sa_gnt[p][v]) begin
          xb_in[p]     = front[p][v];
          xb_in_vc[p]  = outvc_q[p][v];
          in_won[p]    = 1'b1;
          in_won_vc[p] = VC_ID_W'(v);
        end
      end
    end
  end

  // ------------------------------------------------------------------ crossbar
  logic [VC_ID_W-1:0] xb_out_vc [NUM_PORTS];
  flit_t              xb_out    [NUM_PORTS];
  logic               xb_valid  [NUM_PORTS];

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) xb_out_vc[o] = xb_in_vc[out_sel[o]];
  end

  crossbar u_xbar (
    .in_flit   (xb_in),
    .sel       (out_sel),
    .en        (out_en),
    .out_vc    (xb_out_vc),
    .out_flit  (xb_out),
    .out_valid (xb_valid)
  );

  // ------------------------------------------- input virtual-channel states
  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) release_vc[o] = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      for (int v = 0; v < NUM_VC; v++) begin
        if (sa_gnt[p][v] && is_tail(front[p][v])) begin
          release_vc[route_q[p][v]][outvc_q[p][v]] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        for (int v = 0; v < NUM_VC; v++) begin
          state_q[p][v] <= VC_IDLE;
          route_q[p][v] <= PORT_LOCAL;
          outvc_q[p][v] <= '0;
        end
      end
    end else begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        for (int v = 0; v < NUM_VC; v++) begin
          if (state_q[p][v] == VC_IDLE) begin
            if (va_gnt[p*NUM_VC+v]) begin
              state_q[p][v] <= VC_ACTIVE;
              route_q[p][v] <= route[p][v];
              outvc_q[p][v] <= va_vc[p*NUM_VC+v];
            end
          end else if (sa_gnt[p][v] && is_tail(front[p][v])) begin
            state_q[p][v] <= VC_IDLE;
          end
        end
      end
    end
  end

  // ------------------------------------------- credits and output registers
  logic credit_used [NUM_PORTS][NUM_VC];
  logic credit_back [NUM_PORTS][NUM_VC];

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      for (int v = 0; v < NUM_VC; v++) begin
        credit_used[o][v] = xb_valid[o] && (int'(xb_out_vc[o]) == v);
        credit_back[o][v] = tx_credit_i[o] && (int'(tx_credit_vc_i[o]) == v);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        for (int v = 0; v < NUM_VC; v++) credit_q[o][v] <= CW'(BUF_DEPTH);
        tx_valid_o[o]     <= 1'b0;
        tx_flit_o[o]      <= '0;
        rx_credit_o[o]    <= 1'b0;
        rx_credit_vc_o[o] <= '0;
      end
    end else begin
      for (int o = 0; o < NUM_PORTS; o++) begin
        for (int v = 0; v < NUM_VC; v++) begin
          if (credit_used[o][v] && !credit_back[o][v])
            credit_q[o][v] <= credit_q[o][v] - 1'b1;
          else if (credit_back[o][v] && !credit_used[o][v])
            credit_q[o][v] <= credit_q[o][v] + 1'b1;
        end
        tx_valid_o[o]     <= xb_valid[o];
        if (xb_valid[o]) tx_flit_o[o] <= xb_out[o];
        rx_credit_o[o]    <= in_won[o];
        rx_credit_vc_o[o] <= in_won_vc[o];
      end
    end
  end

  // ------------------------------------------------ activity, for observation
  // evt_vc_wait: a header is waiting for a free output virtual channel.
  // evt_credit_wait: a flit that owns an output virtual channel has no credit.
  // evt_sw_conflict: a ready flit lost switch allocation to another one.
  logic evt_vc_wait, evt_credit_wait, evt_sw_conflict;
  always_comb begin
    evt_vc_wait     = 1'b0;
    evt_credit_wait = 1'b0;
    evt_sw_conflict = 1'b0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      for (int v = 0; v < NUM_VC; v++) begin
        if (va_req[p*NUM_VC+v] && !va_gnt[p*NUM_VC+v]) evt_vc_wait = 1'b1;
        if ((state_q[p][v] == VC_ACTIVE) && !empty[p][v] && !sa_req[p][v]) evt_credit_wait = 1'b1;
        if (sa_req[p][v] && !sa_gnt[p][v]) evt_sw_conflict = 1'b1;
      end
    end
  end

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_chk
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      assert property (@(posedge clk) disable iff (!rst_n) int'(credit_q[o][v]) <= BUF_DEPTH)
        else $error("noc_router: credit counter above buffer depth");
    end
  end

endmodule
