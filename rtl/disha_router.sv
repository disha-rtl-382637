// disha_router: one Disha router for a two-dimensional mesh or torus.
//
// Wormhole router with one lane per physical channel, four network ports
// (X+, X-, Y+, Y-) and a node port, extended for deadlock recovery:
//  * channel_rx steers each arriving flit into its channel's input buffer
//    (Status low) or into the shared one-flit Deadlock Buffer (Status high);
//  * route_compute per crossbar input gives the shortest-path outputs (used
//    adaptively) and the dimension-order output (used on the Deadlock Buffer
//    path);
//  * a deadlock_detector per network input times how long its head flit has
//    waited against T_out and sets its Deadlock Bit;
//  * token_logic holds or passes the circulating Token;
//  * disha_control configures the 6 x 5 crossbar (xbar), gives the Deadlock
//    Buffer priority by displacing a normal connection into the
//    reconfiguration buffer, and starts a recovery when a Deadlock Bit is set
//    and the Token is here.
//
// Interface: in_fwd/in_send are the four incoming channels (Req, Status, flit
// / Send), out_fwd/out_send the four outgoing ones; inj_* is the node's
// injection port (valid/ready) and ej_* its ejection port, where ej_db marks
// flits of a packet that arrived over the Deadlock Buffer path (they may be
// interleaved with a normal packet's flits). token_in/token_out are the Token
// wires of the ring. my_x/my_y give the router's position, t_out the time-out.
// A flit crosses the router in one cycle after its output is connected; a new
// head needs one cycle to be connected.
//
// The organisation follows the Disha router drawing: one lane per physical
// channel, no output buffers, a 6 x 5 crossbar, and a Deadlock Buffer reached
// by bypassing the input buffers. This design's own choices are the 2-flit
// buffer on the node's injection port, the clocking of everything (Token
// included) by the one router clock, and the arbitration policies described
// in disha_control. Router configurations with several virtual channels per
// link are not covered. EARLY_RELEASE selects the optional early Token
// release (see disha_control); it is off by default.
module disha_router
  import disha_pkg::*;
#(
  parameter int KX         = 16,
  parameter int KY         = 16,
  parameter bit TORUS      = 1'b1,
  parameter int BUF_DEPTH  = 2,
  parameter int DB_DEPTH   = 1,
  parameter int CNT_W      = 8,
  parameter bit INIT_TOKEN = 1'b0,
  parameter bit EARLY_RELEASE = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  coord_t           my_x,
  input  coord_t           my_y,
  input  logic [CNT_W-1:0] t_out,
  input  chan_fwd_t        in_fwd  [N_NET],
  output logic             in_send [N_NET],
  output chan_fwd_t        out_fwd [N_NET],
  input  logic             out_send[N_NET],
  input  logic             inj_valid,
  input  flit_t            inj_flit,
  output logic             inj_ready,
  output logic             ej_valid,
  output flit_t            ej_flit,
  output logic             ej_db,
  input  logic             ej_ready,
  input  logic             token_in,
  output logic             token_out,
  // observation
  output logic             token_held,
  output logic [N_NET-1:0] deadlock_bits,
  output logic             recovering,
  output logic             reconfig_held,
  output logic             ev_start,
  output logic             ev_preempt,
  output logic             ev_restore
);
  // ---- input side ----
  logic  ib_full [N_NET], ib_wr [N_NET], ib_empty [N_NET];
  flit_t ib_wdata[N_NET];
  logic  db_full, db_wr, db_empty;
  flit_t db_wdata;
  logic  inj_full, inj_empty;

  logic  src_valid [N_IN];
  flit_t src_flit  [N_IN];
  logic  pop       [N_IN];

  channel_rx u_rx (
    .clk, .rst_n, .in_fwd, .in_send,
    .ib_full, .ib_wr, .ib_wdata,
    .db_full, .db_wr, .db_wdata
  );

  for (genvar c = 0; c < N_NET; c++) begin : g_ib
    flit_fifo #(.DEPTH(BUF_DEPTH)) u_ib (
      .clk, .rst_n,
      .wr_en(ib_wr[c]), .wr_data(ib_wdata[c]),
      .rd_en(pop[c]), .rd_data(src_flit[c]),
      .empty(ib_empty[c]), .full(ib_full[c]), .count()
    );
    assign src_valid[c] = !ib_empty[c];
  end

  flit_fifo #(.DEPTH(DB_DEPTH)) u_db (
    .clk, .rst_n,
    .wr_en(db_wr), .wr_data(db_wdata),
    .rd_en(pop[IN_DB]), .rd_data(src_flit[IN_DB]),
    .empty(db_empty), .full(db_full), .count()
  );
  assign src_valid[IN_DB] = !db_empty;

  flit_fifo #(.DEPTH(BUF_DEPTH)) u_inj (
    .clk, .rst_n,
    .wr_en(inj_valid && !inj_full), .wr_data(inj_flit),
    .rd_en(pop[IN_NODE]), .rd_data(src_flit[IN_NODE]),
    .empty(inj_empty), .full(inj_full), .count()
  );
  assign src_valid[IN_NODE] = !inj_empty;
  assign inj_ready = !inj_full;

  // ---- address decoders ----
  logic [N_OUT-1:0] adaptive [N_IN];
  out_idx_t         dor      [N_IN];
  logic [COORD_W:0] hops     [N_IN];
  for (genvar s = 0; s < N_IN; s++) begin : g_rc
    route_compute #(.KX(KX), .KY(KY), .TORUS(TORUS)) u_rc (
      .cur_x(my_x), .cur_y(my_y),
      .dst_x(head_dst_x(src_flit[s])), .dst_y(head_dst_y(src_flit[s])),
      .adaptive(adaptive[s]), .dor(dor[s]), .hops(hops[s])
    );
  end

  // ---- deadlock detection ----
  logic dl [N_NET], blocked [N_NET], release_dl [N_NET];
  for (genvar c = 0; c < N_NET; c++) begin : g_dd
    deadlock_detector #(.CNT_W(CNT_W)) u_dd (
      .clk, .rst_n, .blocked(blocked[c]), .release_i(release_dl[c]),
      .t_out, .deadlock(dl[c]), .t_elapsed()
    );
    assign deadlock_bits[c] = dl[c];
  end

  // ---- Token ----
  logic hold;
  token_logic #(.INIT_TOKEN(INIT_TOKEN)) u_tok (
    .clk, .rst_n, .token_in, .hold, .token_here(token_held), .token_out
  );

  // ---- decision and control, crossbar ----
  src_idx_t sel [N_OUT];
  logic     en  [N_OUT], out_status [N_OUT], osend [N_OUT];
  flit_t    x_flit  [N_OUT];
  logic     x_valid [N_OUT];

  for (genvar c = 0; c < N_NET; c++) begin : g_os
    assign osend[c] = out_send[c];
  end
  assign osend[OUT_NODE] = ej_ready;

  disha_control #(.EARLY_RELEASE(EARLY_RELEASE), .DB_DEPTH(DB_DEPTH)) u_ctl (
    .clk, .rst_n, .src_valid, .src_flit, .adaptive, .dor, .hops,
    .out_send(osend), .dl, .token_here(token_held),
    .sel, .en, .out_status, .pop, .blocked, .release_o(release_dl),
    .hold, .recovering, .rb_valid(reconfig_held), .ev_start, .ev_preempt, .ev_restore
  );

  xbar #(.NI(N_IN), .NO(N_OUT)) u_xbar (
    .in_flit(src_flit), .in_valid(src_valid), .sel, .en,
    .out_flit(x_flit), .out_valid(x_valid)
  );

  for (genvar c = 0; c < N_NET; c++) begin : g_out
    assign out_fwd[c].req    = x_valid[c];
    assign out_fwd[c].status = out_status[c];
    assign out_fwd[c].flit   = x_flit[c];
  end
  assign ej_valid = x_valid[OUT_NODE];
  assign ej_flit  = x_flit[OUT_NODE];
  assign ej_db    = out_status[OUT_NODE];
endmodule
