// disha_control: the Decision and Control Logic of a Disha router.
//
// It owns the crossbar configuration: for every output a connection (valid,
// source input, Deadlock-Buffer mode). Wormhole switching: a head flit at the
// front of an input claims an output, the connection carries the packet's
// flits one per cycle whenever the input has a flit and the next router's
// Send is high, and it is released when the tail flit has passed.
//
// Every cycle, in this order:
//  1. Release. A connection whose tail flit moves is released. If that
//     connection was the Deadlock Buffer path and the reconfiguration buffer
//     holds the connection it displaced, that connection is restored.
//  2. Deadlock Buffer head. A head flit in the Deadlock Buffer takes the
//     dimension-order output; if a normal packet is using it, that connection
//     is cut and saved in the reconfiguration buffer (the Deadlock Buffer has
//     priority). The output sends with Status high, so the flit lands in the
//     next router's Deadlock Buffer, or at the node if it has arrived.
//  3. Recovery start. If the Token is here, the Deadlock Buffer path through
//     this router is idle, and an input's Deadlock Bit is set while its head
//     flit is still waiting, that packet (lowest-numbered input first) is
//     switched to the Deadlock Buffer path: any output it had claimed is
//     given back, it takes its dimension-order output, displacing a normal
//     connection if needed, and it sends with Status high. The Token is held
//     ('hold') until its tail flit has passed, then the Deadlock Bit is
//     released and the Token moves on.
//  4. Normal allocation. Remaining waiting head flits, visited in a rotating
//     order, take the lowest-numbered free output among those on a shortest
//     path whose next router has room (fully adaptive, minimal).
// Also produced per network input: 'blocked' (its head flit waits) for the
// deadlock detector, and 'release' when the head leaves normally or the
// recovered packet's tail has passed.
// Event outputs pulse for one cycle when a recovery starts (ev_start), a
// connection is displaced (ev_preempt) or restored (ev_restore).
//
// Early release (EARLY_RELEASE = 1, an optional optimisation of the scheme;
// off by default): the router counts the flits of the recovered packet it has
// sent. The Deadlock Buffer path ahead holds at most hops x DB_DEPTH flits, so
// once hops x DB_DEPTH + 1 flits have left, the head has been consumed at the
// destination; the Deadlock Bit is then released and the Token passed on
// before the tail has gone. The packet's connection stays in Deadlock Buffer
// mode until its tail, and no new recovery starts here until then.
// Caution: this mode can stall a loaded network. The rest of the recovered
// packet may still be upstream on normal connections, which a second Deadlock
// Buffer packet may cut while it waits for the first one's connection here.
module disha_control
  import disha_pkg::*;
#(
  parameter bit EARLY_RELEASE = 1'b0,
  parameter int DB_DEPTH      = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               src_valid [N_IN],
  input  flit_t              src_flit  [N_IN],
  input  logic [N_OUT-1:0]   adaptive  [N_IN],
  input  out_idx_t           dor       [N_IN],
  input  logic [COORD_W:0]   hops      [N_IN],
  input  logic               out_send  [N_OUT],
  input  logic               dl        [N_NET],
  input  logic               token_here,
  output src_idx_t           sel       [N_OUT],
  output logic               en        [N_OUT],
  output logic               out_status[N_OUT],
  output logic               pop       [N_IN],
  output logic               blocked   [N_NET],
  output logic               release_o [N_NET],
  output logic               hold,
  output logic               recovering,
  output logic               rb_valid,
  output logic               ev_start,
  output logic               ev_preempt,
  output logic               ev_restore
);
  // connection state, one per output
  logic     c_valid [N_OUT];
  src_idx_t c_src   [N_OUT];
  logic     c_db    [N_OUT];
  logic     n_valid [N_OUT];
  src_idx_t n_src   [N_OUT];
  logic     n_db    [N_OUT];

  src_idx_t rec_src, n_rec_src;
  logic [7:0] rec_need, rec_sent;   // early release: flits to send, flits sent
  logic     n_recovering;
  logic [2:0] rr;

  // reconfiguration buffer interface
  logic     rb_save, rb_restore;
  src_idx_t rb_save_src, rb_src;
  out_idx_t rb_save_dst, rb_dst;
  logic [N_OUT-1:0] rb_dst_match;
  logic [N_IN-1:0]  rb_src_match;

  reconfig_buffer u_rb (
    .clk, .rst_n,
    .save(rb_save), .save_src(rb_save_src), .save_dst(rb_save_dst),
    .restore(rb_restore),
    .valid(rb_valid), .src(rb_src), .dst(rb_dst),
    .dst_match(rb_dst_match), .src_match(rb_src_match)
  );

  logic fire [N_OUT];
  logic fire_db_src [N_IN];   // the source's flit left through a Deadlock-Buffer-mode output
  logic rec_done, early_done;
  logic start;
  int   start_in;

  // datapath control from the registered configuration
  always_comb begin
    for (int s = 0; s < N_IN; s++) begin
      pop[s]         = 1'b0;
      fire_db_src[s] = 1'b0;
    end
    for (int o = 0; o < N_OUT; o++) begin
      sel[o]        = c_src[o];
      en[o]         = c_valid[o];
      out_status[o] = c_valid[o] && c_db[o];
      fire[o]       = c_valid[o] && src_valid[c_src[o]] && out_send[o];
      if (fire[o]) begin
        pop[c_src[o]] = 1'b1;
        if (c_db[o]) fire_db_src[c_src[o]] = 1'b1;
      end
    end
  end

  // next configuration
  always_comb begin
    logic busy_src [N_IN];
    logic db_busy;
    logic found;
    int   t, s;
    for (int o = 0; o < N_OUT; o++) begin
      n_valid[o] = c_valid[o];
      n_src[o]   = c_src[o];
      n_db[o]    = c_db[o];
    end
    n_recovering = recovering;
    n_rec_src    = rec_src;
    rb_save      = 1'b0;
    rb_save_src  = '0;
    rb_save_dst  = '0;
    rb_restore   = 1'b0;
    rec_done     = 1'b0;
    start        = 1'b0;
    start_in     = 0;
    ev_preempt   = 1'b0;
    t            = 0;
    s            = 0;
    found        = 1'b0;

    early_done = 1'b0;
    if (EARLY_RELEASE && recovering && fire_db_src[rec_src] && rec_sent + 8'd1 >= rec_need)
      early_done = 1'b1;

    // 1. release on tail
    for (int o = 0; o < N_OUT; o++) begin
      if (fire[o] && src_flit[c_src[o]].tail) begin
        n_valid[o] = 1'b0;
        n_db[o]    = 1'b0;
        if (c_db[o]) begin
          if (recovering && c_src[o] == rec_src) rec_done = 1'b1;
          if (rb_dst_match[o]) begin
            n_valid[o] = 1'b1;
            n_src[o]   = rb_src;
            rb_restore = 1'b1;
          end
        end
      end
    end
    rec_done = rec_done || early_done;
    if (rec_done) n_recovering = 1'b0;

    for (int i = 0; i < N_IN; i++) busy_src[i] = rb_src_match[i] && !rb_restore;
    for (int o = 0; o < N_OUT; o++) if (n_valid[o]) busy_src[n_src[o]] = 1'b1;

    // 2. Deadlock Buffer head: priority, displacing a normal connection
    if (src_valid[IN_DB] && src_flit[IN_DB].head && !busy_src[IN_DB]) begin
      t = int'(dor[IN_DB]);
      if (!n_valid[t]) begin
        n_valid[t] = 1'b1; n_src[t] = src_idx_t'(IN_DB); n_db[t] = 1'b1;
        busy_src[IN_DB] = 1'b1;
      end else if (!n_db[t] && !rb_valid) begin
        rb_save = 1'b1; rb_save_src = n_src[t]; rb_save_dst = out_idx_t'(t);
        ev_preempt = 1'b1;
        n_src[t] = src_idx_t'(IN_DB); n_db[t] = 1'b1;
        busy_src[IN_DB] = 1'b1;
      end
    end

    // 3. recovery start when holding the Token
    db_busy = src_valid[IN_DB] || rb_valid || recovering;
    for (int o = 0; o < N_OUT; o++) if (n_valid[o] && n_db[o]) db_busy = 1'b1;
    if (token_here && !db_busy) begin
      found = 1'b0;
      for (int i = 0; i < N_NET; i++) begin
        if (!found && dl[i] && src_valid[i] && src_flit[i].head && !pop[i]) begin
          found = 1'b1;
          start_in = i;
        end
      end
      if (found) begin
        start = 1'b1;
        // give back an output the packet had claimed but not used
        for (int o = 0; o < N_OUT; o++)
          if (n_valid[o] && n_src[o] == src_idx_t'(start_in)) n_valid[o] = 1'b0;
        t = int'(dor[start_in]);
        if (n_valid[t]) begin
          rb_save = 1'b1; rb_save_src = n_src[t]; rb_save_dst = out_idx_t'(t);
          ev_preempt = 1'b1;
        end
        n_valid[t] = 1'b1; n_src[t] = src_idx_t'(start_in); n_db[t] = 1'b1;
        busy_src[start_in] = 1'b1;
        n_recovering = 1'b1;
        n_rec_src    = src_idx_t'(start_in);
      end
    end

    // 4. normal fully adaptive allocation
    for (int k = 0; k < N_IN; k++) begin
      s = (int'(rr) + k) % N_IN;
      if (s != IN_DB && src_valid[s] && src_flit[s].head && !busy_src[s]) begin
        found = 1'b0;
        for (int o = 0; o < N_OUT; o++) begin
          if (!found && adaptive[s][o] && !n_valid[o] && out_send[o]) begin
            found = 1'b1;
            n_valid[o] = 1'b1; n_src[o] = src_idx_t'(s); n_db[o] = 1'b0;
            busy_src[s] = 1'b1;
          end
        end
      end
    end
  end

  assign hold       = recovering || start;
  assign ev_start   = start;
  assign ev_restore = rb_restore;

  always_comb begin
    for (int i = 0; i < N_NET; i++) begin
      blocked[i]   = src_valid[i] && src_flit[i].head && !pop[i]
                     && !(recovering && rec_src == src_idx_t'(i));
      release_o[i] = (pop[i] && src_flit[i].head && !fire_db_src[i])
                     || (rec_done && rec_src == src_idx_t'(i));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < N_OUT; o++) begin
        c_valid[o] <= 1'b0;
        c_src[o]   <= '0;
        c_db[o]    <= 1'b0;
      end
      recovering <= 1'b0;
      rec_src    <= '0;
      rec_need   <= '0;
      rec_sent   <= '0;
      rr         <= '0;
    end else begin
      for (int o = 0; o < N_OUT; o++) begin
        c_valid[o] <= n_valid[o];
        c_src[o]   <= n_src[o];
        c_db[o]    <= n_db[o];
      end
      recovering <= n_recovering;
      rec_src    <= n_rec_src;
      if (start) begin
        rec_need <= 8'(int'(hops[start_in]) * DB_DEPTH + 1);
        rec_sent <= '0;
      end else if (recovering && fire_db_src[rec_src]) begin
        rec_sent <= rec_sent + 1'b1;
      end
      rr         <= (rr == 3'(N_IN-1)) ? '0 : rr + 1'b1;
    end
  end

  // no two outputs are ever connected to the same input
  for (genvar a = 0; a < N_OUT; a++) begin : g_chk_a
    for (genvar b = a + 1; b < N_OUT; b++) begin : g_chk_b
      a_one_output_per_input: assert property (@(posedge clk) disable iff (!rst_n)
        !(c_valid[a] && c_valid[b] && c_src[a] == c_src[b]));
    end
  end
endmodule
