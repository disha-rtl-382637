// disha_traffic_run: drives one Disha network with packet traffic and checks
// delivery. Every node sends NPKT packets of LEN flits as fast as it can;
// each destination is uniform random, except that with probability HOT_PCT %
// it is one of four hot-spot nodes. Every packet must arrive complete, in
// order, at its destination; exactly one Token must exist every cycle. When
// all packets have arrived, 'done' rises and the counts are final:
// 'recoveries' is the number of Token captures. EARLY selects the network's
// early Token release.
module disha_traffic_run
  import disha_pkg::*;
#(
  parameter int KX      = 4,
  parameter int KY      = 4,
  parameter int LEN     = 32,
  parameter int NPKT    = 16,
  parameter int TOUT    = 8,
  parameter int HOT_PCT = 0,
  parameter bit EARLY   = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   delivered,
  output int   n_start
);
  localparam int NN = KX * KY;
  localparam int HOT [4] = '{NN/4 + 1, NN/2 + KX/2, 3*NN/4 + 2, KX + KX/2};
  logic             inj_valid [NN];
  flit_t            inj_flit  [NN];
  logic             inj_ready [NN];
  logic             ej_valid  [NN];
  flit_t            ej_flit   [NN];
  logic             ej_db     [NN];
  logic             ej_ready  [NN];
  logic             token_held[NN];
  logic [N_NET-1:0] deadlock_bits[NN];
  logic             recovering[NN];
  logic             reconfig_held[NN];
  logic             ev_start  [NN];
  logic             ev_preempt[NN];
  logic             ev_restore[NN];

  disha_network #(.KX(KX), .KY(KY), .TORUS(1'b1), .TOUT(TOUT), .EARLY_RELEASE(EARLY)) dut (.*);

  int cycle = 0;
  int n_preempt = 0, n_restore = 0, n_dl_set = 0, n_dl_free = 0;
  int n_db_pkts = 0, n_interleave = 0;
  initial begin checks = 0; failures = 0; delivered = 0; n_start = 0; done = 1'b0; end

  // injection state
  int sent_pkts [NN];
  int sent_flit [NN];
  int cur_dst   [NN];

  // reassembly state per node and per kind (0 normal, 1 Deadlock Buffer path)
  int  rx_src [NN][2];
  int  rx_pkt [NN][2];
  int  rx_seq [NN][2];
  bit  rx_open[NN][2];

  logic [N_NET-1:0] dl_prev [NN];
  logic             rec_prev[NN];

  function automatic flit_t make_flit(int src, int pkt, int seq, int dst);
    flit_t f;
    f.head = (seq == 0);
    f.tail = (seq == LEN-1);
    if (seq == 0) f.data = {8'(src), 4'(dst / KX), 4'(dst % KX)};
    else          f.data = {8'(src), 3'(pkt), 5'(seq)};
    return f;
  endfunction

  // uniform random destination; with probability HOT_PCT % one of four hot spots
  function automatic int pick_dst(int src);
    int d;
    do begin
      if (int'($urandom_range(99)) < HOT_PCT) d = HOT[$urandom_range(3)];
      else d = int'($urandom_range(NN-1));
    end while (d == src);
    return d;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // drive the injection ports from registered state
  always_comb begin
    for (int n = 0; n < NN; n++) begin
      inj_valid[n] = rst_n && (sent_pkts[n] < NPKT);
      inj_flit[n]  = make_flit(n, sent_pkts[n] % 8, sent_flit[n], cur_dst[n]);
      ej_ready[n]  = 1'b1;
    end
  end

  initial begin
    for (int n = 0; n < NN; n++) begin
      sent_pkts[n] = 0; sent_flit[n] = 0; cur_dst[n] = pick_dst(n);
      dl_prev[n] = '0; rec_prev[n] = 0;
    end
  end

  always @(posedge clk) if (rst_n && !done) begin
    int tokens;
    int k;
    cycle++;
    tokens = 0;
    for (int n = 0; n < NN; n++) begin
      tokens += int'(token_held[n]);
      // injection
      if (inj_valid[n] && inj_ready[n]) begin
        if (sent_flit[n] == LEN-1) begin
          sent_flit[n] = 0;
          sent_pkts[n]++;
          cur_dst[n] = pick_dst(n);
        end else sent_flit[n]++;
      end
      // ejection and reassembly
      if (ej_valid[n] && ej_ready[n]) begin
        k = int'(ej_db[n]);
        if (k == 1 && rx_open[n][0]) n_interleave++;
        if (ej_flit[n].head) begin
          check(!rx_open[n][k], "head while a packet of the same kind is open");
          check(int'(ej_flit[n].data[3:0]) == n % KX && int'(ej_flit[n].data[7:4]) == n / KX,
                $sformatf("packet for (%0d,%0d) ejected at node %0d", ej_flit[n].data[3:0], ej_flit[n].data[7:4], n));
          rx_open[n][k] = 1; rx_src[n][k] = int'(ej_flit[n].data[15:8]); rx_seq[n][k] = 1;
          rx_pkt[n][k] = -1;
        end else begin
          check(rx_open[n][k], "body flit with no open packet");
          check(int'(ej_flit[n].data[15:8]) == rx_src[n][k], "flit from wrong source");
          check(int'(ej_flit[n].data[4:0]) == rx_seq[n][k],
                $sformatf("node %0d flit number %0d expected %0d", n, ej_flit[n].data[4:0], rx_seq[n][k]));
          if (rx_pkt[n][k] < 0) rx_pkt[n][k] = int'(ej_flit[n].data[7:5]);
          else check(int'(ej_flit[n].data[7:5]) == rx_pkt[n][k], "flits of two packets mixed");
          rx_seq[n][k]++;
          if (ej_flit[n].tail) begin
            check(rx_seq[n][k] == LEN, "tail at wrong position");
            rx_open[n][k] = 0;
            delivered++;
            if (k == 1) n_db_pkts++;
          end
        end
      end
      // events
      n_start   += int'(ev_start[n]);
      n_preempt += int'(ev_preempt[n]);
      n_restore += int'(ev_restore[n]);
      for (int c = 0; c < N_NET; c++) begin
        if (deadlock_bits[n][c] && !dl_prev[n][c]) n_dl_set++;
        if (!deadlock_bits[n][c] && dl_prev[n][c] && !rec_prev[n]) n_dl_free++;
      end
      dl_prev[n]  = deadlock_bits[n];
      rec_prev[n] = recovering[n];
    end
    check(tokens == 1, $sformatf("%0d Tokens in the network", tokens));
    if (delivered == NN * NPKT && !done) begin
      done <= 1'b1;
      final_checks();
    end
  end

  task automatic final_checks();
    check(n_start == n_db_pkts, "recoveries and Deadlock Buffer deliveries differ");
    $display("KX=%0d KY=%0d TOUT=%0d HOT_PCT=%0d EARLY=%0d: cycles=%0d delivered=%0d recoveries=%0d (%0d per 1000 packets) reconfigurations=%0d bits_cleared_without_token=%0d",
             KX, KY, TOUT, HOT_PCT, EARLY, cycle, delivered, n_start, n_start * 1000 / delivered, n_preempt, n_dl_free);
  endtask
endmodule
