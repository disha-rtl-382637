// tb_disha_network: end-to-end test of a small Disha torus under heavy load.
//
// Every node injects NPKT packets of LEN flits (32, the evaluated message
// length) to random other nodes as fast as its injection port accepts them.
// With one lane per channel and fully adaptive routing on a torus, such a
// load deadlocks the network repeatedly; the test passes only if every packet
// still arrives complete, in order and at the right node, i.e. Disha recovers.
// Checked every cycle: exactly one Token exists. Mechanisms counted, each of
// which must occur at least once: Deadlock Bit set by time-out, Token capture
// (recovery start), crossbar reconfiguration (displaced connection), restore
// from the reconfiguration buffer, packets delivered over the Deadlock Buffer
// path, flits of the two kinds interleaved at a node, and a Deadlock Bit
// cleared because the packet moved on without the Token.
//
// Flit contents: head data = {src[7:0], dst_y[3:0], dst_x[3:0]}, other flits
// data = {src[7:0], packet number[2:0], flit number[4:0]}.
module tb_disha_network;
  import disha_pkg::*;

  localparam int KX   = 4;
  localparam int KY   = 4;
  localparam int NN   = KX * KY;
  localparam int LEN  = 32;
  localparam int NPKT = 24;
  localparam int TOUT = 8;
  localparam int MAX_CYCLES = 200000;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

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

  disha_network #(.KX(KX), .KY(KY), .TORUS(1'b1), .TOUT(TOUT)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_start = 0, n_preempt = 0, n_restore = 0, n_dl_set = 0, n_dl_free = 0;
  int n_db_pkts = 0, n_interleave = 0, delivered = 0;

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

  function automatic int pick_dst(int src);
    int d;
    do d = int'($urandom_range(NN-1)); while (d == src);
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
    void'($urandom(7));
    for (int n = 0; n < NN; n++) begin
      sent_pkts[n] = 0; sent_flit[n] = 0; cur_dst[n] = pick_dst(n);
      dl_prev[n] = '0; rec_prev[n] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
  end

  always @(posedge clk) if (rst_n) begin
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
    if (delivered == NN * NPKT) finish_test();
  end

  task automatic finish_test();
    $display("cycles=%0d delivered=%0d deadlock_bits_set=%0d recoveries=%0d reconfigurations=%0d restores=%0d db_packets=%0d interleaved=%0d bits_cleared_without_token=%0d",
             cycle, delivered, n_dl_set, n_start, n_preempt, n_restore, n_db_pkts, n_interleave, n_dl_free);
    check(delivered == NN * NPKT, "not every packet delivered");
    check(n_dl_set > 0,     "no Deadlock Bit was ever set");
    check(n_start > 0,      "no Token capture / recovery");
    check(n_preempt > 0,    "no crossbar reconfiguration");
    check(n_restore > 0,    "no restore from the reconfiguration buffer");
    check(n_db_pkts > 0,    "no packet delivered over the Deadlock Buffer path");
    check(n_interleave > 0, "no interleaving of normal and Deadlock Buffer flits at a node");
    check(n_dl_free > 0,    "no Deadlock Bit cleared without the Token");
    check(n_start == n_db_pkts, "recoveries and Deadlock Buffer deliveries differ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    $display("watchdog: delivered %0d of %0d", delivered, NN * NPKT);
    failures++;
    finish_test();
  end
endmodule
