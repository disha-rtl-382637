// tb_disha_router: one router at (1,1) of a 4 x 4 torus, with its neighbours
// modelled by the testbench (input buffer and Deadlock Buffer room per
// outgoing channel, Send derived from the Status the router drives).
//  1. A packet injected at the node for (3,1) leaves on X+ with Status low,
//     in order, 2 cycles per flit pipeline start-up.
//  2. A packet arriving on X- for (1,1) is ejected at the node.
//  3. Reconfiguration: a normal packet from Y- to (1,2) holds output Y+ and
//     stalls; a Deadlock Buffer packet arriving on X+ for (1,3) takes Y+ with
//     Status high; after its tail the normal packet resumes on Y+.
//  4. Detection and recovery: a packet from X- for (3,1) finds X+ and X-
//     without room; its Deadlock Bit rises T_out+2 cycles after it began to
//     wait; the Token then arriving is held, the packet leaves on X+ with
//     Status high into the neighbour's Deadlock Buffer, and the Token moves on
//     only after the tail has gone.
// A second router built with EARLY_RELEASE = 1 receives the same stimulus; it
// must behave identically except that in step 4 it passes the Token on as
// soon as hops x DB_DEPTH + 1 = 2 x 1 + 1 = 3 flits of the recovered packet
// have left, before the tail.
module tb_disha_router;
  import disha_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  localparam int TOUT = 8;
  localparam int LEN  = 6;

  chan_fwd_t in_fwd [N_NET];
  logic      in_send[N_NET];
  chan_fwd_t out_fwd[N_NET];
  logic      out_send[N_NET];
  logic      inj_valid, inj_ready, ej_valid, ej_db, ej_ready;
  flit_t     inj_flit, ej_flit;
  logic      token_in, token_out, token_held, recovering, reconfig_held;
  logic [N_NET-1:0] deadlock_bits;
  logic      ev_start, ev_preempt, ev_restore;

  disha_router #(.KX(4), .KY(4), .TORUS(1'b1), .CNT_W(8)) dut (
    .clk, .rst_n, .my_x(coord_t'(1)), .my_y(coord_t'(1)), .t_out(8'(TOUT)),
    .in_fwd, .in_send, .out_fwd, .out_send,
    .inj_valid, .inj_flit, .inj_ready, .ej_valid, .ej_flit, .ej_db, .ej_ready,
    .token_in, .token_out, .token_held, .deadlock_bits, .recovering, .reconfig_held,
    .ev_start, .ev_preempt, .ev_restore);

  // the same router with early Token release
  chan_fwd_t out_fwd_e [N_NET];
  logic      out_send_e[N_NET];
  logic      in_send_e [N_NET];
  logic      inj_ready_e, ej_valid_e, ej_db_e, token_out_e, token_held_e, recovering_e, reconfig_held_e;
  flit_t     ej_flit_e;
  logic [N_NET-1:0] deadlock_bits_e;
  logic      ev_start_e, ev_preempt_e, ev_restore_e;

  disha_router #(.KX(4), .KY(4), .TORUS(1'b1), .CNT_W(8), .EARLY_RELEASE(1'b1)) dut_e (
    .clk, .rst_n, .my_x(coord_t'(1)), .my_y(coord_t'(1)), .t_out(8'(TOUT)),
    .in_fwd, .in_send(in_send_e), .out_fwd(out_fwd_e), .out_send(out_send_e),
    .inj_valid, .inj_flit, .inj_ready(inj_ready_e),
    .ej_valid(ej_valid_e), .ej_flit(ej_flit_e), .ej_db(ej_db_e), .ej_ready,
    .token_in, .token_out(token_out_e), .token_held(token_held_e), .deadlock_bits(deadlock_bits_e),
    .recovering(recovering_e), .reconfig_held(reconfig_held_e),
    .ev_start(ev_start_e), .ev_preempt(ev_preempt_e), .ev_restore(ev_restore_e));

  // neighbour model
  logic ib_room [N_NET], db_room [N_NET];
  always_comb for (int c = 0; c < N_NET; c++) begin
    out_send[c]   = out_fwd[c].status ? db_room[c] : ib_room[c];
    out_send_e[c] = out_fwd_e[c].status ? db_room[c] : ib_room[c];
  end

  // logs of flits leaving: [channel][status]
  int log_data [N_NET][2][$];
  int ej_log [2][$];
  int n_preempt = 0, n_restore = 0, n_start = 0, tok_out_cycle = -1;
  int db_sent_e = 0, early_tok_flits = -1, mismatches = 0;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < N_NET; c++)
      if (out_fwd[c].req && out_send[c]) log_data[c][out_fwd[c].status].push_back(int'(out_fwd[c].flit.data));
    if (ej_valid && ej_ready) ej_log[ej_db].push_back(int'(ej_flit.data));
    n_preempt += int'(ev_preempt);
    n_restore += int'(ev_restore);
    n_start   += int'(ev_start);
    if (token_out) tok_out_cycle = cycle;
    // the early-release router must move the same flits
    for (int c = 0; c < N_NET; c++)
      if (out_fwd_e[c].req != out_fwd[c].req || in_send_e[c] != in_send[c]
          || (out_fwd[c].req && (out_fwd_e[c].status != out_fwd[c].status || out_fwd_e[c].flit != out_fwd[c].flit)))
        mismatches++;
    if (ej_valid_e != ej_valid || (ej_valid && ej_flit_e != ej_flit)) mismatches++;
    // flits sent in earlier cycles when the Token leaves
    if (token_out_e && early_tok_flits < 0) early_tok_flits = db_sent_e;
    if (out_fwd_e[OUT_XP].req && out_fwd_e[OUT_XP].status && out_send_e[OUT_XP]) db_sent_e++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, what); end
  endtask

  function automatic flit_t mk(int seq, int n, int dx, int dy, int tag);
    flit_t f;
    f.head = (seq == 0); f.tail = (seq == n-1);
    f.data = (seq == 0) ? 16'({tag[7:0], 4'(dy), 4'(dx)}) : 16'({tag[7:0], 8'(seq)});
    return f;
  endfunction

  // drive flits [from, to) of a packet on input channel c
  task automatic send_flits(int c, bit status, int from, int to, int n, int dx, int dy, int tag);
    for (int s = from; s < to; s++) begin
      @(negedge clk);
      in_fwd[c].req = 1; in_fwd[c].status = status; in_fwd[c].flit = mk(s, n, dx, dy, tag);
      do @(posedge clk); while (!in_send[c]);
      #1 in_fwd[c].req = 0;
    end
  endtask

  function automatic bit is_packet(int q[$], int n, int dx, int dy, int tag);
    if (q.size() != n) return 0;
    for (int s = 0; s < n; s++) if (q[s] != int'(mk(s, n, dx, dy, tag).data)) return 0;
    return 1;
  endfunction

  initial begin
    int t0, tdl;
    for (int c = 0; c < N_NET; c++) begin in_fwd[c] = '0; ib_room[c] = 1; db_room[c] = 1; end
    inj_valid = 0; inj_flit = '0; ej_ready = 1; token_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // 1. injection towards (3,1)
    t0 = cycle;
    for (int s = 0; s < LEN; s++) begin
      @(negedge clk); inj_valid = 1; inj_flit = mk(s, LEN, 3, 1, 8'h11);
      do @(posedge clk); while (!inj_ready);
      #1 inj_valid = 0;
    end
    repeat (6) @(posedge clk);
    check(is_packet(log_data[OUT_XP][0], LEN, 3, 1, 8'h11), "injected packet on X+ with Status low");
    check(!token_held, "Token left the router (not owner, never received)");

    // 2. arrival on X- for this node
    send_flits(IN_XM, 0, 0, LEN, LEN, 1, 1, 8'h22);
    repeat (4) @(posedge clk);
    check(is_packet(ej_log[0], LEN, 1, 1, 8'h22), "packet ejected at its destination");

    // 3. reconfiguration of output Y+
    send_flits(IN_YM, 0, 0, 3, LEN, 1, 2, 8'h33);              // head + 2 flits, then stall
    repeat (3) @(posedge clk);
    check(log_data[OUT_YP][0].size() == 3, "normal packet started on Y+");
    send_flits(IN_XP, 1, 0, LEN, LEN, 1, 3, 8'h44);            // Deadlock Buffer packet
    repeat (4) @(posedge clk);
    check(n_preempt == 1, "Y+ connection displaced once");
    check(is_packet(log_data[OUT_YP][1], LEN, 1, 3, 8'h44), "Deadlock Buffer packet on Y+ with Status high");
    check(n_restore == 1 && !reconfig_held, "connection restored after the tail");
    send_flits(IN_YM, 0, 3, LEN, LEN, 1, 2, 8'h33);            // rest of the normal packet
    repeat (4) @(posedge clk);
    check(is_packet(log_data[OUT_YP][0], LEN, 1, 2, 8'h33), "normal packet resumed and completed on Y+");

    // 4. deadlock detection and recovery towards (3,1)
    ib_room[OUT_XP] = 0; ib_room[OUT_XM] = 0;
    for (int c = 0; c < N_NET; c++) begin log_data[c][0].delete(); log_data[c][1].delete(); end
    fork
      send_flits(IN_XM, 0, 0, LEN, LEN, 3, 1, 8'h55);
    join_none
    @(posedge clk); @(negedge clk); t0 = cycle;                 // edges up to the one writing the head
    tdl = -1;
    for (int k = 0; k < 30; k++) begin
      @(negedge clk);
      if (deadlock_bits[IN_XM] && tdl < 0) tdl = cycle - t0;
    end
    check(tdl == TOUT + 2, $sformatf("Deadlock Bit after %0d waiting cycles, expected %0d", tdl, TOUT + 2));
    check(n_start == 0 && log_data[OUT_XP][1].size() == 0, "no recovery without the Token");
    // the Token arrives
    tok_out_cycle = -1;
    db_sent_e = 0; early_tok_flits = -1;
    @(negedge clk); token_in = 1;
    @(negedge clk); token_in = 0;
    check(token_held && !token_out, "Token captured and held");
    @(negedge clk);
    check(n_start == 1 && recovering && token_held && !token_out, "recovery started, Token still held");
    repeat (LEN + 6) @(posedge clk);
    check(is_packet(log_data[OUT_XP][1], LEN, 3, 1, 8'h55), "deadlocked packet sent on X+ into the Deadlock Buffer");
    check(log_data[OUT_XP][0].size() == 0, "nothing sent to the full input buffer");
    check(tok_out_cycle > 0 && !token_held, "Token released after the tail");
    check(deadlock_bits == '0 && !recovering, "Deadlock Bit reset after the tail");
    check(early_tok_flits == 3, $sformatf("early release: Token passed after %0d flits, expected 3", early_tok_flits));
    check(!token_held_e && db_sent_e == LEN, "early release: whole packet still sent");
    check(mismatches == 0, $sformatf("the two routers moved different flits (%0d cycles)", mismatches));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
