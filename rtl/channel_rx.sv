// channel_rx: receive side of a router's four network channels.
//
// Each incoming channel carries Req, Status and a flit; the router answers
// with Send. A flit with Status low goes to that channel's own input buffer;
// a flit with Status high bypasses the input buffer and goes into the single
// Deadlock Buffer the four channels share (the role of the Status-enabled
// tri-state buffers in front of the Deadlock Buffer). Send is high when the
// buffer the flit is headed for has room, so it follows Status within the
// cycle; Status comes from a register in the sender, so no loop forms.
//
// This design's own additions: if two channels carry Status at once, the
// lowest-numbered one is taken, and once the head flit of a packet has entered
// the Deadlock Buffer, the buffer stays locked to that channel until the
// packet's tail flit has entered, so that flits of two packets never mix in it.
// A flit moves in a cycle in which Req and Send are both high; a flit that is
// refused may be withdrawn by the sender (the sender's crossbar may be
// reconfigured in between), so nothing is latched without Send.
module channel_rx
  import disha_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  chan_fwd_t in_fwd  [N_NET],
  output logic      in_send [N_NET],
  input  logic      ib_full [N_NET],
  output logic      ib_wr   [N_NET],
  output flit_t     ib_wdata[N_NET],
  input  logic      db_full,
  output logic      db_wr,
  output flit_t     db_wdata
);
  logic       locked;
  logic [1:0] lock_ch;
  logic       sel_valid;
  logic [1:0] sel_ch;

  // channel granted the Deadlock Buffer this cycle
  always_comb begin
    sel_valid = 1'b0;
    sel_ch    = '0;
    if (locked) begin
      sel_valid = in_fwd[lock_ch].req && in_fwd[lock_ch].status;
      sel_ch    = lock_ch;
    end else begin
      for (int c = N_NET-1; c >= 0; c--) begin
        if (in_fwd[c].req && in_fwd[c].status && in_fwd[c].flit.head) begin
          sel_valid = 1'b1;
          sel_ch    = 2'(c);
        end
      end
    end
  end

  always_comb begin
    db_wr    = 1'b0;
    db_wdata = in_fwd[sel_ch].flit;
    for (int c = 0; c < N_NET; c++) begin
      ib_wdata[c] = in_fwd[c].flit;
      if (in_fwd[c].status) begin
        in_send[c] = !db_full && sel_valid && (sel_ch == 2'(c));
        ib_wr[c]   = 1'b0;
      end else begin
        in_send[c] = !ib_full[c];
        ib_wr[c]   = in_fwd[c].req && !ib_full[c];
      end
    end
    db_wr = sel_valid && !db_full;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked  <= 1'b0;
      lock_ch <= '0;
    end else if (db_wr) begin
      if (db_wdata.tail) begin
        locked <= 1'b0;
      end else begin
        locked  <= 1'b1;
        lock_ch <= sel_ch;
      end
    end
  end

  // while locked, the owning channel may only continue the packet it started
  a_lock_body: assert property (@(posedge clk) disable iff (!rst_n)
    locked && in_fwd[lock_ch].req && in_fwd[lock_ch].status |-> !in_fwd[lock_ch].flit.head);
endmodule
