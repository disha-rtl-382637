// tb_channel_rx: Status-steered reception. Flits with Status low go to their
// channel's input buffer when it has room; flits with Status high go to the
// Deadlock Buffer; Send follows the target buffer's room; two channels
// offering Deadlock Buffer flits at once are served one packet at a time,
// lowest channel first, and a packet keeps the Deadlock Buffer until its tail.
module tb_channel_rx;
  import disha_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  chan_fwd_t in_fwd  [N_NET];
  logic      in_send [N_NET];
  logic      ib_full [N_NET];
  logic      ib_wr   [N_NET];
  flit_t     ib_wdata[N_NET];
  logic      db_full, db_wr;
  flit_t     db_wdata;

  channel_rx dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic flit_t fl(bit h, bit t, int d);
    flit_t f; f.head = h; f.tail = t; f.data = 16'(d); return f;
  endfunction

  initial begin
    for (int c = 0; c < N_NET; c++) begin in_fwd[c] = '0; ib_full[c] = 0; end
    db_full = 0;
    @(posedge clk); rst_n = 1'b1;
    // normal flits, random buffer fullness
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      for (int c = 0; c < N_NET; c++) begin
        in_fwd[c].req = 1'($urandom); in_fwd[c].status = 0;
        in_fwd[c].flit = flit_t'($urandom); ib_full[c] = 1'($urandom);
      end
      #1;
      for (int c = 0; c < N_NET; c++) begin
        check(in_send[c] == !ib_full[c], "Send follows input buffer room");
        check(ib_wr[c] == (in_fwd[c].req && !ib_full[c]), "input buffer write");
        check(ib_wdata[c] == in_fwd[c].flit, "input buffer data");
      end
      check(!db_wr, "no Deadlock Buffer write for Status low");
    end
    // channels 1 and 3 both offer a 3-flit Deadlock Buffer packet
    @(negedge clk);
    for (int c = 0; c < N_NET; c++) begin in_fwd[c] = '0; ib_full[c] = 1; end
    begin
      int seq1, seq3, got1, got3;
      seq1 = 0; seq3 = 0; got1 = 0; got3 = 0;
      for (int it = 0; it < 20; it++) begin
        in_fwd[1].req = seq1 < 3; in_fwd[1].status = 1; in_fwd[1].flit = fl(seq1 == 0, seq1 == 2, 100 + seq1);
        in_fwd[3].req = seq3 < 3; in_fwd[3].status = 1; in_fwd[3].flit = fl(seq3 == 0, seq3 == 2, 300 + seq3);
        db_full = (it % 3 == 1);
        #1;
        check(!(in_send[1] && in_send[3]), "only one channel gets the Deadlock Buffer");
        check(db_wr == ((in_send[1] && in_fwd[1].req) || (in_send[3] && in_fwd[3].req)), "db write matches Send");
        if (in_send[1] && in_fwd[1].req) begin
          check(db_wdata == in_fwd[1].flit, "db data from channel 1");
          check(got3 == 0 || got3 == 3, "channel 3 packet not interrupted");
        end
        if (in_send[3] && in_fwd[3].req) begin
          check(db_wdata == in_fwd[3].flit, "db data from channel 3");
          check(got1 == 3, "lowest channel served first");
        end
        if (db_full) check(!in_send[1] && !in_send[3], "no Send while Deadlock Buffer full");
        @(posedge clk);
        if (in_send[1] && in_fwd[1].req) begin seq1++; got1++; end
        if (in_send[3] && in_fwd[3].req) begin seq3++; got3++; end
        @(negedge clk);
      end
      check(got1 == 3 && got3 == 3, "both packets fully received");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
