// tb_deadlock_detector: checks the time-out timing of the Deadlock Bit for
// several thresholds (bit high from the (T_out+2)-th blocked cycle on), that
// an unblocked cycle restarts T_elapsed, that the bit stays set while the head
// is no longer blocked until released, and that the counter saturates.
module tb_deadlock_detector;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic blocked, rel, dl;
  logic [7:0] t_out, te;

  deadlock_detector #(.CNT_W(8)) dut (.clk, .rst_n, .blocked, .release_i(rel), .t_out,
                                      .deadlock(dl), .t_elapsed(te));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // block for n cycles and return the first cycle index (0-based) with dl high, -1 if none
  task automatic run_blocked(int n, output int first);
    first = -1;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      if (dl && first < 0) first = k;
      blocked = 1'b1;
    end
  endtask

  initial begin
    int first;
    blocked = 0; rel = 0; t_out = 8;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4; i++) begin
      int to;
      to = (i == 0) ? 4 : (i == 1) ? 8 : (i == 2) ? 16 : 64;
      @(negedge clk); blocked = 0; rel = 1; t_out = 8'(to);
      @(negedge clk); rel = 0;
      check(!dl && te == 0, "idle after release");
      // blocked from cycle 0; dl observed at negedge of cycle k means it was set at edge k
      for (int k = 0; k < to + 5; k++) begin
        blocked = 1'b1;
        @(negedge clk);
        check(dl == (k >= to + 1), $sformatf("T_out=%0d: after %0d blocked cycles dl=%0b", to, k + 1, dl));
      end
      // no longer blocked: bit stays, count restarts
      blocked = 0;
      @(negedge clk);
      check(dl && te == 0, "bit held, T_elapsed cleared when not blocked");
    end
    // interrupted blocking never times out
    @(negedge clk); rel = 1; t_out = 8;
    @(negedge clk); rel = 0;
    for (int k = 0; k < 40; k++) begin
      blocked = (k % 8) != 7;
      @(negedge clk);
      check(!dl, "interrupted waits must not time out");
    end
    // saturation
    blocked = 1; t_out = 8'd255;
    repeat (300) @(negedge clk);
    check(te == 8'hff && !dl, "counter saturates without wrapping");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
