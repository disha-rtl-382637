// tb_flit_fifo: random pushes and pops on a 2-deep and a 1-deep flit buffer,
// compared with a queue model: data order, empty, full and count.
module tb_flit_fifo;
  import disha_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  wr2, rd2, e2, f2, wr1, rd1, e1, f1;
  flit_t wd2, rq2, wd1, rq1;
  logic [1:0] c2;
  logic [0:0] c1;

  flit_fifo #(.DEPTH(2)) u2 (.clk, .rst_n, .wr_en(wr2), .wr_data(wd2), .rd_en(rd2),
                             .rd_data(rq2), .empty(e2), .full(f2), .count(c2));
  flit_fifo #(.DEPTH(1)) u1 (.clk, .rst_n, .wr_en(wr1), .wr_data(wd1), .rd_en(rd1),
                             .rd_data(rq1), .empty(e1), .full(f1), .count(c1));

  flit_t q2[$], q1[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    wr2 = 0; rd2 = 0; wr1 = 0; rd1 = 0; wd2 = '0; wd1 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(e2 == (q2.size() == 0) && f2 == (q2.size() == 2) && int'(c2) == q2.size(), "depth-2 flags");
      check(e1 == (q1.size() == 0) && f1 == (q1.size() == 1) && int'(c1) == q1.size(), "depth-1 flags");
      if (q2.size() > 0) check(rq2 == q2[0], "depth-2 data order");
      if (q1.size() > 0) check(rq1 == q1[0], "depth-1 data order");
      rd2 = (q2.size() > 0) && ($urandom_range(3) != 0);
      wr2 = ((q2.size() < 2) || rd2) && ($urandom_range(3) != 0);
      wd2 = flit_t'($urandom);
      rd1 = (q1.size() > 0) && ($urandom_range(1) != 0);
      wr1 = (q1.size() < 1 || rd1) && ($urandom_range(1) != 0);
      wd1 = flit_t'($urandom);
      @(posedge clk);
      if (rd2) void'(q2.pop_front());
      if (wr2) q2.push_back(wd2);
      if (rd1) void'(q1.pop_front());
      if (wr1) q1.push_back(wd1);
    end
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
