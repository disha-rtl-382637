// tb_disha_workloads: the traffic patterns the scheme was evaluated under,
// run on 8 x 8 tori of one-lane routers with 32-flit messages:
//  * uniform random traffic with time-outs of 4 and 64 cycles (the two
//    thresholds whose Token-capture rates were compared), and with 16;
//  * uniform traffic with 5 % of packets aimed at 4 hot-spot nodes, time-out 8.
// Each network is saturated (every node sends as fast as it can). All packets
// must arrive; each run must recover from at least one deadlock; and the short
// time-out must capture the Token at least as often as the long one. The
// number of Token captures per 1000 delivered packets is printed per run.
module tb_disha_workloads;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  localparam int NR = 4;
  logic done [NR];
  int   c [NR], f [NR], d [NR], r [NR];

  disha_traffic_run #(.KX(8), .KY(8), .NPKT(8), .TOUT(4))                 u_t4  (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]), .delivered(d[0]), .n_start(r[0]));
  disha_traffic_run #(.KX(8), .KY(8), .NPKT(8), .TOUT(64))                u_t64 (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]), .delivered(d[1]), .n_start(r[1]));
  disha_traffic_run #(.KX(8), .KY(8), .NPKT(8), .TOUT(16))                u_t16 (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]), .delivered(d[2]), .n_start(r[2]));
  disha_traffic_run #(.KX(8), .KY(8), .NPKT(8), .TOUT(8), .HOT_PCT(5))    u_hot (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]), .delivered(d[3]), .n_start(r[3]));

  int checks = 0, failures = 0;

  task automatic report();
    checks = 0; failures = 0;
    for (int i = 0; i < NR; i++) begin
      checks += c[i] + 2; failures += f[i];
      if (!done[i]) begin failures++; $display("FAIL: run %0d delivered only %0d packets", i, d[i]); end
      if (r[i] == 0) begin failures++; $display("FAIL: run %0d never recovered", i); end
    end
    checks++;
    if (r[0] < r[1]) begin failures++; $display("FAIL: time-out 4 captured the Token less often than 64"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    void'($urandom(11));
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    @(posedge clk);
    report();
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog");
    report();
  end
endmodule
