// tb_token_logic: Token truth table (Output = Token present AND NOT hold),
// holding for several cycles, one-cycle pass, and the reset owner.
module tb_token_logic;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tin, hold, here0, out0, here1, out1;
  token_logic #(.INIT_TOKEN(1'b0)) u0 (.clk, .rst_n, .token_in(tin), .hold, .token_here(here0), .token_out(out0));
  token_logic #(.INIT_TOKEN(1'b1)) u1 (.clk, .rst_n, .token_in(1'b0), .hold, .token_here(here1), .token_out(out1));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    tin = 0; hold = 1;
    #2;
    check(!here0 && here1, "reset owner");
    @(posedge clk); rst_n = 1'b1;
    // table rows with no token: output 0 for either hold value
    @(negedge clk); hold = 0; #1 check(!out0, "in 0, deadlock 0 -> out 0");
    hold = 1; #1 check(!out0, "in 0, deadlock 1 -> out 0");
    check(here1, "owner keeps the Token while holding");
    // owner passes with hold low
    hold = 0; #1 check(out1, "in 1, deadlock 0 -> out 1");
    hold = 1; #1 check(!out1, "in 1, deadlock 1 -> out 0");
    // token arrives at u0, is held 5 cycles, then passed for one cycle
    hold = 1; tin = 1;
    @(negedge clk); tin = 0;
    check(here0 && !out0, "token latched and held");
    repeat (5) begin @(negedge clk); check(here0 && !out0, "still held"); end
    hold = 0; #1;
    check(out0, "passed when hold drops");
    @(negedge clk);
    check(!here0 && !out0, "gone after passing");
    // a token arriving with hold low stays one cycle only
    tin = 1; @(negedge clk); tin = 0;
    check(here0 && out0, "one-cycle stay");
    @(negedge clk);
    check(!here0, "moved on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
