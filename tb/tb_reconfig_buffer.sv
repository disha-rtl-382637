// tb_reconfig_buffer: the example pairs of the crossbar reconfiguration
// (input 2 = X- to output 1 = X+ in one-based numbering, and input 2 to
// output 4 = Y-) saved, matched and restored, plus random save/restore
// sequences against a model.
module tb_reconfig_buffer;
  import disha_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic save, restore, valid;
  src_idx_t save_src, src;
  out_idx_t save_dst, dst;
  logic [N_OUT-1:0] dst_match;
  logic [N_IN-1:0]  src_match;

  reconfig_buffer dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_state(bit v, int s, int d);
    for (int o = 0; o < N_OUT; o++) check(dst_match[o] == (v && o == d), $sformatf("dst_match[%0d]", o));
    for (int i = 0; i < N_IN; i++)  check(src_match[i] == (v && i == s), $sformatf("src_match[%0d]", i));
    check(valid == v, "valid");
    if (v) check(int'(src) == s && int'(dst) == d, "stored pair");
  endtask

  initial begin
    bit mv; int ms, md;
    save = 0; restore = 0; save_src = '0; save_dst = '0;
    @(posedge clk); rst_n = 1'b1;
    @(negedge clk); expect_state(0, 0, 0);
    // X- (index 1) displaced from X+ (index 0)
    save = 1; save_src = src_idx_t'(IN_XM); save_dst = out_idx_t'(OUT_XP);
    @(negedge clk); save = 0;
    expect_state(1, IN_XM, OUT_XP);
    repeat (3) @(negedge clk);
    expect_state(1, IN_XM, OUT_XP);
    restore = 1; @(negedge clk); restore = 0;
    expect_state(0, 0, 0);
    // X- displaced from Y- (index 3)
    save = 1; save_src = src_idx_t'(IN_XM); save_dst = out_idx_t'(OUT_YM);
    @(negedge clk); save = 0;
    expect_state(1, IN_XM, OUT_YM);
    restore = 1; @(negedge clk); restore = 0;
    expect_state(0, 0, 0);
    // random sequences
    mv = 0; ms = 0; md = 0;
    for (int it = 0; it < 300; it++) begin
      if (!mv) begin
        save = 1'($urandom); restore = 0;
        save_src = src_idx_t'($urandom_range(N_IN-1)); save_dst = out_idx_t'($urandom_range(N_OUT-1));
      end else begin
        save = 0; restore = 1'($urandom);
      end
      @(negedge clk);
      if (save) begin mv = 1; ms = int'(save_src); md = int'(save_dst); end
      else if (restore) mv = 0;
      save = 0; restore = 0;
      expect_state(mv, ms, md);
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
