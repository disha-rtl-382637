// tb_xbar: random input flits, valids, selects and enables on the 6 x 5
// crossbar; every output must show its selected input, valid only if enabled.
module tb_xbar;
  import disha_pkg::*;
  int checks = 0, failures = 0;

  flit_t    in_flit [N_IN];
  logic     in_valid[N_IN];
  logic [2:0] sel   [N_OUT];
  logic     en      [N_OUT];
  flit_t    out_flit [N_OUT];
  logic     out_valid[N_OUT];

  xbar dut (.*);

  initial begin
    for (int it = 0; it < 500; it++) begin
      for (int i = 0; i < N_IN; i++) begin
        in_flit[i]  = flit_t'($urandom);
        in_valid[i] = 1'($urandom);
      end
      for (int o = 0; o < N_OUT; o++) begin
        sel[o] = 3'($urandom_range(N_IN-1));
        en[o]  = 1'($urandom);
      end
      #1;
      for (int o = 0; o < N_OUT; o++) begin
        checks++;
        if (out_valid[o] != (en[o] && in_valid[sel[o]]) || (en[o] && out_flit[o] != in_flit[sel[o]])) begin
          failures++;
          if (failures < 10) $display("FAIL: output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
