// reconfig_buffer: the reconfiguration buffer of the crossbar.
//
// When a packet on the Deadlock Buffer path needs an output that a normal
// packet is using, the crossbar is reconfigured and only the connection that
// was cut is remembered: the input (src) and the output (dst) it was connected
// to. One entry suffices because only one packet uses the Deadlock Buffer path
// at a time. 'save' stores a pair; 'restore' empties the buffer once the
// Deadlock Buffer packet's tail has left, and the decision logic reconnects
// src to dst. 'dst_match' flags, per output, the output the stored connection
// belongs to, and 'src_match' flags the suspended input, which must not be
// treated as idle meanwhile. Saving while full is a protocol error.
module reconfig_buffer
  import disha_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     save,
  input  src_idx_t save_src,
  input  out_idx_t save_dst,
  input  logic     restore,
  output logic     valid,
  output src_idx_t src,
  output out_idx_t dst,
  output logic [N_OUT-1:0] dst_match,
  output logic [N_IN-1:0]  src_match
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      src   <= '0;
      dst   <= '0;
    end else if (save) begin
      valid <= 1'b1;
      src   <= save_src;
      dst   <= save_dst;
    end else if (restore) begin
      valid <= 1'b0;
    end
  end

  always_comb begin
    for (int o = 0; o < N_OUT; o++) dst_match[o] = valid && (dst == out_idx_t'(o));
    for (int i = 0; i < N_IN; i++)  src_match[i] = valid && (src == src_idx_t'(i));
  end

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n) save |-> !valid || restore);
endmodule
