// deadlock_detector: time-out based deadlock detection for one input.
//
// T_elapsed counts the cycles in which the head flit at the front of the input
// cannot be sent out; it returns to zero in any cycle in which no head is
// blocked (a new packet thus starts from zero). The count is compared with the
// threshold T_out (t_out, loaded with a constant); when T_elapsed > T_out the
// Deadlock Bit is set. The bit stays set until 'release' is pulsed: the router
// pulses it when the head leaves normally (some other router broke the cycle)
// or when the tail of the packet it sent down the Deadlock Buffer path has
// gone by. The counter saturates instead of wrapping.
//
// Timing: with the head blocked from cycle 0 on, T_elapsed = k during cycle k,
// the comparison first holds in cycle t_out+1, and deadlock is high from cycle
// t_out+2 on.
module deadlock_detector #(
  parameter int CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             blocked,   // a head flit is waiting and was not sent
  input  logic             release_i, // clear the Deadlock Bit
  input  logic [CNT_W-1:0] t_out,
  output logic             deadlock,  // the Deadlock Bit
  output logic [CNT_W-1:0] t_elapsed
);
  logic timed_out;
  assign timed_out = t_elapsed > t_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_elapsed <= '0;
      deadlock  <= 1'b0;
    end else begin
      if (!blocked)               t_elapsed <= '0;
      else if (~&t_elapsed)       t_elapsed <= t_elapsed + 1'b1;
      if (release_i)              deadlock  <= 1'b0;
      else if (blocked && timed_out) deadlock <= 1'b1;
    end
  end
endmodule
