// token_logic: the router's stage of the circulating Token.
//
// One Token travels along a fixed ring through every router and grants the
// right to use the Deadlock Buffer path, so that only one packet uses it at a
// time. A one-bit latch holds the Token while it is at this router. Each
// cycle the Token is passed on (token_out high for one cycle) unless the
// router holds it: Output Token = Token present AND NOT Deadlock, where
// 'hold' is high while the router uses, or is starting to use, the Deadlock
// Buffer path. A Token arriving on token_in is latched at the next edge, so it
// advances one router per clock; the router that resets with INIT_TOKEN set
// owns it after reset.
module token_logic #(
  parameter bit INIT_TOKEN = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic token_in,
  input  logic hold,
  output logic token_here,
  output logic token_out
);
  assign token_out = token_here && !hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) token_here <= INIT_TOKEN;
    else        token_here <= token_in || (token_here && hold);
  end

  a_single_token: assert property (@(posedge clk) disable iff (!rst_n) !(token_in && token_here && hold));
endmodule
