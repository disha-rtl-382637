// route_compute: the address decoder of one router input.
//
// From the router's own position (cur_x, cur_y) and a head flit's destination
// it gives two answers in the same cycle:
//  * adaptive: one bit per output (X+, X-, Y+, Y-, Node) for every output that
//    lies on some shortest path to the destination. The normal input buffers
//    may use any of them (fully adaptive, minimal). Only the Node bit is set
//    when the packet has arrived.
//  * dor: the single output a packet travelling on the Deadlock Buffer path
//    takes: X first, then Y, then Node (dimension order).
// With TORUS set the rings wrap, and a direction is productive when it is the
// shorter way round; when both ways are equally long both are offered and the
// dimension-order route takes the + way. With TORUS clear the network is a
// mesh. Misrouting is not offered, so no livelock bound is needed.
//  * hops: the length of a shortest path, used to know when a packet sent on
//    the Deadlock Buffer path has certainly reached its destination.
module route_compute
  import disha_pkg::*;
#(
  parameter int KX    = 16,
  parameter int KY    = 16,
  parameter bit TORUS = 1'b1
) (
  input  coord_t         cur_x,
  input  coord_t         cur_y,
  input  coord_t         dst_x,
  input  coord_t         dst_y,
  output logic [N_OUT-1:0] adaptive,
  output out_idx_t       dor,
  output logic [COORD_W:0] hops
);
  // productive directions of one dimension: {minus, plus}
  function automatic logic [1:0] dim_dirs(int cur, int dst, int k, bit torus);
    int fwd;
    logic [1:0] d;
    d = 2'b00;
    if (cur != dst) begin
      if (torus) begin
        fwd = (dst >= cur) ? dst - cur : dst - cur + k;
        if (fwd < k - fwd)      d = 2'b01;
        else if (fwd > k - fwd) d = 2'b10;
        else                    d = 2'b11;
      end else begin
        d = (dst > cur) ? 2'b01 : 2'b10;
      end
    end
    return d;
  endfunction

  // hop distance along one dimension
  function automatic int dim_dist(int cur, int dst, int k, bit torus);
    int d;
    d = (dst >= cur) ? dst - cur : cur - dst;
    if (torus && k - d < d) d = k - d;
    return d;
  endfunction

  logic [1:0] xd, yd;

  always_comb begin
    xd = dim_dirs(int'(cur_x), int'(dst_x), KX, TORUS);
    yd = dim_dirs(int'(cur_y), int'(dst_y), KY, TORUS);
    hops = (COORD_W+1)'(dim_dist(int'(cur_x), int'(dst_x), KX, TORUS)
                      + dim_dist(int'(cur_y), int'(dst_y), KY, TORUS));
    adaptive = '0;
    adaptive[OUT_XP] = xd[0];
    adaptive[OUT_XM] = xd[1];
    adaptive[OUT_YP] = yd[0];
    adaptive[OUT_YM] = yd[1];
    adaptive[OUT_NODE] = (xd == 2'b00) && (yd == 2'b00);
    if (xd[0])      dor = out_idx_t'(OUT_XP);
    else if (xd[1]) dor = out_idx_t'(OUT_XM);
    else if (yd[0]) dor = out_idx_t'(OUT_YP);
    else if (yd[1]) dor = out_idx_t'(OUT_YM);
    else            dor = out_idx_t'(OUT_NODE);
  end
endmodule
