// tb_route_compute: exhaustive check of the address decoder on the default
// 16 x 16 torus and on a 5 x 3 mesh. Expected answers come from hop counts:
// a direction is productive if moving one step that way shortens the
// distance to the destination; the hop count is the sum of ring distances.
module tb_route_compute;
  import disha_pkg::*;
  int checks = 0, failures = 0;

  coord_t cx, cy, dx, dy;
  logic [N_OUT-1:0] ad_t, ad_m;
  out_idx_t dor_t, dor_m;
  logic [COORD_W:0] hops_t, hops_m;

  route_compute u_t (.cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .adaptive(ad_t), .dor(dor_t), .hops(hops_t));
  route_compute #(.KX(5), .KY(3), .TORUS(1'b0)) u_m (
    .cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .adaptive(ad_m), .dor(dor_m), .hops(hops_m));

  function automatic int ring_dist(int a, int b, int k, bit torus);
    int d = (a > b) ? a - b : b - a;
    if (torus && k - d < d) d = k - d;
    return d;
  endfunction

  function automatic logic [N_OUT-1:0] expect_mask(int x, int y, int tx, int ty, int kx, int ky, bit torus);
    logic [N_OUT-1:0] m = '0;
    int d0x = ring_dist(x, tx, kx, torus), d0y = ring_dist(y, ty, ky, torus);
    if (torus || x < kx-1) m[OUT_XP] = ring_dist((x+1) % kx, tx, kx, torus) < d0x;
    if (torus || x > 0)    m[OUT_XM] = ring_dist((x+kx-1) % kx, tx, kx, torus) < d0x;
    if (torus || y < ky-1) m[OUT_YP] = ring_dist((y+1) % ky, ty, ky, torus) < d0y;
    if (torus || y > 0)    m[OUT_YM] = ring_dist((y+ky-1) % ky, ty, ky, torus) < d0y;
    m[OUT_NODE] = (d0x == 0) && (d0y == 0);
    return m;
  endfunction

  function automatic int expect_dor(logic [N_OUT-1:0] m);
    if (m[OUT_XP]) return OUT_XP;
    if (m[OUT_XM]) return OUT_XM;
    if (m[OUT_YP]) return OUT_YP;
    if (m[OUT_YM]) return OUT_YM;
    return OUT_NODE;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [N_OUT-1:0] e;
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y += 3)
        for (int tx = 0; tx < 16; tx++)
          for (int ty = 0; ty < 16; ty += 5) begin
            cx = coord_t'(x); cy = coord_t'(y); dx = coord_t'(tx); dy = coord_t'(ty);
            #1;
            e = expect_mask(x, y, tx, ty, 16, 16, 1'b1);
            check(ad_t == e, $sformatf("torus (%0d,%0d)->(%0d,%0d) mask %b expected %b", x, y, tx, ty, ad_t, e));
            check(int'(dor_t) == expect_dor(e), "torus dimension-order output");
            check(int'(hops_t) == ring_dist(x, tx, 16, 1'b1) + ring_dist(y, ty, 16, 1'b1), "torus hop count");
          end
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 3; y++)
        for (int tx = 0; tx < 5; tx++)
          for (int ty = 0; ty < 3; ty++) begin
            cx = coord_t'(x); cy = coord_t'(y); dx = coord_t'(tx); dy = coord_t'(ty);
            #1;
            e = expect_mask(x, y, tx, ty, 5, 3, 1'b0);
            check(ad_m == e, $sformatf("mesh (%0d,%0d)->(%0d,%0d) mask %b expected %b", x, y, tx, ty, ad_m, e));
            check(int'(dor_m) == expect_dor(e), "mesh dimension-order output");
            check(int'(hops_m) == ring_dist(x, tx, 5, 1'b0) + ring_dist(y, ty, 3, 1'b0), "mesh hop count");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
