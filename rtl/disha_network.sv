// disha_network: a KX x KY two-dimensional torus (or mesh) of Disha routers
// with a hardwired Token ring.
//
// Every router connects to its four neighbours by a pair of unidirectional
// channels (Req, Status, flit forward; Send back). With TORUS set the edges
// wrap around; otherwise the border channels are left idle. Each router's
// node port (injection and ejection) is brought out, so that processor nodes
// or traffic sources can be attached outside. Observation outputs per router
// show where the Token is and count the recovery events.
//
// The Token ring visits every router once along mesh links: up column 0,
// then a serpentine through rows 1..KY-1 of columns 1..KX-1 (down odd
// columns, up even ones), and back along row 0 to the start. This needs KX
// even. The router at (0,0) owns the Token after reset. The Token moves one
// router per clock when nobody holds it.
//
// Defaults follow the evaluated configuration: a 16 x 16 torus, input buffers
// two flits deep, time-out of 8 cycles. Node (x, y) has index y*KX + x.
// EARLY_RELEASE enables the optional early Token release (off by default).
module disha_network
  import disha_pkg::*;
#(
  parameter int KX        = 16,
  parameter int KY        = 16,
  parameter bit TORUS     = 1'b1,
  parameter int BUF_DEPTH = 2,
  parameter int DB_DEPTH  = 1,
  parameter int CNT_W     = 8,
  parameter int TOUT      = 8,
  parameter bit EARLY_RELEASE = 1'b0,
  localparam int NN       = KX * KY
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inj_valid [NN],
  input  flit_t            inj_flit  [NN],
  output logic             inj_ready [NN],
  output logic             ej_valid  [NN],
  output flit_t            ej_flit   [NN],
  output logic             ej_db     [NN],
  input  logic             ej_ready  [NN],
  output logic             token_held[NN],
  output logic [N_NET-1:0] deadlock_bits[NN],
  output logic             recovering[NN],
  output logic             reconfig_held[NN],
  output logic             ev_start  [NN],
  output logic             ev_preempt[NN],
  output logic             ev_restore[NN]
);
  // successor of node (x, y) on the Token ring
  function automatic int token_next(int x, int y);
    int nx, ny;
    if (x == 0) begin
      if (y < KY-1) begin nx = 0; ny = y + 1; end
      else          begin nx = 1; ny = y;     end
    end else if (y == 0) begin
      nx = x - 1; ny = 0;
    end else if (x % 2 == 1) begin          // down this column
      if (y > 1)          begin nx = x;     ny = y - 1; end
      else if (x < KX-1)  begin nx = x + 1; ny = 1;     end
      else                begin nx = x;     ny = 0;     end
    end else begin                          // up this column
      if (y < KY-1) begin nx = x;     ny = y + 1; end
      else          begin nx = x + 1; ny = y;     end
    end
    return ny * KX + nx;
  endfunction

  chan_fwd_t out_fwd [NN][N_NET];
  logic      out_send[NN][N_NET];
  chan_fwd_t in_fwd  [NN][N_NET];
  logic      in_send [NN][N_NET];
  logic      tok_in  [NN];
  logic      tok_out [NN];

  for (genvar y = 0; y < KY; y++) begin : g_y
    for (genvar x = 0; x < KX; x++) begin : g_x
      localparam int N  = y * KX + x;
      localparam int E  = y * KX + (x + 1) % KX;
      localparam int W  = y * KX + (x + KX - 1) % KX;
      localparam int NO = ((y + 1) % KY) * KX + x;
      localparam int S  = ((y + KY - 1) % KY) * KX + x;
      localparam bit HAS_E = TORUS || (x < KX-1);
      localparam bit HAS_W = TORUS || (x > 0);
      localparam bit HAS_N = TORUS || (y < KY-1);
      localparam bit HAS_S = TORUS || (y > 0);

      // incoming channels: input X+ arrives from the east neighbour's X- output, etc.
      assign in_fwd[N][IN_XP] = HAS_E ? out_fwd[E][OUT_XM] : '0;
      assign in_fwd[N][IN_XM] = HAS_W ? out_fwd[W][OUT_XP] : '0;
      assign in_fwd[N][IN_YP] = HAS_N ? out_fwd[NO][OUT_YM] : '0;
      assign in_fwd[N][IN_YM] = HAS_S ? out_fwd[S][OUT_YP] : '0;
      assign out_send[N][OUT_XP] = HAS_E ? in_send[E][IN_XM] : 1'b0;
      assign out_send[N][OUT_XM] = HAS_W ? in_send[W][IN_XP] : 1'b0;
      assign out_send[N][OUT_YP] = HAS_N ? in_send[NO][IN_YM] : 1'b0;
      assign out_send[N][OUT_YM] = HAS_S ? in_send[S][IN_YP] : 1'b0;

      assign tok_in[token_next(x, y)] = tok_out[N];

      disha_router #(
        .KX(KX), .KY(KY), .TORUS(TORUS), .BUF_DEPTH(BUF_DEPTH),
        .DB_DEPTH(DB_DEPTH), .CNT_W(CNT_W), .INIT_TOKEN(N == 0),
        .EARLY_RELEASE(EARLY_RELEASE)
      ) u_router (
        .clk, .rst_n,
        .my_x(coord_t'(x)), .my_y(coord_t'(y)), .t_out(CNT_W'(TOUT)),
        .in_fwd(in_fwd[N]), .in_send(in_send[N]),
        .out_fwd(out_fwd[N]), .out_send(out_send[N]),
        .inj_valid(inj_valid[N]), .inj_flit(inj_flit[N]), .inj_ready(inj_ready[N]),
        .ej_valid(ej_valid[N]), .ej_flit(ej_flit[N]), .ej_db(ej_db[N]), .ej_ready(ej_ready[N]),
        .token_in(tok_in[N]), .token_out(tok_out[N]),
        .token_held(token_held[N]), .deadlock_bits(deadlock_bits[N]),
        .recovering(recovering[N]), .reconfig_held(reconfig_held[N]),
        .ev_start(ev_start[N]), .ev_preempt(ev_preempt[N]), .ev_restore(ev_restore[N])
      );
    end
  end

  // elaboration-time checks of the configuration
  if (KX % 2 != 0 || KY < 2) begin : g_bad_ring
    $error("disha_network: the Token ring needs an even KX and KY >= 2");
  end
  if (KX > (1 << COORD_W) || KY > (1 << COORD_W)) begin : g_bad_size
    $error("disha_network: KX and KY must fit in COORD_W bits");
  end
endmodule
