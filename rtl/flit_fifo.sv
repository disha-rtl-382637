// flit_fifo: first-in first-out flit buffer, used both as a router input
// buffer (IB) and as the router's Deadlock Buffer (DB).
//
// DEPTH entries of flit_t held in a circular array with read and write
// pointers and an occupancy count. A write (wr_en) stores wr_data at the tail;
// a read (rd_en) removes the head, which is always visible on rd_data while
// !empty. Writes and reads may happen in the same cycle. 'full' depends only
// on the registered count, so the Send line derived from it never forms a
// combinational path between routers. The depth of 2 used for input buffers
// is the one the evaluation of the scheme uses; the one-entry Deadlock Buffer
// is the "additional special flit buffer" of the scheme. Writing when full or
// reading when empty is a protocol error flagged by assertions.
module flit_fifo
  import disha_pkg::*;
#(
  parameter int DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_en,
  input  flit_t wr_data,
  input  logic  rd_en,
  output flit_t rd_data,
  output logic  empty,
  output logic  full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (int'(p) == DEPTH-1) ? '0 : p + 1'b1;
  endfunction

  assign empty   = (count == 0);
  assign full    = (int'(count) == DEPTH);
  assign rd_data = mem[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr_en) wr_ptr <= next_ptr(wr_ptr);
      if (rd_en) rd_ptr <= next_ptr(rd_ptr);
      case ({wr_en, rd_en})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_data;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
