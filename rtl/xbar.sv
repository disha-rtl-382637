// xbar: the router's crossbar switch, N_IN inputs to N_OUT outputs.
//
// Each output has a select (the input it is connected to) and an enable. An
// enabled output shows the selected input's flit and valid bit; a disabled
// output shows valid low. Several outputs may select the same input only
// transiently; allocation in the decision logic keeps them distinct. With the
// defaults it is the 6 x 5 switch of the router: inputs X+, X-, Y+, Y-,
// Deadlock Buffer, Node; outputs X+, X-, Y+, Y-, Node. Purely combinational.
module xbar
  import disha_pkg::*;
#(
  parameter int NI = N_IN,
  parameter int NO = N_OUT
) (
  input  flit_t                  in_flit [NI],
  input  logic                   in_valid[NI],
  input  logic [$clog2(NI)-1:0]  sel     [NO],
  input  logic                   en      [NO],
  output flit_t                  out_flit [NO],
  output logic                   out_valid[NO]
);
  always_comb begin
    for (int o = 0; o < NO; o++) begin
      out_flit[o]  = in_flit[sel[o]];
      out_valid[o] = en[o] && in_valid[sel[o]];
    end
  end
endmodule
