// mb_ctrl_mux: control-source multiplexer for the existing SIMD units.
//
// The SIMD computation, data reorganization, load/store units and the data
// station already exist in a SIMD-enhanced processor. While a Breeze
// instruction runs they are steered by the Breeze decoder instead of the
// processor's conventional control path; this multiplexer chooses between the
// two. It is the one gate level the source says the Breeze control adds in
// front of those units. Purely combinational.
//
// Interface: sel_breeze = 1 passes breeze_ctrl, else conv_ctrl, to ctrl.
// The control word width W is a choice of this design.
module mb_ctrl_mux #(
  parameter int unsigned W = 22
) (
  input  logic         sel_breeze,
  input  logic [W-1:0] conv_ctrl,
  input  logic [W-1:0] breeze_ctrl,
  output logic [W-1:0] ctrl
);

  always_comb ctrl = sel_breeze ? breeze_ctrl : conv_ctrl;

endmodule
