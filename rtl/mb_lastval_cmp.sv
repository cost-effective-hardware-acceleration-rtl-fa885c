// mb_lastval_cmp: bank of loop-bound comparators.
//
// For each of N loop levels it tells whether the loop index has reached the
// loop bound ("last value"). A loop index runs from 1 up to its bound, so a
// level is at its last value when index >= bound; using ">=" rather than "=="
// makes a bound of 0 behave like a bound of 1 (a choice of this design). All
// comparators work in parallel and are purely combinational.
//
// The hardware looping unit uses one bank of five comparators. The address
// generation units share one bank of four (loops 2..5): the outermost loop
// never selects a stride by its own last value.
//
// Interface: index[i], bound[i] -> last[i], one bit per level, no clock.
module mb_lastval_cmp #(
  parameter int unsigned N     = 5,
  parameter int unsigned WIDTH = 32
) (
  input  logic [N-1:0][WIDTH-1:0] index,
  input  logic [N-1:0][WIDTH-1:0] bound,
  output logic [N-1:0]            last
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      last[i] = (index[i] >= bound[i]);
    end
  end

endmodule
