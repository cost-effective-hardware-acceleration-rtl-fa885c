// mb_hw_loop: five levels of nested loops in hardware (zero-overhead looping).
//
// Level 1 is the outermost loop, level 5 the innermost; array index i holds
// level i+1. Every enabled clock cycle is one iteration of the innermost
// loop body. Each loop index runs from 1 (lower bound) to its bound (upper
// bound) taken from the Breeze instruction. Five parallel comparators flag
// the levels that are at their bound; a priority encoder picks the level to
// increment: the innermost level whose inner levels are all at their bound
// and which is not at its own bound. That level is incremented by 1 and every
// level inside it is reset to 1. When all five levels are at their bound,
// the current iteration is the last one of the nest and end_of_loops is high.
//
// Interface:
//   init          load all indices with 1 (start of a Breeze instruction)
//   load          load the indices from load_index (restart of an
//                 instruction whose loop state was saved at an exception)
//   en            advance by one iteration; low = stall/exception, the
//                 indices hold (they are the saved loop state)
//   bound[i]      loop bound of level i+1, static while running
//   index[i]      current index of level i+1 (registered)
//   last[i]       level i+1 is at its bound (combinational from index)
//   inc[i]        level i+1 increments on the next enabled edge
//   end_of_loops  all levels at their bound: this is the final iteration
// Timing: index changes one clock after an enabled cycle. init has priority
// over load, load over en. This is the single-cycle form whose cost the source reports; the
// two-stage pipelined form suggested for clock rates above 1 GHz is not built.
module mb_hw_loop #(
  parameter int unsigned LEVELS = 5,
  parameter int unsigned WIDTH  = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         init,
  input  logic                         load,
  input  logic [LEVELS-1:0][WIDTH-1:0] load_index,
  input  logic                         en,
  input  logic [LEVELS-1:0][WIDTH-1:0] bound,
  output logic [LEVELS-1:0][WIDTH-1:0] index,
  output logic [LEVELS-1:0]            last,
  output logic [LEVELS-1:0]            inc,
  output logic                         end_of_loops
);

  // all_inner_last[i]: every level inside level i+1 is at its bound
  logic [LEVELS-1:0] all_inner_last;
  // reset_lvl[i]: level i+1 wraps back to 1 because an outer level increments
  logic [LEVELS-1:0] reset_lvl;

  mb_lastval_cmp #(.N(LEVELS), .WIDTH(WIDTH)) u_cmp (
    .index (index),
    .bound (bound),
    .last  (last)
  );

  // Priority encoder.
  always_comb begin
    all_inner_last[LEVELS-1] = 1'b1;
    for (int i = LEVELS - 2; i >= 0; i--) begin
      all_inner_last[i] = all_inner_last[i+1] & last[i+1];
    end
    end_of_loops = all_inner_last[0] & last[0];
    for (int i = 0; i < LEVELS; i++) begin
      inc[i]       = all_inner_last[i] & ~last[i];
      reset_lvl[i] = all_inner_last[i] &  last[i] & ~end_of_loops;
    end
  end

  // Increment-by-1 counters.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LEVELS; i++) index[i] <= WIDTH'(1);
    end else if (init) begin
      for (int i = 0; i < LEVELS; i++) index[i] <= WIDTH'(1);
    end else if (load) begin
      index <= load_index;
    end else if (en) begin
      for (int i = 0; i < LEVELS; i++) begin
        if (inc[i])            index[i] <= index[i] + WIDTH'(1);
        else if (reset_lvl[i]) index[i] <= WIDTH'(1);
      end
    end
  end

  // At most one level increments per iteration.
  a_one_inc: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(inc));
  // The final iteration increments nothing.
  a_end_no_inc: assert property (@(posedge clk) disable iff (!rst_n) end_of_loops |-> inc == '0);

endmodule
