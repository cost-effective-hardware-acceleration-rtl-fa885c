// mb_agu: address generation unit of one data stream.
//
// Each of the four streams (three input, one output) owns one. Per iteration
// the unit adds one of five strides to its address register (prev-address).
// Which stride is used follows from the loop level that increments next:
// stride-k when loop k increments, stride-5 when only the innermost loop
// steps. The unit sees that through the shared last-value comparators of
// loops 2..5 (lastval[0] is loop 2 ... lastval[3] is loop 5) and the
// stream's masks from the Breeze instruction:
//   inc-cond k    for each loop j = 2..5: condition met if mask-k bit for j
//                 is clear (loop j is not required) or loop j is at its last value
//   inc-combine k flag-k = all four conditions met and mask-k not all clear
//   select        the lowest k with flag-k set picks stride-k; no flag set
//                 picks stride-5
//   generate      updated address = prev-address + stride (32-bit adder,
//                 strides are two's complement, so they may decrement)
// With the masks of a plain loop nest (mask-k requires loops k+1..5) this
// gives exactly the nest's address sequence; other masks let a stream ignore
// loop levels. The mask encoding and the priority of the outer flag are this
// design's reading of the block diagram, which names the blocks but not
// their logic.
//
// Interface: init loads base; load loads load_addr (restart after an
// exception, when prev-address was saved); en advances one iteration (low =
// stall, only the address register holds state). addr is registered and is the address
// of the current iteration; flag/stride_sel show the decision for the next.
module mb_agu #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned LEVELS = 5
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           init,
  input  logic                           load,
  input  logic [WIDTH-1:0]               load_addr,
  input  logic                           en,
  input  logic [WIDTH-1:0]               base,
  input  logic [LEVELS-1:0][WIDTH-1:0]   stride,
  input  logic [(LEVELS-1)*(LEVELS-1)-1:0] mask,
  input  logic [LEVELS-2:0]              lastval,
  output logic [LEVELS-2:0]              flag,
  output logic [$clog2(LEVELS)-1:0]      stride_sel,
  output logic [WIDTH-1:0]               addr
);

  localparam int unsigned NF = LEVELS - 1;  // flags / masks per stream

  logic [NF-1:0][NF-1:0] cond;   // inc-cond outputs: cond[k][j]
  logic [WIDTH-1:0]      stride_q;

  // inc-cond and inc-combine
  always_comb begin
    for (int k = 0; k < NF; k++) begin
      for (int j = 0; j < NF; j++) begin
        cond[k][j] = ~mask[k*NF + j] | lastval[j];
      end
      flag[k] = (&cond[k]) & (|mask[k*NF +: NF]);
    end
  end

  // stride selection, outer flag first
  always_comb begin
    stride_sel = $clog2(LEVELS)'(LEVELS - 1);
    for (int k = NF - 1; k >= 0; k--) begin
      if (flag[k]) stride_sel = $clog2(LEVELS)'(k);
    end
    stride_q = stride[stride_sel];
  end

  // address-generate
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    addr <= '0;
    else if (init) addr <= base;
    else if (load) addr <= load_addr;
    else if (en)   addr <= addr + stride_q;
  end

endmodule
