// mb_imem: Breeze instruction memory.
//
// Holds the Breeze instruction once it has entered the processor, so that the
// ordinary fetch path is not used again while the instruction runs. It is a
// small single-port-write, single-port-read SRAM-like array of 32-bit words.
// The default depth of 33 words holds one complete Breeze instruction in the
// format of mb_pkg (132 bytes); the source gives a typical instruction size of
// 120 bytes. Depth, word width and the port timing are this design's choices.
//
// Interface:
//   we, waddr, wdata  write one word on the clock edge
//   re, raddr         read request; rdata holds the word one clock later
//                     (synchronous read, as an SRAM macro would give)
// A write and a read of the same word in one cycle return the old word.
module mb_imem #(
  parameter int unsigned DEPTH  = 33,
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end

endmodule
