// mb_pkg: shared constants and types of the MediaBreeze front end.
//
// MediaBreeze runs a whole loop nest of a SIMD media kernel from one densely
// encoded "Breeze instruction". The instruction holds five loop bounds, the
// base address of three input streams (IS-1..IS-3) and one output stream (OS),
// five strides per stream (one per loop level), per-stream stride masks, the
// SIMD operation word (operation, reduction, shift, result loop level) and
// the element types of the streams.
//
// Word layout of a Breeze instruction (32-bit words, word 0 first). The order
// of the fields follows the published instruction format, read row by row;
// the bit positions inside the control word, the mask words and the type word
// are this design's own choice:
//   words  0.. 4  Loop1-count .. Loop5-count (Loop1 is the outermost loop)
//   words  5.. 8  starting address of IS-1, IS-2, IS-3, OS
//   word   9      OPR / RedOp / Shift / LL   (see simd_ctrl_t)
//   words 10..29  strides: word 10 + 5*s + (k-1) is stride-k of stream s
//                 (s = 0..3 for IS-1, IS-2, IS-3, OS), two's complement
//   word  30      masks of IS-1 (bits 15:0) and IS-2 (bits 31:16)
//   word  31      masks of IS-3 (bits 15:0) and OS   (bits 31:16)
//   word  32      data types (2 bits per stream, bits 7:0) and multicast
//                 (1 bit per stream, bits 11:8); remaining bits unused
// A stream's 16 mask bits hold mask-1..mask-4, four bits each: bit
// 4*(k-1)+(j-2) of the field says that stride-k needs loop j (j = 2..5) to be
// at its last value.
package mb_pkg;

  localparam int unsigned NUM_LOOPS   = 5;   // levels of hardware loop nesting
  localparam int unsigned NUM_STREAMS = 4;   // IS-1, IS-2, IS-3, OS
  localparam int unsigned WORD_W      = 32;  // loop counters, addresses, strides
  localparam int unsigned INSTR_WORDS = 33;  // words of a full Breeze instruction
  localparam int unsigned MASK_W      = 16;  // mask bits per stream
  localparam int unsigned SIMD_W      = 128; // SIMD register width in bits

  localparam int unsigned W_LOOP_COUNT = 0;
  localparam int unsigned W_BASE       = 5;
  localparam int unsigned W_CTRL       = 9;
  localparam int unsigned W_STRIDE     = 10;
  localparam int unsigned W_MASK       = 30;
  localparam int unsigned W_TYPES      = 32;

  localparam int unsigned S_IS1 = 0;
  localparam int unsigned S_IS2 = 1;
  localparam int unsigned S_IS3 = 2;
  localparam int unsigned S_OS  = 3;

  typedef logic [WORD_W-1:0] word_t;

  // Element size of a stream.
  typedef enum logic [1:0] {
    DT_8   = 2'd0,
    DT_16  = 2'd1,
    DT_32  = 2'd2,
    DT_RSV = 2'd3   // reserved, treated as 32-bit
  } dtype_e;

  // Control word 9: what the SIMD computation and data reorganization units
  // do on every iteration, and at which loop level results are written.
  //   bits  7:0  OPR    operation code
  //   bits 11:8  RedOp  reduction operation
  //   bits 16:12 Shift  right shift applied to final results
  //   bits 19:17 LL     loop level (1..5) whose iterations write a result
  //   bit  20    signed arithmetic
  //   bit  21    saturate results
  typedef struct packed {
    logic       saturate;
    logic       is_signed;
    logic [2:0] ll;
    logic [4:0] shift;
    logic [3:0] redop;
    logic [7:0] opr;
  } simd_ctrl_t;

  localparam int unsigned SIMD_CTRL_W = $bits(simd_ctrl_t);

  // Everything the decoder extracts from a Breeze instruction.
  // Array index 0 is loop 1 (outermost) and stream IS-1.
  typedef struct packed {
    word_t      [NUM_LOOPS-1:0]                     loop_count;
    word_t      [NUM_STREAMS-1:0]                   base;
    word_t      [NUM_STREAMS-1:0][NUM_LOOPS-1:0]    stride;
    logic       [NUM_STREAMS-1:0][MASK_W-1:0]       mask;
    simd_ctrl_t                                     simd;
    logic       [NUM_STREAMS-1:0][1:0]              dtype;
    logic       [NUM_STREAMS-1:0]                   multicast;
  } breeze_cfg_t;

endpackage
