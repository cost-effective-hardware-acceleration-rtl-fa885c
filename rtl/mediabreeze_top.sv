// mediabreeze_top: the MediaBreeze front end of a SIMD-enhanced processor.
//
// MediaBreeze removes the overhead instructions of SIMD media kernels
// (address arithmetic, loop branches, loads/stores and data reorganization
// bookkeeping) by running a whole loop nest from one Breeze instruction. This
// module holds the new hardware: the Breeze instruction memory, the decoder,
// the five hardware loops, the shared last-value comparators with the four
// address generation units (IS-1, IS-2, IS-3, OS) and the multiplexer that
// hands control of the existing SIMD units to the Breeze decoder. The
// existing units themselves (load/store units, SIMD computation unit, data
// reorganization, data station, caches) are outside; this module drives them
// through its ports.
//
// Operation: bi_start with bi_addr/bi_len fetches the instruction over the
// fetch port, decodes it once, then issues one iteration per clock with
// iter_valid: the three input-stream load addresses, the output-stream store
// address with os_write, the five loop indices and the SIMD control word.
// os_write marks iterations that complete the loop level LL of the control
// word (all loops inside LL at their last value), where a result is written.
// stall freezes the nest for a cycle; bi_interrupt parks it (PAUSE) with all
// state kept in place and bi_resume continues it. While paused, loop_index,
// is_addr and os_addr are the instruction's saved state: a handler may read
// them, run another Breeze instruction, and later restart the interrupted
// one with bi_restore and that state on ctx_index / ctx_addr (IS-1, IS-2,
// IS-3, OS), so that it continues where it stopped. done pulses once after the
// final iteration; halt_pipeline holds the superscalar pipeline meanwhile.
//
// Timing: the first iteration comes INSTR_WORDS + 5 cycles after the cycle
// in which the last instruction word is returned (fetch_rvalid); then one
// iteration per cycle that is neither stalled nor paused. Everything runs unpipelined in one clock, the
// form whose cost the source reports; its suggestion to split looping into
// two and address generation into three pipeline stages is not built.
module mediabreeze_top
  import mb_pkg::*;
#(
  parameter int unsigned AW = $clog2(INSTR_WORDS)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // start / interrupt instructions from the processor's decoder
  input  logic                            bi_start,
  input  logic                            bi_restore,
  input  word_t                           bi_addr,
  input  logic [AW:0]                     bi_len,
  input  logic                            bi_interrupt,
  input  logic                            bi_resume,
  // saved state of an interrupted instruction, loaded when bi_restore
  input  word_t [NUM_LOOPS-1:0]           ctx_index,
  input  word_t [NUM_STREAMS-1:0]         ctx_addr,
  // fetch port for the Breeze instruction
  output logic                            fetch_req,
  output word_t                           fetch_addr,
  input  logic                            fetch_rvalid,
  input  word_t                           fetch_rdata,
  // memory side
  input  logic                            stall,
  output logic                            iter_valid,
  output word_t [NUM_STREAMS-2:0]         is_addr,
  output word_t                           os_addr,
  output logic                            os_write,
  output word_t [NUM_LOOPS-1:0]           loop_index,
  // control of the existing SIMD units
  input  simd_ctrl_t                      conv_ctrl,
  output simd_ctrl_t                      simd_ctrl,
  output logic [4:0]                      simd_lanes,
  output logic [NUM_STREAMS-1:0][1:0]     stream_dtype,
  output logic [NUM_STREAMS-1:0]          stream_multicast,
  // status
  output logic                            halt_pipeline,
  output logic                            busy,
  output logic                            done
);

  breeze_cfg_t            cfg;
  logic                   imem_we, imem_re;
  logic [AW-1:0]          imem_waddr, imem_raddr;
  word_t                  imem_wdata, imem_rdata;
  logic                   dec_start, dec_done, dec_busy;
  logic [AW:0]            dec_len;
  logic                   loop_init, ctx_load, run_en, breeze_active, end_of_loops;
  logic [NUM_LOOPS-1:0]   loop_last, loop_inc;
  logic [NUM_LOOPS-2:0]   lastval;     // loops 2..5, for the address units
  word_t [NUM_STREAMS-1:0] addr;
  logic [SIMD_CTRL_W-1:0] ctrl_bits;

  mb_control #(.AW(AW)) u_ctl (
    .clk, .rst_n,
    .bi_start, .bi_restore, .bi_addr, .bi_len, .bi_interrupt, .bi_resume,
    .fetch_req, .fetch_addr, .fetch_rvalid, .fetch_rdata,
    .imem_we, .imem_waddr, .imem_wdata,
    .dec_start, .dec_len, .dec_done,
    .stall, .end_of_loops,
    .loop_init, .ctx_load, .run_en, .breeze_active, .halt_pipeline, .busy, .done
  );

  mb_imem #(.DEPTH(INSTR_WORDS), .WIDTH(WORD_W), .AW(AW)) u_imem (
    .clk,
    .we    (imem_we),
    .waddr (imem_waddr),
    .wdata (imem_wdata),
    .re    (imem_re),
    .raddr (imem_raddr),
    .rdata (imem_rdata)
  );

  mb_decoder #(.AW(AW)) u_dec (
    .clk, .rst_n,
    .start      (dec_start),
    .len        (dec_len),
    .rd_en      (imem_re),
    .rd_addr    (imem_raddr),
    .rd_data    (imem_rdata),
    .busy       (dec_busy),
    .done       (dec_done),
    .cfg        (cfg),
    .simd_lanes (simd_lanes)
  );

  mb_hw_loop #(.LEVELS(NUM_LOOPS), .WIDTH(WORD_W)) u_loop (
    .clk, .rst_n,
    .init         (loop_init),
    .load         (ctx_load),
    .load_index   (ctx_index),
    .en           (run_en),
    .bound        (cfg.loop_count),
    .index        (loop_index),
    .last         (loop_last),
    .inc          (loop_inc),
    .end_of_loops (end_of_loops)
  );

  // last_val comparators of loops 2..5, shared by the four address units
  mb_lastval_cmp #(.N(NUM_LOOPS - 1), .WIDTH(WORD_W)) u_lastval (
    .index (loop_index[NUM_LOOPS-1:1]),
    .bound (cfg.loop_count[NUM_LOOPS-1:1]),
    .last  (lastval)
  );

  for (genvar s = 0; s < NUM_STREAMS; s++) begin : g_agu
    mb_agu #(.WIDTH(WORD_W), .LEVELS(NUM_LOOPS)) u_agu (
      .clk, .rst_n,
      .init       (loop_init),
      .load       (ctx_load),
      .load_addr  (ctx_addr[s]),
      .en         (run_en),
      .base       (cfg.base[s]),
      .stride     (cfg.stride[s]),
      .mask       (cfg.mask[s]),
      .lastval    (lastval),
      .flag       (),
      .stride_sel (),
      .addr       (addr[s])
    );
  end

  mb_ctrl_mux #(.W(SIMD_CTRL_W)) u_mux (
    .sel_breeze  (breeze_active),
    .conv_ctrl   (conv_ctrl),
    .breeze_ctrl (cfg.simd),
    .ctrl        (ctrl_bits)
  );

  assign simd_ctrl        = simd_ctrl_t'(ctrl_bits);
  assign iter_valid       = run_en;
  assign is_addr          = addr[NUM_STREAMS-2:0];
  assign os_addr          = addr[S_OS];
  assign stream_dtype     = cfg.dtype;
  assign stream_multicast = cfg.multicast;

  // A result is written when every loop inside level LL is at its last
  // value; LL outside 1..5 counts as 5 (a result every iteration).
  always_comb begin
    logic inner_last;
    inner_last = 1'b1;
    for (int j = 2; j <= NUM_LOOPS; j++) begin
      if (cfg.simd.ll >= 3'd1 && 32'(cfg.simd.ll) < j) inner_last &= lastval[j-2];
    end
    os_write = run_en & inner_last;
  end

endmodule
