// mb_control: sequencing of one Breeze instruction.
//
// The processor's ordinary decoder meets a 32-bit start instruction carrying
// the address and length of a Breeze instruction. Once older instructions
// have finished it raises bi_start; from then on the superscalar pipeline is
// held (halt_pipeline) until the Breeze instruction has run, because
// MediaBreeze reuses the processor's SIMD, load/store and register hardware.
// The controller steps through
//   FETCH  read the instruction, one word per request, from the fetch port
//          into the Breeze instruction memory
//   DEC    let the decoder read it once into its field registers
//   RUN    one loop-nest iteration per clock; a stall from the memory side
//          freezes loops and address registers for that cycle
//   PAUSE  entered on bi_interrupt (the second added instruction, or an
//          exception): loop indices and stream addresses stay in their
//          registers, the pipeline is released, bi_resume continues the run.
//          The handler may instead read the loop indices and addresses out
//          (its saved state) and start another Breeze instruction; the
//          interrupted one is later restarted with bi_restore set, which
//          reloads the saved state instead of starting the nest afresh.
// and returns to IDLE after the iteration flagged end_of_loops.
//
// Interface:
//   bi_start, bi_addr, bi_len   start a Breeze instruction (pulse, in IDLE
//                               or PAUSE; in PAUSE it abandons the paused one)
//   bi_restore                  with bi_start: continue from saved state
//   bi_interrupt, bi_resume     pause / continue a running instruction
//   fetch_req, fetch_addr       request one 32-bit word at a byte address
//   fetch_rvalid, fetch_rdata   the word, any number of cycles later
//   imem_we/waddr/wdata         fill port of the instruction memory; wdata is
//                               the returned fetch word passed straight on,
//                               written at the slot counted by this block
//   dec_start, dec_len, dec_done  decoder handshake
//   stall, end_of_loops         from the memory side / the hardware loops
//   loop_init                   load loop indices and base addresses
//   ctx_load                    load saved loop indices and addresses instead
//   run_en                      this cycle is an iteration (loops advance)
//   breeze_active               Breeze decoder owns the SIMD control
//   done                        one-cycle pulse after the last iteration
// Only one fetch request is outstanding at a time. The state encoding, the
// fetch port and the pause/resume handshake are choices of this design; the
// source states only the behaviour.
module mb_control
  import mb_pkg::*;
#(
  parameter int unsigned AW = $clog2(INSTR_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          bi_start,
  input  logic          bi_restore,
  input  word_t         bi_addr,
  input  logic [AW:0]   bi_len,
  input  logic          bi_interrupt,
  input  logic          bi_resume,
  output logic          fetch_req,
  output word_t         fetch_addr,
  input  logic          fetch_rvalid,
  input  word_t         fetch_rdata,
  output logic          imem_we,
  output logic [AW-1:0] imem_waddr,
  output word_t         imem_wdata,
  output logic          dec_start,
  output logic [AW:0]   dec_len,
  input  logic          dec_done,
  input  logic          stall,
  input  logic          end_of_loops,
  output logic          loop_init,
  output logic          ctx_load,
  output logic          run_en,
  output logic          breeze_active,
  output logic          halt_pipeline,
  output logic          busy,
  output logic          done
);

  typedef enum logic [2:0] {
    S_IDLE  = 3'd0,
    S_FETCH = 3'd1,
    S_DEC   = 3'd2,
    S_RUN   = 3'd3,
    S_PAUSE = 3'd4
  } state_e;

  state_e      state;
  word_t       addr_q;
  logic [AW:0] len_q;
  logic [AW:0] cnt_q;
  logic        pending_q;
  logic        dec_issued_q;
  logic        restore_q;

  assign fetch_req     = (state == S_FETCH) && !pending_q && (cnt_q < len_q);
  assign fetch_addr    = addr_q + word_t'({cnt_q, 2'b00});
  assign imem_we       = (state == S_FETCH) && pending_q && fetch_rvalid;
  assign imem_waddr    = cnt_q[AW-1:0];
  assign imem_wdata    = fetch_rdata;
  assign dec_start     = (state == S_DEC) && !dec_issued_q;
  assign dec_len       = len_q;
  assign loop_init     = (state == S_DEC) && dec_done && !restore_q;
  assign ctx_load      = (state == S_DEC) && dec_done &&  restore_q;
  assign run_en        = (state == S_RUN) && !stall && !bi_interrupt;
  assign breeze_active = (state == S_RUN);
  assign halt_pipeline = (state == S_FETCH) || (state == S_DEC) || (state == S_RUN);
  assign busy          = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      addr_q       <= '0;
      len_q        <= '0;
      cnt_q        <= '0;
      pending_q    <= 1'b0;
      dec_issued_q <= 1'b0;
      restore_q    <= 1'b0;
      done         <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (bi_start) begin
            state     <= S_FETCH;
            addr_q    <= bi_addr;
            len_q     <= (32'(bi_len) > INSTR_WORDS) ? (AW+1)'(INSTR_WORDS) : bi_len;
            cnt_q     <= '0;
            pending_q <= 1'b0;
            restore_q <= bi_restore;
          end
        end
        S_FETCH: begin
          if (fetch_req) pending_q <= 1'b1;
          if (pending_q && fetch_rvalid) begin
            pending_q <= 1'b0;
            cnt_q     <= cnt_q + 1'b1;
          end
          if (!pending_q && cnt_q >= len_q) begin
            state        <= S_DEC;
            dec_issued_q <= 1'b0;
          end
        end
        S_DEC: begin
          dec_issued_q <= 1'b1;
          if (dec_done) state <= S_RUN;
        end
        S_RUN: begin
          if (bi_interrupt)                 state <= S_PAUSE;
          else if (run_en && end_of_loops) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        S_PAUSE: begin
          if (bi_start) begin
            state     <= S_FETCH;
            addr_q    <= bi_addr;
            len_q     <= (32'(bi_len) > INSTR_WORDS) ? (AW+1)'(INSTR_WORDS) : bi_len;
            cnt_q     <= '0;
            pending_q <= 1'b0;
            restore_q <= bi_restore;
          end else if (bi_resume) begin
            state <= S_RUN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A response only arrives for an outstanding request.
  a_rvalid_pending: assert property (@(posedge clk) disable iff (!rst_n)
    (fetch_rvalid && state == S_FETCH) |-> pending_q);

endmodule
