// mb_decoder: Breeze instruction decoder.
//
// A Breeze instruction is decoded once: the decoder reads it word by word out
// of the Breeze instruction memory and keeps every field in its own register,
// from where the loop bounds, strides and masks feed the hardware loops and
// the address generation units, and the SIMD control word drives the existing
// SIMD units for the whole run. Words at or beyond the instruction length
// given by the start instruction read as zero, so a shorter instruction simply
// leaves the trailing fields clear.
//
// It also works out the SIMD parallelism of the run. A 128-bit SIMD unit does
// 16, 8 or 4 operations at once on 8-, 16- or 32-bit elements; with streams of
// mixed element sizes only the smallest of these is reached, so
// simd_lanes = min over the four streams of 128 / element size.
//
// Interface:
//   start, len      begin decoding an instruction of len words (pulse)
//   rd_en, rd_addr  read port into mb_imem (one-cycle read latency)
//   busy            decoding is in progress
//   done            one-cycle pulse: cfg is complete and stays valid
//   cfg             decoded fields, see mb_pkg
//   simd_lanes      parallelism of the run: 4, 8 or 16
// Timing: done rises INSTR_WORDS + 1 clock edges after the edge that
// samples start. The word layout is
// the one of mb_pkg; the registers-after-decode organisation follows the
// source, the sequential one-word-per-cycle read is this design's choice.
module mb_decoder
  import mb_pkg::*;
#(
  parameter int unsigned AW = $clog2(INSTR_WORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [AW:0]      len,
  output logic             rd_en,
  output logic [AW-1:0]    rd_addr,
  input  word_t            rd_data,
  output logic             busy,
  output logic             done,
  output breeze_cfg_t      cfg,
  output logic [4:0]       simd_lanes
);

  word_t          words [INSTR_WORDS];
  logic [AW:0]    len_q;
  logic [AW-1:0]  widx_q;     // word index of the data arriving now
  logic           wvalid_q;

  // read sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      rd_addr  <= '0;
      len_q    <= '0;
      wvalid_q <= 1'b0;
      widx_q   <= '0;
      done     <= 1'b0;
    end else begin
      wvalid_q <= rd_en;
      widx_q   <= rd_addr;
      done     <= wvalid_q && (32'(widx_q) == INSTR_WORDS - 1);
      if (start && !busy) begin
        busy    <= 1'b1;
        rd_addr <= '0;
        len_q   <= len;
      end else if (busy) begin
        if (32'(rd_addr) == INSTR_WORDS - 1) busy <= 1'b0;
        else                                 rd_addr <= rd_addr + AW'(1);
      end
    end
  end

  assign rd_en = busy;

  // field registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < INSTR_WORDS; i++) words[i] <= '0;
    end else if (wvalid_q) begin
      words[widx_q] <= ((AW+1)'(widx_q) < len_q) ? rd_data : '0;
    end
  end

  // field extraction
  always_comb begin
    for (int l = 0; l < NUM_LOOPS; l++) cfg.loop_count[l] = words[W_LOOP_COUNT + l];
    for (int s = 0; s < NUM_STREAMS; s++) begin
      cfg.base[s] = words[W_BASE + s];
      for (int k = 0; k < NUM_LOOPS; k++) cfg.stride[s][k] = words[W_STRIDE + NUM_LOOPS*s + k];
      cfg.mask[s]      = words[W_MASK + s/2][MASK_W*(s%2) +: MASK_W];
      cfg.dtype[s]     = words[W_TYPES][2*s +: 2];
      cfg.multicast[s] = words[W_TYPES][8 + s];
    end
    cfg.simd = simd_ctrl_t'(words[W_CTRL][SIMD_CTRL_W-1:0]);
  end

  // SIMD parallelism: the widest element of any stream sets it
  always_comb begin
    simd_lanes = 5'd16;
    for (int s = 0; s < NUM_STREAMS; s++) begin
      case (dtype_e'(cfg.dtype[s]))
        DT_8:    ;
        DT_16:   if (simd_lanes > 5'd8) simd_lanes = 5'd8;
        default: simd_lanes = 5'd4;
      endcase
    end
  end

endmodule
