// tb_mb_decoder: self-checking test of the Breeze instruction decoder.
// The bench holds random 33-word instructions in an array behind a one-cycle
// read port, starts the decoder with random lengths (0..33), and checks
// every decoded field against the word it must come from (zero beyond the
// length), the SIMD parallelism for random mixes of element types, and the
// decode latency: done rises INSTR_WORDS + 1 clock edges after start is
// sampled (the bench counts INSTR_WORDS + 2 falling edges).
module tb_mb_decoder;
  import mb_pkg::*;
  logic clk = 0, rst_n = 1, start = 0;
  logic [6:0] len;
  logic rd_en, busy, done;
  logic [5:0] rd_addr;
  word_t rd_data;
  breeze_cfg_t cfg;
  logic [4:0] simd_lanes;
  word_t mem [INSTR_WORDS];
  int checks = 0, failures = 0;

  mb_decoder #(.AW(6)) dut (.clk, .rst_n, .start, .len, .rd_en, .rd_addr, .rd_data, .busy, .done, .cfg, .simd_lanes);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts
  always_ff @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic word_t w(int i, int n);
    return (i < n) ? mem[i] : '0;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (60) begin
      int n, cyc, exp_lanes, maxsz;
      n = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 33) : 33;
      for (int i = 0; i < INSTR_WORDS; i++) mem[i] = $urandom();
      @(negedge clk);
      start = 1; len = 7'(n);
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      check("decode latency", cyc == INSTR_WORDS + 2);
      check("busy cleared", !busy);
      for (int l = 0; l < 5; l++) check("loop count", cfg.loop_count[l] == w(l, n));
      for (int s = 0; s < 4; s++) begin
        check("base", cfg.base[s] == w(5 + s, n));
        for (int k = 0; k < 5; k++) check("stride", cfg.stride[s][k] == w(10 + 5 * s + k, n));
        check("mask", cfg.mask[s] == (s % 2 == 0 ? w(30 + s / 2, n)[15:0] : w(30 + s / 2, n)[31:16]));
        check("dtype", cfg.dtype[s] == w(32, n)[2 * s +: 2]);
        check("multicast", cfg.multicast[s] == w(32, n)[8 + s]);
      end
      check("opr", cfg.simd.opr == w(9, n)[7:0]);
      check("redop", cfg.simd.redop == w(9, n)[11:8]);
      check("shift", cfg.simd.shift == w(9, n)[16:12]);
      check("ll", cfg.simd.ll == w(9, n)[19:17]);
      check("signed", cfg.simd.is_signed == w(9, n)[20]);
      check("saturate", cfg.simd.saturate == w(9, n)[21]);
      maxsz = 8;
      for (int s = 0; s < 4; s++) begin
        int sz;
        sz = (w(32, n)[2 * s +: 2] == 0) ? 8 : (w(32, n)[2 * s +: 2] == 1) ? 16 : 32;
        if (sz > maxsz) maxsz = sz;
      end
      exp_lanes = 128 / maxsz;
      check("simd lanes", int'(simd_lanes) == exp_lanes);
      // fields stay valid after done
      repeat (3) @(negedge clk);
      check("cfg held", cfg.loop_count[0] == w(0, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
