// tb_mb_workloads: media kernels run as Breeze instructions on the front end.
//
// Each kernel below is written as a loop nest of at most five levels with
// its streams given as array-index expressions of the loop variables, the way
// the C code of the kernel would index its arrays. The bench turns each
// stream into a base address and one step per loop level (by evaluating the
// expression at index 1 and at index 2 of each level), encodes the Breeze
// instruction with the stride formula
//   stride-k = P_k - sum over j > k of (N_j - 1) * P_j
// and runs it on mediabreeze_top at its default parameters with random
// stalls. Every issued iteration is checked against the kernel's own index
// expressions, not against the step model, and every result write against
// the loop level at which the kernel stores. Sizes are small versions chosen
// for simulation time:
//   cfa    colour-filter-array interpolation: 3 input rows around a pixel
//          (rows y-1, y, y+1), one output pixel group per iteration, 16 rows
//          of 64 pixels
//   dct    8x8 block transform as Y = C * X per block (row of Y accumulated
//          over k, one store per row), over a 4x4 grid of blocks
//   mot    full-search motion estimation: 16x16 block, search range -8..+8
//          in both directions, one SAD result per search position (LL = 2)
//   scale  2:1 horizontal image down-scaling: even and odd pixels in, one
//          out, 32 rows of 64 pixels
//   aud    FIR filter: 16 taps, 64 groups of 8 output samples, one store per
//          group
//   g711   per-sample companding over 16 Ki samples (one level in use)
module tb_mb_workloads;
  import mb_pkg::*;

  logic clk = 0, rst_n = 1;
  logic bi_start = 0, bi_restore = 0, bi_interrupt = 0, bi_resume = 0;
  word_t [4:0] ctx_index = '0;
  word_t [3:0] ctx_addr = '0;
  word_t bi_addr = 0;
  logic [6:0] bi_len = 0;
  logic fetch_req, fetch_rvalid = 0;
  word_t fetch_addr, fetch_rdata = 0;
  logic stall = 0;
  logic iter_valid, os_write;
  word_t [2:0] is_addr;
  word_t os_addr;
  word_t [4:0] loop_index;
  simd_ctrl_t conv_ctrl, simd_ctrl;
  logic [4:0] simd_lanes;
  logic [3:0][1:0] stream_dtype;
  logic [3:0] stream_multicast;
  logic halt_pipeline, busy, done;

  mediabreeze_top dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  int checks = 0, failures = 0;
  word_t prog_mem [word_t];

  initial begin
    forever begin
      @(posedge clk);
      if (fetch_req) begin
        word_t a;
        a = fetch_addr;
        @(negedge clk);
        fetch_rvalid = 1;
        fetch_rdata = prog_mem.exists(a) ? prog_mem[a] : 32'h0;
        @(negedge clk);
        fetch_rvalid = 0;
      end
    end
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // current kernel
  string kname;
  int    bnd [5];
  int    ll;
  logic [1:0] dt [4];

  // Address of stream s for 0-based loop variables v[0..4] (v[0] = loop 1).
  function automatic word_t kaddr(int s, int v [5]);
    case (kname)
      "cfa": begin   // image W=64 bytes; pixel groups of 16 along x; rows y=1..H
        int y, x;
        y = v[3] + 1; x = v[4] * 16;
        case (s)
          0: return 32'h1000_0000 + 32'((y - 1) * 64 + x);
          1: return 32'h1000_0000 + 32'(y * 64 + x);
          2: return 32'h1000_0000 + 32'((y + 1) * 64 + x);
          default: return 32'h2000_0000 + 32'((y - 1) * 64 + x);
        endcase
      end
      "dct": begin   // 16-bit, image 32x32, block (by,bx), Y[u][:] += C[u][k] * X[k][:]
        int by, bx, u, k;
        by = v[0]; bx = v[1]; u = v[2]; k = v[3];
        case (s)
          0: return 32'h3000_0000 + 32'((u * 8 + k) * 2);                            // C[u][k]
          1: return 32'h3100_0000 + 32'(((by * 8 + k) * 32 + bx * 8) * 2);           // X row k
          2: return 32'h3200_0000;                                                   // unused
          default: return 32'h3300_0000 + 32'(((by * 8 + u) * 32 + bx * 8) * 2);    // Y row u
        endcase
      end
      "mot": begin   // 8-bit, frame width 48, block at (16,16), search sy,sx in -8..8
        int sy, sx, r;
        sy = v[0] - 8; sx = v[1] - 8; r = v[2];
        case (s)
          0: return 32'h4000_0000 + 32'((16 + r) * 48 + 16);               // current block row
          1: return 32'h4100_0000 + 32'((16 + sy + r) * 48 + 16 + sx);     // reference row
          2: return 32'h4200_0000;                                         // unused
          default: return 32'h4300_0000 + 32'(((sy + 8) * 17 + (sx + 8)) * 4); // SAD[sy][sx]
        endcase
      end
      "scale": begin // 16-bit, rows of 64 pixels in, 32 out; 8 pixels per SIMD group
        int y, g;
        y = v[3]; g = v[4];
        case (s)
          0: return 32'h5000_0000 + 32'((y * 64 + g * 16) * 2);
          1: return 32'h5000_0000 + 32'((y * 64 + g * 16 + 8) * 2);
          2: return 32'h5100_0000;
          default: return 32'h5200_0000 + 32'((y * 32 + g * 8) * 2);
        endcase
      end
      "aud": begin   // 16-bit samples, 8 output groups of 8 samples, 16 taps
        int n, k;
        n = v[3]; k = v[4];
        case (s)
          0: return 32'h6000_0000 + 32'((n * 8 + k) * 2);   // x[8n+k ..]
          1: return 32'h6100_0000 + 32'(k * 2);             // h[k]
          2: return 32'h6200_0000;
          default: return 32'h6300_0000 + 32'(n * 16);      // y[8n ..]
        endcase
      end
      default: begin // g711: 8-bit in, 16-bit out, 16 samples per group
        int g;
        g = v[4];
        case (s)
          0: return 32'h7000_0000 + 32'(g * 16);
          1: return 32'h7100_0000;
          2: return 32'h7100_0000;
          default: return 32'h7200_0000 + 32'(g * 32);
        endcase
      end
    endcase
  endfunction

  task automatic set_kernel(string name);
    kname = name;
    case (name)
      "cfa":   begin bnd = '{1, 1, 1, 16, 4};  ll = 5; dt = '{0, 0, 0, 0}; end
      "dct":   begin bnd = '{4, 4, 8, 8, 1};  ll = 3; dt = '{1, 1, 1, 1}; end
      "mot":   begin bnd = '{17, 17, 16, 1, 1}; ll = 2; dt = '{0, 0, 0, 2}; end
      "scale": begin bnd = '{1, 1, 1, 32, 4};  ll = 5; dt = '{1, 1, 1, 1}; end
      "aud":   begin bnd = '{1, 1, 1, 64, 16}; ll = 4; dt = '{1, 1, 1, 1}; end
      default: begin bnd = '{1, 1, 1, 1, 1024}; ll = 5; dt = '{0, 0, 0, 1}; end
    endcase
  endtask

  task automatic run_kernel(string name, word_t at);
    word_t w [INSTR_WORDS];
    int v [5], v1 [5];
    longint total, iters;
    int writes, exp_writes, guard;
    bit fin;
    set_kernel(name);
    for (int i = 0; i < INSTR_WORDS; i++) w[i] = '0;
    for (int l = 0; l < 5; l++) w[l] = word_t'(bnd[l]);
    for (int l = 0; l < 5; l++) v[l] = 0;
    for (int s = 0; s < 4; s++) begin
      int p [5];
      w[5 + s] = kaddr(s, v);
      for (int l = 0; l < 5; l++) begin
        v1 = v; v1[l] = 1;
        p[l] = int'(kaddr(s, v1) - kaddr(s, v));
      end
      for (int k = 0; k < 5; k++) begin
        int st;
        st = p[k];
        for (int j = k + 1; j < 5; j++) st -= (bnd[j] - 1) * p[j];
        w[10 + 5 * s + k] = word_t'(st);
      end
    end
    w[9] = 32'({2'b01, 3'(ll), 5'd0, 4'd0, 8'h10});
    w[30] = {16'h8CEF, 16'h8CEF};
    w[31] = {16'h8CEF, 16'h8CEF};
    w[32] = {24'h0, dt[3], dt[2], dt[1], dt[0]};
    for (int i = 0; i < INSTR_WORDS; i++) prog_mem[at + 32'(4 * i)] = w[i];

    total = 1;
    for (int l = 0; l < 5; l++) total *= bnd[l];
    exp_writes = 1;
    for (int l = 0; l < ll; l++) exp_writes *= bnd[l];

    @(negedge clk);
    bi_start = 1; bi_addr = at; bi_len = 7'(INSTR_WORDS);
    @(negedge clk);
    bi_start = 0;
    iters = 0; writes = 0; fin = 0; guard = 0;
    for (int l = 0; l < 5; l++) v[l] = 0;
    while (!fin && guard < 100000) begin
      guard++;
      stall = busy && ($urandom_range(0, 7) == 0);
      #1;
      if (iter_valid) begin
        bit exp_w;
        for (int s = 0; s < 4; s++) begin
          word_t got;
          got = (s < 3) ? is_addr[s] : os_addr;
          check({name, " address"}, got == kaddr(s, v));
          if (got != kaddr(s, v) && failures < 30)
            $display("  %s stream %0d iter %0d got %h exp %h", name, s, iters, got, kaddr(s, v));
        end
        exp_w = 1;
        for (int l = ll; l < 5; l++) if (v[l] != bnd[l] - 1) exp_w = 0;
        check({name, " result write"}, os_write == exp_w);
        if (os_write) writes++;
        iters++;
        if (iters == total) fin = 1;
        else begin
          for (int l = 4; l >= 0; l--) begin
            if (v[l] < bnd[l] - 1) begin v[l]++; break; end
            v[l] = 0;
          end
        end
      end
      @(negedge clk);
    end
    stall = 0;
    check({name, " iterations"}, iters == total);
    check({name, " results written"}, writes == exp_writes);
    @(negedge clk);
    check({name, " finished"}, !busy);
    $display("%s: %0d iterations, %0d results, SIMD lanes %0d", name, iters, writes, simd_lanes);
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    conv_ctrl = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_kernel("cfa",   32'h0080_0000);
    run_kernel("dct",   32'h0080_1000);
    run_kernel("mot",   32'h0080_2000);
    run_kernel("scale", 32'h0080_3000);
    run_kernel("aud",   32'h0080_4000);
    run_kernel("g711",  32'h0080_5000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
