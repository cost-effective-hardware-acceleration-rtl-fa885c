// tb_mediabreeze_top: end-to-end test of the MediaBreeze front end.
//
// The bench stands in for the processor around the front end: an instruction
// memory answering fetch requests with random latency, a memory side that
// stalls at random, and the start / interrupt / resume instructions. It
// encodes Breeze instructions itself from a loop nest description (bounds,
// and for each stream the address step per loop level, "pitch"), turning the
// pitches into the per-level strides and masks of the instruction format.
// The reference for every iteration is a software loop odometer:
//   address(stream) = base + sum over levels k of (index_k - 1) * pitch_k
//   os_write        = every loop inside level LL is at its bound
// Checked every iteration: the five loop indices, the four stream addresses,
// os_write, and the SIMD control word; when idle the conventional control
// word must pass. Also checked: the iteration count of each nest, the latency
// from the last fetched word to the first iteration (INSTR_WORDS + 5 cycles),
// the SIMD parallelism, that halt_pipeline is released while paused, and one
// done pulse per instruction. Programs: a 2-D sub-block walk with a
// transposed and a reversed stream and one result per row, random five-level
// nests with negative pitches and every LL, a 30-word instruction without
// the mask and type words, and save/restore: a nest is interrupted, its
// indices and addresses are read out, another instruction is started from
// PAUSE and run, and the first is restarted from the saved state. Each mechanism (stall, interrupt/resume,
// reduced result writes, control switch-over, short instruction, decrementing
// address, each SIMD width, restore) is counted and must occur.
module tb_mediabreeze_top;
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
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts

  int checks = 0, failures = 0;
  int n_stall = 0, n_pause = 0, n_os_skip = 0, n_switch = 0, n_short = 0, n_decr = 0;
  int n_lanes4 = 0, n_lanes8 = 0, n_lanes16 = 0, n_done = 0, n_restore = 0;

  // reference state of an abandoned (interrupted and saved) instruction
  int unsigned sv_idx [5];
  longint      sv_iters;

  // instruction memory seen by the fetch port
  word_t prog_mem [word_t];
  longint rvalid_cycle, cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (done) n_done <= n_done + 1;

  initial begin
    forever begin
      @(posedge clk);
      if (fetch_req) begin
        word_t a;
        a = fetch_addr;
        repeat ($urandom_range(0, 2)) @(posedge clk);
        @(negedge clk);
        fetch_rvalid = 1;
        fetch_rdata = prog_mem.exists(a) ? prog_mem[a] : 32'h0;
        rvalid_cycle = cycle;
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

  // one loop nest
  int unsigned bnd [5];
  word_t       base [4];
  int          pitch [4][5];
  simd_ctrl_t  ctrl;
  logic [1:0]  dt [4];
  logic [3:0]  mc;

  // Encode the nest as a Breeze instruction at address a.
  task automatic encode(word_t a);
    word_t w [INSTR_WORDS];
    for (int i = 0; i < INSTR_WORDS; i++) w[i] = '0;
    for (int l = 0; l < 5; l++) w[l] = bnd[l];
    for (int s = 0; s < 4; s++) w[5 + s] = base[s];
    w[9] = 32'(ctrl);
    for (int s = 0; s < 4; s++) begin
      for (int k = 0; k < 5; k++) begin
        int st;
        st = pitch[s][k];
        for (int j = k + 1; j < 5; j++) st -= (int'(bnd[j]) - 1) * pitch[s][j];
        w[10 + 5 * s + k] = word_t'(st);
      end
    end
    // plain nest masks: stride-k needs loops k+1..5 at their last value
    w[30] = {16'h8CEF, 16'h8CEF};
    w[31] = {16'h8CEF, 16'h8CEF};
    w[32] = {20'h0, mc, dt[3], dt[2], dt[1], dt[0]};
    for (int i = 0; i < INSTR_WORDS; i++) prog_mem[a + 32'(4 * i)] = w[i];
  endtask

  // Run the instruction at address a (len words) and check it.
  // short_form: the mask and type words are absent, every iteration
  // uses stride-5 of each stream.
  // restore: continue from sv_idx / sv_iters with the state on ctx_*.
  // abandon_at >= 0: interrupt before that iteration, check and save the
  // state read from the outputs, and return with the instruction paused.
  task automatic run(word_t a, int len, bit short_form, bit stalls,
                     bit restore = 0, longint abandon_at = -1);
    int unsigned idx [5];
    longint total, iters, first_cycle;
    int writes, guard;
    bit fin;
    total = 1;
    for (int l = 0; l < 5; l++) total *= (bnd[l] == 0 ? 1 : bnd[l]);
    for (int l = 0; l < 5; l++) idx[l] = restore ? sv_idx[l] : 1;
    @(negedge clk);
    bi_start = 1; bi_restore = restore; bi_addr = a; bi_len = 7'(len);
    @(negedge clk);
    bi_start = 0; bi_restore = 0;
    check("halt while fetching", halt_pipeline && busy);
    guard = 0;
    while (!iter_valid && guard < 1000) begin
      guard++;
      check("conventional control while loading", simd_ctrl == conv_ctrl);
      @(negedge clk);
    end
    first_cycle = cycle;
    check("first iteration latency", first_cycle - rvalid_cycle == INSTR_WORDS + 5);
    n_switch++;
    case (simd_lanes)
      5'd4: n_lanes4++;
      5'd8: n_lanes8++;
      5'd16: n_lanes16++;
      default: check("simd lanes value", 0);
    endcase
    if (!short_form) begin
      int maxsz, exp;
      maxsz = 8;
      for (int s = 0; s < 4; s++) begin
        int sz;
        sz = (dt[s] == 0) ? 8 : (dt[s] == 1) ? 16 : 32;
        if (sz > maxsz) maxsz = sz;
      end
      exp = 128 / maxsz;
      check("simd lanes", int'(simd_lanes) == exp);
    end else begin
      check("short form: 8-bit types", simd_lanes == 5'd16);
      n_short++;
    end
    iters = restore ? sv_iters : 0;
    if (restore) n_restore++;
    writes = 0; fin = 0; guard = 0;
    while (!fin && guard < 200000) begin
      guard++;
      if (abandon_at >= 0 && iters == abandon_at) begin
        stall = 0; bi_interrupt = 1;
        #1;
        check("interrupted cycle issues nothing", !iter_valid);
        @(negedge clk);
        bi_interrupt = 0;
        #1;
        check("paused for save", busy && !halt_pipeline && !iter_valid);
        for (int l = 0; l < 5; l++) check("saved loop index", loop_index[l] == idx[l]);
        for (int s = 0; s < 4; s++) begin
          word_t exp_a;
          exp_a = base[s];
          for (int l = 0; l < 5; l++) exp_a += word_t'((int'(idx[l]) - 1) * pitch[s][l]);
          check("saved address", ((s < 3) ? is_addr[s] : os_addr) == exp_a);
        end
        ctx_index = loop_index;
        ctx_addr = {os_addr, is_addr[2], is_addr[1], is_addr[0]};
        for (int l = 0; l < 5; l++) sv_idx[l] = idx[l];
        sv_iters = iters;
        @(negedge clk);
        return;
      end
      stall = stalls && ($urandom_range(0, 5) == 0);
      bi_interrupt = stalls && !stall && ($urandom_range(0, 40) == 0);
      #1;
      if (iter_valid) begin
        bit exp_w;
        for (int l = 0; l < 5; l++) check("loop index", loop_index[l] == idx[l]);
        for (int s = 0; s < 4; s++) begin
          word_t exp_a, got;
          exp_a = base[s];
          if (short_form) exp_a += word_t'(longint'(iters) * pitch[s][4]);
          else for (int l = 0; l < 5; l++) exp_a += word_t'((int'(idx[l]) - 1) * pitch[s][l]);
          got = (s < 3) ? is_addr[s] : os_addr;
          check("stream address", got == exp_a);
          if (got != exp_a && failures < 30)
            $display("  stream %0d iter %0d got %h exp %h", s, iters, got, exp_a);
        end
        exp_w = 1;
        if (ctrl.ll >= 1 && ctrl.ll <= 5)
          for (int l = int'(ctrl.ll); l < 5; l++) if (idx[l] != (bnd[l] == 0 ? 1 : bnd[l])) exp_w = 0;
        check("os_write", os_write == exp_w);
        if (os_write) writes++;
        check("breeze control", simd_ctrl == ctrl);
        iters++;
        if (iters == total) fin = 1;
        else begin
          for (int l = 4; l >= 0; l--) begin
            if (idx[l] < (bnd[l] == 0 ? 1 : bnd[l])) begin idx[l]++; break; end
            idx[l] = 1;
          end
        end
      end else begin
        check("no write when idle", !os_write);
        if (stall) n_stall++;
      end
      @(negedge clk);
      if (bi_interrupt) begin
        bi_interrupt = 0;
        n_pause++;
        repeat ($urandom_range(1, 4)) begin
          #1;
          check("paused: pipeline released, state kept", !halt_pipeline && busy && !iter_valid);
          check("paused: conventional control", simd_ctrl == conv_ctrl);
          conv_ctrl = simd_ctrl_t'($urandom());
          @(negedge clk);
        end
        bi_resume = 1; @(negedge clk); bi_resume = 0;
      end
    end
    stall = 0;
    check("iteration count", iters == total);
    if (writes < total) n_os_skip++;
    @(negedge clk);
    check("finished", !busy && !halt_pipeline);
    check("conventional control after", simd_ctrl == conv_ctrl);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dones_expected;
    conv_ctrl = simd_ctrl_t'(22'h2a5a5);
    repeat (3) @(negedge clk);
    rst_n = 1;
    dones_expected = 0;

    // 1: 8x8 sub-block of a 64-byte-wide image; IS-2 walks it transposed,
    //    IS-3 walks 16-bit coefficients backwards, one result per row (LL=4)
    bnd = '{1, 1, 1, 8, 8};
    base = '{32'h0001_0000, 32'h0002_0000, 32'h0003_0100, 32'h0004_0000};
    pitch = '{'{0, 0, 0, 64, 1}, '{0, 0, 0, 1, 64}, '{0, 0, 0, -16, -2}, '{0, 0, 0, 4, 0}};
    ctrl = '{saturate: 1'b1, is_signed: 1'b1, ll: 3'd4, shift: 5'd3, redop: 4'd1, opr: 8'h21};
    dt = '{2'd0, 2'd0, 2'd1, 2'd1};
    mc = 4'b0000;
    encode(32'h0080_0000);
    n_decr++;
    run(32'h0080_0000, 33, 0, 1);
    dones_expected++;

    // 2: random five-level nests
    repeat (25) begin
      for (int l = 0; l < 5; l++) bnd[l] = $urandom_range(1, 4);
      for (int s = 0; s < 4; s++) begin
        base[s] = $urandom();
        for (int l = 0; l < 5; l++) begin
          pitch[s][l] = $urandom_range(0, 512) - 256;
          if (pitch[s][l] < 0) n_decr++;
        end
      end
      ctrl = simd_ctrl_t'($urandom());
      ctrl.ll = 3'($urandom_range(0, 7));
      for (int s = 0; s < 4; s++) dt[s] = 2'($urandom_range(0, 2));
      mc = 4'($urandom());
      begin
        word_t a;
        a = 32'h0090_0000 + 32'($urandom_range(0, 255)) * 256;
        encode(a);
        run(a, 33, 0, 1);
      end
      dones_expected++;
    end

    // 3: a 30-word instruction (no mask and type words): every stream
    //    steps by its stride-5 each iteration, 8-bit elements
    bnd = '{2, 1, 3, 1, 4};
    base = '{32'h0005_0000, 32'h0006_0000, 32'h0007_0000, 32'h0008_0000};
    pitch = '{'{0, 0, 0, 0, 1}, '{0, 0, 0, 0, 2}, '{0, 0, 0, 0, -4}, '{0, 0, 0, 0, 8}};
    ctrl = '{saturate: 1'b0, is_signed: 1'b0, ll: 3'd3, shift: 5'd0, redop: 4'd0, opr: 8'h05};
    dt = '{2'd2, 2'd2, 2'd2, 2'd2};
    mc = 4'b1111;
    encode(32'h00a0_0000);
    run(32'h00a0_0000, 30, 1, 1);
    dones_expected++;

    // 4: save and restore: interrupt a nest half way, read its state out,
    //    run another instruction in between, then restart it from that state
    repeat (4) begin
      int unsigned b1 [5];
      word_t ba1 [4];
      int p1 [4][5];
      simd_ctrl_t c1;
      logic [1:0] d1 [4];
      longint tot;
      for (int l = 0; l < 5; l++) bnd[l] = $urandom_range(1, 4);
      for (int s = 0; s < 4; s++) begin
        base[s] = $urandom();
        for (int l = 0; l < 5; l++) pitch[s][l] = $urandom_range(0, 512) - 256;
      end
      ctrl = simd_ctrl_t'($urandom());
      for (int s = 0; s < 4; s++) dt[s] = 2'($urandom_range(0, 2));
      encode(32'h00b0_0000);
      tot = 1;
      for (int l = 0; l < 5; l++) tot *= bnd[l];
      b1 = bnd; ba1 = base; p1 = pitch; c1 = ctrl; d1 = dt;
      run(32'h00b0_0000, 33, 0, 1, 0, $urandom_range(0, int'(tot) - 1));
      // the handler runs another Breeze instruction, starting it from PAUSE
      for (int l = 0; l < 5; l++) bnd[l] = $urandom_range(1, 3);
      for (int s = 0; s < 4; s++) begin
        base[s] = $urandom();
        for (int l = 0; l < 5; l++) pitch[s][l] = $urandom_range(0, 64) - 32;
      end
      ctrl = simd_ctrl_t'($urandom());
      encode(32'h00c0_0000);
      run(32'h00c0_0000, 33, 0, 1);
      dones_expected++;
      // and the interrupted one continues from its saved state
      bnd = b1; base = ba1; pitch = p1; ctrl = c1; dt = d1;
      run(32'h00b0_0000, 33, 0, 1, 1);
      dones_expected++;
    end

    repeat (3) @(negedge clk);
    check("one done per instruction", n_done == dones_expected);
    $display("mechanisms: stall=%0d pause=%0d reduced_writes=%0d switch=%0d short=%0d decrement=%0d lanes4=%0d lanes8=%0d lanes16=%0d done=%0d restore=%0d",
             n_stall, n_pause, n_os_skip, n_switch, n_short, n_decr, n_lanes4, n_lanes8, n_lanes16, n_done, n_restore);
    check("stall happened", n_stall > 0);
    check("interrupt/resume happened", n_pause > 0);
    check("reduced result writes happened", n_os_skip > 0);
    check("control switch-over happened", n_switch > 0);
    check("short instruction happened", n_short > 0);
    check("decrementing stride happened", n_decr > 0);
    check("4-way SIMD happened", n_lanes4 > 0);
    check("8-way SIMD happened", n_lanes8 > 0);
    check("16-way SIMD happened", n_lanes16 > 0);
    check("save/restore happened", n_restore > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
