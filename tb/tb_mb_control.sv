// tb_mb_control: self-checking test of the Breeze instruction sequencer.
// The bench plays the instruction cache (random response latency), the
// decoder (done a random number of cycles after dec_start) and the loop nest
// (end_of_loops after a set number of enabled iterations). Per instruction it
// checks the fetch addresses and the words written into the instruction
// memory, the decoder handshake, that iterations only count when neither
// stalled nor interrupted, that a pause releases halt_pipeline and keeps the
// iteration count, the total number of iterations, the done pulse, the
// choice between a fresh start and a restore of saved state, and that a
// start while paused abandons the paused instruction.
module tb_mb_control;
  import mb_pkg::*;
  logic clk = 0, rst_n = 1;
  logic bi_start = 0, bi_restore = 0, bi_interrupt = 0, bi_resume = 0;
  word_t bi_addr = 0;
  logic [6:0] bi_len = 0;
  logic fetch_req, fetch_rvalid = 0;
  word_t fetch_addr, fetch_rdata = 0;
  logic imem_we;
  logic [5:0] imem_waddr;
  word_t imem_wdata;
  logic dec_start, dec_done = 0;
  logic [6:0] dec_len;
  logic stall = 0, end_of_loops;
  logic loop_init, ctx_load, run_en, breeze_active, halt_pipeline, busy, done;
  int checks = 0, failures = 0;
  int iters, n_iter, pauses, stalls, dones;

  mb_control #(.AW(6)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts

  assign end_of_loops = (iters == n_iter - 1);
  always @(posedge clk) if (done) dones++;
  always @(posedge clk) if (run_en) iters <= iters + 1;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic word_t mem_word(word_t a);
    return a ^ 32'h5a5a_1234;
  endfunction

  // instruction cache model: answers each request after 1..4 cycles
  initial begin
    forever begin
      @(posedge clk);
      if (fetch_req) begin
        word_t a;
        a = fetch_addr;
        repeat ($urandom_range(0, 3)) @(posedge clk);
        @(negedge clk);
        fetch_rvalid = 1; fetch_rdata = mem_word(a);
        @(negedge clk);
        fetch_rvalid = 0;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pauses = 0; stalls = 0; dones = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (12) begin
      int len, nwrites, guard, init_seen, load_seen, dec_starts;
      bit rest;
      len = $urandom_range(1, 33);
      n_iter = $urandom_range(1, 40);
      iters = 0; nwrites = 0; init_seen = 0; load_seen = 0; dec_starts = 0;
      rest = 1'($urandom());
      @(negedge clk);
      bi_start = 1; bi_restore = rest; bi_addr = 32'h0040_0000 + 32'($urandom_range(0, 1023)) * 4; bi_len = 7'(len);
      @(negedge clk);
      bi_start = 0; bi_restore = 0;
      check("busy after start", busy && halt_pipeline);
      guard = 0;
      while (busy && guard < 5000) begin
        guard++;
        stall = ($urandom_range(0, 4) == 0);
        bi_interrupt = breeze_active && ($urandom_range(0, 15) == 0);
        #1;
        if (imem_we) begin
          check("fetch word", imem_wdata == mem_word(bi_addr + 32'(nwrites) * 4));
          check("imem address", int'(imem_waddr) == nwrites);
          nwrites++;
        end
        if (dec_start) begin
          dec_starts++;
          check("all words fetched", nwrites == len);
          check("decode length", int'(dec_len) == len);
          fork begin
            repeat ($urandom_range(2, 6)) @(posedge clk);
            @(negedge clk); dec_done = 1; @(negedge clk); dec_done = 0;
          end join_none
        end
        if (loop_init) init_seen++;
        if (ctx_load) load_seen++;
        if (run_en) check("run only when not stalled", !stall && !bi_interrupt);
        if (breeze_active && stall) stalls++;
        @(negedge clk);
        if (bi_interrupt) begin
          bi_interrupt = 0;
          pauses++;
          repeat (3) begin
            #1;
            check("paused: pipeline released", !halt_pipeline && busy && !run_en);
            @(negedge clk);
          end
          bi_resume = 1; @(negedge clk); bi_resume = 0;
        end
      end
      check("finished", !busy && !halt_pipeline);
      check("iteration count", iters == n_iter);
      check("one decode", dec_starts == 1);
      check("one init or restore", rest ? (load_seen == 1 && init_seen == 0) : (init_seen == 1 && load_seen == 0));
      @(negedge clk);
    end
    // a new instruction started while one is paused abandons the paused one
    iters = 0; n_iter = 1000;
    @(negedge clk); bi_start = 1; bi_addr = 32'h100; bi_len = 7'd1; @(negedge clk); bi_start = 0;
    while (!run_en) begin
      if (dec_start) fork begin @(negedge clk); @(negedge clk); dec_done = 1; @(negedge clk); dec_done = 0; end join_none
      @(negedge clk);
    end
    repeat (5) @(negedge clk);
    bi_interrupt = 1; @(negedge clk); bi_interrupt = 0;
    check("paused", busy && !halt_pipeline);
    n_iter = 3;
    iters = 0;
    bi_start = 1; bi_restore = 1; bi_addr = 32'h200; bi_len = 7'd1; @(negedge clk); bi_start = 0; bi_restore = 0;
    check("start from pause fetches", halt_pipeline && fetch_addr == 32'h200);
    begin
      int g, loads;
      g = 0; loads = 0;
      while (busy && g < 200) begin
        #1;
        if (ctx_load) loads++;
        if (dec_start) fork begin @(negedge clk); @(negedge clk); dec_done = 1; @(negedge clk); dec_done = 0; end join_none
        @(negedge clk); g++;
      end
      check("restarted from saved state", loads == 1);
      check("second instruction ran its own nest", iters == 3 && !busy);
    end
    repeat (2) @(negedge clk);
    check("done pulses", dones == 13);
    check("pause exercised", pauses > 0);
    check("stall exercised", stalls > 0);
    $display("pauses=%0d stalls=%0d", pauses, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
