// tb_mb_agu: self-checking test of one address generation unit.
// Part 1 drives random last-value vectors, masks and strides and follows the
// address register with a reference that picks the stride in the bench:
// flag-k holds when mask-k is non-zero and every loop it names is at its last
// value; the outermost such k wins, none means stride-5. Part 2 runs a plain
// 2-D sub-block walk (rows x columns with a row pitch) from a loop odometer
// and checks every address against base + row*pitch + col*elem. Random
// stall cycles must hold the address; a saved address loaded back after an
// init must continue the sequence.
module tb_mb_agu;
  logic clk = 0, rst_n = 1, init = 0, load = 0, en = 0;
  logic [31:0] load_addr = '0;
  int loads_seen = 0;
  logic [31:0] base;
  logic [4:0][31:0] stride;
  logic [15:0] mask;
  logic [3:0] lastval;
  logic [3:0] flag;
  logic [2:0] stride_sel;
  logic [31:0] addr;
  int checks = 0, failures = 0;
  logic [31:0] ref_addr;

  mb_agu #(.WIDTH(32), .LEVELS(5)) dut (.clk, .rst_n, .init, .load, .load_addr, .en, .base, .stride, .mask, .lastval, .flag, .stride_sel, .addr);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t addr=%h ref=%h", what, $time, addr, ref_addr);
    end
  endtask

  function automatic int ref_sel(logic [15:0] m, logic [3:0] lv);
    for (int k = 0; k < 4; k++) begin
      logic [3:0] mk;
      mk = m[4*k +: 4];
      if (mk != 0 && (lv & mk) == mk) return k;
    end
    return 4;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    check("save/load exercised", loads_seen > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned rows, cols, pitch, elem, r, c;
    base = 0; stride = '0; mask = '0; lastval = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Part 1: random masks and last values
    repeat (20) begin
      base = $urandom();
      for (int k = 0; k < 5; k++) stride[k] = $urandom();
      mask = 16'($urandom());
      init = 1; @(negedge clk); init = 0;
      ref_addr = base;
      repeat (200) begin
        int s;
        if ($urandom_range(0, 50) == 0) begin
          // save prev-address, clobber it with init, load it back
          en = 0; load_addr = addr;
          init = 1; @(negedge clk); init = 0;
          load = 1; @(negedge clk); load = 0;
          loads_seen++;
        end
        lastval = 4'($urandom());
        en = ($urandom_range(0, 4) != 0);
        #1;
        check("address", addr == ref_addr);
        s = ref_sel(mask, lastval);
        check("stride select", int'(stride_sel) == s);
        if (en) ref_addr = ref_addr + stride[s];
        @(negedge clk);
      end
      en = 0;
    end
    // Part 2: 2-D sub-block walk, plain nest masks (loop 4 = rows, loop 5 = columns)
    repeat (10) begin
      rows = $urandom_range(1, 8); cols = $urandom_range(1, 8);
      elem = 1 << $urandom_range(0, 2); pitch = 64 * elem;
      base = 32'h1000_0000 + 32'($urandom_range(0, 255));
      stride = '0;
      stride[4] = elem;
      stride[3] = pitch - (cols - 1) * elem;
      mask = 16'h0000;
      mask[4*3 +: 4] = 4'b1000;   // stride-4 needs loop 5 at its last value
      init = 1; @(negedge clk); init = 0;
      r = 0; c = 0;
      while (r < rows) begin
        en = ($urandom_range(0, 3) != 0);
        lastval = {(c == cols - 1), (r == rows - 1), 2'b11};
        #1;
        ref_addr = base + r * pitch + c * elem;
        check("sub-block address", addr == ref_addr);
        if (en) begin
          if (c == cols - 1) begin c = 0; r++; end else c++;
        end
        @(negedge clk);
      end
      en = 0;
    end
    check("save/load exercised", loads_seen > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
