// tb_mb_imem: self-checking test of the Breeze instruction memory.
// Fills all 33 words with random data, reads them back in random order with
// the one-cycle read latency, checks that rdata holds when re is low, that a
// same-cycle write and read return the old word, and that an out-of-range
// write changes nothing.
module tb_mb_imem;
  localparam int unsigned D = 33;
  logic clk = 0, we = 0, re = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] model [D];
  int checks = 0, failures = 0;

  mb_imem #(.DEPTH(D), .WIDTH(32), .AW(6)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] held;
    @(negedge clk);
    for (int i = 0; i < D; i++) begin
      we = 1; waddr = 6'(i); wdata = $urandom(); model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    repeat (300) begin
      int a;
      a = $urandom_range(0, D - 1);
      re = 1; raddr = 6'(a);
      @(negedge clk);
      re = 0;
      check("read data", rdata == model[a]);
      held = rdata;
      raddr = 6'((a + 1 + $urandom_range(0, D - 2)) % D);
      @(negedge clk);
      check("read hold", rdata == held);
    end
    // write and read the same word together: old word returned
    we = 1; re = 1; waddr = 6'd7; raddr = 6'd7; wdata = ~model[7];
    @(negedge clk);
    we = 0; re = 0;
    check("read-during-write old data", rdata == model[7]);
    model[7] = ~model[7];
    re = 1; @(negedge clk); re = 0;
    check("write landed", rdata == model[7]);
    // out-of-range write
    we = 1; waddr = 6'd40; wdata = 32'hdead_beef; @(negedge clk); we = 0;
    for (int i = 0; i < D; i++) begin
      re = 1; raddr = 6'(i); @(negedge clk); re = 0;
      check("no alias", rdata == model[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
