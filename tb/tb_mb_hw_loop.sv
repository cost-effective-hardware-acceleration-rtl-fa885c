// tb_mb_hw_loop: self-checking test of the five hardware loops.
// A software odometer (innermost level counts first, carries outward) is the
// reference. For many random loop-bound sets (1..4 per level, plus zero and
// a long innermost loop that crosses 16 bits) the bench runs the nest with
// random stall cycles, and checks every cycle: the five indices, that one
// level at most increments, that end_of_loops rises exactly on the final
// iteration, and that the nest takes exactly prod(bounds) enabled cycles
// (one iteration per clock). At random points the indices are saved, wiped
// by init and loaded back with load, and the nest must continue unchanged.
module tb_mb_hw_loop;
  localparam int unsigned L = 5;
  logic clk = 0, rst_n = 1, init = 0, load = 0, en = 0;
  logic [4:0][31:0] load_index = '0;
  int loads_seen = 0;
  logic [L-1:0][31:0] bound, index;
  logic [L-1:0] last, inc;
  logic end_of_loops;
  int checks = 0, failures = 0;
  int unsigned ref_idx [L];
  int stalls_seen = 0;

  mb_hw_loop #(.LEVELS(L), .WIDTH(32)) dut (.clk, .rst_n, .init, .load, .load_index, .en, .bound, .index, .last, .inc, .end_of_loops);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // a falling edge, so the asynchronous reset acts

  function automatic int unsigned eff(int i);
    return (bound[i] == 0) ? 1 : bound[i];
  endfunction

  function automatic void ref_step();
    for (int i = L - 1; i >= 0; i--) begin
      if (ref_idx[i] < eff(i)) begin
        ref_idx[i]++;
        return;
      end
      ref_idx[i] = 1;
    end
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run_nest(bit with_stalls);
    longint unsigned total, iter;
    bit fin;
    total = 1;
    for (int i = 0; i < L; i++) total *= eff(i);
    for (int i = 0; i < L; i++) ref_idx[i] = 1;
    @(negedge clk); init = 1; en = 0;
    @(negedge clk); init = 0;
    iter = 0;
    fin = 0;
    while (!fin) begin
      if (with_stalls && $urandom_range(0, 30) == 0) begin
        // save the indices, clobber them, and load them back
        en = 0;
        load_index = index;
        init = 1; @(negedge clk); init = 0;
        load = 1; @(negedge clk); load = 0;
        loads_seen++;
      end
      en = with_stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
      #1;
      for (int i = 0; i < L; i++) check("index", index[i] == ref_idx[i]);
      check("inc onehot0", $countones(inc) <= 1);
      check("end flag", end_of_loops == (iter == total - 1));
      if (en) begin
        iter++;
        if (iter == total) fin = 1;
        else ref_step();
      end else stalls_seen++;
      @(negedge clk);
    end
    en = 0;
    check("iteration count", iter == total);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bound = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < L; i++) bound[i] = 32'(i + 1);
    run_nest(0);
    repeat (60) begin
      for (int i = 0; i < L; i++) bound[i] = $urandom_range(1, 4);
      run_nest(1);
    end
    bound = '{32'd2, 32'd0, 32'd1, 32'd3, 32'd0};
    run_nest(1);
    bound = '{32'd2, 32'd1, 32'd1, 32'd1, 32'd70000};
    run_nest(0);
    check("stalls exercised", stalls_seen > 0);
    check("save/load exercised", loads_seen > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
