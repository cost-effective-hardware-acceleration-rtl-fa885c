// tb_mb_lastval_cmp: self-checking test of the loop-bound comparator bank.
// Applies directed corner values (equal, one below, one above, zero bound,
// the 32-bit extremes) and random index/bound pairs to all five levels and
// compares each "last" bit with an unsigned comparison done in the bench.
module tb_mb_lastval_cmp;
  localparam int unsigned N = 5;
  logic [N-1:0][31:0] index, bound;
  logic [N-1:0]       last;
  int checks = 0, failures = 0;

  mb_lastval_cmp #(.N(N), .WIDTH(32)) dut (.index, .bound, .last);

  task automatic check_all();
    #1;
    for (int i = 0; i < N; i++) begin
      bit exp;
      exp = !(index[i] < bound[i]);
      checks++;
      if (last[i] !== exp) begin
        failures++;
        $display("FAIL level %0d index=%0d bound=%0d last=%0b", i, index[i], bound[i], last[i]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6];
    corner = '{32'd0, 32'd1, 32'd2, 32'h7fff_ffff, 32'h8000_0000, 32'hffff_ffff};
    foreach (corner[a]) foreach (corner[b]) begin
      for (int i = 0; i < N; i++) begin
        index[i] = corner[(a + i) % 6];
        bound[i] = corner[b];
      end
      check_all();
    end
    repeat (2000) begin
      for (int i = 0; i < N; i++) begin
        bound[i] = $urandom();
        case ($urandom_range(0, 3))
          0: index[i] = bound[i];
          1: index[i] = bound[i] - 1;
          2: index[i] = bound[i] + 1;
          default: index[i] = $urandom();
        endcase
      end
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
