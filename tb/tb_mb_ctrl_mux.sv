// tb_mb_ctrl_mux: self-checking test of the control-source multiplexer.
// Random conventional and Breeze control words with both select values.
module tb_mb_ctrl_mux;
  localparam int unsigned W = 22;
  logic sel_breeze;
  logic [W-1:0] conv_ctrl, breeze_ctrl, ctrl;
  int checks = 0, failures = 0;

  mb_ctrl_mux #(.W(W)) dut (.sel_breeze, .conv_ctrl, .breeze_ctrl, .ctrl);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) begin
      sel_breeze = 1'($urandom());
      conv_ctrl = W'($urandom());
      breeze_ctrl = W'($urandom());
      #1;
      checks++;
      if (ctrl != (sel_breeze ? breeze_ctrl : conv_ctrl)) begin
        failures++;
        $display("FAIL sel=%0b ctrl=%h", sel_breeze, ctrl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
