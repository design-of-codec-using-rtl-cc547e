// tb_hcpm_pos_cycle_logic: exhaustive check of the positive-cycle multiplexer
// (MUX_B): S_P = 1 must pass the flip-flop feedback, S_P = 0 the codec input.
module tb_hcpm_pos_cycle_logic;

  logic sp, din, fb, mux_b;
  int   checks = 0, failures = 0;

  hcpm_pos_cycle_logic dut (.*);

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sp, din, fb} = 3'(v);
      #1;
      checks++;
      if (mux_b !== (sp ? fb : din)) begin
        failures++;
        $display("FAIL sp=%0b din=%0b fb=%0b: mux_b=%0b", sp, din, fb, mux_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
