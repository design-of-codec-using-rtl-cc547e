// tb_hcpm_neg_cycle_logic: checks the integrated negative-cycle logic.
// While CLK is high the latch is transparent: xnor_o = m XNOR MUX_D. While
// CLK is low it holds the MUX_D value present at the falling edge, so
// changes of MUX_D's inputs no longer reach n. m follows S_N at all times.
module tb_hcpm_neg_cycle_logic;

  logic clk = 1'b1;
  logic sn, i1, i0, din, fb, sel;
  logic xnor_o, xnor_hold;
  int   checks = 0, failures = 0;

  hcpm_neg_cycle_logic dut (.*);

  always #50 clk = ~clk;

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  initial begin
    logic m, held;
    {sn, i1, i0, din, fb, sel} = '0;
    @(posedge clk); #1;
    for (int i = 0; i < 300; i++) begin
      // high half: transparent
      {sn, i1, i0, din, fb, sel} = 6'($urandom);
      #10;
      m = sn ? fb : din;
      check(xnor_o, ~(m ^ (sel ? i1 : i0)), "transparent half");
      held = sel ? i1 : i0;
      @(negedge clk); #1;
      // low half: MUX_D inputs change, latch must hold; m still follows S_N
      {i1, i0, sel} = 3'($urandom);
      {sn, din, fb} = 3'($urandom);
      #10;
      m = sn ? fb : din;
      check(xnor_o, ~(m ^ held), "held half");
      check(xnor_hold, ~(m ^ held), "held value output");
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
