// tb_hcpm_reused_dff: checks the reused flip-flop: capture on the rising
// edge only, hold across the falling edge, and asynchronous active-low clear
// that acts between edges and holds Q at 0 while asserted.
module tb_hcpm_reused_dff;

  logic clk = 1'b1;
  logic clr_n, d, q;
  int   checks = 0, failures = 0;

  hcpm_reused_dff dut (.*);

  always #50 clk = ~clk;

  initial begin : watchdog
    #100000;
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
    logic exp, nd;
    clr_n = 1; d = 0;
    @(posedge clk); #1;
    exp = 0;
    for (int i = 0; i < 200; i++) begin
      nd = 1'($urandom);
      d = nd;                         // new D after the rising edge: not captured yet
      #10; check(q, exp, "hold before edge");
      @(negedge clk); #1;
      check(q, exp, "no capture on falling edge");
      @(posedge clk); #1;
      exp = nd;
      check(q, exp, "capture on rising edge");
    end
    // asynchronous clear between edges
    d = 1;
    @(posedge clk); #1; check(q, 1'b1, "set before clear");
    #20; clr_n = 0; #1;
    check(q, 1'b0, "asynchronous clear");
    @(posedge clk); #1; check(q, 1'b0, "held cleared");
    clr_n = 1;
    @(posedge clk); #1; check(q, 1'b1, "capture after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
