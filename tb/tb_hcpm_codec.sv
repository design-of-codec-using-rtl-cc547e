// tb_hcpm_codec: self-checking testbench of the HCPM codec datapath.
//
// Drives the raw controls (S_P, S_N, I1, I0, clear) for each of the four
// coding modes and a random bit stream of NBITS bits per mode. Expected
// values come from the textbook definitions of the codes, not from the
// datapath:
//   FM0:        first half = not(previous second half), second half =
//               first half XOR not(bit)  (bit 0 toggles mid-bit, bit 1 not)
//   Manchester: line = bit XOR CLK (first half = not bit, second half = bit)
// The line output is checked in the middle of each half period; decoded
// bits are checked one clock period after the bit (the codec's latency).
// CLK period is 100 time units, high first.
module tb_hcpm_codec;

  localparam int NBITS = 200;
  localparam int HALF  = 50;

  logic clk = 1'b1;
  logic clr_n, sp, sn, i1, i0, din;
  logic y_enc, x_dec;
  int   checks = 0, failures = 0;

  hcpm_codec dut (.*);

  always #HALF clk = ~clk;

  initial begin : watchdog
    #(4 * 100 * (NBITS + 20));
    failures++;
    $display("watchdog expired");
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

  // Waits from a point 1 unit after a rising edge to 1 unit after the next.
  task automatic next_cycle();
    @(posedge clk); #1;
  endtask

  task automatic set_ctrl(input logic p, input logic n, input logic a, input logic b,
                          input logic cn);
    sp = p; sn = n; i1 = a; i0 = b; clr_n = cn;
  endtask

  // FM0 encoding: S_P=1 S_N=0 I1=1 I0=0
  task automatic run_fm0_enc();
    logic prev, x, yfp, yfn;
    set_ctrl(1, 0, 1, 0, 0);
    din = 0;
    next_cycle();
    clr_n = 1;
    prev = 0;                       // line level after clear
    for (int b = 0; b < NBITS; b++) begin
      x = 1'($urandom);
      din = x;
      yfp = ~prev;
      yfn = yfp ^ ~x;
      #(HALF/2 - 1); check(y_enc, yfp, "FM0 enc first half");
      #HALF;         check(y_enc, yfn, "FM0 enc second half");
      prev = yfn;
      next_cycle();
    end
  endtask

  // Manchester encoding: S_P=0 S_N=1 I1=1 I0=0, flip-flop held cleared
  task automatic run_man_enc();
    logic x;
    set_ctrl(0, 1, 1, 0, 0);
    for (int b = 0; b < NBITS; b++) begin
      x = 1'($urandom);
      din = x;
      #(HALF/2 - 1); check(y_enc, ~x, "Manchester enc first half");
      #HALF;         check(y_enc,  x, "Manchester enc second half");
      next_cycle();
    end
  endtask

  // Decoding: drives two code halves per bit and checks the bit one period later.
  task automatic run_dec(input bit fm0);
    logic h1, h2, exp_bit, prev, have;
    if (fm0) set_ctrl(0, 0, 0, 1, 1);
    else     set_ctrl(1, 0, 0, 0, 1);
    prev = 0; have = 0; exp_bit = 0;
    for (int b = 0; b <= NBITS; b++) begin
      logic x;
      x = 1'($urandom);
      if (fm0) begin h1 = ~prev; h2 = h1 ^ ~x; end
      else     begin h1 = ~x;    h2 = x;       end
      prev = h2;
      din = h1;
      #(HALF/2 - 1);
      if (have) check(x_dec, exp_bit, fm0 ? "FM0 dec bit" : "Manchester dec bit");
      @(negedge clk); #1;
      din = h2;
      #(HALF/2 - 1);
      if (have) check(x_dec, exp_bit, fm0 ? "FM0 dec bit (2nd half)" : "Manchester dec bit (2nd half)");
      exp_bit = x; have = 1;
      next_cycle();
    end
  endtask

  initial begin
    set_ctrl(1, 0, 1, 0, 0);
    din = 0;
    #1;
    run_fm0_enc();
    run_man_enc();
    run_dec(1'b1);
    run_dec(1'b0);
    // Clear in a decoding mode forces X_D low.
    clr_n = 0; #1;
    check(x_dec, 1'b0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
