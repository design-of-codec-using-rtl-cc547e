// tb_fm_codec_top: end-to-end test of the FM0/Manchester codec.
//
// Two codecs share one clock: the transmitter runs in an encoding mode, its
// line output passes through a channel that delays it by a quarter period,
// and the receiver decodes it. Every SEG_BITS bits both codecs switch code
// (FM0 <-> Manchester) at the same bit boundary; one reset is applied in
// the middle of the run. Checked against independent reference models:
//   - the transmitter's line level in the middle of each half period
//     (FM0: first half = not previous second half, bit 0 toggles mid-bit;
//     Manchester: line = bit XOR CLK),
//   - the receiver's decoded bit exactly one period after the bit, which is
//     also the codec's decode latency.
// Coverage counters: FM0 zero and one bits, Manchester bits, decoded bits
// per code, mode switches in each direction, resets, and cycles in which the
// transmitter's flip-flop is held cleared by Manchester encoding. A counter
// that stays zero is a failure. The codec has no parameters; this test runs
// it as built.
module tb_fm_codec_top;
  import fm_codec_pkg::*;

  localparam int SEG_BITS = 64;
  localparam int NSEG     = 8;
  localparam int HALF     = 50;

  logic        clk = 1'b1;
  logic        rst_n;
  codec_mode_e tx_mode, rx_mode;
  logic        tx_din, tx_y, tx_xd;
  logic        chan;
  logic        rx_y, rx_xd;
  int          checks = 0, failures = 0;

  // coverage
  int n_fm0_zero = 0, n_fm0_one = 0, n_man_bits = 0;
  int n_fm0_dec = 0, n_man_dec = 0;
  int n_sw_to_man = 0, n_sw_to_fm0 = 0, n_reset = 0, n_held_clear = 0;

  fm_codec_top u_tx (.clk(clk), .rst_n(rst_n), .mode(tx_mode), .din(tx_din),
                     .y_enc(tx_y), .x_dec(tx_xd));
  fm_codec_top u_rx (.clk(clk), .rst_n(rst_n), .mode(rx_mode), .din(chan),
                     .y_enc(rx_y), .x_dec(rx_xd));

  always #HALF clk = ~clk;
  always @(tx_y) chan <= #(HALF/2) tx_y;   // channel: quarter-period delay

  initial begin : watchdog
    #(2 * 100 * (SEG_BITS * NSEG + 20));
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

  task automatic cover_nonzero(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else
      $display("  %-34s %0d", what, n);
  endtask

  initial begin
    logic prev_yfn, exp_bit, have_bit, fm0, yfp, yfn, x;
    rst_n = 0; tx_mode = MODE_FM0_ENC; rx_mode = MODE_FM0_DEC; tx_din = 0; chan = 0;
    @(posedge clk); #1;
    rst_n = 1;
    prev_yfn = 0; have_bit = 0; exp_bit = 0;

    for (int s = 0; s < NSEG; s++) begin
      fm0 = (s % 2 == 0);
      if (s > 0) begin
        if (fm0) n_sw_to_fm0++; else n_sw_to_man++;
      end
      tx_mode = fm0 ? MODE_FM0_ENC : MODE_MAN_ENC;
      rx_mode = fm0 ? MODE_FM0_DEC : MODE_MAN_DEC;
      // Leaving Manchester encoding releases a cleared flip-flop: the FM0
      // line starts from level 0, as after a reset.
      if (fm0) prev_yfn = 0;

      for (int b = 0; b < SEG_BITS; b++) begin
        // mid-run reset: asserted for one bit, the receiver's bit is lost
        if (s == NSEG / 2 && b == SEG_BITS / 2) begin
          rst_n = 0; n_reset++;
          #(HALF/2 - 1);
          check(tx_xd, 1'b0, "reset clears transmitter flip-flop");
          check(rx_xd, 1'b0, "reset clears receiver flip-flop");
          @(posedge clk); #1;
          rst_n = 1;
          prev_yfn = 0; have_bit = 0;
        end

        x = 1'($urandom);
        tx_din = x;
        if (fm0) begin
          yfp = ~prev_yfn;
          yfn = yfp ^ ~x;
          prev_yfn = yfn;
          if (x) n_fm0_one++; else n_fm0_zero++;
        end else begin
          yfp = ~x;
          yfn = x;
          n_man_bits++;
        end

        #(HALF/2 - 1);
        check(tx_y, yfp, fm0 ? "FM0 line, first half" : "Manchester line, first half");
        if (have_bit) begin
          check(rx_xd, exp_bit, "decoded bit, one period late");
          if (fm0) n_fm0_dec++; else n_man_dec++;
        end
        if (!fm0 && tx_xd == 1'b0) n_held_clear++;
        #HALF;
        check(tx_y, yfn, fm0 ? "FM0 line, second half" : "Manchester line, second half");
        if (have_bit) check(rx_xd, exp_bit, "decoded bit held for the period");
        exp_bit = x; have_bit = 1;
        @(posedge clk); #1;
      end
    end

    $display("coverage:");
    cover_nonzero(n_fm0_zero,   "FM0 zero bits (mid-bit transition)");
    cover_nonzero(n_fm0_one,    "FM0 one bits (no mid-bit transition)");
    cover_nonzero(n_man_bits,   "Manchester encoded bits");
    cover_nonzero(n_fm0_dec,    "FM0 decoded bits");
    cover_nonzero(n_man_dec,    "Manchester decoded bits");
    cover_nonzero(n_sw_to_man,  "switches FM0 -> Manchester");
    cover_nonzero(n_sw_to_fm0,  "switches Manchester -> FM0");
    cover_nonzero(n_reset,      "resets");
    cover_nonzero(n_held_clear, "cycles with DFF held cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
