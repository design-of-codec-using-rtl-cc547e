// tb_codec_examples: replays the short example streams used to explain the
// codes: FM0 encoding of 0,0,1,0,1 starting from a low line, and Manchester
// encoding of 0,0,1,1,0, each followed by decoding of the produced code.
// Expected line levels are written out by hand from the code definitions:
//   FM0 (from line level 0):  bits 0 0 1 0 1 -> halves 10 10 11 01 00
//   Manchester (bit XOR CLK): bits 0 0 1 1 0 -> halves 10 10 01 01 10
// Decoded bits must reproduce the streams one clock period late.
module tb_codec_examples;
  import fm_codec_pkg::*;

  localparam int HALF = 50;

  logic        clk = 1'b1;
  logic        rst_n;
  codec_mode_e mode;
  logic        din, y_enc, x_dec;
  int          checks = 0, failures = 0;

  fm_codec_top dut (.*);

  always #HALF clk = ~clk;

  initial begin : watchdog
    #10000;
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

  // Encodes five bits and compares the line halves with the listed code.
  task automatic encode(input codec_mode_e m, input logic [4:0] bits,
                        input logic [9:0] code, input string what);
    mode = m;
    for (int b = 4; b >= 0; b--) begin
      din = bits[b];
      #(HALF/2 - 1); check(y_enc, code[2*b+1], what);
      #HALF;         check(y_enc, code[2*b],   what);
      @(posedge clk); #1;
    end
  endtask

  // Feeds the listed code halves and compares the decoded bits.
  task automatic decode(input codec_mode_e m, input logic [4:0] bits,
                        input logic [9:0] code, input string what);
    mode = m;
    for (int b = 4; b >= -1; b--) begin
      if (b >= 0) din = code[2*b+1];
      #(HALF/2 - 1);
      if (b < 4) check(x_dec, bits[b+1], what);
      @(negedge clk); #1;
      if (b >= 0) din = code[2*b];
      @(posedge clk); #1;
    end
  endtask

  initial begin
    rst_n = 0; mode = MODE_FM0_ENC; din = 0;
    @(posedge clk); #1;
    rst_n = 1;
    encode(MODE_FM0_ENC, 5'b00101, 10'b10_10_11_01_00, "FM0 encoding example");
    decode(MODE_FM0_DEC, 5'b00101, 10'b10_10_11_01_00, "FM0 decoding example");
    encode(MODE_MAN_ENC, 5'b00110, 10'b10_10_01_01_10, "Manchester encoding example");
    decode(MODE_MAN_DEC, 5'b00110, 10'b10_10_01_01_10, "Manchester decoding example");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
