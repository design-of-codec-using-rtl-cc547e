// tb_hcpm_mode_ctrl: checks the mode table of the codec controller for all
// four modes with reset released and asserted. The expected settings are
// written out independently below.
module tb_hcpm_mode_ctrl;
  import fm_codec_pkg::*;

  codec_mode_e mode;
  logic        rst_n;
  codec_ctrl_t ctrl;
  logic        clr_n;
  int          checks = 0, failures = 0;

  hcpm_mode_ctrl dut (.*);

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {S_P, S_N, I1, I0, clear held}
  function automatic logic [4:0] expected(input int m);
    case (m)
      0: return 5'b1_0_1_0_0;   // FM0 encoding
      1: return 5'b0_0_0_1_0;   // FM0 decoding
      2: return 5'b0_1_1_0_1;   // Manchester encoding
      default: return 5'b1_0_0_0_0; // Manchester decoding
    endcase
  endfunction

  initial begin
    for (int m = 0; m < 4; m++) begin
      for (int r = 0; r < 2; r++) begin
        logic [4:0] e;
        mode  = codec_mode_e'(m);
        rst_n = 1'(r);
        #1;
        e = expected(m);
        checks++;
        if ({ctrl.sp, ctrl.sn, ctrl.i1, ctrl.i0} !== e[4:1]) begin
          failures++;
          $display("FAIL mode %0d: ctrl=%b expected %b", m, ctrl, e[4:1]);
        end
        checks++;
        if (clr_n !== (r == 1 && !e[0])) begin
          failures++;
          $display("FAIL mode %0d rst_n=%0d: clr_n=%0b", m, r, clr_n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
