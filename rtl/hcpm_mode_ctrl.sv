// hcpm_mode_ctrl: coding-mode controller of the FM0/Manchester codec.
//
// Translates the 2-bit coding mode into the static settings of the
// datapath (S_P, S_N, I1, I0) and into the clear of the reused flip-flop:
//
//   mode            S_P S_N I1 I0  clr_n
//   FM0 encoding     1   0   1  0  rst_n
//   FM0 decoding     0   0   0  1  rst_n
//   Manchester enc.  0   1   1  0  0 (DFF held at logic-0)
//   Manchester dec.  1   0   0  0  rst_n
//
// S_P and S_N of all four rows and I1/I0 of three rows are the published
// mode settings. For FM0 decoding I1/I0 = 0/1 is this design's choice: the
// negative half must compute Y_FN XNOR Y_FP, which with a non-inverting
// latch needs n = not Y_FP, i.e. MUX_D = not(select). The reset input and
// its use as the flip-flop clear are also this design's own.
// Purely combinational.
module hcpm_mode_ctrl
  import fm_codec_pkg::*;
(
  input  codec_mode_e mode,
  input  logic        rst_n,   // active-low reset, clears the reused DFF
  output codec_ctrl_t ctrl,
  output logic        clr_n
);

  always_comb begin
    unique case (mode)
      MODE_FM0_ENC: ctrl = '{sp: 1'b1, sn: 1'b0, i1: 1'b1, i0: 1'b0};
      MODE_FM0_DEC: ctrl = '{sp: 1'b0, sn: 1'b0, i1: 1'b0, i0: 1'b1};
      MODE_MAN_ENC: ctrl = '{sp: 1'b0, sn: 1'b1, i1: 1'b1, i0: 1'b0};
      MODE_MAN_DEC: ctrl = '{sp: 1'b1, sn: 1'b0, i1: 1'b0, i0: 1'b0};
      default:      ctrl = '{sp: 1'b1, sn: 1'b0, i1: 1'b1, i0: 1'b0};
    endcase
    clr_n = rst_n && (mode != MODE_MAN_ENC);
  end

endmodule
