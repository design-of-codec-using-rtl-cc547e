// fm_codec_top: FM0/Manchester codec with mode selection.
//
// A serial line codec for short-range links: it encodes a bit stream into
// FM0 (bi-phase space) or Manchester code, or decodes either code back into
// bits, with one shared datapath in which every gate and storage element is
// used in every mode. The mode controller sets the datapath's multiplexers;
// hcpm_codec does the work.
//
// Timing: one bit per CLK period, CLK high during the first code half.
//   Encoding: din holds X_E for the period; y_enc carries the first code
//   half while CLK is high and the second while CLK is low.
//   Decoding: din carries the first code half while CLK is high and the
//   second while CLK is low; x_dec shows the decoded bit from the next
//   rising edge of CLK for one full period.
// rst_n (active low, asynchronous) clears the codec's flip-flop; FM0
// encoding starts from a low line level after reset. Switching the mode is
// allowed at a rising edge of CLK; the bit after the switch is already coded
// in the new mode.
module fm_codec_top
  import fm_codec_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  codec_mode_e mode,
  input  logic        din,    // X_E (encoding) or received code Y_FD / Y_MD
  output logic        y_enc,  // encoded line signal Y_FE / Y_ME
  output logic        x_dec   // decoded bit X_D
);

  codec_ctrl_t ctrl;
  logic        clr_n;

  hcpm_mode_ctrl u_ctrl (
    .mode  (mode),
    .rst_n (rst_n),
    .ctrl  (ctrl),
    .clr_n (clr_n)
  );

  hcpm_codec u_codec (
    .clk   (clk),
    .clr_n (clr_n),
    .sp    (ctrl.sp),
    .sn    (ctrl.sn),
    .i1    (ctrl.i1),
    .i0    (ctrl.i0),
    .din   (din),
    .y_enc (y_enc),
    .x_dec (x_dec)
  );

endmodule
