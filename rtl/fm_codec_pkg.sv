// fm_codec_pkg: types shared by the FM0/Manchester codec.
//
// The codec has four coding modes: FM0 encoding, FM0 decoding, Manchester
// encoding and Manchester decoding. Each mode is realised by four static
// control bits, S_P (select of MUX_B), S_N (select of MUX_C), and I1/I0 (the
// data inputs of MUX_D). codec_ctrl_t bundles these bits. The binary codes of
// codec_mode_e are this design's own choice.
package fm_codec_pkg;

  typedef enum logic [1:0] {
    MODE_FM0_ENC = 2'd0,
    MODE_FM0_DEC = 2'd1,
    MODE_MAN_ENC = 2'd2,
    MODE_MAN_DEC = 2'd3
  } codec_mode_e;

  typedef struct packed {
    logic sp;  // MUX_B select: 1 = reused DFF output, 0 = codec input
    logic sn;  // MUX_C select: 1 = reused DFF output, 0 = codec input
    logic i1;  // MUX_D input 1
    logic i0;  // MUX_D input 0
  } codec_ctrl_t;

endpackage
