// hcpm_codec: fully reused FM0/Manchester codec datapath (half-cycle
// partitioned architecture).
//
// One bit occupies one CLK period, CLK high first. MUX_A, selected by CLK,
// presents the positive-cycle logic (MUX_B) while CLK is high and the
// integrated negative-cycle logic (an XNOR) while CLK is low; the shared
// inverter INV_A after it drives the encoder output y_enc (Y_FE or Y_ME),
// which is valid in each half cycle. The single reused D flip-flop samples
// at the rising edge of CLK, at the end of the negative half: its output
// is Y_FN(t-1) for FM0 encoding and the decoded bit x_dec (X_D) for both
// decoders, one cycle after the bit was received.
//
// Control inputs sp, sn, i1, i0 and clr_n select the coding mode (see
// hcpm_mode_ctrl); they are static during operation. Data input din must be
// stable around the CLK edges: for encoding it holds X_E for the whole
// period; for decoding it carries the first code half while CLK is high and
// the second while CLK is low.
//
// The structure follows the architecture exactly. One detail is this
// design's own: the flip-flop's D is taken as the inverse of the XNOR
// formed with the latch's held value, rather than from INV_A's output. Up
// to the rising edge both carry the same value (MUX_A has been selecting
// the XNOR for the whole low half), but reading INV_A's output would race,
// in a zero-delay simulation, with the same edge switching MUX_A and
// reopening the latch.
module hcpm_codec (
  input  logic clk,
  input  logic clr_n,   // clear of the reused DFF, active low
  input  logic sp,      // S_P
  input  logic sn,      // S_N
  input  logic i1,      // I1
  input  logic i0,      // I0
  input  logic din,     // X_E / Y_FD / Y_MD
  output logic y_enc,   // Y_FE / Y_ME, INV_A output
  output logic x_dec    // X_D, reused DFF output
);

  logic dff_q, mux_b, xnor_o, xnor_hold, mux_a;

  hcpm_pos_cycle_logic u_pos (
    .sp    (sp),
    .din   (din),
    .fb    (dff_q),
    .mux_b (mux_b)
  );

  hcpm_neg_cycle_logic u_neg (
    .clk    (clk),
    .sn     (sn),
    .i1     (i1),
    .i0     (i0),
    .din    (din),
    .fb     (dff_q),
    .sel    (mux_b),
    .xnor_o    (xnor_o),
    .xnor_hold (xnor_hold)
  );

  always_comb mux_a = clk ? mux_b : xnor_o;   // MUX_A
  always_comb y_enc = ~mux_a;                 // INV_A

  hcpm_reused_dff u_dff (
    .clk   (clk),
    .clr_n (clr_n),
    .d     (~xnor_hold),
    .q     (dff_q)
  );

  always_comb x_dec = dff_q;

endmodule
