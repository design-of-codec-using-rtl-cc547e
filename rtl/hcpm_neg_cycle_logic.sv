// hcpm_neg_cycle_logic: integrated negative-cycle logic of the HCPM codec.
//
// While CLK is low the codec output is the inverse of this block's XNOR,
// i.e. m XOR n. One XNOR serves all four coding modes:
//   m (MUX_C, select S_N): the reused DFF output (S_N = 1; logic-0 in
//     Manchester encoding, where the DFF is held cleared) or the codec input.
//   n (MUX_D, then a latch): MUX_D picks I1 or I0 with MUX_B's output as its
//     select, so with the constants I1/I0 it forms MUX_B's output, its
//     inverse or a constant. The latch is transparent while CLK is high and
//     holds during the low half, which stores Y_FP(t) for FM0 decoding.
// In FM0 encoding this gives X_E XOR Y_FN(t-1); in FM0 decoding
// Y_FN(t) XNOR Y_FP(t); in Manchester encoding X_E; in Manchester decoding
// Y_MD.
//
// The architecture draws n as a level-sensitive latch enabled by CLK. This
// RTL models that latch as its stored value, captured when the latch closes
// (falling edge of CLK), plus a transparency multiplexer while CLK is high.
// Its output is the same as the latch's whenever MUX_D is stable at the
// falling edge, which the codec's timing guarantees, and the model avoids a
// zero-delay race: the reused DFF samples at the rising edge, the very edge
// that reopens the latch, and must see the held value (n_hold). In
// silicon the latch's own delay provides that ordering.
// The latch output is taken non-inverted, as drawn in the codec's overall
// architecture; the I1/I0 settings of the mode table match that polarity.
module hcpm_neg_cycle_logic (
  input  logic clk,
  input  logic sn,      // S_N, select of MUX_C
  input  logic i1,      // MUX_D input 1
  input  logic i0,      // MUX_D input 0
  input  logic din,     // codec input X_E / Y_FD / Y_MD
  input  logic fb,      // reused DFF output
  input  logic sel,     // MUX_B output, select of MUX_D
  output logic xnor_o,  // m XNOR n, to MUX_A input 0
  output logic xnor_hold // m XNOR (held latch value): equals xnor_o while CLK is low
);

  logic m, mux_d, n, n_hold;

  always_comb m = sn ? fb : din;        // MUX_C
  always_comb mux_d = sel ? i1 : i0;    // MUX_D

  always_ff @(negedge clk) n_hold <= mux_d;   // latch, EN = CLK: held value
  always_comb n = clk ? mux_d : n_hold;        // latch, EN = CLK: output

  always_comb xnor_o    = ~(m ^ n);
  always_comb xnor_hold = ~(m ^ n_hold);

endmodule
