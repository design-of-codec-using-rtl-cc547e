// hcpm_pos_cycle_logic: simplified positive-cycle logic of the HCPM codec (MUX_B).
//
// While CLK is high the codec output is the inverse of this block's output.
// S_P = 1 passes the reused flip-flop's output Y_FN(t-1), so the codec emits
// Y_FP(t) = not Y_FN(t-1) for FM0 encoding. S_P = 0 passes the codec input,
// so Manchester encoding emits not X_E in the first half of the bit. The
// same output also drives the select of MUX_D in the negative-cycle logic,
// which is how the positive-cycle logic is shared with it.
//
// Purely combinational; one 2-to-1 multiplexer as drawn in the architecture.
module hcpm_pos_cycle_logic (
  input  logic sp,     // S_P
  input  logic din,    // codec input X_E / Y_FD / Y_MD
  input  logic fb,     // reused DFF output, Y_FN(t-1)
  output logic mux_b   // MUX_B output
);

  always_comb mux_b = sp ? fb : din;

endmodule
