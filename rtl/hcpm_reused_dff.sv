// hcpm_reused_dff: the single reused D flip-flop of the HCPM codec.
//
// The flip-flop samples D on the rising edge of CLK, that is at the end of
// the negative half of each bit period (each bit starts with CLK high). In
// FM0 encoding it therefore holds Y_FN(t-1) during bit t; in FM0 and
// Manchester decoding its output is the decoded bit X_D, valid for the whole
// cycle after the bit. The clear CLR forces Q to logic-0; Manchester
// encoding keeps it asserted so the flip-flop supplies the constant '0' of
// the negative-cycle logic.
//
// The clear is asynchronous and active low (clr_n = 0 clears). Both are
// choices of this design: the architecture only names a CLR input.
module hcpm_reused_dff (
  input  logic clk,
  input  logic clr_n,  // asynchronous clear, active low
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n) q <= 1'b0;
    else        q <= d;
  end

endmodule
