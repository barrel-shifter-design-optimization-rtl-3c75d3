// bs_mux_reversal: mux data reversal unit.
//
// One row of N 2:1 multiplexers. When rev is 1 the output is the input with
// its bit order reversed (dout[i] = din[N-1-i]); otherwise the input passes
// through. The data reversal designs put one of these in front of a
// right-only datapath so that a left-oriented operation becomes a
// right-oriented one, and a second one behind it to undo the reversal.
// Purely combinational; one mux delay.
module bs_mux_reversal #(
  parameter int unsigned N = 32
) (
  input  logic         rev,
  input  logic [N-1:0] din,
  output logic [N-1:0] dout
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      dout[i] = rev ? din[N-1-i] : din[i];
    end
  end

endmodule
