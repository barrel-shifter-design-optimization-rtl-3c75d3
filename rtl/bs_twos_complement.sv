// bs_twos_complement: two's complement of the shift/rotate amount.
//
// y = (2^LGN - a) mod 2^LGN, built as in the design: a row of inverters
// followed by a ripple chain of half adders that adds one. Bit i is
// ~a[i] XOR c[i] and the carry c[i+1] = ~a[i] AND c[i], with c[0] = 1; the
// carry out of the top bit is not needed. The amount is only log2(N) bits
// wide, so the chain is short, but it is still on the critical path of the
// two's complement shifter. Purely combinational.
module bs_twos_complement #(
  parameter int unsigned LGN = 5
) (
  input  logic [LGN-1:0] a,
  output logic [LGN-1:0] y
);

  logic [LGN-1:0] c;
  logic [LGN-1:0] na;

  assign na   = ~a;
  assign c[0] = 1'b1;

  for (genvar i = 0; i < LGN; i++) begin : g_ha
    assign y[i] = na[i] ^ c[i];
    if (i < LGN - 1) begin : g_carry
      assign c[i+1] = na[i] & c[i];
    end
  end

endmodule
