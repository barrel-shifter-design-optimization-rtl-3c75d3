// bs_right_rotator: log2(N)-row right rotator, optionally preceded by a
// rotate-by-one row.
//
// Row k rotates right by 2^k when amt[k] is 1 (rows run smallest shift
// first). All input bits reach the output, so no fill value is needed.
// With PRE_ROT1 = 1 an extra row in front rotates right by one when rot1 is
// 1; the one's complement shifter uses it to correct the off-by-one of an
// inverted amount. It sits first because its control (the direction) is
// known early, while the selected amount is not. With PRE_ROT1 = 0 the row
// is not built and rot1 is ignored.
// Purely combinational: log2(N) (+1) mux levels.
module bs_right_rotator #(
  parameter int unsigned N        = 32,
  parameter int unsigned LGN      = $clog2(N),
  parameter bit          PRE_ROT1 = 1'b0
) (
  input  logic [N-1:0]   din,
  input  logic [LGN-1:0] amt,
  input  logic           rot1,
  output logic [N-1:0]   dout
);

  logic [N-1:0] stage [LGN+1];

  if (PRE_ROT1) begin : g_rot1
    assign stage[0] = rot1 ? {din[0], din[N-1:1]} : din;
  end else begin : g_no_rot1
    assign stage[0] = din;
  end

  for (genvar k = 0; k < LGN; k++) begin : g_row
    localparam int unsigned W = 1 << k;
    assign stage[k+1] = amt[k] ? {stage[k][W-1:0], stage[k][N-1:W]} : stage[k];
  end

  assign dout = stage[LGN];

endmodule
