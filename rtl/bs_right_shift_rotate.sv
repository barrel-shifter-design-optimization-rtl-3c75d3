// bs_right_shift_rotate: right shifter/rotator with pad calculation and
// level-by-level overflow detection (the core of the Mux-based Data Reversal
// design).
//
// log2(N) rows of 2:1 multiplexers. The row for amount bit k shifts right by
// W = 2^k when amt[k] is 1. In front of each row a pad calculation chooses
// what enters the W high-order positions: the W bits leaving the low end
// (rotate) or W copies of the fill bit s (shift). Left operations reach this
// unit with their data already bit-reversed.
//
// Overflow: during a left shift the original sign bit sits at position 0 of
// din. Each row also selects, with W multiplexers, the W bits that it moves
// onto or past position 0 (cur[W:1]), or the sign bit itself when the row does
// not shift; these are XORed with the sign bit and ORed. Each level's result
// is ORed into the previous level's and passed on. Rows are ordered with the
// largest shift first so that the widest overflow level starts earliest; the
// order does not change the result. ovf_raw must still be gated with
// "operation is a left shift" by the instantiating design.
//
// Purely combinational: log2(N) mux levels for dout.
module bs_right_shift_rotate #(
  parameter int unsigned N   = 32,
  parameter int unsigned LGN = $clog2(N)
) (
  input  logic [N-1:0]   din,
  input  logic [LGN-1:0] amt,
  input  logic           rotate,
  input  logic           s,
  output logic [N-1:0]   dout,
  output logic           ovf_raw
);

  // stage[j] is the input of row j; row j shifts by 2^(LGN-1-j).
  logic [N-1:0] stage [LGN+1];
  logic         ovf_chain [LGN+1];
  logic         sign;

  assign stage[0]     = din;
  assign ovf_chain[0] = 1'b0;
  assign sign         = din[0];

  for (genvar j = 0; j < LGN; j++) begin : g_row
    localparam int unsigned K = LGN - 1 - j;
    localparam int unsigned W = 1 << K;

    logic [W-1:0] pad;
    logic [W-1:0] ovf_sel;

    // pad calculation
    assign pad = rotate ? stage[j][W-1:0] : {W{s}};
    // row of multiplexers
    assign stage[j+1] = amt[K] ? {pad, stage[j][N-1:W]} : stage[j];
    // overflow level: bits that move onto or past position 0
    assign ovf_sel       = amt[K] ? stage[j][W:1] : {W{sign}};
    assign ovf_chain[j+1] = ovf_chain[j] | (|(ovf_sel ^ {W{sign}}));
  end

  assign dout    = stage[LGN];
  assign ovf_raw = ovf_chain[LGN];

endmodule
