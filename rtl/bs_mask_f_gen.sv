// bs_mask_f_gen: recursive generator of the mask F.
//
// F has amt zeros at its high (left) end and ones everywhere else, e.g. for
// N = 8, amt = 2: F = 00111111. It is the mask of a logical right shift.
//
// The structure is recursive. Leave off F's least significant bit, which is
// always 1. For 2 bits the rest is just ~amt[0]. Given the (2^k - 1)-bit
// remainder m for 2^k bits, the remainder for 2^(k+1) bits is
//     { m AND ~amt[k],  ~amt[k],  m OR ~amt[k] }
// and the final mask is {m, 1'b1}. Each step adds one AND/OR level; in all
// the generator uses N - log2(N) - 1 AND gates, as many OR gates and log2(N)
// inverters. F's lowest bit is the constant 1.
// Purely combinational; log2(N) gate levels.
module bs_mask_f_gen #(
  parameter int unsigned N   = 32,
  parameter int unsigned LGN = $clog2(N)
) (
  input  logic [LGN-1:0] amt,
  output logic [N-1:0]   f
);

  // lvl[k][2^(k+1)-2:0] holds the remainder for a 2^(k+1)-bit mask;
  // the bits above it are tied to zero.
  logic [N-2:0] lvl [LGN];
  logic [LGN-1:0] na;

  assign na = ~amt;

  if (N > 2) begin : g_lvl0_pad
    assign lvl[0] = {{(N-2){1'b0}}, na[0]};
  end else begin : g_lvl0
    assign lvl[0] = na[0];
  end

  for (genvar k = 1; k < LGN; k++) begin : g_lvl
    localparam int unsigned WP = (1 << k) - 1;  // width of previous remainder
    localparam int unsigned WN = 2 * WP + 1;    // width of this remainder
    logic [WN-1:0] nxt;
    assign nxt = {lvl[k-1][WP-1:0] & {WP{na[k]}}, na[k], lvl[k-1][WP-1:0] | {WP{na[k]}}};
    if (WN < N - 1) begin : g_pad
      assign lvl[k] = {{(N-1-WN){1'b0}}, nxt};
    end else begin : g_full
      assign lvl[k] = nxt;
    end
  end

  assign f = {lvl[LGN-1], 1'b1};

endmodule
