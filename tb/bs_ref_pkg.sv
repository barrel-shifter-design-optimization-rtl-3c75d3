// bs_ref_pkg: bit-level reference model of the barrel shifter operations,
// used by the testbenches to compute expected values independently of the
// RTL. Words up to MAXN bits; n is the active width.
//
//   ref_result: result bit i takes data bit i+amt (right) or i-amt (left);
//               positions that fall off the word wrap around for rotates and
//               receive the fill bit otherwise (the sign bit for an
//               arithmetic right shift, else 0).
//   ref_ovf:    left shift only; the shift is replayed one place at a time
//               and overflow is set if any bit entering the sign position
//               differs from the original sign bit.
package bs_ref_pkg;
  import bs_pkg::*;

  localparam int MAXN = 128;
  typedef logic [MAXN-1:0] word_t;

  function automatic word_t ref_result(word_t data, int n, int amt, op_t op);
    word_t res = '0;
    logic  fill = op.right && !op.rotate && op.arith ? data[n-1] : 1'b0;
    for (int i = 0; i < n; i++) begin
      int src = op.right ? i + amt : i - amt;
      if (src >= 0 && src < n)      res[i] = data[src];
      else if (op.rotate)           res[i] = data[(src + n) % n];
      else                          res[i] = fill;
    end
    return res;
  endfunction

  function automatic logic ref_ovf(word_t data, int n, int amt, op_t op);
    word_t cur = data;
    logic  ovf = 1'b0;
    if (op.right || op.rotate) return 1'b0;
    for (int step = 0; step < amt; step++) begin
      for (int i = n - 1; i > 0; i--) cur[i] = cur[i-1];
      cur[0] = 1'b0;
      if (cur[n-1] != data[n-1]) ovf = 1'b1;
    end
    return ovf;
  endfunction

  function automatic logic ref_zero(word_t data, int n, int amt, op_t op);
    word_t r = ref_result(data, n, amt, op);
    for (int i = 0; i < n; i++) if (r[i]) return 1'b0;
    return 1'b1;
  endfunction

  // The five supported operations, in a fixed order for loops.
  function automatic op_t op_by_index(int k);
    case (k % 5)
      0:       return OP_ROR;
      1:       return OP_ROL;
      2:       return OP_SRL;
      3:       return OP_SLL;
      default: return OP_SRA;
    endcase
  endfunction

  function automatic string op_name(op_t op);
    if (op.rotate) return op.right ? "ROR" : "ROL";
    if (op.right)  return op.arith ? "SRA" : "SRL";
    return op.arith ? "SLA(unsupported)" : "SLL";
  endfunction

endpackage
