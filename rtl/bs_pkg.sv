// bs_pkg: types shared by the barrel shifter designs.
//
// All designs take a 3-bit opcode in which every bit names one aspect of the
// operation: direction (right/left), kind (rotate/shift) and fill
// (arithmetic/logical). The split into three independent bits follows the
// design; the bit order and polarity below are this implementation's choice.
//
//   op.right op.rotate op.arith   operation
//      1         1        x       rotate right
//      0         1        x       rotate left
//      1         0        0       shift right logical   (SRL)
//      0         0        0       shift left logical    (SLL)
//      1         0        1       shift right arithmetic (SRA)
//      0         0        1       not supported: behaves as SLL
//
// Shift left arithmetic is deliberately not supported, and the arithmetic bit
// is ignored for rotates.
package bs_pkg;

  typedef struct packed {
    logic right;   // 1: right oriented, 0: left oriented
    logic rotate;  // 1: rotate, 0: shift
    logic arith;   // 1: arithmetic, 0: logical
  } op_t;

  localparam op_t OP_ROR = '{right: 1'b1, rotate: 1'b1, arith: 1'b0};
  localparam op_t OP_ROL = '{right: 1'b0, rotate: 1'b1, arith: 1'b0};
  localparam op_t OP_SRL = '{right: 1'b1, rotate: 1'b0, arith: 1'b0};
  localparam op_t OP_SLL = '{right: 1'b0, rotate: 1'b0, arith: 1'b0};
  localparam op_t OP_SRA = '{right: 1'b1, rotate: 1'b0, arith: 1'b1};

endpackage
