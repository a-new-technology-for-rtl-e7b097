// alu_pkg: operation codes shared by the two halves of the tri-state clocked ALU.
//
// The 3-bit select word chooses one of eight operations. Codes with sel[2]=0
// belong to the logic unit, codes with sel[2]=1 to the arithmetic unit. The
// code table (AND, NAND, NOR, BUFFER A, SUBTRACTION, DECREMENT, ADDITION,
// CLEAR for 000..111) follows the published operation table; the enum names
// are this design's own.
package alu_pkg;

  typedef enum logic [2:0] {
    OP_AND   = 3'b000,  // yl <= a & b
    OP_NAND  = 3'b001,  // yl <= ~(a & b)
    OP_NOR   = 3'b010,  // yl <= ~(a | b)
    OP_BUF_A = 3'b011,  // yl <= a
    OP_SUB   = 3'b100,  // ya <= a - b
    OP_DEC   = 3'b101,  // ya <= a - 1
    OP_ADD   = 3'b110,  // ya <= a + b
    OP_CLR   = 3'b111   // ya <= 0
  } alu_op_e;

  // sel[2] tells which unit an operation belongs to.
  localparam int unsigned UNIT_BIT = 2;

  function automatic logic is_arith(input logic [2:0] sel);
    return sel[UNIT_BIT];
  endfunction

endpackage
