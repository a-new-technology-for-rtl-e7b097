// arith_unit: the arithmetic half of the ALU, with its own result register.
//
// On a rising edge of its clock, when sel selects an arithmetic operation
// (sel[2] = 1), the register ya loads
//   100 SUBTRACTION : a - b   101 DECREMENT : a - 1
//   110 ADDITION    : a + b   111 CLEAR     : 0
// all modulo 2**WIDTH: the result has the operand width and carries or
// borrows out of the top bit are dropped. For a logic code (sel[2] = 0) ya
// keeps its value. Latency is one edge of clk.
//
// The operation codes follow the published table; that DECREMENT acts on a,
// and that results wrap, are this design's reading. clk is meant to be the
// gated clock clk_t1 of the tri-state clock switch. No reset: the published
// pin count leaves no reset pin; CLEAR gives a known value.
module arith_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [2:0]       sel,
  output logic [WIDTH-1:0] ya
);

  logic [WIDTH-1:0] result;

  always_comb begin
    unique case (sel[1:0])
      OP_SUB[1:0]:  result = a - b;
      OP_DEC[1:0]:  result = a - WIDTH'(1);
      OP_ADD[1:0]:  result = a + b;
      default:      result = '0;          // OP_CLR
    endcase
  end

  always_ff @(posedge clk) begin
    if (is_arith(sel)) ya <= result;
  end

endmodule
