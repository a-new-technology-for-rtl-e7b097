// logic_unit: the logic half of the ALU, with its own result register.
//
// On a rising edge of its clock, when sel selects a logic operation
// (sel[2] = 0), the register yl loads
//   000 AND : a & b      001 NAND : ~(a & b)
//   010 NOR : ~(a | b)   011 BUFFER A : a
// For an arithmetic code (sel[2] = 1) yl keeps its value. Latency is one
// edge of clk: the result is visible after the edge that samples a, b, sel.
//
// The operation codes follow the published table. clk is meant to be the
// gated clock clk_t2 of the tri-state clock switch, so that the unit sees no
// edges while the arithmetic unit is in use. The register has no reset: the
// published pin count leaves no reset pin, so yl is undefined until the
// first logic operation is clocked in.
module logic_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [2:0]       sel,
  output logic [WIDTH-1:0] yl
);

  logic [WIDTH-1:0] result;

  always_comb begin
    unique case (sel[1:0])
      OP_AND[1:0]:   result = a & b;
      OP_NAND[1:0]:  result = ~(a & b);
      OP_NOR[1:0]:   result = ~(a | b);
      default:       result = a;          // OP_BUF_A
    endcase
  end

  always_ff @(posedge clk) begin
    if (!is_arith(sel)) yl <= result;
  end

endmodule
