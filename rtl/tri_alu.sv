// tri_alu: 8-bit ALU whose two halves are clocked through a tri-state clock switch.
//
// The ALU is split into a logic unit (AND, NAND, NOR, BUFFER A; output yl)
// and an arithmetic unit (SUBTRACTION, DECREMENT, ADDITION, CLEAR; output
// ya), each with its own result register. A conventional ALU clocks both
// registers every cycle although only one of them produces the wanted
// result. Here the clock reaches only one unit: en = 1 passes clk to the
// arithmetic unit (clk_t1), en = 0 passes it to the logic unit (clk_t2), and
// the other unit's clock net is high impedance, so its register and the
// logic in front of it do not switch.
//
// Interface: clk, en, a, b (WIDTH bits), sel (3 bits), outputs ya and yl
// (WIDTH bits): 37 pins at WIDTH = 8, matching the published pin count, and
// 2*WIDTH flip-flops (16 at WIDTH = 8) plus the switch's enable latch.
// Timing: a, b and sel are sampled at a rising edge of clk and the selected
// unit's output changes after that edge. en is taken while clk is low, so a
// new en value governs the next rising edge. To execute an operation, drive
// en equal to sel[2]; with en and sel[2] different, neither output changes.
//
// What follows the publication: the operation table, the split into two
// units with outputs ya and yl, en as a pin, and the tri-state clock steering
// with clk_t1 active for en = 1. This design's choices: which unit hangs on
// which gated clock, the enable latch, that a unit holds its output for a
// code of the other unit, and no reset.
module tri_alu #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             en,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [2:0]       sel,
  output logic [WIDTH-1:0] ya,
  output logic [WIDTH-1:0] yl
);

  tri clk_t1;  // arithmetic unit clock, driven while en = 1
  tri clk_t2;  // logic unit clock, driven while en = 0

  tri_clock_switch u_clk_switch (
    .clk    (clk),
    .en     (en),
    .clk_t1 (clk_t1),
    .clk_t2 (clk_t2)
  );

  arith_unit #(.WIDTH(WIDTH)) u_arith (
    .clk (clk_t1),
    .a   (a),
    .b   (b),
    .sel (sel),
    .ya  (ya)
  );

  logic_unit #(.WIDTH(WIDTH)) u_logic (
    .clk (clk_t2),
    .a   (a),
    .b   (b),
    .sel (sel),
    .yl  (yl)
  );

endmodule
