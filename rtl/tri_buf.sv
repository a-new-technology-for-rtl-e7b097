// tri_buf: tri-state buffer.
//
// While en is 1 the output y follows the input x; while en is 0 the output is
// released to high impedance, so x is cut off from whatever y drives. This is
// the basic switch that the clock steering is built from. Purely
// combinational, no clock. WIDTH defaults to a single bit as in the
// published symbol (X, En, Y); a wider instance gates a whole bus with one
// enable.
module tri_buf #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] x,
  input  logic             en,
  output tri   [WIDTH-1:0] y
);

  assign y = en ? x : 'z;

endmodule
