// tri_clock_switch: steers one clock to one of two loads with tri-state buffers.
//
// Two tri-state buffers share the input clk. The buffer driving clk_t1 is
// enabled by en, the buffer driving clk_t2 by the inverse of en, so at any
// time exactly one output carries the clock and the other is high impedance:
//   en = 1 : clk_t1 = clk, clk_t2 = Z
//   en = 0 : clk_t2 = clk, clk_t1 = Z
// A register clocked from the released output sees no edges and does not
// toggle, which is where the dynamic power is saved.
//
// The buffer pair with the inverter on one enable is the published circuit.
// The enable first passes through a storage element clocked by clk, as the
// synthesized netlist of the original shows; here that element is a latch
// that is transparent while clk is low (this design's choice), so the
// buffers' enables only change while clk is low and a gated clock never gets
// a shortened high pulse or an extra edge. A change of en therefore takes
// effect from the next rising edge of clk.
//
// A released output is high impedance. Whatever it drives should hold a
// defined low level (a weak pull-down, or a keeper) so that the gated
// registers do not see a floating clock; two-state simulators read the
// released net as 0.
//
// Circuit warning: the enable latch is intentional (clock-gating latch).
module tri_clock_switch (
  input  logic clk,
  input  logic en,
  output tri   clk_t1,
  output tri   clk_t2
);

  logic en_q;    // enable held stable while clk is high
  logic en_q_n;  // inverted enable for the second buffer

  always_latch begin
    if (!clk) en_q = en;
  end

  assign en_q_n = ~en_q;

  tri_buf #(.WIDTH(1)) u_buf_t1 (.x(clk), .en(en_q),   .y(clk_t1));
  tri_buf #(.WIDTH(1)) u_buf_t2 (.x(clk), .en(en_q_n), .y(clk_t2));

endmodule
