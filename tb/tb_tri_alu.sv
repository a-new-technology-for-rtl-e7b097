// tb_tri_alu: end-to-end test of the tri-state clocked ALU at its default size.
//
// Runs 3000 clock cycles of random operands, select codes and en values
// through the top, with no parameter changed. Inputs change while clk is
// low. A reference model of the whole ALU predicts both outputs after every
// rising edge of clk:
//   en = 1 and sel[2] = 1 : ya takes the arithmetic result, yl holds
//   en = 0 and sel[2] = 0 : yl takes the logic result, ya holds
//   en differs from sel[2]: both hold (the selected unit's clock is off)
// The gated clocks inside the top are watched too: every clk edge must reach
// exactly the unit chosen by en, and the other unit must see none.
// Mechanisms counted, each of which must occur at least once: each of the
// eight operations executed; cycles with the arithmetic unit gated off;
// cycles with the logic unit gated off; cycles where the selected unit was
// gated off and both outputs held; switches of en in both directions; and a
// change of en while clk is high, which must not disturb the current cycle.
module tb_tri_alu;

  localparam int unsigned W = 8;      // the top's default width
  localparam int unsigned CYCLES = 3000;

  logic         clk;
  logic         en;
  logic [W-1:0] a, b;
  logic [2:0]   sel;
  logic [W-1:0] ya, yl;

  logic [W-1:0] m_ya, m_yl;
  int checks   = 0;
  int failures = 0;

  int op_done [8];
  int n_arith_gated = 0, n_logic_gated = 0, n_both_hold = 0;
  int n_en_rise = 0, n_en_fall = 0, n_en_high_glitch = 0;
  int n_clk = 0, n_t1 = 0, n_t2 = 0, exp_t1 = 0, exp_t2 = 0;

  tri_alu u_dut (.clk(clk), .en(en), .a(a), .b(b), .sel(sel), .ya(ya), .yl(yl));

  always @(posedge u_dut.clk_t1) n_t1++;
  always @(posedge u_dut.clk_t2) n_t2++;

  function automatic logic [W-1:0] arith_ref(input logic [2:0] s, input logic [W-1:0] x, input logic [W-1:0] y);
    case (s[1:0])
      2'b00:   return W'(int'(x) - int'(y));   // SUBTRACTION
      2'b01:   return W'(int'(x) - 1);         // DECREMENT
      2'b10:   return W'(int'(x) + int'(y));   // ADDITION
      default: return '0;                      // CLEAR
    endcase
  endfunction

  function automatic logic [W-1:0] logic_ref(input logic [2:0] s, input logic [W-1:0] x, input logic [W-1:0] y);
    case (s[1:0])
      2'b00:   return x & y;                   // AND
      2'b01:   return ~(x & y);                // NAND
      2'b10:   return ~(x | y);                // NOR
      default: return x;                       // BUFFER A
    endcase
  endfunction

  task automatic check(input string what);
    checks++;
    if (ya !== m_ya || yl !== m_yl) begin
      failures++;
      $display("FAIL %s: ya=%h (exp %h) yl=%h (exp %h) t=%0t", what, ya, m_ya, yl, m_yl, $time);
    end
  endtask

  task automatic expect_count(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic expect_seen(input int n, input string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  // One clock cycle with the inputs already set; update the model at the edge.
  task automatic cycle(input logic mid_high_en_flip);
    logic en_now;
    @(posedge clk);
    en_now = en;
    n_clk++;
    if (en_now) exp_t1++; else exp_t2++;
    if (en_now && sel[2]) begin
      m_ya = arith_ref(sel, a, b);
      op_done[sel]++;
    end else if (!en_now && !sel[2]) begin
      m_yl = logic_ref(sel, a, b);
      op_done[sel]++;
    end else begin
      n_both_hold++;
    end
    if (!en_now) n_arith_gated++; else n_logic_gated++;
    if (mid_high_en_flip) begin
      // Flip en while clk is high: the switch must ignore it until clk is low.
      #2 en = ~en;
      n_en_high_glitch++;
      #1 check($sformatf("en flipped while clk high, sel=%03b", sel));
      en = ~en;
    end else begin
      #1 check($sformatf("en=%0b sel=%03b a=%h b=%h", en_now, sel, a, b));
    end
  endtask

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    #(10 * (CYCLES + 100));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic en_prev;
    // Give both registers a known value: CLEAR on the arithmetic unit,
    // then AND with b = 0 on the logic unit.
    en = 1'b1; sel = 3'b111; a = '0; b = '0;
    m_ya = ya; m_yl = yl;
    cycle(1'b0);
    m_yl = yl;                      // logic unit still undefined here
    @(negedge clk);
    en = 1'b0; sel = 3'b000;
    cycle(1'b0);
    en_prev = en;
    for (int i = 0; i < CYCLES; i++) begin
      @(negedge clk);
      #1;
      a   = W'($urandom);
      b   = W'($urandom);
      if (i % 13 == 0) a = '0;
      sel = 3'($urandom);
      // Mostly en = sel[2], as a controller would drive it; sometimes not.
      en  = ($urandom % 8 == 0) ? !sel[2] : sel[2];
      if (en && !en_prev) n_en_rise++;
      if (!en && en_prev) n_en_fall++;
      en_prev = en;
      cycle(i % 97 == 5);
    end
    expect_count(n_t1, exp_t1, "clock edges reaching the arithmetic unit");
    expect_count(n_t2, exp_t2, "clock edges reaching the logic unit");
    expect_count(n_t1 + n_t2, n_clk, "clock edges in total");
    for (int k = 0; k < 8; k++) expect_seen(op_done[k], $sformatf("operation %03b", k));
    expect_seen(n_arith_gated, "arithmetic unit gated off");
    expect_seen(n_logic_gated, "logic unit gated off");
    expect_seen(n_both_hold, "selected unit gated off, both outputs held");
    expect_seen(n_en_rise, "switch from logic to arithmetic unit");
    expect_seen(n_en_fall, "switch from arithmetic to logic unit");
    expect_seen(n_en_high_glitch, "en changed while clk high");
    $display("ops done: %p", op_done);
    $display("cycles=%0d arith clocked=%0d logic clocked=%0d held=%0d en rises=%0d falls=%0d mid-high flips=%0d",
             n_clk, n_t1, n_t2, n_both_hold, n_en_rise, n_en_fall, n_en_high_glitch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
