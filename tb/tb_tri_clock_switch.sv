// tb_tri_clock_switch: self-checking test of the tri-state clock switch.
//
// clk runs with a 10-time-unit period (rising edges at 5, 15, ...). en is
// changed at random times, both while clk is low and while it is high. The
// released outputs land on pull-down nets (tri0), as a keeper would hold
// them on silicon. Checks, for 400 clock cycles:
//  - at each rising edge of clk, clk_t1 rises exactly when en was 1 during
//    the preceding low phase, and clk_t2 exactly when en was 0;
//  - the two gated clocks are never high together;
//  - a gated clock never rises while clk is low nor falls while clk is high
//    (no shortened pulse, no extra edge), also when en changes mid-phase;
//  - the edge counts on clk_t1 and clk_t2 add up to the clk edge count.
module tb_tri_clock_switch;

  logic clk;
  logic en;
  tri0  clk_t1;
  tri0  clk_t2;

  int checks   = 0;
  int failures = 0;

  int n_clk = 0, n_t1 = 0, n_t2 = 0, exp_t1 = 0, exp_t2 = 0;
  int n_mid_high_changes = 0;
  logic en_low_phase;   // en as it stood at the end of the last low phase

  tri_clock_switch u_dut (.clk(clk), .en(en), .clk_t1(clk_t1), .clk_t2(clk_t2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at t=%0t (clk=%0b en=%0b t1=%0b t2=%0b)", what, $time, clk, en, clk_t1, clk_t2);
    end
  endtask

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference for the enable: en is only ever changed off the clock edges,
  // so its value just before a rising edge is the value held while clk is high.
  always @(posedge clk) begin
    en_low_phase = en;
    n_clk++;
    if (en_low_phase) exp_t1++; else exp_t2++;
    #1;
    check(clk_t1 == en_low_phase,  "clk_t1 follows clk when en was 1");
    check(clk_t2 == !en_low_phase, "clk_t2 follows clk when en was 0");
  end

  always @(posedge clk_t1) begin n_t1++; #0 check(clk === 1'b1, "clk_t1 rose while clk low"); end
  always @(posedge clk_t2) begin n_t2++; #0 check(clk === 1'b1, "clk_t2 rose while clk low"); end
  always @(negedge clk_t1) begin #0 check(clk === 1'b0, "clk_t1 fell while clk high"); end
  always @(negedge clk_t2) begin #0 check(clk === 1'b0, "clk_t2 fell while clk high"); end

  always @(clk_t1 or clk_t2) begin
    #0 check(!(clk_t1 && clk_t2), "both gated clocks high");
  end

  initial begin
    en = 1'b0;
    for (int i = 0; i < 400; i++) begin
      // Each pass spans one clock period starting at a falling edge (clk is
      // low for offsets 0..4 and high for 5..9). en changes at a random
      // offset that is never on an edge.
      int unsigned d;
      d = 1 + ($urandom % 4);
      if ($urandom_range(0, 1) != 0) d += 5;
      #(d);
      en = $urandom_range(0, 1) != 0;
      if (clk) n_mid_high_changes++;
      #(10 - d);
    end
    #20;
    check(n_t1 == exp_t1, "clk_t1 edge count");
    check(n_t2 == exp_t2, "clk_t2 edge count");
    check(n_t1 + n_t2 == n_clk, "every clk edge reaches exactly one output");
    check(n_mid_high_changes > 0, "en changed while clk high at least once");
    check(n_t1 > 0 && n_t2 > 0, "both outputs were used");
    $display("clk edges=%0d clk_t1 edges=%0d clk_t2 edges=%0d en changes while clk high=%0d",
             n_clk, n_t1, n_t2, n_mid_high_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
