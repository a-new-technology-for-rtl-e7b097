// tb_tri_alu_widths: the tri-state clocked ALU at 16, 32 and 64 bits.
//
// Three instances of the top, WIDTH = 16, 32 and 64, share the clock, en and
// select inputs; each gets the low bits of the same random 64-bit operands.
// A reference model in 64-bit arithmetic, truncated to each width, predicts
// ya and yl after every rising edge (en = 1 with an arithmetic code loads ya,
// en = 0 with a logic code loads yl, anything else holds both). 1500 cycles;
// operands near the top of the range exercise wrap-around at every width.
module tb_tri_alu_widths;

  logic        clk;
  logic        en;
  logic [2:0]  sel;
  logic [63:0] a, b;

  logic [15:0] ya16, yl16;
  logic [31:0] ya32, yl32;
  logic [63:0] ya64, yl64;
  logic [63:0] m_ya, m_yl;   // reference at 64 bits; narrower widths use the low bits

  int checks   = 0;
  int failures = 0;
  int n_loads_a = 0, n_loads_l = 0;

  tri_alu #(.WIDTH(16)) u_w16 (.clk(clk), .en(en), .a(a[15:0]), .b(b[15:0]), .sel(sel), .ya(ya16), .yl(yl16));
  tri_alu #(.WIDTH(32)) u_w32 (.clk(clk), .en(en), .a(a[31:0]), .b(b[31:0]), .sel(sel), .ya(ya32), .yl(yl32));
  tri_alu #(.WIDTH(64)) u_w64 (.clk(clk), .en(en), .a(a),       .b(b),       .sel(sel), .ya(ya64), .yl(yl64));

  task automatic check_all(input string what);
    checks++;
    if (ya16 !== m_ya[15:0] || yl16 !== m_yl[15:0] ||
        ya32 !== m_ya[31:0] || yl32 !== m_yl[31:0] ||
        ya64 !== m_ya       || yl64 !== m_yl) begin
      failures++;
      $display("FAIL %s: ya16=%h ya32=%h ya64=%h exp %h; yl16=%h yl32=%h yl64=%h exp %h",
               what, ya16, ya32, ya64, m_ya, yl16, yl32, yl64, m_yl);
    end
  endtask

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    #40000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Known start: CLEAR, then AND with b = 0.
    a = '0; b = '0;
    en = 1'b1; sel = 3'b111;
    @(posedge clk);
    @(negedge clk);
    en = 1'b0; sel = 3'b000;
    @(posedge clk);
    m_ya = '0; m_yl = '0;
    #1 check_all("initialisation");
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      a   = {$urandom, $urandom};
      b   = {$urandom, $urandom};
      if (i % 9 == 0) a = '0;
      if (i % 10 == 0) b = '1;
      sel = 3'($urandom);
      en  = ($urandom % 6 == 0) ? !sel[2] : sel[2];
      @(posedge clk);
      if (en && sel[2]) begin
        n_loads_a++;
        case (sel[1:0])
          2'b00:   m_ya = a - b;
          2'b01:   m_ya = a - 64'd1;
          2'b10:   m_ya = a + b;
          default: m_ya = '0;
        endcase
      end else if (!en && !sel[2]) begin
        n_loads_l++;
        case (sel[1:0])
          2'b00:   m_yl = a & b;
          2'b01:   m_yl = ~(a & b);
          2'b10:   m_yl = ~(a | b);
          default: m_yl = a;
        endcase
      end
      #1 check_all($sformatf("en=%0b sel=%03b", en, sel));
    end
    checks++;
    if (n_loads_a == 0 || n_loads_l == 0) begin
      failures++;
      $display("FAIL a unit was never loaded");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
