// tb_arith_unit: self-checking test of the arith unit.
//
// Drives the unit with a free-running clock and random operands and select
// codes, 1000 cycles. A reference model, written here from the operation
// table, predicts the register: it loads the result of SUBTRACTION, DECREMENT, ADDITION and CLEAR
// for its own codes and keeps its value for logic codes. The output is
// compared one time unit after every rising edge, so each check also
// confirms the one-edge latency. The first operation is OP_CLR with known
// operands, which gives the register a defined value (it has no reset).
// Every one of the eight codes must have been applied at least once.
module tb_arith_unit;
  import alu_pkg::*;

  localparam int unsigned W = 8;

  logic         clk;
  logic [W-1:0] a, b;
  logic [2:0]   sel;
  logic [W-1:0] ya;

  logic [W-1:0] model;
  int checks   = 0;
  int failures = 0;
  int op_count [8];

  arith_unit #(.WIDTH(W)) u_dut (.clk(clk), .a(a), .b(b), .sel(sel), .ya(ya));

  function automatic logic [W-1:0] reference(input logic [2:0] s, input logic [W-1:0] x,
                                              input logic [W-1:0] y, input logic [W-1:0] old);
    case (s)
      3'b100:  return W'(int'(x) - int'(y));
      3'b101:  return W'(int'(x) - 1);
      3'b110:  return W'(int'(x) + int'(y));
      3'b111:  return '0;
      default: return old;
    endcase
  endfunction

  task automatic check(input string what);
    checks++;
    if (ya !== model) begin
      failures++;
      $display("FAIL %s: got %h expected %h at t=%0t", what, ya, model, $time);
    end
  endtask

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a   = W'(8'hA5);
    b   = '0;
    sel = OP_CLR;
    @(posedge clk);
    model = reference(sel, a, b, 'x);
    #1 check("initial OP_CLR");
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      a   = W'($urandom);
      b   = W'($urandom);
      if (i % 7 == 0) a = '0;     // force borrows / wrap-around
      if (i % 11 == 0) b = '1;
      sel = 3'($urandom);
      op_count[sel]++;
      @(posedge clk);
      model = reference(sel, a, b, model);
      #1 check($sformatf("sel=%03b a=%h b=%h", sel, a, b));
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (op_count[k] == 0) begin
        failures++;
        $display("FAIL select code %03b never applied", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
