// tb_tri_buf: self-checking test of the tri-state buffer.
//
// Two 8-bit buffers share the same input and enable. One drives a net with a
// weak pull-up (tri1), the other a net with a weak pull-down (tri0). While
// enabled, both nets must equal the input. While disabled, the buffer must
// not drive at all, so the nets must show their pull levels (all ones, all
// zeros) whatever the input is. Random inputs, 200 steps.
module tb_tri_buf;

  localparam int unsigned W = 8;

  logic [W-1:0] x;
  logic         en;
  tri1  [W-1:0] y_pu;
  tri0  [W-1:0] y_pd;

  int checks   = 0;
  int failures = 0;

  tri_buf #(.WIDTH(W)) u_pu (.x(x), .en(en), .y(y_pu));
  tri_buf #(.WIDTH(W)) u_pd (.x(x), .en(en), .y(y_pd));

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: x=%h en=%0b got=%h expected=%h", what, x, en, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x  = '0;
    en = 1'b0;
    for (int i = 0; i < 200; i++) begin
      x  = W'($urandom);
      en = (i % 3) != 0;
      #1;
      if (en) begin
        check(y_pu, x, "enabled, pull-up net");
        check(y_pd, x, "enabled, pull-down net");
      end else begin
        check(y_pu, '1, "disabled, pull-up net");
        check(y_pd, '0, "disabled, pull-down net");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
