// tb_final_adder: the carry-propagate adder against x + y mod 2^W, on corner
// values (carry through every bit) and random operands.
module tb_final_adder;
  localparam int unsigned W = 17;
  logic [W-1:0] x, y, s;
  int checks = 0, failures = 0;

  final_adder #(.W(W)) dut (.x(x), .y(y), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] xv, input logic [W-1:0] yv);
    logic [W-1:0] exp;
    x = xv;
    y = yv;
    #1;
    exp = W'(longint'(xv) + longint'(yv));
    checks++;
    if (s !== exp) begin
      failures++;
      $display("FAIL %h + %h = %h, expected %h", xv, yv, s, exp);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, W'(1));
    apply('1, '1);
    apply(W'(1) << (W-1), W'(1) << (W-1));
    for (int k = 0; k < 5000; k++) apply(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
