// tb_compressor_42: exhaustive check of the 4:2 compressor:
// sum of the five inputs = s + 2(c + cout), and cout must not depend on cin
// (the property that keeps a row of these cells free of carry ripple).
module tb_compressor_42;
  logic [3:0] x;
  logic       cin, s, c, cout, cout0;
  int checks = 0, failures = 0;

  compressor_42 dut (.x(x), .cin(cin), .s(s), .c(c), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int ci = 0; ci < 2; ci++) begin
        x   = 4'(v);
        cin = 1'(ci);
        #1;
        checks++;
        if (int'(s) + 2*(int'(c) + int'(cout)) != $countones(x) + ci) begin
          failures++;
          $display("FAIL x=%b cin=%0b s=%0b c=%0b cout=%0b", x, cin, s, c, cout);
        end
        if (ci == 0) cout0 = cout;
        else begin
          checks++;
          if (cout != cout0) begin
            failures++;
            $display("FAIL cout depends on cin for x=%b", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
