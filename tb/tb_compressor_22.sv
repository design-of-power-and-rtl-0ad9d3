// tb_compressor_22: exhaustive check of the 2:2 compressor, x + y = s + 2c.
module tb_compressor_22;
  logic x, y, s, c;
  int checks = 0, failures = 0;

  compressor_22 dut (.x(x), .y(y), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x, y} = 2'(v);
      #1;
      checks++;
      if (int'(s) + 2*int'(c) != int'(x) + int'(y)) begin
        failures++;
        $display("FAIL x=%0b y=%0b s=%0b c=%0b", x, y, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
