// tb_compressor_32: exhaustive check of the 3:2 compressor, x + y + z = s + 2c.
module tb_compressor_32;
  logic x, y, z, s, c;
  int checks = 0, failures = 0;

  compressor_32 dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      #1;
      checks++;
      if (int'(s) + 2*int'(c) != int'(x) + int'(y) + int'(z)) begin
        failures++;
        $display("FAIL xyz=%0b%0b%0b s=%0b c=%0b", x, y, z, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
