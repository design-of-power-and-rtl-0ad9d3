// tb_sorting_network: for every 16-bit input the output must be the
// thermometer code of the input's population count (bit k set exactly when
// more than k inputs are 1). A 5-bit network (odd width) is checked too.
module tb_sorting_network;
  logic [15:0] x, y;
  logic [4:0]  x5, y5;
  int checks = 0, failures = 0;

  sorting_network #(.W(16)) dut   (.x(x),  .y(y));
  sorting_network #(.W(5))  dut5  (.x(x5), .y(y5));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] thermo(input int ones);
    logic [15:0] t;
    for (int k = 0; k < 16; k++) t[k] = (k < ones);
    return t;
  endfunction

  initial begin
    for (int v = 0; v < 65536; v++) begin
      x  = 16'(v);
      x5 = 5'(v);
      #1;
      checks++;
      if (y !== thermo($countones(x))) begin
        failures++;
        if (failures < 10) $display("FAIL x=%b y=%b", x, y);
      end
      if (v < 32) begin
        checks++;
        if (y5 !== 5'(thermo($countones(x5)))) begin
          failures++;
          $display("FAIL W=5 x=%b y=%b", x5, y5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
