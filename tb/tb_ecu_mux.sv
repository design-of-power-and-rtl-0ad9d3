// tb_ecu_mux: with random compensation constants on the K = 5 inputs, every
// select value 0..4 must return its own input and 5..7 must return 0.
module tb_ecu_mux;
  localparam int unsigned K = 5, W = 2;
  logic [W-1:0] comp [K];
  logic [2:0]   sel;
  logic [W-1:0] y;
  int checks = 0, failures = 0;

  ecu_mux #(.K(K), .W(W)) dut (.comp(comp), .sel(sel), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < K; k++) comp[k] = W'($urandom);
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s);
        #1;
        checks++;
        if (y !== ((s < K) ? comp[s] : '0)) begin
          failures++;
          if (failures < 10) $display("FAIL sel=%0d y=%0d", s, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
