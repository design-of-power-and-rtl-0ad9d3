// tb_compression_tree: checks that sum_o + carry_o equals the sum of all input
// rows modulo 2^W. The default 10-row tree (three levels of 4:2 and 3:2
// compressors) and a 7-row tree (a 3:2 group at the first level) are tested
// with random rows and with all-ones rows.
module tb_compression_tree;
  localparam int unsigned W = 17;
  logic [W-1:0] rows10 [10];
  logic [W-1:0] rows7  [7];
  logic [W-1:0] s10, c10, s7, c7;
  int checks = 0, failures = 0;

  compression_tree #(.W(W), .R(10)) dut10 (.rows(rows10), .sum_o(s10), .carry_o(c10));
  compression_tree #(.W(W), .R(7))  dut7  (.rows(rows7),  .sum_o(s7),  .carry_o(c7));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit all_ones);
    longint unsigned t10, t7;
    t10 = 0;
    t7  = 0;
    for (int r = 0; r < 10; r++) begin
      rows10[r] = all_ones ? '1 : W'($urandom);
      t10 += longint'(rows10[r]);
    end
    for (int r = 0; r < 7; r++) begin
      rows7[r] = all_ones ? '1 : W'($urandom);
      t7 += longint'(rows7[r]);
    end
    #1;
    checks += 2;
    if (W'(longint'(s10) + longint'(c10)) !== W'(t10)) begin
      failures++;
      $display("FAIL R=10: %h + %h != %h", s10, c10, W'(t10));
    end
    if (W'(longint'(s7) + longint'(c7)) !== W'(t7)) begin
      failures++;
      $display("FAIL R=7: %h + %h != %h", s7, c7, W'(t7));
    end
  endtask

  initial begin
    check(1'b1);
    for (int k = 0; k < 3000; k++) check(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
