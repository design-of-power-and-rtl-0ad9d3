// tb_booth_selector: drives the selector with digits recoded in the
// testbench and checks (1) each partial-product row against the reference
// row pattern seen from column N-1, and (2) the arithmetic identity
//   sum(kept rows) * 2^(N-1) + TP_L = A * B  (mod 2^(2N)),
// which shows the kept columns plus the sign-extension row lose exactly the
// truncated part and nothing else. Random operands plus corner values.
module tb_booth_selector;
  import amul_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned N = 16;
  logic [N-1:0] a, b;
  booth_digit_t dig  [N/2];
  logic [N:0]   rows [N/2+1];
  int checks = 0, failures = 0;

  booth_selector #(.N(N)) dut (.a(a), .dig(dig), .rows(rows));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] av, input logic [N-1:0] bv);
    longint unsigned kept, mask2, prod, lhs;
    a = av;
    b = bv;
    for (int i = 0; i < N/2; i++) begin
      int d;
      d = booth_digit(longint'(bv), N, i);
      dig[i].neg  = bv[2*i+1];
      dig[i].one  = (d == 1 || d == -1);
      dig[i].two  = (d == 2 || d == -2);
      dig[i].zero = (d == 0);
    end
    #1;
    mask2 = (64'd1 << (2*N)) - 1;
    kept  = 0;
    for (int i = 0; i <= N/2; i++) kept += longint'(rows[i]);
    for (int i = 0; i < N/2; i++) begin
      longint unsigned u, want;
      u    = row_bits(longint'(av), longint'(bv), N, i);
      u    = u ^ (64'd1 << N);                  // inverted row MSB
      want = ((u << (2*i)) >> (N-1)) & ((64'd1 << (N+1)) - 1);
      checks++;
      if (longint'(rows[i]) != want) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h row %0d = %h, expected %h", av, bv, i, rows[i], want);
      end
    end
    prod = longint'(to_signed(longint'(av), N) * to_signed(longint'(bv), N)) & mask2;
    lhs  = ((kept << (N-1)) + tp_low(longint'(av), longint'(bv), N)) & mask2;
    checks++;
    if (lhs != prod) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h kept+TP_L=%h product=%h", av, bv, lhs, prod);
    end
  endtask

  initial begin
    automatic logic [N-1:0] corners [6] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF, 16'hAAAA};
    foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j]);
    for (int k = 0; k < 20000; k++) apply(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
