// tb_signature_generator: ca must equal the number of zero Booth digits of B,
// cb the number of digit sign bits b[2i+1] that are set, and fa the sorted
// bits of A. Exhaustive over B with random A.
module tb_signature_generator;
  import tb_ref_pkg::*;
  localparam int unsigned N  = 16;
  localparam int unsigned CW = $clog2(N/2 + 1);
  logic [N-1:0]  a, b, fa;
  logic [CW-1:0] ca, cb;
  int checks = 0, failures = 0;

  signature_generator #(.N(N)) dut (.a(a), .b(b), .ca(ca), .cb(cb), .fa(fa));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      int ones;
      b = N'(v);
      a = N'($urandom);
      #1;
      ones = popcount(longint'(a), N);
      checks += 3;
      if (int'(ca) != zero_digits(longint'(b), N)) begin
        failures++;
        if (failures < 10) $display("FAIL b=%h ca=%0d", b, ca);
      end
      if (int'(cb) != sign_digits(longint'(b), N)) begin
        failures++;
        if (failures < 10) $display("FAIL b=%h cb=%0d", b, cb);
      end
      for (int k = 0; k < N; k++) begin
        if (fa[k] != (k < ones)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h fa=%b", a, fa);
          break;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
