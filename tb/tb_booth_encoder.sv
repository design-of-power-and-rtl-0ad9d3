// tb_booth_encoder: for every 16-bit B, the digits rebuilt from the flags
// (sign from neg, magnitude from one/two) must satisfy sum d_i*4^i = B as a
// signed number, each digit must match the reference recoding, and exactly
// one of one/two/zero must be set.
module tb_booth_encoder;
  import amul_pkg::*;
  import tb_ref_pkg::*;
  localparam int unsigned N = 16;
  logic [N-1:0]  b;
  booth_digit_t  dig [N/2];
  int checks = 0, failures = 0;

  booth_encoder #(.N(N)) dut (.b(b), .dig(dig));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      longint signed total;
      b = N'(v);
      #1;
      total = 0;
      for (int i = 0; i < N/2; i++) begin
        int mag, d;
        mag = dig[i].two ? 2 : (dig[i].one ? 1 : 0);
        d   = dig[i].neg ? -mag : mag;
        total += longint'(d) <<< (2*i);
        checks++;
        if (d != booth_digit(longint'(v), N, i) ||
            (int'(dig[i].one) + int'(dig[i].two) + int'(dig[i].zero)) != 1) begin
          failures++;
          if (failures < 10) $display("FAIL b=%h digit %0d flags=%b", b, i, dig[i]);
        end
      end
      checks++;
      if (total != to_signed(longint'(v), N)) begin
        failures++;
        if (failures < 10) $display("FAIL b=%h recoded to %0d", b, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
