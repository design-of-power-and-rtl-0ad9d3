// tb_amul_n32: the fixed-width Booth multiplier elaborated at N = 32, the
// 32 x 32 configuration whose error was evaluated alongside the 16 x 16 one.
//
// Same checks as the 16-bit end-to-end test: bit-exact agreement with the
// integer reference (kept columns + group compensation), the error bound,
// every compensation case and digit kind occurring, and a smaller mean
// absolute error than plain truncation. The five compensation values are the
// ones derived for the 16 x 16 multiplier; no separate 32 x 32 table is
// used, so the error figures printed here are not those of a tuned 32-bit
// design. Combinational: outputs are checked 1 time unit after the inputs.
module tb_amul_n32;
  import tb_ref_pkg::*;
  localparam int unsigned N = 32;
  localparam int ERR_LIM = N/2 + 6;   // error bound in units of 2^(N-1)
  localparam int NTESTS = 30000;
  logic [N-1:0] a, b, p;
  logic [2:0]   group;
  int checks = 0, failures = 0;
  int seen [5] = '{default: 0};
  int n_neg = 0, n_two = 0, n_m0 = 0, n_theta = 0, n_apply = 0;
  real err_comp = 0.0, err_trunc = 0.0;
  real sq_comp = 0.0, sq_trunc = 0.0, max_comp = 0.0, max_trunc = 0.0;

  proposed_array_multiplier #(.N(N)) dut (.a(a), .b(b), .p(p), .group(group));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] av, input logic [N-1:0] bv);
    int g, th;
    longint unsigned want, trunc;
    longint signed exact, e, et;
    a = av;
    b = bv;
    #1;
    g     = group_ref(longint'(av), longint'(bv), N);
    th    = theta_ref(g);
    want  = approx_ref(longint'(av), longint'(bv), N, th);
    trunc = approx_ref(longint'(av), longint'(bv), N, 0);
    exact = to_signed(longint'(av), N) * to_signed(longint'(bv), N);
    e     = (to_signed(longint'(p), N) <<< N) - exact;
    et    = (to_signed(trunc, N) <<< N) - exact;
    err_comp  += (e  < 0) ? real'(-e)  : real'(e);
    err_trunc += (et < 0) ? real'(-et) : real'(et);
    sq_comp   += (real'(e)  / real'(longint'(1) << N)) ** 2;
    sq_trunc  += (real'(et) / real'(longint'(1) << N)) ** 2;
    if (((e  < 0) ? real'(-e)  : real'(e))  > max_comp)  max_comp  = (e  < 0) ? real'(-e)  : real'(e);
    if (((et < 0) ? real'(-et) : real'(et)) > max_trunc) max_trunc = (et < 0) ? real'(-et) : real'(et);
    n_apply++;
    seen[g]++;
    if (th != 0) n_theta++;
    for (int i = 0; i < N/2; i++) begin
      int d;
      d = booth_digit(longint'(bv), N, i);
      if (d < 0) n_neg++;
      if (d == 2 || d == -2) n_two++;
      if (d == 0 && bv[2*i+1]) n_m0++;
    end
    checks += 3;
    if (longint'(p) != want) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h p=%h expected %h", av, bv, p, want);
    end
    if (int'(group) != g) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h group=%0d expected %0d", av, bv, group, g);
    end
    // |error| < (N/2 * 2^(N-1) + 2^N * (max theta + 1)); a wrapped
    // (overflowed) result would be off by about 2^(2N-1) and fail here.
    if (((e < 0) ? -e : e) > (longint'(ERR_LIM) << (N-1))) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h error %0d too large", av, bv, e);
    end
  endtask

  initial begin
    automatic logic [N-1:0] corners [7] = '{32'h0000_0000, 32'h0000_0001, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'hAAAA_AAAA, 32'h5555_5555};
    foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j]);
    for (int k = 0; k < NTESTS; k++) begin
      automatic logic [N-1:0] bv;
      bv = N'($urandom);
      if (k % 2 == 1) begin
        int z;
        z = $urandom_range(0, N/2);
        for (int i = 0; i < z; i++) begin
          int q;
          q = $urandom_range(0, N/2 - 1);
          bv[2*q]   = (q == 0) ? 1'b0 : bv[2*q-1];
          bv[2*q+1] = bv[2*q];
        end
      end
      apply(N'($urandom), bv);
    end
    for (int g = 0; g < 5; g++) begin
      $display("compensation case %0d: %0d inputs", g + 1, seen[g]);
      checks++;
      if (seen[g] == 0) failures++;
    end
    $display("negative digits %0d, +-2 digits %0d, -0 digits %0d, non-zero theta %0d",
             n_neg, n_two, n_m0, n_theta);
    checks += 4;
    if (n_neg == 0)   failures++;
    if (n_two == 0)   failures++;
    if (n_m0 == 0)    failures++;
    if (n_theta == 0) failures++;
    $display("mean |error| in output LSBs: compensated %f, truncated only %f",
             err_comp / real'(n_apply) / real'(longint'(1) << N),
             err_trunc / real'(n_apply) / real'(longint'(1) << N));
    $display("max |error| in output LSBs: compensated %f, truncated only %f",
             max_comp / real'(longint'(1) << N), max_trunc / real'(longint'(1) << N));
    $display("mean square error in output LSBs^2: compensated %f, truncated only %f",
             sq_comp / real'(n_apply), sq_trunc / real'(n_apply));
    checks++;
    if (!(err_comp < err_trunc)) begin
      failures++;
      $display("FAIL compensation does not reduce the mean error");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
