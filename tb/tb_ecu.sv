// tb_ecu: the group chosen for each input must follow the classification rule
// (zero-digit count, sign-digit count, ones in A) and theta must be that
// group's compensation (cases 1..5 -> 1, 2, 2, 1, 0). Inputs are random, with
// B biased toward many zero digits so that every group occurs; each group
// must be seen at least once.
module tb_ecu;
  import tb_ref_pkg::*;
  localparam int unsigned N = 16;
  logic [N-1:0] a, b;
  logic [1:0]   theta;
  logic [2:0]   group;
  int checks = 0, failures = 0;
  int seen [5] = '{default: 0};

  ecu #(.N(N)) dut (.a(a), .b(b), .theta(theta), .group(group));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 40000; k++) begin
      int g;
      a = N'($urandom);
      b = N'($urandom);
      // Force a random number of zero digits (triplet 000 or 111) in B.
      if (k % 2 == 1) begin
        int z;
        z = $urandom_range(0, N/2);
        for (int i = 0; i < z; i++) begin
          int p;
          p = $urandom_range(0, N/2 - 1);
          b[2*p]   = (p == 0) ? 1'b0 : b[2*p-1];
          b[2*p+1] = b[2*p];
        end
      end
      #1;
      g = group_ref(longint'(a), longint'(b), N);
      seen[g]++;
      checks += 2;
      if (int'(group) != g) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h group=%0d expected %0d", a, b, group, g);
      end
      if (int'(theta) != theta_ref(g)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h theta=%0d expected %0d", a, b, theta, theta_ref(g));
      end
    end
    for (int g = 0; g < 5; g++) begin
      $display("case %0d: %0d inputs", g + 1, seen[g]);
      checks++;
      if (seen[g] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
