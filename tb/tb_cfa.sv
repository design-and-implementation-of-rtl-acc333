// tb_cfa: exhaustive test of the configurable full adder cell. For all 64
// input combinations it checks, against integer addition, that alpha = 1
// gives sum + 2*carry = a + b + x and alpha = 0 gives the second half adder
// over (a ^ b) and the neighbour carry a_{j-1} & b_{j-1}.
module tb_cfa;
  logic a_j, b_j, a_jm1, b_jm1, x_n, alpha, sum_j, carry_j;
  int checks = 0, failures = 0;

  cfa dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_s, exp_c, tot, t;
    for (int v = 0; v < 64; v++) begin
      {a_j, b_j, a_jm1, b_jm1, x_n, alpha} = 6'(v);
      #1;
      if (alpha) begin
        tot = int'(a_j) + int'(b_j) + int'(!x_n);
      end else begin
        t   = int'(a_jm1 && b_jm1);
        tot = ((int'(a_j) + int'(b_j)) % 2) + t;
      end
      exp_s = tot % 2;
      exp_c = tot / 2;
      checks++;
      if (sum_j != exp_s[0] || carry_j != exp_c[0]) begin
        failures++;
        $display("FAIL v=%b sum=%b carry=%b exp=%0d%0d", 6'(v), sum_j, carry_j, exp_c, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
