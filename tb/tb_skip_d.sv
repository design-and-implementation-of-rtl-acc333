// tb_skip_d: random test of the skip detector. For random carry-save words
// SS, SC, an odd N_hat and the quotient q_hat that makes SS + SC + x even
// (as the loop guarantees), the reference performs the full-word
// carry-save addition and the division by two with word operations and
// derives q_{i+1}, SS[i+1]_0, skip_{i+1} = ~(A_{i+1} | q_{i+1} | SS[i+1]_0)
// and, for a skip, q_{i+2} from the word shifted once more.
module tb_skip_d;
  logic [2:0] n_hat, ss, sc;
  logic q_hat, a1, a2, allow, skip, q_next, a_next;
  int checks = 0, failures = 0, n_skips = 0;

  skip_d dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] wss, wsc, wn, x, s, c, ssn, scn;
    logic q1, q2, exp_skip, exp_q, exp_a;
    for (int t = 0; t < 4000; t++) begin
      wss = 8'($urandom); wsc = 8'($urandom); wn = 8'($urandom) | 8'd1;
      q_hat = wss[0] ^ wsc[0];
      a1 = 1'($urandom); a2 = 1'($urandom); allow = ($urandom_range(7) != 0);
      n_hat = wn[2:0]; ss = wss[2:0]; sc = wsc[2:0];
      x = q_hat ? wn : 8'd0;
      s = wss ^ wsc ^ x;
      c = ((wss & wsc) | (wss & x) | (wsc & x)) << 1;
      ssn = s >> 1; scn = c >> 1;
      q1 = ssn[0] ^ scn[0];
      exp_skip = allow && !a1 && !q1 && !ssn[0];
      q2 = ssn[1] ^ scn[1];
      exp_q = exp_skip ? q2 : q1;
      exp_a = exp_skip ? a2 : a1;
      #1;
      checks++;
      if (s[0] != 1'b0 || (exp_skip && scn[0])) begin
        failures++;
        $display("FAIL reference premise");
      end
      checks++;
      if (skip != exp_skip || q_next != exp_q || a_next != exp_a) begin
        failures++;
        $display("FAIL ss=%h sc=%h n=%h q=%b a1=%b a2=%b allow=%b: skip=%b q=%b a=%b want %b %b %b",
                 wss, wsc, wn, q_hat, a1, a2, allow, skip, q_next, a_next, exp_skip, exp_q, exp_a);
      end
      if (skip) n_skips++;
    end
    checks++;
    if (n_skips == 0) begin failures++; $display("FAIL no skip seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
