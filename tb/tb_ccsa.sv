// tb_ccsa: random test of the one-level CCSA (W = 16). Mode 1F_CSA: the
// sum word must equal a ^ b ^ x and sum + carry must equal a + b + x.
// Mode 2H_CSA: sum + carry must equal a + b, and after repeated passes
// SC reaches zero within W passes and SS equals a + b. Operands are kept
// small enough that no carry leaves the word (ovf must stay 0).
module tb_ccsa;
  localparam int W = 16;
  logic [W-1:0] a, b, x_n, sum, carry;
  logic alpha, ovf;
  int checks = 0, failures = 0;

  ccsa #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W+1:0] ref_sum, got;
    logic [W-1:0] ss, sc, tgt, xv;
    int passes;
    for (int t = 0; t < 2000; t++) begin
      a = W'($urandom) >> 2; b = W'($urandom) >> 2; x_n = ~(W'($urandom) >> 2);
      alpha = 1'b1;
      #1;
      xv = ~x_n;
      ref_sum = (W+2)'(a) + (W+2)'(b) + (W+2)'(xv);
      got = (W+2)'(sum) + (W+2)'(carry);
      checks++;
      if (got != ref_sum || sum != (a ^ b ^ xv) || ovf) begin
        failures++;
        $display("FAIL 1F a=%h b=%h x=%h sum=%h carry=%h", a, b, ~x_n, sum, carry);
      end
      alpha = 1'b0;
      #1;
      ref_sum = (W+2)'(a) + (W+2)'(b);
      got = (W+2)'(sum) + (W+2)'(carry);
      checks++;
      if (got != ref_sum || ovf) begin
        failures++;
        $display("FAIL 2H a=%h b=%h sum=%h carry=%h", a, b, sum, carry);
      end
      // repeated 2H passes: carry-save to binary conversion
      tgt = a + b; ss = a; sc = b; passes = 0;
      while (sc != 0 && passes <= W) begin
        a = ss; b = sc; #1;
        ss = sum; sc = carry; passes++;
      end
      checks++;
      if (sc != 0 || ss != tgt) begin
        failures++;
        $display("FAIL conversion passes=%0d ss=%h want=%h", passes, ss, tgt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
