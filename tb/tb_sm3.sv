// tb_sm3: test of the simplified multiplexer. For random words and all four
// (A_hat, q_hat) pairs, ~x_n must be 0, N_hat, B_hat or D_hat.
module tb_sm3;
  localparam int W = 13;
  logic a_hat, q_hat;
  logic [W-1:0] n_hat, b_hat, d_hat, x_n, want;
  int checks = 0, failures = 0;

  sm3 #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      n_hat = W'($urandom); b_hat = W'($urandom); d_hat = W'($urandom);
      {a_hat, q_hat} = 2'(t);
      #1;
      case ({a_hat, q_hat})
        2'b00: want = '0;
        2'b01: want = n_hat;
        2'b10: want = b_hat;
        default: want = d_hat;
      endcase
      checks++;
      if (~x_n != want) begin
        failures++;
        $display("FAIL A=%b q=%b x=%h want=%h", a_hat, q_hat, ~x_n, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
