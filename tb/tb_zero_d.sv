// tb_zero_d: zero detector on the zero word, every one-hot word and
// random words.
module tb_zero_d;
  localparam int W = 13;
  logic [W-1:0] sc;
  logic zero;
  int checks = 0, failures = 0;

  zero_d #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [W-1:0] v);
    sc = v; #1;
    checks++;
    if (zero != (v == 0)) begin
      failures++;
      $display("FAIL sc=%h zero=%b", v, zero);
    end
  endtask

  initial begin
    chk('0);
    for (int j = 0; j < W; j++) chk(W'(1) << j);
    for (int t = 0; t < 200; t++) chk(W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
