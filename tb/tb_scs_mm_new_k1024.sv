// tb_scs_mm_new_k1024: the end-to-end test of mm_tb_body.svh with 1024-bit
// operands (K = 1024), 12 multiplications (an RSA-1024 sized operand).
module tb_scs_mm_new_k1024;
  localparam int K = 1024;
  localparam bit NEED_SUPP = 1'b0;
  localparam int NOPS = 12;
  logic         clk, rst_n, start, busy, done, skip_evt, alpha;
  logic [K-1:0] a, b;
  logic [K+1:0] n_hat;
  logic [K+2:0] s;

  scs_mm_new #(.K(K)) dut (.*);

`include "mm_tb_body.svh"

  initial begin
    run_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
