// tb_scs_mm_new: end-to-end test of the multiplier at its default size
// (K = 8, no parameter override): 400 multiplications, each checked
// against modular arithmetic, an algorithm-level model and the model's
// cycle count; see mm_tb_body.svh.
module tb_scs_mm_new;
  localparam int K = 8;
  localparam bit NEED_SUPP = 1'b1;
  localparam int NOPS = 400;
  logic         clk, rst_n, start, busy, done, skip_evt, alpha;
  logic [K-1:0] a, b;
  logic [K+1:0] n_hat;
  logic [K+2:0] s;

  scs_mm_new dut (.*);

`include "mm_tb_body.svh"

  initial begin
    run_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
