// tb_mm_ctrl: test of the controller's sequencing (K = 8). The testbench
// plays the datapath: it raises zero after a chosen number of conversion
// passes and drives random skip requests in the loop (only when allowed).
// It checks every cycle's select code, CCSA mode and strobes against the
// phase it expects, the loop length (cnt = i+1 runs 0 .. K+5, advancing by
// two on a skip), that skipping is disallowed exactly in the last
// iteration, and the start-to-done latency.
module tb_mm_ctrl;
  import mm_pkg::*;
  localparam int K = 8;
  logic clk = 0, rst_n = 0, start = 0, zero = 0, skip_q = 0, skip_nx = 0;
  opnd_sel_e sel;
  logic alpha, ld_ops, reg_en, ld_d, loop_en, allow, loop_end, fconv_1st, busy, done;
  int checks = 0, failures = 0;

  mm_ctrl #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input string what, input opnd_sel_e esel, input logic ealpha,
                            input logic ereg, input logic eld_d, input logic eloop,
                            input logic edone);
    checks++;
    if (sel != esel || alpha != ealpha || reg_en != ereg || ld_d != eld_d ||
        loop_en != eloop || done != edone) begin
      failures++;
      $display("FAIL %s: sel=%0d alpha=%b reg_en=%b ld_d=%b loop_en=%b done=%b", what,
               sel, alpha, reg_en, ld_d, loop_en, done);
    end
  endtask

  task automatic run(input int np, input int nf, input int skip_pct);
    int cnt, lat, loops, exp_lat;
    logic sk;
    @(negedge clk);
    start = 1;
    #1;
    checks++;
    if (!ld_ops) begin failures++; $display("FAIL no ld_ops"); end
    @(negedge clk);
    start = 0; lat = 1;
    // PRE
    expect_out("pre", SEL_LOAD, 1, 1, 0, 0, 0);
    @(negedge clk); lat++;
    // PCONV
    for (int p = 0; p < np; p++) begin
      zero = 0; #1;
      expect_out("pconv", SEL_REG, 0, 1, 0, 0, 0);
      @(negedge clk); lat++;
    end
    zero = 1; #1;
    expect_out("pconv end", SEL_REG, 0, 0, 1, 0, 0);
    @(negedge clk); lat++;
    zero = 0;
    // LOOP
    cnt = 0; loops = 0; skip_q = 0;
    while (cnt <= K + 5) begin
      skip_nx = 0; #1;
      checks++;
      if (allow != (cnt != K + 5)) begin
        failures++; $display("FAIL allow=%b at cnt=%0d", allow, cnt);
      end
      sk = allow && ($urandom_range(99) < skip_pct);
      skip_nx = sk; #1;
      expect_out("loop", skip_q ? SEL_SH2 : SEL_SH1, 1, 1, 0, 1, 0);
      checks++;
      if (loop_end != (cnt + (sk ? 2 : 1) > K + 5)) begin
        failures++; $display("FAIL loop_end at cnt=%0d", cnt);
      end
      cnt += sk ? 2 : 1;
      loops++;
      @(negedge clk); lat++;
      skip_q = sk;
      skip_nx = 0;
    end
    // FCONV first pass
    #1;
    checks++;
    if (!fconv_1st) begin failures++; $display("FAIL no first final pass"); end
    expect_out("fconv1", skip_q ? SEL_SH2 : SEL_SH1, 0, 1, 0, 0, 0);
    @(negedge clk); lat++;
    skip_q = 0;
    for (int p = 0; p < nf; p++) begin
      zero = 0; #1;
      expect_out("fconv", SEL_REG, 0, 1, 0, 0, 0);
      @(negedge clk); lat++;
    end
    zero = 1; #1;
    expect_out("fconv end", SEL_REG, 0, 0, 0, 0, 0);
    @(negedge clk); lat++;
    zero = 0; #1;
    checks++;
    if (!done) begin failures++; $display("FAIL done missing"); end
    exp_lat = 5 + np + loops + nf;
    checks++;
    if (lat != exp_lat) begin
      failures++; $display("FAIL latency %0d want %0d", lat, exp_lat);
    end
    @(negedge clk); #1;
    checks++;
    if (busy || done) begin failures++; $display("FAIL not idle after done"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(0, 0, 0);
    run(3, 2, 100);
    for (int t = 0; t < 50; t++) run($urandom_range(6), $urandom_range(6), $urandom_range(80));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
