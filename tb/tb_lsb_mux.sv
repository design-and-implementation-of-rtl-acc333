// tb_lsb_mux: exhaustive test of the 3-bit multiplexers M4/M5: the output
// must be bits 2:0 of the register shifted by one (skip = 0) or two.
module tb_lsb_mux;
  logic skip;
  logic [4:1] r;
  logic [2:0] y;
  int checks = 0, failures = 0;

  lsb_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] full, sh;
    for (int v = 0; v < 32; v++) begin
      {skip, r} = 5'(v);
      full = {r, 1'b0};
      sh = skip ? (full >> 2) : (full >> 1);
      #1;
      checks++;
      if (y != sh[2:0]) begin
        failures++;
        $display("FAIL skip=%b r=%b y=%b", skip, r, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
