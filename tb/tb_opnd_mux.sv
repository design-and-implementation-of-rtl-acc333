// tb_opnd_mux: test of the operand multiplexer for every select code with
// random load and register words.
module tb_opnd_mux;
  import mm_pkg::*;
  localparam int W = 13;
  opnd_sel_e sel;
  logic [W-1:0] ld, r, y, want;
  int checks = 0, failures = 0;

  opnd_mux #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      ld = W'($urandom); r = W'($urandom);
      sel = opnd_sel_e'(t % 4);
      #1;
      case (t % 4)
        0: want = ld;
        1: want = r;
        2: want = W'(r / 2);
        default: want = W'(r / 4);
      endcase
      checks++;
      if (y != want) begin
        failures++;
        $display("FAIL sel=%0d y=%h want=%h", t % 4, y, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
