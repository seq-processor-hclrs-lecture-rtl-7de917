// tb_cond_unit: all 16 ifun values against all 8 flag combinations; the
// expected Cnd is taken from signed comparisons of the result the flags
// describe.
module tb_cond_unit;
  import seq_pkg::*;
  logic [3:0] ifun;
  cc_t cc;
  logic cnd;
  int checks = 0, failures = 0;

  cond_unit dut (.ifun, .cc, .cnd);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s ifun=%0d cc=%b", what, ifun, cc); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic less, equal, e;
    for (int f = 0; f < 16; f++)
      for (int c = 0; c < 8; c++) begin
        ifun = 4'(f); cc = cc_t'(3'(c));
        #1;
        // "less than" after a compare is the true sign of the difference
        less = cc.sf != cc.of;
        equal = cc.zf;
        case (f)
          0: e = 1;
          1: e = less || equal;
          2: e = less;
          3: e = equal;
          4: e = !equal;
          5: e = !less;
          6: e = !less && !equal;
          default: e = 0;
        endcase
        check(cnd == e, "cnd");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
