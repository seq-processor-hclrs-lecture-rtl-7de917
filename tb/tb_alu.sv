// tb_alu: random and corner operands for the four operations; the result
// and ZF/SF/OF are checked against arithmetic done at 65 bits in signed
// form.
module tb_alu;
  import seq_pkg::*;
  alufun_e op;
  logic [63:0] a, b, result;
  logic zf, sf, of;
  int checks = 0, failures = 0;
  int ovf_seen = 0;

  alu dut (.op, .a, .b, .result, .zf, .sf, .of);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s op=%0d a=%h b=%h r=%h", what, op, a, b, result); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] corner [6] = '{64'd0, 64'd1, 64'hFFFF_FFFF_FFFF_FFFF,
                                64'h7FFF_FFFF_FFFF_FFFF, 64'h8000_0000_0000_0000, 64'd8};
    logic signed [64:0] wide;
    logic [63:0] e;
    logic eo;
    for (int i = 0; i < 6000; i++) begin
      op = alufun_e'($urandom_range(0, 3));
      a = (i % 3 == 0) ? corner[$urandom_range(0, 5)] : {$urandom, $urandom};
      b = (i % 4 == 0) ? corner[$urandom_range(0, 5)] : {$urandom, $urandom};
      if (i % 7 == 0) b = a;
      #1;
      eo = 1'b0;
      case (op)
        ALU_ADD: begin wide = $signed({a[63], a}) + $signed({b[63], b}); e = wide[63:0];
                       eo = (wide > 65'sh0_7FFF_FFFF_FFFF_FFFF) || (wide < -65'sh0_8000_0000_0000_0000); end
        ALU_SUB: begin wide = $signed({a[63], a}) - $signed({b[63], b}); e = wide[63:0];
                       eo = (wide > 65'sh0_7FFF_FFFF_FFFF_FFFF) || (wide < -65'sh0_8000_0000_0000_0000); end
        ALU_AND: e = a & b;
        default: e = a ^ b;
      endcase
      check(result == e, "result");
      check(zf == (e == 0), "ZF");
      check(sf == e[63], "SF");
      check(of == eo, "OF");
      if (eo) ovf_seen++;
    end
    check(ovf_seen > 0, "overflow exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
