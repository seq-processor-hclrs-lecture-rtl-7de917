// tb_register_bank: checks the HCLRS register bank: the initial value after
// reset, loading on enable, holding without enable, at two widths.
module tb_register_bank;
  logic clk = 0, rst, en;
  logic [63:0] d64, q64;
  logic [7:0]  d8, q8;
  int checks = 0, failures = 0;

  register_bank #(.WIDTH(64), .INIT(64'd0)) dut64 (.clk, .rst, .en, .d(d64), .q(q64));
  register_bank #(.WIDTH(8), .INIT(8'hA5))  dut8  (.clk, .rst, .en, .d(d8),  .q(q8));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] exp64;
    logic [7:0]  exp8;
    rst = 1; en = 0; d64 = 64'h1234; d8 = 8'h11;
    @(posedge clk); #1;
    check(q64 == 64'd0, "reset value 64");
    check(q8 == 8'hA5, "reset value 8");
    rst = 0;
    exp64 = 0; exp8 = 8'hA5;
    for (int i = 0; i < 200; i++) begin
      en = $urandom_range(0, 1);
      d64 = {$urandom, $urandom};
      d8 = 8'($urandom);
      @(posedge clk);
      if (en) begin exp64 = d64; exp8 = d8; end
      #1;
      check(q64 == exp64, "q64");
      check(q8 == exp8, "q8");
    end
    rst = 1; @(posedge clk); #1;
    check(q8 == 8'hA5 && q64 == 0, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
