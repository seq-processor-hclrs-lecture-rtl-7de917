// tb_y86_memory: fills a small memory through the loader port, then checks
// the 10-byte instruction port, same-cycle data reads, next-cycle data
// writes and the address-error flags against a shadow byte array.
module tb_y86_memory;
  localparam int unsigned N = 256;
  logic clk = 0;
  logic [63:0] pc, mem_addr, mem_input, mem_output, load_addr, dbg_addr, dbg_data;
  logic [79:0] i10bytes;
  logic imem_error, dmem_error, mem_readbit, mem_writebit, load_we;
  logic [7:0] load_data;
  logic [7:0] shadow [N];
  int checks = 0, failures = 0;

  y86_memory #(.MEM_BYTES(N)) dut (.clk, .pc, .i10bytes, .imem_error, .mem_addr, .mem_input,
    .mem_readbit, .mem_writebit, .mem_output, .dmem_error, .load_we, .load_addr, .load_data,
    .dbg_addr, .dbg_data);
  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [7:0] sb(input logic [63:0] a);
    return (a < N) ? shadow[a] : 8'h00;
  endfunction

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [79:0] e10;
    logic [63:0] e8;
    mem_readbit = 0; mem_writebit = 0; mem_addr = 0; mem_input = 0; pc = 0; dbg_addr = 0;
    load_we = 1;
    for (int a = 0; a < N; a++) begin
      load_addr = 64'(a); load_data = 8'($urandom); shadow[a] = load_data;
      @(posedge clk); #1;
    end
    load_we = 0;
    for (int i = 0; i < 2000; i++) begin
      // instruction port
      pc = ($urandom_range(0, 9) == 0) ? 64'(N - $urandom_range(0, 12)) : 64'($urandom_range(0, N - 1));
      // data port
      mem_addr = ($urandom_range(0, 9) == 0) ? 64'(N - $urandom_range(0, 12)) : 64'($urandom_range(0, N - 8));
      mem_readbit = $urandom_range(0, 1);
      mem_writebit = !mem_readbit && ($urandom_range(0, 1) == 1);
      mem_input = {$urandom, $urandom};
      dbg_addr = 64'($urandom_range(0, N - 8));
      #1;
      for (int k = 0; k < 10; k++) e10[8*k +: 8] = sb(pc + 64'(k));
      check(i10bytes == e10, "i10bytes");
      check(imem_error == (pc >= N), "imem_error");
      check(dmem_error == (mem_addr > N - 8), "dmem_error");
      for (int k = 0; k < 8; k++) e8[8*k +: 8] = sb(mem_addr + 64'(k));
      if (mem_readbit && mem_addr <= N - 8) check(mem_output == e8, "same-cycle read");
      for (int k = 0; k < 8; k++) e8[8*k +: 8] = sb(dbg_addr + 64'(k));
      check(dbg_data == e8, "dbg read");
      @(posedge clk);
      if (mem_writebit && mem_addr <= N - 8)
        for (int k = 0; k < 8; k++) shadow[mem_addr + 64'(k)] = mem_input[8*k +: 8];
      #1;
      if (mem_writebit && mem_addr <= N - 8) begin
        mem_writebit = 0; mem_readbit = 1; #1;
        check(mem_output == mem_input, "write visible next cycle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
