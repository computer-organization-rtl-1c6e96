// tb_instr_mem: loads every word of the instruction memory through its load
// port with a value derived from its index, then reads all of it back at
// byte addresses (PC values) in random order.
module tb_instr_mem;
  logic        clk = 1'b0, prog_we = 1'b0;
  logic [7:0]  prog_addr = '0;
  logic [31:0] prog_data = '0, addr = '0, instr;
  int checks = 0, failures = 0;

  instr_mem #(.WORDS(256)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [31:0] pattern(int i);
    return 32'(i) * 32'h9E37_79B1 ^ 32'h1234_5678;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 8'(i); prog_data = pattern(i);
    end
    @(negedge clk);
    prog_we = 1'b0;
    for (int t = 0; t < 512; t++) begin
      int i;
      i = int'($urandom_range(255));
      addr = 32'(i * 4); #1;
      checks++;
      if (instr !== pattern(i)) begin
        failures++;
        if (failures < 20) $display("FAIL addr=%h instr=%h expected %h", addr, instr, pattern(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
