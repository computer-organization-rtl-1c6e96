// tb_parallel_load_register: checks load, hold and reset of the parallel-load
// register against a reference value kept in the testbench, over random data
// and random load controls.
module tb_parallel_load_register;
  logic        clk = 1'b0, rst = 1'b1, c = 1'b0;
  logic [31:0] x = '0, z, ref_z;
  int checks = 0, failures = 0;

  parallel_load_register #(.W(32), .RESET_VALUE(32'h0000_0040)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    checks++; if (z !== 32'h40) begin failures++; $display("FAIL reset value %h", z); end
    ref_z = 32'h40;
    rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      c = 1'($urandom_range(1));
      x = $urandom;
      @(negedge clk);
      if (c) ref_z = x;
      checks++;
      if (z !== ref_z) begin failures++; $display("FAIL c=%b z=%h expected %h", c, z, ref_z); end
    end
    rst = 1'b1; c = 1'b1; x = 32'hFFFF_FFFF;
    @(negedge clk);
    checks++; if (z !== 32'h40) begin failures++; $display("FAIL reset over load %h", z); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
