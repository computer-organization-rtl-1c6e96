// tb_data_mem: writes every word of the data memory, then mixes random
// stores (we = 1) and cycles with we = 0, reading random addresses and
// comparing with an array kept in the testbench.
module tb_data_mem;
  logic        clk = 1'b0, we = 1'b0;
  logic [31:0] addr = '0, wdata = '0, rdata;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  data_mem #(.WORDS(256), .W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1'b1; addr = 32'(i * 4); wdata = $urandom; model[i] = wdata;
    end
    for (int t = 0; t < 1000; t++) begin
      int i;
      @(negedge clk);
      i = int'($urandom_range(255));
      we = 1'($urandom_range(1)); addr = 32'(i * 4); wdata = $urandom;
      #1;
      checks++;   // read before the store takes effect
      if (rdata !== model[i]) begin
        failures++;
        if (failures < 20) $display("FAIL read %h: %h expected %h", addr, rdata, model[i]);
      end
      if (we) model[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 256; i++) begin
      addr = 32'(i * 4); #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("FAIL final %h", addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
