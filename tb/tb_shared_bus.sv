// tb_shared_bus: drives four devices' values onto a 32-bit bus with one
// enable at a time and checks that the bus carries the enabled device's
// value; with no device enabled it must read 0.
module tb_shared_bus;
  logic [3:0][31:0] d;
  logic [3:0]       en;
  logic [31:0]      q;
  int checks = 0, failures = 0;

  shared_bus #(.NDRV(4), .W(32)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      for (int i = 0; i < 4; i++) d[i] = $urandom;
      for (int i = 0; i < 4; i++) begin
        en = 4'(1 << i); #1;
        checks++;
        if (q !== d[i]) begin failures++; $display("FAIL driver %0d: bus %h, expected %h", i, q, d[i]); end
      end
      en = '0; #1;
      checks++;
      if (q !== '0) begin failures++; $display("FAIL idle bus %h", q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
