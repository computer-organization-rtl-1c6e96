// tb_decoder: exhaustive test of the 2-4 decoder with enable and of a 5-32
// decoder: for every input and enable value the output must have exactly the
// line of the input's index set when enabled and no line set when disabled.
module tb_decoder;
  logic [1:0]  a2;
  logic [4:0]  a5;
  logic        en;
  logic [3:0]  y2;
  logic [31:0] y5;
  int checks = 0, failures = 0;

  decoder #(.N(2)) dut2 (.a(a2), .en(en), .y(y2));
  decoder #(.N(5)) dut5 (.a(a5), .en(en), .y(y5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int i = 0; i < 4; i++) begin
        en = 1'(e); a2 = 2'(i); #1;
        checks++;
        if (y2 !== (e ? 4'(1 << i) : 4'b0)) begin
          failures++; $display("FAIL 2-4 en=%0d a=%0d y=%b", e, i, y2);
        end
      end
      for (int i = 0; i < 32; i++) begin
        en = 1'(e); a5 = 5'(i); #1;
        checks++;
        if (y5 !== (e ? 32'(64'd1 << i) : 32'b0)) begin
          failures++; $display("FAIL 5-32 en=%0d a=%0d y=%h", e, i, y5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
