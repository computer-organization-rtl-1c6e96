// tb_register_file: tests the 32 x 32 register file and the four-register
// example size. Random writes (with random WE) and random reads on both ports
// are compared with an array kept in the testbench: a write with WE = 1 must
// change only the addressed register, a write with WE = 0 nothing, and both
// read ports must show the addressed registers combinationally, including a
// register written at the previous clock edge.
module tb_register_file;
  logic        clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;

  // 32-register instance.
  logic [4:0]  s1, s2, da;
  logic [31:0] dd, q1, q2;
  logic        we;
  logic [31:0] model [32];

  register_file #(.NUM_REGS(32), .W(32)) dut (
    .clk, .rst, .src1_addr(s1), .src2_addr(s2), .dst_addr(da), .dst_data(dd),
    .we, .src1_data(q1), .src2_data(q2)
  );

  // Four-register instance.
  logic [1:0]  s1b, s2b, dab;
  logic [31:0] q1b, q2b;
  logic [31:0] model4 [4];

  register_file #(.NUM_REGS(4), .W(32)) dut4 (
    .clk, .rst, .src1_addr(s1b), .src2_addr(s2b), .dst_addr(dab), .dst_data(dd),
    .we, .src1_data(q1b), .src2_data(q2b)
  );

  always #5 clk = ~clk;

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %h, expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; da = 0; dab = 0; dd = 0; s1 = 0; s2 = 0; s1b = 0; s2b = 0;
    @(negedge clk);
    rst = 1'b0;
    foreach (model[i]) model[i] = '0;
    foreach (model4[i]) model4[i] = '0;
    // Reset clears every register.
    for (int i = 0; i < 32; i++) begin
      s1 = 5'(i); s2 = 5'(31 - i); #1;
      chk(q1, 32'd0, "after reset, port 1");
      chk(q2, 32'd0, "after reset, port 2");
    end
    // Fill every register once, then random traffic.
    for (int i = 0; i < 1000; i++) begin
      we = (i < 32) ? 1'b1 : 1'($urandom_range(3) != 0);
      da = (i < 32) ? 5'(i) : 5'($urandom_range(31));
      dab = 2'($urandom_range(3));
      dd = $urandom;
      @(negedge clk);
      if (we) begin model[da] = dd; model4[dab] = dd; end
      // The register just written, on both ports.
      s1 = da; s2 = da; s1b = dab; s2b = dab; #1;
      chk(q1, model[da], "written register, port 1");
      chk(q2, model[da], "written register, port 2");
      chk(q1b, model4[dab], "4-reg written register, port 1");
      // Two random registers.
      s1 = 5'($urandom_range(31)); s2 = 5'($urandom_range(31));
      s1b = 2'($urandom_range(3)); s2b = 2'($urandom_range(3)); #1;
      chk(q1, model[s1], "port 1");
      chk(q2, model[s2], "port 2");
      chk(q1b, model4[s1b], "4-reg port 1");
      chk(q2b, model4[s2b], "4-reg port 2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
