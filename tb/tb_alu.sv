// tb_alu: compares the ALU with the testbench's own arithmetic for all five
// operations on random operands and on corner values (0, 1, -1, the largest
// and smallest signed numbers), including the zero flag.
module tb_alu;
  import mips_lite_pkg::*;
  logic [31:0] a, b, y, e;
  alu_op_t     op;
  logic        zero;
  int checks = 0, failures = 0;

  alu #(.W(32)) dut (.*);

  localparam logic [31:0] CORNER [6] = '{32'd0, 32'd1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000, 32'd5};

  task automatic one(input logic [31:0] ta, input logic [31:0] tb_, input alu_op_t top);
    a = ta; b = tb_; op = top; #1;
    case (top)
      ALU_ADD: e = ta + tb_;
      ALU_SUB: e = ta - tb_;
      ALU_AND: e = ta & tb_;
      ALU_OR:  e = ta | tb_;
      default: e = ($signed(ta) < $signed(tb_)) ? 32'd1 : 32'd0;
    endcase
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++;
      if (failures < 20) $display("FAIL op=%s a=%h b=%h y=%h zero=%b expected %h", top.name(), ta, tb_, y, zero, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static alu_op_t ops [5] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_SLT};
    foreach (ops[k]) begin
      foreach (CORNER[i]) foreach (CORNER[j]) one(CORNER[i], CORNER[j], ops[k]);
      for (int t = 0; t < 500; t++) one($urandom, $urandom, ops[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
