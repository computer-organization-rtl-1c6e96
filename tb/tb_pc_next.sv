// tb_pc_next: checks PC + 4, beq targets (forward and backward offsets) and
// j targets (upper four bits kept from PC + 4) on random PCs.
module tb_pc_next;
  import mips_lite_pkg::*;
  logic [31:0] pc, offset, next, e;
  logic [25:0] target;
  pc_sel_t     sel;
  int checks = 0, failures = 0;

  pc_next #(.W(32)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 600; t++) begin
      int k;
      k = t % 3;
      pc     = {$urandom} & ~32'd3;
      offset = 32'(signed'(16'($urandom)));
      target = 26'($urandom);
      sel    = (k == 0) ? PC_PLUS4 : (k == 1) ? PC_BRANCH : PC_JUMP;
      #1;
      case (k)
        0:       e = pc + 4;
        1:       e = pc + 4 + offset * 4;
        default: e = ((pc + 4) & 32'hF000_0000) | (32'(target) * 4);
      endcase
      checks++;
      if (next !== e) begin
        failures++;
        if (failures < 20) $display("FAIL sel=%s pc=%h off=%h tgt=%h next=%h expected %h", sel.name(), pc, offset, target, next, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
