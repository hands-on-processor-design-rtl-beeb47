// tb_hrisc_ctrl_hw -- self-checking test of the hardwired HRISC control unit.
// Presents every one of the seventeen instructions to each stage (ID, EX,
// MEM and WB) in turn, with random register fields and random low bits for
// I-type immediates, and compares each stage's control lines with the
// reference table of hrisc_tb_pkg.
module tb_hrisc_ctrl_hw;
  import hrisc_pkg::*;
  import hrisc_tb_pkg::*;

  logic [5:0]  op1, op2, op3, op4;
  logic [10:0] cw2;
  id_ctrl_t    id_c;
  ex_ctrl_t    ex_c;
  mem_ctrl_t   mem_c;
  wb_ctrl_t    wb_c;
  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0;

  hrisc_ctrl_hw dut (.op1, .op2, .cw2(cw2), .op3, .op4, .id_c, .ex_c, .mem_c, .wb_c);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int rep = 0; rep < 50; rep++) begin
      foreach (ALL_OPS[i]) begin
        logic [31:0] ins;
        opcode_e op;
        op = ALL_OPS[i];
        if (op[5] == 1'b0) ins = rtype(op, 5'($urandom), 5'($urandom), 5'($urandom));
        else               ins = itype(op, 5'($urandom), 5'($urandom), 16'($urandom));
        // other stages see unrelated instructions at the same time
        op1 = ALL_OPS[$urandom_range(0, 16)]; op2 = ALL_OPS[$urandom_range(0, 16)];
        op3 = ALL_OPS[$urandom_range(0, 16)]; op4 = ALL_OPS[$urandom_range(0, 16)];
        cw2 = 11'($urandom);
        case (rep % 4)
          0: op1 = ins[31:26];
          1: begin op2 = ins[31:26]; cw2 = ins[10:0]; end
          2: op3 = ins[31:26];
          default: op4 = ins[31:26];
        endcase
        @(negedge clk);
        checks++;
        case (rep % 4)
          0: if (id_c !== exp_id(op)) begin
               failures++; $display("FAIL ID %s got %b exp %b", op.name(), id_c, exp_id(op));
             end
          1: if (ex_c !== exp_ex(op)) begin
               failures++; $display("FAIL EX %s got %b exp %b", op.name(), ex_c, exp_ex(op));
             end
          2: if (mem_c !== exp_mem(op)) begin
               failures++; $display("FAIL MEM %s got %b exp %b", op.name(), mem_c, exp_mem(op));
             end
          default: if (wb_c !== exp_wb(op)) begin
               failures++; $display("FAIL WB %s got %b exp %b", op.name(), wb_c, exp_wb(op));
             end
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
