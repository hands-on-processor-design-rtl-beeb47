// tb_hrisc_alu -- self-checking test of the HRISC ALU.
// Applies the EX control words of every ALU-using instruction (ADD, SUB,
// AND, XOR, SRL, SLL, SEQ, SLT, SGT, and the pass used by JR/JALR) to random
// and corner operands and compares the result and the set bit with values
// computed here from the instruction's meaning.
module tb_hrisc_alu;
  import hrisc_pkg::*;

  logic [31:0] a, b, f;
  logic [3:0]  s;
  logic        cn, m, sr, sl, setf, set;
  int checks = 0, failures = 0;
  logic clk = 0;
  int cycles = 0;

  hrisc_alu #(.W(32)) dut (.a, .b, .s, .cn, .m, .sr, .sl, .setf, .f, .set);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 200000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic apply(logic [10:0] cw);
    {s, cn, m} = {cw[10:7], cw[6], cw[5]};
    setf = cw[2]; sl = cw[1]; sr = cw[0];
  endtask

  task automatic check(string what, logic [31:0] exp_f, logic chk_set, logic exp_set);
    #1;
    checks++;
    if (f !== exp_f || (chk_set && set !== exp_set)) begin
      failures++;
      $display("FAIL %s a=%h b=%h f=%h exp=%h set=%b exp_set=%b", what, a, b, f, exp_f, set, exp_set);
    end
  endtask

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'h1234_5678};
    for (int i = 0; i < 3000; i++) begin
      if (i < 36) begin a = corner[i % 6]; b = corner[i / 6]; end
      else begin
        a = $urandom; b = $urandom;
        if (i % 4 == 0) b = a;            // equal operands for SEQ
        if (i % 7 == 0) b = $urandom % 40;  // small shift amounts
      end
      apply(CW_ADD); check("ADD", a + b, 0, 0);
      apply(CW_SUB); check("SUB", a - b, 0, 0);
      apply(CW_AND); check("AND", a & b, 0, 0);
      apply(CW_XOR); check("XOR", a ^ b, 0, 0);
      apply(CW_SRL); check("SRL", a >> (b % 32), 0, 0);
      apply(CW_SLL); check("SLL", a << (b % 32), 0, 0);
      apply(CW_SEQ); check("SEQ", a - b, 1, a == b);
      apply(CW_SLT); check("SLT", a - b, 1, $signed(a) < $signed(b));
      apply(CW_SGT); check("SGT", a - b, 1, $signed(a) > $signed(b));
      apply(11'b0);  check("PASS", a, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
