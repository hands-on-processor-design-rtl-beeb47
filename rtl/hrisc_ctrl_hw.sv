// hrisc_ctrl_hw -- hardwired control unit of the HRISC pipeline.
//
// Replaces the four stage PROMs of the microcoded unit by gates. The opcode
// bits are called a b c d e f (bit 31 down to bit 26 of the instruction).
//  * R-type instructions (a=0) carry their eleven EX control lines in bits
//    10..0; the EX outputs are those bits ANDed with a', so an I-type
//    immediate can never reach the ALU controls.
//  * I-type instructions (a=1) are decoded from b, c, d:
//      X = a b' c      (ADDI, LHI: ALU result written back through OUT1)
//      NEW = a b' c d  (LHI)
//    S0, Cn and the OUT1 load are OR-ed with the I-type adds, and the
//    MEM and WB lines are:
//      OUT2 <- OUT1  = a' f' + X         OUT2 <- OUT3 = a' e f
//      MDR2 <- DM    = a b' c' d'        DM <- MDR1   = a b' c' d
//      RD <- OUT2    = X + a'            RD <- MDR2   = a b' c' d'
//      R31 <- LINK3  = a b c d
// These equations are the document's. Its EX table sets EB for ADDI, LW, SW
// and LHI, i.e. EB = a b'; that is what is built. The ID lines (b1,b2), the
// forced add for LW/SW and for the branch-target sum, the PC2 operand
// select, the OUT1 target load and the COND/MAR/MDR1 enables are this
// design's own equations, chosen to give exactly the microcoded unit's
// control words for all seventeen instructions. Purely combinational.
module hrisc_ctrl_hw
  import hrisc_pkg::*;
(
  input  logic [5:0]  op1,  // opcode in IR1 (ID)
  input  logic [5:0]  op2,  // opcode in IR2 (EX)
  input  logic [10:0] cw2,  // bits 10..0 of IR2
  input  logic [5:0]  op3,  // opcode in IR3 (MEM)
  input  logic [5:0]  op4,  // opcode in IR4 (WB)
  output id_ctrl_t    id_c,
  output ex_ctrl_t    ex_c,
  output mem_ctrl_t   mem_c,
  output wb_ctrl_t    wb_c
);

  // ---- ID -----------------------------------------------------------------
  logic a1, b1_, c1, d1;
  assign {a1, b1_, c1, d1} = op1[5:2];
  assign id_c.b1 = a1 & b1_ & ~c1;
  assign id_c.b2 = a1 & b1_ & (c1 | d1);

  // ---- EX -----------------------------------------------------------------
  logic a2, b2_, c2, d2;
  logic x2, ls2, br2, add2;
  assign {a2, b2_, c2, d2} = op2[5:2];
  assign x2   = a2 & ~b2_ & c2;        // ADDI, LHI
  assign ls2  = a2 & ~b2_ & ~c2;       // LW, SW
  assign br2  = a2 & b2_ & ~c2;        // BEQZ, BNEZ
  assign add2 = x2 | ls2 | br2;        // I-type instructions that add

  assign ex_c.s[3:1]  = {3{~a2}} & cw2[10:8];
  assign ex_c.s[0]    = (~a2 & cw2[7]) | add2;
  assign ex_c.cn      = (~a2 & cw2[6]) | add2;
  assign ex_c.m       = ~a2 & cw2[5];
  assign ex_c.out1_op = (~a2 & cw2[4]) | x2;
  assign ex_c.out3_op = ~a2 & cw2[3];
  assign ex_c.setf    = ~a2 & cw2[2];
  assign ex_c.sl      = ~a2 & cw2[1];
  assign ex_c.sr      = ~a2 & cw2[0];
  assign ex_c.eb      = (a2 & ~b2_) | br2;
  assign ex_c.new_imm = a2 & ~b2_ & c2 & d2;
  assign ex_c.ea      = br2;
  assign ex_c.out1_tgt = a2 & b2_;
  assign ex_c.cond_ld = br2;
  assign ex_c.mar_ld  = ls2;
  assign ex_c.mdr1_ld = ls2 & d2;

  // ---- MEM ----------------------------------------------------------------
  logic a3, b3_, c3, d3, e3, f3;
  assign {a3, b3_, c3, d3, e3, f3} = op3;
  assign mem_c.out2_out1 = (~a3 & ~f3) | (a3 & ~b3_ & c3);
  assign mem_c.out2_out3 = ~a3 & e3 & f3;
  assign mem_c.mdr2_ld   = a3 & ~b3_ & ~c3 & ~d3;
  assign mem_c.dm_we     = a3 & ~b3_ & ~c3 & d3;

  // ---- WB -----------------------------------------------------------------
  logic a4, b4_, c4, d4;
  assign {a4, b4_, c4, d4} = op4[5:2];
  assign wb_c.rd_out2  = (a4 & ~b4_ & c4) | ~a4;
  assign wb_c.rd_mdr2  = a4 & ~b4_ & ~c4 & ~d4;
  assign wb_c.r31_link = a4 & b4_ & c4 & d4;

endmodule
