// hrisc_ctrl_ucode -- microcoded control unit of the HRISC pipeline.
//
// Every pipe stage has its own microprogram PROM, addressed by the opcode of
// the instruction register of that stage: PROM ID by IR1, PROM EX by IR2,
// PROM MEM by IR3 and PROM WB by IR4. Each PROM word is the set of control
// lines that stage needs, so the outputs are valid in the same cycle as the
// instruction register they belong to (purely combinational, 64 words each).
//
// The PROM contents follow the field tables of the document (b1,b2 for ID;
// EB, NEW, SETF, SR, SL, S3-S0, Cn, M, OUT1 and OUT3 loads for EX; the MEM
// and WB loads). Entries the document leaves open ("x") are stored as 0, and
// unused opcodes hold all-zero words (no-operation). The EX lines that pick
// PC2 as an operand, load a branch/jump target into OUT1, and enable COND,
// MAR and MDR1 are this design's additions, since the document's EX table
// does not list them. The tables are computed from the opcode by the rom_*
// functions below when the PROM arrays are initialised.
module hrisc_ctrl_ucode
  import hrisc_pkg::*;
(
  input  logic [5:0] op1,   // opcode in IR1 (ID)
  input  logic [5:0] op2,   // opcode in IR2 (EX)
  input  logic [5:0] op3,   // opcode in IR3 (MEM)
  input  logic [5:0] op4,   // opcode in IR4 (WB)
  output id_ctrl_t   id_c,
  output ex_ctrl_t   ex_c,
  output mem_ctrl_t  mem_c,
  output wb_ctrl_t   wb_c
);

  function automatic id_ctrl_t rom_id(input logic [5:0] op);
    id_ctrl_t c = '0;
    case (op)
      OP_BEQZ:       c = '{b1: 1'b1, b2: 1'b0};
      OP_BNEZ:       c = '{b1: 1'b1, b2: 1'b1};
      OP_JR, OP_JALR: c = '{b1: 1'b0, b2: 1'b1};
      default:       c = '0;
    endcase
    return c;
  endfunction

  function automatic ex_ctrl_t from_cw(input logic [10:0] cw);
    ex_ctrl_t c = '0;
    c.s       = cw[10:7];
    c.cn      = cw[6];
    c.m       = cw[5];
    c.out1_op = cw[4];
    c.out3_op = cw[3];
    c.setf    = cw[2];
    c.sl      = cw[1];
    c.sr      = cw[0];
    return c;
  endfunction

  function automatic ex_ctrl_t rom_ex(input logic [5:0] op);
    ex_ctrl_t c = '0;
    case (op)
      OP_ADD: c = from_cw(CW_ADD);
      OP_SUB: c = from_cw(CW_SUB);
      OP_AND: c = from_cw(CW_AND);
      OP_XOR: c = from_cw(CW_XOR);
      OP_SRL: c = from_cw(CW_SRL);
      OP_SLL: c = from_cw(CW_SLL);
      OP_SEQ: c = from_cw(CW_SEQ);
      OP_SLT: c = from_cw(CW_SLT);
      OP_SGT: c = from_cw(CW_SGT);
      OP_ADDI, OP_LHI: begin
        c = from_cw(CW_ADD);
        c.eb      = 1'b1;
        c.new_imm = (op == OP_LHI);
      end
      OP_LW, OP_SW: begin
        c.s       = S_ADD;
        c.cn      = 1'b1;
        c.eb      = 1'b1;
        c.mar_ld  = 1'b1;
        c.mdr1_ld = (op == OP_SW);
      end
      OP_BEQZ, OP_BNEZ: begin
        c.s        = S_ADD;
        c.cn       = 1'b1;
        c.eb       = 1'b1;
        c.ea       = 1'b1;
        c.out1_tgt = 1'b1;
        c.cond_ld  = 1'b1;
      end
      OP_JR, OP_JALR: begin
        c.s        = S_PASS;
        c.out1_tgt = 1'b1;
      end
      default: c = '0;
    endcase
    return c;
  endfunction

  function automatic mem_ctrl_t rom_mem(input logic [5:0] op);
    mem_ctrl_t c = '0;
    case (op)
      OP_ADD, OP_SUB, OP_AND, OP_XOR, OP_SRL, OP_SLL, OP_ADDI, OP_LHI:
        c.out2_out1 = 1'b1;
      OP_SEQ, OP_SLT, OP_SGT: c.out2_out3 = 1'b1;
      OP_LW:   c.mdr2_ld = 1'b1;
      OP_SW:   c.dm_we   = 1'b1;
      default: c = '0;
    endcase
    return c;
  endfunction

  function automatic wb_ctrl_t rom_wb(input logic [5:0] op);
    wb_ctrl_t c = '0;
    case (op)
      OP_ADD, OP_SUB, OP_AND, OP_XOR, OP_SRL, OP_SLL, OP_SEQ, OP_SLT, OP_SGT,
      OP_ADDI, OP_LHI: c.rd_out2 = 1'b1;
      OP_LW:   c.rd_mdr2  = 1'b1;
      OP_JALR: c.r31_link = 1'b1;
      default: c = '0;
    endcase
    return c;
  endfunction

  id_ctrl_t  prom_id  [64];
  ex_ctrl_t  prom_ex  [64];
  mem_ctrl_t prom_mem [64];
  wb_ctrl_t  prom_wb  [64];

  initial begin
    for (int i = 0; i < 64; i++) begin
      prom_id[i]  = rom_id(6'(i));
      prom_ex[i]  = rom_ex(6'(i));
      prom_mem[i] = rom_mem(6'(i));
      prom_wb[i]  = rom_wb(6'(i));
    end
  end

  assign id_c  = prom_id[op1];
  assign ex_c  = prom_ex[op2];
  assign mem_c = prom_mem[op3];
  assign wb_c  = prom_wb[op4];

endmodule
