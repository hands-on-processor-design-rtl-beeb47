// hrisc_tb_pkg -- reference models shared by the HRISC testbenches.
//
// exp_* : the control lines each stage must produce for each of the
//         seventeen instructions, written out instruction by instruction
//         from the HRISC control tables (independently of the RTL PROMs).
// isa_model : an instruction-level model of HRISC. It executes one
//         instruction at a time in program order; a taken branch or jump
//         takes effect after the three delay-slot instructions that follow
//         it, and JALR links to the instruction after those slots. Registers
//         never written are undefined in the hardware (no reset); written[]
//         marks the ones a comparison may use.
package hrisc_tb_pkg;
  import hrisc_pkg::*;

  function automatic id_ctrl_t exp_id(opcode_e op);
    id_ctrl_t c = '0;
    if (op == OP_BEQZ) c.b1 = 1'b1;
    if (op == OP_BNEZ) begin c.b1 = 1'b1; c.b2 = 1'b1; end
    if (op == OP_JR || op == OP_JALR) c.b2 = 1'b1;
    return c;
  endfunction

  function automatic ex_ctrl_t exp_ex(opcode_e op);
    ex_ctrl_t c = '0;
    case (op)
      OP_ADD:  begin c.s = 4'b0001; c.cn = 1; c.out1_op = 1; end
      OP_SUB:  begin c.s = 4'b0110; c.cn = 1; c.out1_op = 1; end
      OP_AND:  begin c.s = 4'b1011; c.m = 1; c.out1_op = 1; end
      OP_XOR:  begin c.s = 4'b0110; c.m = 1; c.out1_op = 1; end
      OP_SRL:  c.sr = 1;
      OP_SLL:  c.sl = 1;
      OP_SEQ:  begin c.s = 4'b0110; c.cn = 1; c.out3_op = 1; end
      OP_SLT:  begin c.s = 4'b0110; c.out3_op = 1; c.setf = 1; end
      OP_SGT:  begin c.s = 4'b0110; c.cn = 1; c.out3_op = 1; c.setf = 1; end
      OP_ADDI: begin c.s = 4'b0001; c.cn = 1; c.out1_op = 1; c.eb = 1; end
      OP_LHI:  begin c.s = 4'b0001; c.cn = 1; c.out1_op = 1; c.eb = 1; c.new_imm = 1; end
      OP_LW:   begin c.s = 4'b0001; c.cn = 1; c.eb = 1; c.mar_ld = 1; end
      OP_SW:   begin c.s = 4'b0001; c.cn = 1; c.eb = 1; c.mar_ld = 1; c.mdr1_ld = 1; end
      OP_BEQZ, OP_BNEZ: begin
        c.s = 4'b0001; c.cn = 1; c.eb = 1; c.ea = 1; c.out1_tgt = 1; c.cond_ld = 1;
      end
      OP_JR, OP_JALR: c.out1_tgt = 1;
      default: ;
    endcase
    return c;
  endfunction

  function automatic mem_ctrl_t exp_mem(opcode_e op);
    mem_ctrl_t c = '0;
    case (op)
      OP_ADD, OP_SUB, OP_AND, OP_XOR, OP_SRL, OP_SLL, OP_ADDI, OP_LHI: c.out2_out1 = 1;
      OP_SEQ, OP_SLT, OP_SGT: c.out2_out3 = 1;
      OP_LW: c.mdr2_ld = 1;
      OP_SW: c.dm_we = 1;
      default: ;
    endcase
    return c;
  endfunction

  function automatic wb_ctrl_t exp_wb(opcode_e op);
    wb_ctrl_t c = '0;
    case (op)
      OP_LW:   c.rd_mdr2 = 1;
      OP_SW, OP_BEQZ, OP_BNEZ, OP_JR: ;
      OP_JALR: c.r31_link = 1;
      default: c.rd_out2 = 1;
    endcase
    return c;
  endfunction

  localparam opcode_e ALL_OPS [17] = '{OP_ADD, OP_SUB, OP_AND, OP_XOR, OP_SRL, OP_SLL,
    OP_SEQ, OP_SLT, OP_SGT, OP_LW, OP_SW, OP_ADDI, OP_LHI, OP_BEQZ, OP_BNEZ, OP_JR, OP_JALR};

  class isa_model;
    logic [31:0] r   [32];
    bit          written [32];  // registers the program has written
    logic [31:0] dm  [int];
    logic [31:0] im  [int];
    logic [31:0] pc;
    int          pending;   // delay-slot instructions left before redirect (0 none)
    logic [31:0] target;
    int          executed;

    function new();
      foreach (r[i]) begin r[i] = '0; written[i] = 0; end
      written[0] = 1;
      pc = 0; pending = 0; target = 0; executed = 0;
    endfunction

    function logic [31:0] rdm(logic [31:0] a);
      return dm.exists(a) ? dm[a] : 32'h0;
    endfunction

    function void step();
      logic [31:0] ins, av, bv, imm, res;
      logic [4:0]  rs, rt, rdr, rdi;
      logic        redirect;
      logic [31:0] tgt;
      opcode_e     op;
      ins = im.exists(pc) ? im[pc] : 32'h0;
      op  = opcode_e'(ins[31:26]);
      rs = ins[25:21]; rt = ins[20:16]; rdr = ins[15:11]; rdi = ins[20:16];
      av = r[rs]; bv = r[rt];
      imm = {{16{ins[15]}}, ins[15:0]};
      redirect = 0; tgt = 0;
      case (op)
        OP_ADD:  r[rdr] = av + bv;
        OP_SUB:  r[rdr] = av - bv;
        OP_AND:  r[rdr] = av & bv;
        OP_XOR:  r[rdr] = av ^ bv;
        OP_SRL:  r[rdr] = av >> bv[4:0];
        OP_SLL:  r[rdr] = av << bv[4:0];
        OP_SEQ:  r[rdr] = (av == bv) ? 1 : 0;
        OP_SLT:  r[rdr] = ($signed(av) < $signed(bv)) ? 1 : 0;
        OP_SGT:  r[rdr] = ($signed(av) > $signed(bv)) ? 1 : 0;
        OP_ADDI: r[rdi] = av + imm;
        OP_LHI:  r[rdi] = av + {ins[15:0], 16'h0};
        OP_LW:   r[rdi] = rdm((av + imm) & 32'h3ff);
        OP_SW:   dm[(av + imm) & 32'h3ff] = bv;
        OP_BEQZ: if (av == 0) begin redirect = 1; tgt = pc + 1 + imm; end
        OP_BNEZ: if (av != 0) begin redirect = 1; tgt = pc + 1 + imm; end
        OP_JR:   begin redirect = 1; tgt = av; end
        OP_JALR: begin redirect = 1; tgt = av; r[31] = pc + 4; end
        default: ;
      endcase
      case (op)
        OP_ADD, OP_SUB, OP_AND, OP_XOR, OP_SRL, OP_SLL, OP_SEQ, OP_SLT, OP_SGT: written[rdr] = 1;
        OP_ADDI, OP_LHI, OP_LW: written[rdi] = 1;
        OP_JALR: written[31] = 1;
        default: ;
      endcase
      r[0] = '0;
      executed++;
      if (pending > 0) begin
        pending--;
        pc = (pending == 0) ? target : pc + 1;
      end else begin
        pc = pc + 1;
      end
      if (redirect) begin pending = 3; target = tgt; end
    endfunction
  endclass

endpackage
