// hrisc_pkg -- shared types and constants of the HRISC five-stage pipeline.
//
// HRISC is a 17-instruction subset of DLX meant to be built from TTL parts.
// Instructions are 32 bits wide. The opcode is the top six bits, named
// a b c d e f from bit 31 down to bit 26. Bit a tells the two formats apart:
//   R-type (a=0): op | rs[25:21] | rt[20:16] | rd[15:11] | control word[10:0]
//   I-type (a=1): op | rs[25:21] | rd[20:16] | immediate[15:0]
// Bits e,f of an R-type opcode select the result path (10 ALU, 00 shift,
// 11 set). Bits b,c,d of an I-type opcode are decoded into eight instructions.
// Within those constraints the exact opcode values below are this design's
// own choice; the R-type bcd bits are made distinct so that a PROM addressed
// by the opcode alone (the microcoded control unit) can tell all 17 apart.
//
// An R-type instruction carries its own EX-stage control lines in bits 10..0
// (the hardwired control unit gates them straight to the datapath):
//   [10:7] S3-S0  ALU function select      [6] Cn   ALU carry / compare sense
//   [5]    M      logic (1) / arith (0)     [4] OUT1 <- A op B
//   [3]    OUT3 <- A op B (set result)      [2] SETF (0 equal, 1 ordered)
//   [1]    SL     shift left                [0] SR   shift right
// A program word of all zeros is a no-operation.
package hrisc_pkg;

  localparam int unsigned XLEN = 32;

  // ---- opcodes -----------------------------------------------------------
  typedef enum logic [5:0] {
    OP_ADD  = 6'b000010,
    OP_SUB  = 6'b000110,
    OP_AND  = 6'b001010,
    OP_XOR  = 6'b001110,
    OP_SRL  = 6'b001000,
    OP_SLL  = 6'b001100,
    OP_SEQ  = 6'b000011,
    OP_SLT  = 6'b000111,
    OP_SGT  = 6'b001011,
    OP_LW   = 6'b100000,
    OP_SW   = 6'b100100,
    OP_ADDI = 6'b101000,
    OP_LHI  = 6'b101100,
    OP_BEQZ = 6'b110000,
    OP_BNEZ = 6'b110100,
    OP_JR   = 6'b111000,
    OP_JALR = 6'b111100
  } opcode_e;

  // ---- R-type control words (bits 10..0 of the instruction) --------------
  localparam logic [10:0] CW_ADD = 11'b0001_1_0_1_0_0_0_0;
  localparam logic [10:0] CW_SUB = 11'b0110_1_0_1_0_0_0_0;
  localparam logic [10:0] CW_AND = 11'b1011_0_1_1_0_0_0_0;
  localparam logic [10:0] CW_XOR = 11'b0110_0_1_1_0_0_0_0;
  localparam logic [10:0] CW_SRL = 11'b0000_0_0_0_0_0_0_1;
  localparam logic [10:0] CW_SLL = 11'b0000_0_0_0_0_0_1_0;
  localparam logic [10:0] CW_SEQ = 11'b0110_1_0_0_1_0_0_0;
  localparam logic [10:0] CW_SLT = 11'b0110_0_0_0_1_1_0_0;
  localparam logic [10:0] CW_SGT = 11'b0110_1_0_0_1_1_0_0;

  // ---- ALU function codes -------------------------------------------------
  localparam logic [3:0] S_PASS = 4'b0000;  // arithmetic mode: F = A
  localparam logic [3:0] S_ADD  = 4'b0001;  // arithmetic mode: F = A + B
  localparam logic [3:0] S_SUB  = 4'b0110;  // arithmetic mode: F = A - B
  localparam logic [3:0] S_AND  = 4'b1011;  // logic mode: F = A & B
  localparam logic [3:0] S_XOR  = 4'b0110;  // logic mode: F = A ^ B

  // ---- control lines of each stage -----------------------------------------
  // ID: b1,b2 = 10 BEQZ, 11 BNEZ, 01 JR/JALR, 00 anything else.
  typedef struct packed {
    logic b1;
    logic b2;
  } id_ctrl_t;

  typedef struct packed {
    logic [3:0] s;        // S3-S0
    logic       cn;       // Cn
    logic       m;        // M
    logic       out1_op;  // OUT1 <- A op (B or IMM)
    logic       out3_op;  // OUT3 <- A op B (set result)
    logic       setf;     // SETF
    logic       sl;       // SL
    logic       sr;       // SR
    logic       eb;       // second ALU operand: 1 immediate, 0 register B
    logic       new_imm;  // NEW: immediate placed in the upper half (LHI)
    logic       ea;       // first ALU operand: 1 PC2, 0 register A
    logic       out1_tgt; // OUT1 <- transfer target (branch or jump)
    logic       cond_ld;  // COND <- Z
    logic       mar_ld;   // MAR <- A + IMM
    logic       mdr1_ld;  // MDR1 <- B
  } ex_ctrl_t;

  typedef struct packed {
    logic out2_out1;  // OUT2 <- OUT1
    logic out2_out3;  // OUT2 <- OUT3
    logic mdr2_ld;    // MDR2 <- DM[MAR]
    logic dm_we;      // DM[MAR] <- MDR1
  } mem_ctrl_t;

  typedef struct packed {
    logic rd_out2;    // RD <- OUT2
    logic rd_mdr2;    // RD <- MDR2
    logic r31_link;   // R31 <- LINK3
  } wb_ctrl_t;

  // Number of instructions after a branch or jump that are fetched and
  // executed before the new PC takes effect (the transfer resolves in MEM).
  localparam int unsigned DELAY_SLOTS = 3;

  // ---- instruction builders (used by testbenches and program loaders) ----
  function automatic logic [31:0] rtype(opcode_e op, logic [4:0] rs, logic [4:0] rt,
                                        logic [4:0] rd);
    logic [10:0] cw;
    case (op)
      OP_ADD:  cw = CW_ADD;
      OP_SUB:  cw = CW_SUB;
      OP_AND:  cw = CW_AND;
      OP_XOR:  cw = CW_XOR;
      OP_SRL:  cw = CW_SRL;
      OP_SLL:  cw = CW_SLL;
      OP_SEQ:  cw = CW_SEQ;
      OP_SLT:  cw = CW_SLT;
      OP_SGT:  cw = CW_SGT;
      default: cw = '0;
    endcase
    return {op, rs, rt, rd, cw};
  endfunction

  function automatic logic [31:0] itype(opcode_e op, logic [4:0] rs, logic [4:0] rd,
                                        logic [15:0] imm);
    return {op, rs, rd, imm};
  endfunction

endpackage
