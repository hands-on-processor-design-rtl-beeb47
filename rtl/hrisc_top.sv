// hrisc_top -- five-stage pipelined HRISC processor.
//
// Stages and their registers (a register named with stage number n is
// loaded at the end of that stage):
//   IF : IR1 <- IM[PC1];  PC1 <- PC1 + 1, or the transfer target in OUT1.
//   ID : IR2 <- IR1; A <- R[rs]; B <- R[IR1 bits 20..16]; PC2 <- PC1.
//   EX : IR3 <- IR2; OUT1 <- A op (B or IMM) or the branch/jump target;
//        OUT3 <- set result; COND <- (A == 0); MAR <- A + IMM; MDR1 <- B.
//   MEM: IR4 <- IR3; OUT2 <- OUT1 or OUT3; MDR2 <- DM[MAR] or
//        DM[MAR] <- MDR1.
//   WB : RD <- OUT2 or MDR2, or R31 <- LINK3.
// Each stage takes its control lines from the instruction register of that
// stage, either through the per-stage PROMs (hrisc_ctrl_ucode) or through
// gates (hrisc_ctrl_hw). Both units are built; the ctl_sel input picks the
// one that drives the datapath (0 microcoded, 1 hardwired) and may be
// changed between instructions, since both give the same lines for every
// defined instruction.
//
// Transfers of control: the branch target (PC2 + offset) or the jump
// target (register A) is computed in EX into OUT1 and COND is set there;
// in MEM the PC multiplexer takes OUT1 when b1,b2 of that instruction and
// COND say so (b1 b2 = 10 BEQZ taken if COND, 11 BNEZ taken if not COND,
// 01 JR/JALR always). The three instructions after a branch or jump are
// fetched before the new PC takes effect and are executed (delay slots);
// a transfer must not sit in another transfer's delay slots. JALR writes
// R31 with the address of the first instruction after its delay slots.
//
// Hazards: none are detected and nothing is forwarded apart from the
// register file's same-cycle write-to-read path. A result can be read by
// the third instruction after its producer (two independent instructions
// or no-ops in between); software schedules for this. Offsets and the
// ADDI immediate are sign-extended, LHI places its immediate in the upper
// half and adds register rs (use R0 for a plain load-high).
//
// The document gives the stages, the registers and their transfers, the
// PC path and the control lines; the delay-slot behaviour, the scheduling
// rule, the link value, reset, the memory sizes and the load/inspection
// ports are this design's choices.
//
// Assertions check that both control units agree on the opcode-only lines
// and that no transfer sits in another transfer's delay slots.
//
// Ports: clk, rst_n (synchronous, active low: PC1 and all pipeline
// registers cleared, i.e. filled with no-ops); ctl_sel; imem_ld_* writes
// the instruction memory; dm_h_* presets/reads the data memory; dbg_ra/
// dbg_rd read a register; pc shows PC1.
module hrisc_top
  import hrisc_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          ctl_sel,
  input  logic                          imem_ld_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] imem_ld_addr,
  input  logic [31:0]                   imem_ld_data,
  input  logic                          dm_h_we,
  input  logic [$clog2(DMEM_WORDS)-1:0] dm_h_addr,
  input  logic [31:0]                   dm_h_wdata,
  output logic [31:0]                   dm_h_rdata,
  input  logic [4:0]                    dbg_ra,
  output logic [31:0]                   dbg_rd,
  output logic [31:0]                   pc
);
  localparam int unsigned IAW = $clog2(IMEM_WORDS);
  localparam int unsigned DAW = $clog2(DMEM_WORDS);

  // ---- pipeline registers ---------------------------------------------------
  logic [31:0] pc1, ir1;                          // IF
  logic [31:0] ir2, a_q, b_q, pc2;                // ID
  id_ctrl_t    br2;
  logic [31:0] ir3, out1, out3, mar, mdr1, link2; // EX
  logic        cond;
  id_ctrl_t    br3;
  logic [31:0] ir4, out2, mdr2, link3;            // MEM

  // ---- control ------------------------------------------------------------
  id_ctrl_t  id_u, id_h, id_c;
  ex_ctrl_t  ex_u, ex_h, ex_c;
  mem_ctrl_t mem_u, mem_h, mem_c;
  wb_ctrl_t  wb_u, wb_h, wb_c;

  hrisc_ctrl_ucode u_ucode (
    .op1(ir1[31:26]), .op2(ir2[31:26]), .op3(ir3[31:26]), .op4(ir4[31:26]),
    .id_c(id_u), .ex_c(ex_u), .mem_c(mem_u), .wb_c(wb_u)
  );

  hrisc_ctrl_hw u_hw (
    .op1(ir1[31:26]), .op2(ir2[31:26]), .cw2(ir2[10:0]), .op3(ir3[31:26]),
    .op4(ir4[31:26]),
    .id_c(id_h), .ex_c(ex_h), .mem_c(mem_h), .wb_c(wb_h)
  );

  assign id_c  = ctl_sel ? id_h  : id_u;
  assign ex_c  = ctl_sel ? ex_h  : ex_u;
  assign mem_c = ctl_sel ? mem_h : mem_u;
  assign wb_c  = ctl_sel ? wb_h  : wb_u;

  // ---- IF -------------------------------------------------------------------
  logic [31:0] im_rdata;
  logic        take;

  hrisc_imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk(clk), .addr(pc1[IAW-1:0]), .rdata(im_rdata),
    .ld_we(imem_ld_we), .ld_addr(imem_ld_addr), .ld_data(imem_ld_data)
  );

  // PC multiplexer select, from b1,b2 of the instruction in MEM and COND.
  assign take = br3.b1 ? (br3.b2 ^ cond) : br3.b2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc1 <= '0;
      ir1 <= '0;
    end else begin
      pc1 <= take ? out1 : pc1 + 32'd1;
      ir1 <= im_rdata;
    end
  end

  // ---- ID -------------------------------------------------------------------
  logic [31:0] rf_rd1, rf_rd2, rf_wd;
  logic [4:0]  rf_wa;
  logic        rf_we;

  hrisc_regfile #(.W(32), .NREGS(32)) u_rf (
    .clk(clk),
    .ra1(ir1[25:21]), .rd1(rf_rd1),
    .ra2(ir1[20:16]), .rd2(rf_rd2),
    .ra3(dbg_ra),     .rd3(dbg_rd),
    .we(rf_we), .wa(rf_wa), .wd(rf_wd)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ir2 <= '0;
      a_q <= '0;
      b_q <= '0;
      pc2 <= '0;
      br2 <= '0;
    end else begin
      ir2 <= ir1;
      a_q <= rf_rd1;
      b_q <= rf_rd2;
      pc2 <= pc1;
      br2 <= id_c;
    end
  end

  // ---- EX -------------------------------------------------------------------
  logic [31:0] imm, opa, opb, alu_f;
  logic        alu_set;

  assign imm = ex_c.new_imm ? {ir2[15:0], 16'h0000} : {{16{ir2[15]}}, ir2[15:0]};
  assign opa = ex_c.ea ? pc2 : a_q;
  assign opb = ex_c.eb ? imm : b_q;

  hrisc_alu #(.W(32)) u_alu (
    .a(opa), .b(opb), .s(ex_c.s), .cn(ex_c.cn), .m(ex_c.m),
    .sr(ex_c.sr), .sl(ex_c.sl), .setf(ex_c.setf),
    .f(alu_f), .set(alu_set)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ir3   <= '0;
      out1  <= '0;
      out3  <= '0;
      cond  <= 1'b0;
      mar   <= '0;
      mdr1  <= '0;
      link2 <= '0;
      br3   <= '0;
    end else begin
      ir3   <= ir2;
      br3   <= br2;
      link2 <= pc2 + 32'(DELAY_SLOTS);
      if (ex_c.out1_op || ex_c.out1_tgt || ex_c.sr || ex_c.sl) out1 <= alu_f;
      if (ex_c.out3_op) out3 <= {31'b0, alu_set};
      if (ex_c.cond_ld) cond <= (a_q == '0);
      if (ex_c.mar_ld)  mar  <= alu_f;
      if (ex_c.mdr1_ld) mdr1 <= b_q;
    end
  end

  // ---- MEM ------------------------------------------------------------------
  logic [31:0] dm_rdata;

  hrisc_dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk(clk), .addr(mar[DAW-1:0]), .we(mem_c.dm_we && rst_n), .wdata(mdr1),
    .rdata(dm_rdata),
    .h_addr(dm_h_addr), .h_we(dm_h_we), .h_wdata(dm_h_wdata), .h_rdata(dm_h_rdata)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ir4   <= '0;
      out2  <= '0;
      mdr2  <= '0;
      link3 <= '0;
    end else begin
      ir4   <= ir3;
      link3 <= link2;
      if (mem_c.out2_out1)      out2 <= out1;
      else if (mem_c.out2_out3) out2 <= out3;
      if (mem_c.mdr2_ld) mdr2 <= dm_rdata;
    end
  end

  // ---- WB -------------------------------------------------------------------
  assign rf_we = rst_n && (wb_c.rd_out2 || wb_c.rd_mdr2 || wb_c.r31_link);
  assign rf_wa = wb_c.r31_link ? 5'd31 : (ir4[31] ? ir4[20:16] : ir4[15:11]);
  assign rf_wd = wb_c.r31_link ? link3 : (wb_c.rd_mdr2 ? mdr2 : out2);

  assign pc = pc1;

  // ---- rules checked in simulation -------------------------------------------
  function automatic logic defined_op(input logic [5:0] op);
    return op inside {OP_ADD, OP_SUB, OP_AND, OP_XOR, OP_SRL, OP_SLL, OP_SEQ, OP_SLT,
                      OP_SGT, OP_LW, OP_SW, OP_ADDI, OP_LHI, OP_BEQZ, OP_BNEZ, OP_JR,
                      OP_JALR};
  endfunction

  // The two control units agree on every line that depends on the opcode
  // alone, for the seventeen defined instructions.
  a_id_agree: assert property (@(posedge clk) disable iff (!rst_n)
    defined_op(ir1[31:26]) |-> id_u == id_h);
  a_mem_agree: assert property (@(posedge clk) disable iff (!rst_n)
    defined_op(ir3[31:26]) |-> mem_u == mem_h);
  a_wb_agree: assert property (@(posedge clk) disable iff (!rst_n)
    defined_op(ir4[31:26]) |-> wb_u == wb_h);

  // Programming rule: no branch or jump in the delay slots of another one.
  a_no_transfer_in_delay_slot: assert property (@(posedge clk) disable iff (!rst_n)
    (br3 != '0) |-> (br2 == '0 && id_c == '0));

endmodule
