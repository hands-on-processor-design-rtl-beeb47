// tb_hrisc_top -- end-to-end test of the HRISC pipeline at full size.
//
// Loads a program that uses all seventeen instructions (arithmetic, logic,
// shifts, the three set instructions, LHI, loads and stores, a counted loop
// closed by BNEZ, taken and untaken BEQZ/BNEZ, JR, a JALR call and return,
// a useful instruction in a delay slot and instructions that must be
// skipped), runs it three times -- with the microcoded control unit, with
// the hardwired one, and switching between them every few cycles -- and
// compares all registers and the whole data memory with the instruction-
// level model in hrisc_tb_pkg. It also checks the pipeline timing: the
// first instruction writes its result on the fifth clock edge after reset
// and the next three independent instructions follow one per cycle. Every
// mechanism (taken/untaken branches, jumps, link, loads, stores, set,
// shifts, LHI, the register file's same-cycle pass, both control units,
// a switch between them) is counted and must occur.
module tb_hrisc_top;
  import hrisc_pkg::*;
  import hrisc_tb_pkg::*;

  logic        clk = 0;
  logic        rst_n = 0;
  logic        ctl_sel = 0;
  logic        imem_ld_we = 0;
  logic [9:0]  imem_ld_addr = '0;
  logic [31:0] imem_ld_data = '0;
  logic        dm_h_we = 0;
  logic [9:0]  dm_h_addr = '0;
  logic [31:0] dm_h_wdata = '0;
  logic [31:0] dm_h_rdata;
  logic [4:0]  dbg_ra = '0;
  logic [31:0] dbg_rd;
  logic [31:0] pc;

  hrisc_top dut (.*);

  int checks = 0, failures = 0;
  longint cycles = 0;

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 50000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // ---- mechanism counters --------------------------------------------------
  int n_beqz_t, n_beqz_n, n_bnez_t, n_bnez_n, n_jump, n_link, n_load, n_store;
  int n_set, n_shift, n_lhi, n_pass, n_ucode, n_hw, n_switch;
  logic prev_sel = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.br3 == 2'b10) begin if (dut.take) n_beqz_t++; else n_beqz_n++; end
    if (dut.br3 == 2'b11) begin if (dut.take) n_bnez_t++; else n_bnez_n++; end
    if (dut.br3 == 2'b01 && dut.take) n_jump++;
    if (dut.rf_we && dut.wb_c.r31_link) n_link++;
    if (dut.mem_c.mdr2_ld) n_load++;
    if (dut.mem_c.dm_we) n_store++;
    if (dut.ex_c.out3_op) n_set++;
    if (dut.ex_c.sr || dut.ex_c.sl) n_shift++;
    if (dut.ex_c.new_imm) n_lhi++;
    if (dut.rf_we && dut.rf_wa != 0 &&
        (dut.rf_wa == dut.ir1[25:21] || dut.rf_wa == dut.ir1[20:16])) n_pass++;
    if (ctl_sel) n_hw++; else n_ucode++;
    if (ctl_sel != prev_sel) n_switch++;
    prev_sel <= ctl_sel;
  end

  // ---- program ---------------------------------------------------------------
  logic [31:0] prog [int];
  localparam logic [31:0] NOP = 32'h0;

  function automatic logic [15:0] off(int from, int to);
    return 16'(to - (from + 1));
  endfunction

  task automatic build_program();
    prog.delete();
    prog[0]  = itype(OP_ADDI, 0, 1, 16'd5);
    prog[1]  = itype(OP_ADDI, 0, 2, -16'sd3);
    prog[2]  = itype(OP_LHI,  0, 3, 16'h1234);
    prog[3]  = itype(OP_ADDI, 0, 4, 16'd100);
    prog[4]  = rtype(OP_ADD, 1, 2, 5);
    prog[5]  = rtype(OP_SUB, 1, 2, 6);
    prog[6]  = rtype(OP_AND, 3, 4, 7);
    prog[7]  = rtype(OP_XOR, 1, 4, 8);
    prog[8]  = itype(OP_ADDI, 0, 9, 16'd4);
    prog[9]  = NOP;
    prog[10] = NOP;
    prog[11] = rtype(OP_SLL, 1, 9, 10);
    prog[12] = rtype(OP_SRL, 3, 9, 11);
    prog[13] = rtype(OP_SEQ, 1, 1, 12);
    prog[14] = rtype(OP_SEQ, 1, 2, 13);
    prog[15] = rtype(OP_SLT, 2, 1, 14);
    prog[16] = rtype(OP_SLT, 1, 2, 15);
    prog[17] = rtype(OP_SGT, 1, 2, 16);
    prog[18] = rtype(OP_SGT, 2, 1, 17);
    prog[19] = itype(OP_SW, 4, 5, 16'd10);       // DM[110] <- r5
    prog[20] = itype(OP_SW, 9, 3, 16'd0);        // DM[4]   <- r3
    prog[21] = itype(OP_LW, 4, 18, 16'd10);      // r18 <- DM[110]
    prog[22] = itype(OP_LW, 0, 19, 16'd20);      // r19 <- DM[20] (preset)
    prog[23] = itype(OP_ADDI, 0, 20, 16'd3);     // loop counter
    prog[24] = itype(OP_ADDI, 0, 21, 16'd0);     // accumulator
    prog[25] = NOP;
    prog[26] = NOP;
    prog[27] = rtype(OP_ADD, 21, 20, 21);        // loop: acc += counter
    prog[28] = itype(OP_ADDI, 20, 20, -16'sd1);
    prog[29] = NOP;
    prog[30] = NOP;
    prog[31] = itype(OP_BNEZ, 20, 0, off(31, 27));
    prog[32] = NOP; prog[33] = NOP; prog[34] = NOP;
    prog[35] = itype(OP_BEQZ, 0, 0, off(35, 41)); // always taken
    prog[36] = itype(OP_ADDI, 0, 22, 16'd7);      // delay slot: executed
    prog[37] = NOP; prog[38] = NOP;
    prog[39] = itype(OP_ADDI, 0, 23, 16'd99);     // skipped
    prog[40] = itype(OP_ADDI, 0, 23, 16'd98);     // skipped
    prog[41] = itype(OP_BEQZ, 1, 0, off(41, 39)); // not taken
    prog[42] = NOP; prog[43] = NOP; prog[44] = NOP;
    prog[45] = itype(OP_BNEZ, 0, 0, off(45, 39)); // not taken
    prog[46] = NOP; prog[47] = NOP; prog[48] = NOP;
    prog[49] = itype(OP_ADDI, 0, 24, 16'd65);
    prog[50] = itype(OP_ADDI, 0, 25, 16'd70);
    prog[51] = NOP; prog[52] = NOP;
    prog[53] = itype(OP_JALR, 25, 0, 16'd0);      // call 70, link 57
    prog[54] = itype(OP_ADDI, 0, 26, 16'd1);      // delay slot
    prog[55] = NOP; prog[56] = NOP;
    prog[57] = itype(OP_ADDI, 0, 27, 16'd2);      // after return
    prog[58] = itype(OP_JR, 24, 0, 16'd0);        // to 65
    prog[59] = NOP; prog[60] = NOP; prog[61] = NOP;
    prog[62] = itype(OP_ADDI, 0, 28, 16'd55);     // skipped
    prog[65] = itype(OP_BEQZ, 0, 0, off(65, 65)); // halt: loop on itself
    prog[66] = NOP; prog[67] = NOP; prog[68] = NOP;
    prog[70] = itype(OP_ADDI, 31, 29, 16'd0);     // subroutine: r29 <- r31
    prog[71] = NOP;
    prog[72] = NOP;
    prog[73] = itype(OP_JR, 31, 0, 16'd0);        // return
    prog[74] = NOP; prog[75] = NOP; prog[76] = NOP;
  endtask

  task automatic load_all();
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      imem_ld_we = 1; imem_ld_addr = 10'(i);
      imem_ld_data = prog.exists(i) ? prog[i] : NOP;
      dm_h_we = 1; dm_h_addr = 10'(i); dm_h_wdata = (i == 20) ? 32'hCAFE_BABE : 32'h0;
    end
    @(negedge clk);
    imem_ld_we = 0; dm_h_we = 0;
  endtask

  // mode: 0 microcoded, 1 hardwired, 2 switching every 3 cycles
  task automatic run(int mode);
    isa_model m;
    int first_wr;
    int edge_no;
    m = new();
    foreach (prog[a]) m.im[a] = prog[a];
    m.dm[20] = 32'hCAFE_BABE;
    while (m.executed < 2000 && !(m.pc == 65 && m.pending == 0 && m.executed > 100)) m.step();

    rst_n = 0;
    ctl_sel = (mode == 1);
    load_all();
    repeat (2) @(negedge clk);
    rst_n = 1;
    first_wr = -1;
    edge_no = 0;
    for (int c = 0; c < 400; c++) begin
      @(posedge clk);
      edge_no++;
      if (edge_no <= 8 && dut.rf_we && dut.rf_wa != 0) begin
        if (first_wr < 0) first_wr = edge_no;
      end
      if (mode == 0 || mode == 1) begin
        if (edge_no >= 5 && edge_no <= 8) begin
          checks++;
          if (!(dut.rf_we && dut.rf_wa == 5'(edge_no - 4))) begin
            failures++;
            $display("FAIL mode %0d: no write of r%0d at edge %0d", mode, edge_no - 4, edge_no);
          end
        end
      end
      @(negedge clk);
      if (mode == 2 && c % 3 == 2) ctl_sel = ~ctl_sel;
    end
    checks++;
    if (first_wr != 5) begin
      failures++;
      $display("FAIL mode %0d: first write-back at edge %0d, expected 5", mode, first_wr);
    end
    checks++;
    if (pc < 65 || pc > 69) begin
      failures++;
      $display("FAIL mode %0d: not in the final loop, pc=%0d", mode, pc);
    end
    for (int r = 0; r < 32; r++) begin
      if (!m.written[r]) continue;
      dbg_ra = 5'(r);
      #1;
      checks++;
      if (dbg_rd !== m.r[r]) begin
        failures++;
        $display("FAIL mode %0d: r%0d = %h, expected %h", mode, r, dbg_rd, m.r[r]);
      end
    end
    for (int a = 0; a < 1024; a++) begin
      dm_h_addr = 10'(a);
      #1;
      checks++;
      if (dm_h_rdata !== m.rdm(a)) begin
        failures++;
        $display("FAIL mode %0d: DM[%0d] = %h, expected %h", mode, a, dm_h_rdata, m.rdm(a));
      end
    end
    $display("mode %0d: model executed %0d instructions; r21=%0d r29=%0d", mode,
             m.executed, m.r[21], m.r[29]);
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    build_program();
    run(0);
    run(1);
    run(2);
    $display("mechanism counts:");
    need("BEQZ taken", n_beqz_t);
    need("BEQZ not taken", n_beqz_n);
    need("BNEZ taken", n_bnez_t);
    need("BNEZ not taken", n_bnez_n);
    need("JR/JALR", n_jump);
    need("R31 <- LINK3", n_link);
    need("load MDR2 <- DM[MAR]", n_load);
    need("store DM[MAR] <- MDR1", n_store);
    need("OUT3 set result", n_set);
    need("shift SR/SL", n_shift);
    need("NEW (LHI)", n_lhi);
    need("register file same-cycle pass", n_pass);
    need("cycles under microcoded control", n_ucode);
    need("cycles under hardwired control", n_hw);
    need("control unit switches", n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
