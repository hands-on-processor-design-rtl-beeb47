// tb_hrisc_random -- random-program test of the HRISC pipeline.
//
// Generates programs of about 900 random instructions that obey the
// scheduling rules of the pipeline: no source register was written by
// either of the two previous instructions, and forward BEQZ/BNEZ branches
// have three random non-transfer instructions in their delay slots and two
// no-ops at their target. A prologue gives every register a value; the data
// memory is preset with random words. Each program runs under the
// microcoded and under the hardwired control unit, and the registers and the
// data memory are compared with the instruction-level model.
module tb_hrisc_random;
  import hrisc_pkg::*;
  import hrisc_tb_pkg::*;

  localparam int NPROG = 40;
  localparam int HALT  = 1000;

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

  int checks = 0, failures = 0, n_taken = 0, n_branches = 0;
  longint cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (rst_n && dut.br3[1]) begin n_branches++; if (dut.take) n_taken++; end
    if (cycles > 200000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  logic [31:0] prog [1024];
  logic [31:0] dinit [1024];
  logic [4:0]  last1, last2;   // destinations of the two previous instructions

  function automatic logic [4:0] src();
    logic [4:0] r;
    do r = 5'($urandom); while (r == last1 || r == last2);
    return r;
  endfunction

  function automatic logic [31:0] rand_plain(output logic [4:0] dst);
    opcode_e ops [13] = '{OP_ADD, OP_SUB, OP_AND, OP_XOR, OP_SRL, OP_SLL, OP_SEQ, OP_SLT,
                          OP_SGT, OP_LW, OP_SW, OP_ADDI, OP_LHI};
    opcode_e op;
    logic [4:0] rs, rt, rd;
    op = ops[$urandom_range(0, 12)];
    rs = src(); rt = src(); rd = 5'($urandom_range(1, 30));
    dst = 0;
    case (op)
      OP_SW:  return itype(op, rs, rt, 16'($urandom));
      OP_LW, OP_ADDI: begin dst = rd; return itype(op, rs, rd, 16'($urandom)); end
      OP_LHI: begin dst = rd; return itype(op, 5'(0), rd, 16'($urandom)); end
      default: begin dst = rd; return rtype(op, rs, rt, rd); end
    endcase
  endfunction

  task automatic emit(inout int a, input logic [31:0] w, input logic [4:0] dst);
    prog[a] = w; a++;
    last2 = last1; last1 = dst;
  endtask

  task automatic gen();
    int a;
    logic [4:0] d;
    foreach (prog[i]) prog[i] = 32'h0;
    foreach (dinit[i]) dinit[i] = $urandom;
    a = 0; last1 = 0; last2 = 0;
    for (int r = 1; r < 32; r++) emit(a, itype(OP_ADDI, 0, 5'(r), 16'($urandom)), 5'(r));
    emit(a, 0, 0); emit(a, 0, 0);
    while (a < HALT - 20) begin
      if ($urandom_range(0, 9) == 0) begin
        int k = $urandom_range(0, 4);
        opcode_e bop = $urandom_range(0, 1) ? OP_BEQZ : OP_BNEZ;
        logic [4:0] cr = src();
        if ($urandom_range(0, 3) == 0) cr = 0;     // always / never taken
        emit(a, itype(bop, cr, 0, 16'(3 + k)), 0);
        for (int j = 0; j < 3 + k; j++) begin
          logic [31:0] w = rand_plain(d);
          emit(a, w, d);
        end
        emit(a, 0, 0); emit(a, 0, 0);               // branch target
      end else begin
        logic [31:0] w = rand_plain(d);
        emit(a, w, d);
      end
    end
    prog[HALT] = itype(OP_BEQZ, 0, 0, 16'hffff);   // loop on itself
  endtask

  task automatic run(bit sel);
    isa_model m;
    m = new();
    foreach (prog[i]) if (prog[i] != 0) m.im[i] = prog[i];
    foreach (dinit[i]) m.dm[i] = dinit[i];
    while (m.executed < 5000 && !(m.pc == HALT && m.pending == 0)) m.step();
    rst_n = 0; ctl_sel = sel;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      imem_ld_we = 1; imem_ld_addr = 10'(i); imem_ld_data = prog[i];
      dm_h_we = 1; dm_h_addr = 10'(i); dm_h_wdata = dinit[i];
    end
    @(negedge clk);
    imem_ld_we = 0; dm_h_we = 0;
    @(negedge clk);
    rst_n = 1;
    repeat (m.executed + 40) @(negedge clk);
    checks++;
    if (pc < HALT || pc > HALT + 4) begin
      failures++; $display("FAIL sel %0d: pc=%0d not in the final loop", sel, pc);
    end
    for (int r = 0; r < 32; r++) begin
      dbg_ra = 5'(r); #1;
      checks++;
      if (dbg_rd !== m.r[r]) begin
        failures++; $display("FAIL sel %0d: r%0d=%h expected %h", sel, r, dbg_rd, m.r[r]);
      end
    end
    for (int i = 0; i < 1024; i++) begin
      dm_h_addr = 10'(i); #1;
      checks++;
      if (dm_h_rdata !== m.rdm(i)) begin
        failures++; $display("FAIL sel %0d: DM[%0d]=%h expected %h", sel, i, dm_h_rdata, m.rdm(i));
      end
    end
  endtask

  initial begin
    for (int p = 0; p < NPROG; p++) begin
      gen();
      run(0);
      run(1);
    end
    checks++;
    if (n_taken == 0 || n_taken == n_branches) failures++;
    $display("branches %0d, taken %0d", n_branches, n_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
