// tb_hrisc_regfile -- self-checking test of the HRISC register file.
// Random writes and reads on all three read ports against a shadow copy;
// checks that register 0 stays zero and that a read of the register being
// written in the same cycle returns the new value (the split-cycle rule).
module tb_hrisc_regfile;
  logic clk = 0;
  logic [4:0]  ra1, ra2, ra3, wa;
  logic [31:0] rd1, rd2, rd3, wd;
  logic        we;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0, cycles = 0, bypasses = 0;

  hrisc_regfile #(.W(32), .NREGS(32)) dut (.clk, .ra1, .rd1, .ra2, .rd2, .ra3, .rd3,
                                           .we, .wa, .wd);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic logic [31:0] expect_rd(logic [4:0] ra);
    if (ra == 0) return 0;
    if (we && wa == ra) return wd;
    return shadow[ra];
  endfunction

  task automatic cmp(string p, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL port %s got %h exp %h", p, got, exp);
    end
  endtask

  initial begin
    we = 1;
    // initialise every register
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); wa = 5'(i); wd = $urandom; shadow[i] = (i == 0) ? 0 : wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = 5'($urandom); ra3 = 5'($urandom);
      if (i % 5 == 0) ra1 = wa;
      #1;
      if (we && wa == ra1 && wa != 0) bypasses++;
      cmp("1", rd1, expect_rd(ra1));
      cmp("2", rd2, expect_rd(ra2));
      cmp("3", rd3, expect_rd(ra3));
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    checks++;
    if (bypasses == 0) failures++;
    $display("same-cycle reads of the register being written: %0d", bypasses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
