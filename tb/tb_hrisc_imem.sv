// tb_hrisc_imem -- self-checking test of the HRISC instruction memory.
// Loads random words through the load port and reads them back through the
// fetch port, all 1024 words, in a scrambled order.
module tb_hrisc_imem;
  logic clk = 0;
  logic [9:0]  addr, ld_addr;
  logic [31:0] rdata, ld_data;
  logic        ld_we;
  logic [31:0] ref_mem [1024];
  int checks = 0, failures = 0, cycles = 0;

  hrisc_imem #(.WORDS(1024)) dut (.clk, .addr, .rdata, .ld_we, .ld_addr, .ld_data);

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
    ld_we = 1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); ld_addr = 10'(i); ld_data = $urandom ^ i; ref_mem[i] = ld_data;
    end
    @(negedge clk); ld_we = 0;
    for (int i = 0; i < 1024; i++) begin
      addr = 10'((i * 37 + 11) % 1024);
      #1;
      checks++;
      if (rdata !== ref_mem[addr]) begin
        failures++;
        $display("FAIL addr %0d got %h exp %h", addr, rdata, ref_mem[addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
