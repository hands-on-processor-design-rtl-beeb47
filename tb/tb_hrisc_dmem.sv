// tb_hrisc_dmem -- self-checking test of the HRISC data memory.
// Random stores from the processor port and from the host port (host wins a
// same-cycle collision), checked through both read ports against a model.
module tb_hrisc_dmem;
  logic clk = 0;
  logic [9:0]  addr, h_addr;
  logic [31:0] wdata, rdata, h_wdata, h_rdata;
  logic        we, h_we;
  logic [31:0] ref_mem [1024];
  int checks = 0, failures = 0, cycles = 0;

  hrisc_dmem #(.WORDS(1024)) dut (.clk, .addr, .we, .wdata, .rdata, .h_addr, .h_we,
                                  .h_wdata, .h_rdata);

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
    we = 0; h_we = 1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); h_addr = 10'(i); h_wdata = $urandom; ref_mem[i] = h_wdata;
    end
    @(negedge clk); h_we = 0;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      addr = 10'($urandom); h_addr = 10'($urandom);
      if (i % 9 == 0) h_addr = addr;
      we = $urandom_range(0, 1); h_we = ($urandom_range(0, 3) == 0);
      wdata = $urandom; h_wdata = $urandom;
      #1;
      checks += 2;
      if (rdata !== ref_mem[addr]) begin failures++; $display("FAIL rdata @%0d", addr); end
      if (h_rdata !== ref_mem[h_addr]) begin failures++; $display("FAIL h_rdata @%0d", h_addr); end
      @(posedge clk);
      if (h_we) ref_mem[h_addr] = h_wdata;
      else if (we) ref_mem[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
