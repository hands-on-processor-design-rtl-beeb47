// hrisc_imem -- HRISC instruction memory (IF stage).
//
// WORDS words of 32 bits, word addressed: the PC counts instructions and is
// incremented by one. The read port is combinational; the IF stage captures
// its output in IR1 on the clock edge, as the document's "IR1 <- IM[PC1]"
// register does. The address is the low bits of the PC.
// The program is written through a separate synchronous load port (ld_*),
// which stands in for programming the memory chips before a run; the size
// and the load port are this design's choices.
module hrisc_imem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  output logic [31:0] rdata,
  input  logic        ld_we,
  input  logic [$clog2(WORDS)-1:0] ld_addr,
  input  logic [31:0] ld_data
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
  end

  assign rdata = mem[addr];

endmodule
