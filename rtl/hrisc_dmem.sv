// hrisc_dmem -- HRISC data memory (MEM stage).
//
// WORDS words of 32 bits, word addressed by MAR. A load reads combinationally
// and the MEM stage captures the word in MDR2 ("MDR2 <- DM[MAR]"); a store
// writes MDR1 on the clock edge when we is high ("DM[MAR] <- MDR1").
// A second port (h_*) lets the surroundings preset and inspect the memory:
// its read is combinational, and its write takes precedence over the
// processor's write in the same cycle. Size and host port are this design's
// choices; the document only names the memory.
module hrisc_dmem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  input  logic [$clog2(WORDS)-1:0] h_addr,
  input  logic        h_we,
  input  logic [31:0] h_wdata,
  output logic [31:0] h_rdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (h_we)    mem[h_addr] <= h_wdata;
    else if (we) mem[addr]   <= wdata;
  end

  assign rdata   = mem[addr];
  assign h_rdata = mem[h_addr];

endmodule
