// hrisc_regfile -- the HRISC general register file (ID stage).
//
// NREGS registers of W bits. Two read ports serve the ID stage (A from rs,
// B from rs2 = bits 20..16 of IR1); the write port is driven by WB. A third
// read port is for observation from outside the processor.
//
// The document's register file is read and written in opposite halves of
// the clock (write gated with CLK low, read with CLK high), so an instruction
// in ID sees the value written by the instruction in WB in the same cycle.
// Here the array is written on the rising edge and a read whose address
// matches the write in progress returns the write data, which gives the
// same behaviour with a single clock edge. Register 0 always reads zero and
// ignores writes, as in DLX (the document does not say); this makes the
// all-zero word a harmless no-operation. Reads are combinational.
module hrisc_regfile #(
  parameter int unsigned W     = 32,
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic [$clog2(NREGS)-1:0] ra1,
  output logic [W-1:0]             rd1,
  input  logic [$clog2(NREGS)-1:0] ra2,
  output logic [W-1:0]             rd2,
  input  logic [$clog2(NREGS)-1:0] ra3,
  output logic [W-1:0]             rd3,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] wa,
  input  logic [W-1:0]             wd
);
  localparam int unsigned AW = $clog2(NREGS);

  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (we && wa != '0) regs[wa] <= wd;
  end

  function automatic logic [W-1:0] rd(input logic [AW-1:0] ra, input logic [W-1:0] stored,
                                      input logic wr, input logic [AW-1:0] wadr,
                                      input logic [W-1:0] wdat);
    if (ra == '0)              return '0;
    else if (wr && wadr == ra) return wdat;
    else                       return stored;
  endfunction

  assign rd1 = rd(ra1, regs[ra1], we, wa, wd);
  assign rd2 = rd(ra2, regs[ra2], we, wa, wd);
  assign rd3 = rd(ra3, regs[ra3], we, wa, wd);

endmodule
