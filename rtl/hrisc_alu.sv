// hrisc_alu -- execution unit of the HRISC EX stage.
//
// Combinational. It is steered by the EX control lines the document lists:
// S3-S0, M and Cn select the ALU function, SR/SL select the shifter, and
// SETF with Cn selects which comparison the set unit reports.
//
//   M=1 (logic)  : the sixteen bitwise functions of the classic 4-bit TTL
//                  ALU slice; the two codes HRISC uses are S=1011 (A AND B)
//                  and S=0110 (A XOR B), as printed in the document.
//   M=0 (arith)  : S=0001 A+B (ADD, ADDI, LHI, address and branch-target
//                  sums), S=0110 A-B (SUB, and the set instructions), any
//                  other code passes A (used to hand JR/JALR their target).
//   SR / SL      : logical shift of A by B[4:0]; override the ALU result.
//   set          : SETF=0 gives A==B (SEQ); SETF=1 gives signed A<B when
//                  Cn=0 (SLT) and signed A>B when Cn=1 (SGT).
//
// The document gives the control encodings but not the ALU circuit; the
// arithmetic meanings of codes other than its ADD/SUB/AND/XOR, the shift
// amount taken from B (as in DLX) and the signed comparison are this
// design's choices. Outputs: f (result word) and set (one-bit set result).
module hrisc_alu #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [3:0]   s,
  input  logic         cn,
  input  logic         m,
  input  logic         sr,
  input  logic         sl,
  input  logic         setf,
  output logic [W-1:0] f,
  output logic         set
);
  import hrisc_pkg::*;

  logic [W-1:0] logic_f, arith_f, diff;
  logic         eq, lt, gt;
  localparam int unsigned SHW = $clog2(W);

  always_comb begin
    unique case (s)
      4'b0000: logic_f = ~a;
      4'b0001: logic_f = ~(a | b);
      4'b0010: logic_f = ~a & b;
      4'b0011: logic_f = '0;
      4'b0100: logic_f = ~(a & b);
      4'b0101: logic_f = ~b;
      4'b0110: logic_f = a ^ b;
      4'b0111: logic_f = a & ~b;
      4'b1000: logic_f = ~a | b;
      4'b1001: logic_f = ~(a ^ b);
      4'b1010: logic_f = b;
      4'b1011: logic_f = a & b;
      4'b1100: logic_f = '1;
      4'b1101: logic_f = a | ~b;
      4'b1110: logic_f = a | b;
      default: logic_f = a;
    endcase
  end

  assign diff = a - b;

  always_comb begin
    case (s)
      S_ADD:   arith_f = a + b;
      S_SUB:   arith_f = diff;
      default: arith_f = a;
    endcase
  end

  always_comb begin
    if (sr)      f = a >> b[SHW-1:0];
    else if (sl) f = a << b[SHW-1:0];
    else if (m)  f = logic_f;
    else         f = arith_f;
  end

  assign eq  = (a == b);
  assign lt  = $signed(a) < $signed(b);
  assign gt  = $signed(a) > $signed(b);
  assign set = setf ? (cn ? gt : lt) : eq;

endmodule
