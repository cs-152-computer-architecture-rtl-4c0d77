// alu: the 32-bit ALU of the bus-based datapath.
//
// Combinational.  Operands come from the A and B registers, the result goes to
// the bus through the enALU driver, and `zero` (the controller's zero? input)
// is high when the result is all zeros.  Besides the RV32I integer operations
// (ADD, SUB, shifts, SLT/SLTU, logic) it performs the fixed transfers the
// microprogram needs: pass A, pass B, A+4 (next PC), A-4 (recover the PC of
// the current instruction) and JumpTarg(A,B), which adds the UJ-type jump
// offset held in B (a copy of IR) to A.
//
// Follows the source: the operation list of the integer instructions, the
// zero? output and the A+4, A-4 and JumpTarg transfers of the microprogram.
// Own choices: the compare operations SEQ, SGE and SGEU, which let every
// conditional branch be decided by testing zero? (their result is zero
// exactly when the branch is taken), and the UJ offset taken from the
// instruction format with imm[20|10:1|11|19:12] in bits 31..12.
module alu
  import mc_pkg::*;
(
  input  alu_op_e          op,
  input  logic [XLEN-1:0]  a,
  input  logic [XLEN-1:0]  b,
  output logic [XLEN-1:0]  y,
  output logic             zero
);

  logic [XLEN-1:0] joff;
  assign joff = {{11{b[31]}}, b[31], b[19:12], b[20], b[30:21], 1'b0};

  always_comb begin
    unique case (op)
      ALU_ADD:    y = a + b;
      ALU_SUB:    y = a - b;
      ALU_SLL:    y = a << b[4:0];
      ALU_SLT:    y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU:   y = {31'd0, a < b};
      ALU_XOR:    y = a ^ b;
      ALU_SRL:    y = a >> b[4:0];
      ALU_SRA:    y = $unsigned($signed(a) >>> b[4:0]);
      ALU_OR:     y = a | b;
      ALU_AND:    y = a & b;
      ALU_SEQ:    y = {31'd0, a == b};
      ALU_SGE:    y = {31'd0, $signed(a) >= $signed(b)};
      ALU_SGEU:   y = {31'd0, a >= b};
      ALU_PASS_A: y = a;
      ALU_PASS_B: y = b;
      ALU_INC4:   y = a + 32'd4;
      ALU_DEC4:   y = a - 32'd4;
      ALU_JTARG:  y = a + joff;
      default:    y = '0;
    endcase
  end

  assign zero = (y == '0);

endmodule
