// imm_select: the Immed Select unit between IR and the bus.
//
// Combinational.  Given the instruction register and the 3-bit ImmSel
// control it forms one immediate, which the datapath places on the bus when
// enImm is asserted.  All immediates are sign extended from instruction bit
// 31, as in every RISC-V format.  The branch and jump offsets come out
// already shifted left by one (bit 0 is zero), so "B <= BImm" loads the byte
// offset that is added to the PC.  IMM_IR passes the whole instruction word,
// which the JAL microcode loads into B before JumpTarg(A,B).
//
// Follows the source: the bit positions of the I, S, SB, U and UJ formats
// and the sign bit always in bit 31.  Own choice: the ImmSel encoding.
module imm_select
  import mc_pkg::*;
(
  input  logic [XLEN-1:0] ir,
  input  imm_sel_e        sel,
  output logic [XLEN-1:0] imm
);

  always_comb begin
    unique case (sel)
      IMM_I:   imm = {{20{ir[31]}}, ir[31:20]};
      IMM_S:   imm = {{20{ir[31]}}, ir[31:25], ir[11:7]};
      IMM_B:   imm = {{19{ir[31]}}, ir[31], ir[7], ir[30:25], ir[11:8], 1'b0};
      IMM_U:   imm = {ir[31:12], 12'd0};
      IMM_J:   imm = {{11{ir[31]}}, ir[31], ir[19:12], ir[20], ir[30:21], 1'b0};
      IMM_IR:  imm = ir;
      default: imm = '0;
    endcase
  end

endmodule
