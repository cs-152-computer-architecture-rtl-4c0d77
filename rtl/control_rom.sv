// control_rom: the microprogram of the bus-based RV32 machine.
//
// A combinational ROM of 2^UPC_W words addressed by the microPC.  Each word
// holds the datapath control signals of one register transfer, a microbranch
// type and an absolute microPC used by the fetch, ftrue and ffalse
// microbranches.  Unused words hold the trap state.
//
// Microprogram (one register transfer per line; "->" is the microbranch):
//   FETCH0   MA, A <= PC                         -> next
//   FETCH1   IR <= Memory                        -> spin
//   FETCH2   PC <= A + 4                         -> dispatch
//   ALU0-2   A <= rs1; B <= rs2; rd <= func(A,B)             -> fetch
//   ALUI0-2  A <= rs1; B <= Imm; rd <= Op(A,B)               -> fetch
//   LW0-4    A <= rs1; B <= Imm; MA <= A+B; rd <= Memory (spin); -> fetch
//   SW0-4    A <= rs1; B <= SImm; MA <= A+B; Memory <= rs2 (spin); -> fetch
//   JAL0-4   A <= PC; rd <= A; A <= A-4; B <= IR; PC <= JumpTarg(A,B) -> fetch
//   JALR0-5  A <= rs1; B <= Imm; B <= A+B; A <= PC; rd <= A; PC <= B -> fetch
//   BR0-5    A <= rs1; B <= rs2; A <= PC (ffalse: not taken -> fetch);
//            A <= A-4; B <= BImm; PC <= A+B               -> fetch
//   LUI0     rd <= UImm                                    -> fetch
//   AUIPC0-3 A <= PC; A <= A-4; B <= UImm; rd <= A+B       -> fetch
//   ALUMM0-6 MA <= rs1; A <= Memory (spin); MA <= rs2; B <= Memory (spin);
//            MA <= rd; Memory <= func(A,B) (spin); (empty) -> fetch
//   RMS0-3   MA <= rs1; A <= Memory (spin); B <= rs2; rd <= func(A,B) -> fetch
//   RMD0-4   A <= rs1; B <= rs2; MA <= rd; Memory <= func(A,B) (spin);
//            (empty)                                       -> fetch
//   TRAP     (empty)                                       -> fetch TRAP
//
// The fetch, ALU, ALUi, LW, SW, JAL, conditional-branch and memory-memory
// sequences are those of the source's second controller, step for step.
// The register-memory-source (rd <= M[rs1] op rs2) and register-memory-
// destination (M[rd] <= rs1 op rs2) operations are named there as further
// complex instructions; their sequences here are written in the same style.
// Own choices: the SW immediate is the S-type one; JAL writes rd rather than
// always x1 (so J is JAL with rd = x0); JALR adds the I-type immediate and
// writes PC+4 to rd, which takes six steps; one branch sequence serves all
// six branch conditions, the comparison being chosen by funct3 in the ALU
// during BR2 so that zero? means "taken"; LUI, AUIPC and the trap state.
module control_rom
  import mc_pkg::*;
(
  input  upc_t   addr,
  output uinst_t word
);

  always_comb begin
    word = '{ctrl: CTRL_NOP, jump: UJ_NEXT, abs_target: UA_FETCH};
    unique case (addr)
      // ---- instruction fetch ----
      UA_FETCH + 6'd0: begin  // MA, A <= PC
        word.ctrl.reg_sel = REG_PC; word.ctrl.en_reg = 1'b1;
        word.ctrl.ld_ma = 1'b1;     word.ctrl.ld_a = 1'b1;
      end
      UA_FETCH + 6'd1: begin  // IR <= Memory, spin
        word.ctrl.en_mem = 1'b1; word.ctrl.ld_ir = 1'b1;
        word.jump = UJ_SPIN;
      end
      UA_FETCH + 6'd2: begin  // PC <= A + 4, dispatch
        word.ctrl.alu_op = UOP_INC4; word.ctrl.en_alu = 1'b1;
        word.ctrl.reg_sel = REG_PC;  word.ctrl.reg_wrt = 1'b1;
        word.jump = UJ_DISPATCH;
      end
      // ---- register-register ALU ----
      UA_ALU + 6'd0: begin  // A <= Reg[rs1]
        word.ctrl.reg_sel = REG_RS1; word.ctrl.en_reg = 1'b1; word.ctrl.ld_a = 1'b1;
      end
      UA_ALU + 6'd1: begin  // B <= Reg[rs2]
        word.ctrl.reg_sel = REG_RS2; word.ctrl.en_reg = 1'b1; word.ctrl.ld_b = 1'b1;
      end
      UA_ALU + 6'd2: begin  // Reg[rd] <= func(A,B)
        word.ctrl.alu_op = UOP_FUNC; word.ctrl.en_alu = 1'b1;
        word.ctrl.reg_sel = REG_RD;  word.ctrl.reg_wrt = 1'b1;
        word.jump = UJ_FETCH;
      end
      // ---- register-immediate ALU ----
      UA_ALUI + 6'd0: begin  // A <= Reg[rs1]
        word.ctrl.reg_sel = REG_RS1; word.ctrl.en_reg = 1'b1; word.ctrl.ld_a = 1'b1;
      end
      UA_ALUI + 6'd1: begin  // B <= Imm
        word.ctrl.imm_sel = IMM_I; word.ctrl.en_imm = 1'b1; word.ctrl.ld_b = 1'b1;
      end
      UA_ALUI + 6'd2: begin  // Reg[rd] <= Op(A,B)
        word.ctrl.alu_op = UOP_FUNCI; word.ctrl.en_alu = 1'b1;
        word.ctrl.reg_sel = REG_RD;   word.ctrl.reg_wrt = 1'b1;
        word.jump = UJ_FETCH;
      end
      // ---- load word ----
      UA_LW + 6'd0: begin
        word.ctrl.reg_sel = REG_RS1; word.ctrl.en_reg = 1'b1; word.ctrl.ld_a = 1'b1;
      end
      UA_LW + 6'd1: begin
        word.ctrl.imm_sel = IMM_I; word.ctrl.en_imm = 1'b1; word.ctrl.ld_b = 1'b1;
      end
      UA_LW + 6'd2: begin  // MA <= A + B
        word.ctrl.alu_op = UOP_ADD; word.ctrl.en_alu = 1'b1; word.ctrl.ld_ma = 1'b1;
      end
      UA_LW + 6'd3: begin  // Reg[rd] <= Memory, spin
        word.ctrl.en_mem = 1'b1;
        word.ctrl.reg_sel = REG_RD; word.ctrl.reg_wrt = 1'b1;
        word.jump = UJ_SPIN;
      end
      UA_LW + 6'd4: word.jump = UJ_FETCH;
      // ---- store word ----
      UA_SW + 6'd0: begin
        word.ctrl.reg_sel = REG_RS1; word.ctrl.en_reg = 1'b1; word.ctrl.ld_a = 1'b1;
      end
      UA_SW + 6'd1: begin
        word.ctrl.imm_sel = IMM_S; word.ctrl.en_imm = 1'b1; word.ctrl.ld_b = 1'b1;
      end
      UA_SW + 6'd2: begin
        word.ctrl.alu_op = UOP_ADD; word.ctrl.en_alu = 1'b1; word.ctrl.ld_ma = 1'b1;
      end
      UA_SW + 6'd3: begin  // Memory <= Reg[rs2], spin
        word.ctrl.reg_sel = REG_RS2; word.ctrl.en_reg = 1'b1;
        word.ctrl.en_mem = 1'b1;     word.ctrl.mem_wrt = 1'b1;
        word.jump = UJ_SPIN;
      end
      UA_SW + 6'd4: word.jump = UJ_FETCH;
      // ---- jump and link ----
      UA_JAL + 6'd0: begin  // A <= PC
        word.ctrl.reg_sel = REG_PC; word.ctrl.en_reg = 1'b1; word.ctrl.ld_a = 1'b1;
      end
      UA_JAL + 6'd1: begin  // Reg[rd] <= A
        word.ctrl.alu_op = UOP_COPY_A; word.ctrl.en_alu = 1'b1;
        word.ctrl.reg_sel = REG_RD;    word.ctrl.reg_wrt = 1'b1;
      end
      UA_JAL + 6'd2: begin  // A <= A - 4
        word.ctrl.alu_op = UOP_DEC4; word.ctrl.en_alu = 1'b1; word.ctrl.ld_a = 1'b1;
      end
      UA_JAL + 6'd3: begin  // B <= IR
        word.ctrl.imm_sel = IMM_IR; word.ctrl.en_imm = 1'b1; word.ctrl.ld_b = 1'b1;
      end
      UA_JAL + 6'd4: begin  // PC <= JumpTarg(A,B)
        word.ctrl.alu_op = UOP_JTARG; word.ctrl.en_alu = 1'b1;
        word.ctrl.reg_sel = REG_PC;   word.ctrl.reg_wrt = 1'b1;
        word.jump = UJ_FETCH;
      end
      // ---- jump and link register ----
      UA_JALR + 6'd0: begin  // A <= Reg[rs1]
        word.ctrl.reg_sel = REG_RS1; word.ctrl.en_reg = 1'b1; word.ctrl.ld_a = 1'b1;
      end
      UA_JALR + 6'd1: begin  // B <= Imm
        word.ctrl.imm_sel = IMM_I; word.ctrl.en_imm = 1'b1; word.ctrl.ld_b = 1'b1;
      end
      UA_JALR + 6'd2: begin  // B <= A + B
        word.ctrl.alu_op = UOP_ADD; word.ctrl.en_alu = 1'b1; word.ctrl.ld_b = 1'b1;
      end
      UA_JALR + 6'd3: begin  // A <= PC
        word.ctrl.reg_sel = REG_PC; word.ctrl.en_reg = 1'b1; word.ctrl.ld_a = 1'b1;
      end
      UA_JALR + 6'd4: begin  // Reg[rd] <= A
        word.ctrl.alu_op = UOP_COPY_A; word.ctrl.en_alu = 1'b1;
        word.ctrl.reg_sel = REG_RD;    word.ctrl.reg_wrt = 1'b1;
      end
      UA_JALR + 6'd5: begin  // PC <= B
        word.ctrl.alu_op = UOP_COPY_B; word.ctrl.en_alu = 1'b1;
        word.ctrl.reg_sel = REG_PC;    word.ctrl.reg_wrt = 1'b1;
        word.jump = UJ_FETCH;
      end
      // ---- conditional branches ----
      UA_BR + 6'd0: begin  // A <= Reg[rs1]
        word.ctrl.reg_sel = REG_RS1; word.ctrl.en_reg = 1'b1; word.ctrl.ld_a = 1'b1;
      end
      UA_BR + 6'd1: begin  // B <= Reg[rs2]
        word.ctrl.reg_sel = REG_RS2; word.ctrl.en_reg = 1'b1; word.ctrl.ld_b = 1'b1;
      end
      UA_BR + 6'd2: begin  // A <= PC, compare A,B in the ALU; ffalse
        word.ctrl.reg_sel = REG_PC; word.ctrl.en_reg = 1'b1; word.ctrl.ld_a = 1'b1;
        word.ctrl.alu_op = UOP_BRCMP;
        word.jump = UJ_FFALSE; word.abs_target = UA_FETCH;
      end
      UA_BR + 6'd3: begin  // A <= A - 4
        word.ctrl.alu_op = UOP_DEC4; word.ctrl.en_alu = 1'b1; word.ctrl.ld_a = 1'b1;
      end
      UA_BR + 6'd4: begin  // B <= BImm
        word.ctrl.imm_sel = IMM_B; word.ctrl.en_imm = 1'b1; word.ctrl.ld_b = 1'b1;
      end
      UA_BR + 6'd5: begin  // PC <= A + B
        word.ctrl.alu_op = UOP_ADD; word.ctrl.en_alu = 1'b1;
        word.ctrl.reg_sel = REG_PC; word.ctrl.reg_wrt = 1'b1;
        word.jump = UJ_FETCH;
      end
      // ---- load upper immediate ----
      UA_LUI: begin  // Reg[rd] <= UImm
        word.ctrl.imm_sel = IMM_U; word.ctrl.en_imm = 1'b1;
        word.ctrl.reg_sel = REG_RD; word.ctrl.reg_wrt = 1'b1;
        word.jump = UJ_FETCH;
      end
      // ---- add upper immediate to PC ----
      UA_AUIPC + 6'd0: begin  // A <= PC
        word.ctrl.reg_sel = REG_PC; word.ctrl.en_reg = 1'b1; word.ctrl.ld_a = 1'b1;
      end
      UA_AUIPC + 6'd1: begin  // A <= A - 4
        word.ctrl.alu_op = UOP_DEC4; word.ctrl.en_alu = 1'b1; word.ctrl.ld_a = 1'b1;
      end
      UA_AUIPC + 6'd2: begin  // B <= UImm
        word.ctrl.imm_sel = IMM_U; word.ctrl.en_imm = 1'b1; word.ctrl.ld_b = 1'b1;
      end
      UA_AUIPC + 6'd3: begin  // Reg[rd] <= A + B
        word.ctrl.alu_op = UOP_ADD; word.ctrl.en_alu = 1'b1;
        word.ctrl.reg_sel = REG_RD; word.ctrl.reg_wrt = 1'b1;
        word.jump = UJ_FETCH;
      end
      // ---- memory-memory ALU op: M[rd] <= M[rs1] func M[rs2] ----
      UA_ALUMM + 6'd0: begin  // MA <= Reg[rs1]
        word.ctrl.reg_sel = REG_RS1; word.ctrl.en_reg = 1'b1; word.ctrl.ld_ma = 1'b1;
      end
      UA_ALUMM + 6'd1: begin  // A <= Memory, spin
        word.ctrl.en_mem = 1'b1; word.ctrl.ld_a = 1'b1; word.jump = UJ_SPIN;
      end
      UA_ALUMM + 6'd2: begin  // MA <= Reg[rs2]
        word.ctrl.reg_sel = REG_RS2; word.ctrl.en_reg = 1'b1; word.ctrl.ld_ma = 1'b1;
      end
      UA_ALUMM + 6'd3: begin  // B <= Memory, spin
        word.ctrl.en_mem = 1'b1; word.ctrl.ld_b = 1'b1; word.jump = UJ_SPIN;
      end
      UA_ALUMM + 6'd4: begin  // MA <= Reg[rd]
        word.ctrl.reg_sel = REG_RD; word.ctrl.en_reg = 1'b1; word.ctrl.ld_ma = 1'b1;
      end
      UA_ALUMM + 6'd5: begin  // Memory <= func(A,B), spin
        word.ctrl.alu_op = UOP_FUNC; word.ctrl.en_alu = 1'b1;
        word.ctrl.en_mem = 1'b1;     word.ctrl.mem_wrt = 1'b1;
        word.jump = UJ_SPIN;
      end
      UA_ALUMM + 6'd6: word.jump = UJ_FETCH;
      // ---- register-memory-source ALU op: rd <= M[rs1] func rs2 ----
      UA_RMS + 6'd0: begin  // MA <= Reg[rs1]
        word.ctrl.reg_sel = REG_RS1; word.ctrl.en_reg = 1'b1; word.ctrl.ld_ma = 1'b1;
      end
      UA_RMS + 6'd1: begin  // A <= Memory, spin
        word.ctrl.en_mem = 1'b1; word.ctrl.ld_a = 1'b1; word.jump = UJ_SPIN;
      end
      UA_RMS + 6'd2: begin  // B <= Reg[rs2]
        word.ctrl.reg_sel = REG_RS2; word.ctrl.en_reg = 1'b1; word.ctrl.ld_b = 1'b1;
      end
      UA_RMS + 6'd3: begin  // Reg[rd] <= func(A,B)
        word.ctrl.alu_op = UOP_FUNC; word.ctrl.en_alu = 1'b1;
        word.ctrl.reg_sel = REG_RD;  word.ctrl.reg_wrt = 1'b1;
        word.jump = UJ_FETCH;
      end
      // ---- register-memory-destination ALU op: M[rd] <= rs1 func rs2 ----
      UA_RMD + 6'd0: begin  // A <= Reg[rs1]
        word.ctrl.reg_sel = REG_RS1; word.ctrl.en_reg = 1'b1; word.ctrl.ld_a = 1'b1;
      end
      UA_RMD + 6'd1: begin  // B <= Reg[rs2]
        word.ctrl.reg_sel = REG_RS2; word.ctrl.en_reg = 1'b1; word.ctrl.ld_b = 1'b1;
      end
      UA_RMD + 6'd2: begin  // MA <= Reg[rd]
        word.ctrl.reg_sel = REG_RD; word.ctrl.en_reg = 1'b1; word.ctrl.ld_ma = 1'b1;
      end
      UA_RMD + 6'd3: begin  // Memory <= func(A,B), spin
        word.ctrl.alu_op = UOP_FUNC; word.ctrl.en_alu = 1'b1;
        word.ctrl.en_mem = 1'b1;     word.ctrl.mem_wrt = 1'b1;
        word.jump = UJ_SPIN;
      end
      UA_RMD + 6'd4: word.jump = UJ_FETCH;
      // ---- trap: unknown opcode halts the machine ----
      default: begin
        word.jump = UJ_FETCH; word.abs_target = UA_TRAP;
      end
    endcase
  end

endmodule
