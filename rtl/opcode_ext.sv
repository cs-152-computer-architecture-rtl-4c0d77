// opcode_ext: the "ext" block of the second microcontroller.
//
// Combinational.  It maps the 7-bit major opcode of IR to the control-ROM
// address of the first microinstruction of that opcode's op-group; the
// dispatch microbranch jumps there.  Doing this outside the ROM is what keeps
// the opcode off the ROM address ("input encoding reduces ROM height").
// Op-groups: ALU (OP), ALUi (OP-IMM), LW (LOAD), SW (STORE), JAL (J is JAL
// with rd = x0), JALR (JR is JALR with rd = x0), conditional branches
// (all six share one sequence), LUI, AUIPC and the three complex ALU
// operations (memory-memory, register-memory source, register-memory
// destination).  Any other opcode goes to a trap state that halts the
// machine.
//
// Own choices: the custom opcodes 0001011, 0101011 and 1011011 of the three
// complex operations, the trap state and the microcode addresses.
module opcode_ext
  import mc_pkg::*;
(
  input  logic [6:0] opcode,
  output upc_t       target
);

  always_comb begin
    unique case (opcode)
      OPC_OP:     target = UA_ALU;
      OPC_OPIMM:  target = UA_ALUI;
      OPC_LOAD:   target = UA_LW;
      OPC_STORE:  target = UA_SW;
      OPC_JAL:    target = UA_JAL;
      OPC_JALR:   target = UA_JALR;
      OPC_BRANCH: target = UA_BR;
      OPC_LUI:    target = UA_LUI;
      OPC_AUIPC:  target = UA_AUIPC;
      OPC_CUST0:  target = UA_ALUMM;
      OPC_CUST1:  target = UA_RMS;
      OPC_CUST2:  target = UA_RMD;
      default:    target = UA_TRAP;
    endcase
  end

endmodule
