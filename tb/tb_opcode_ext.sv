// tb_opcode_ext: checks the opcode -> op-group dispatch table for all 128
// opcodes: the twelve defined major opcodes map to their microcode entries,
// every other opcode to the trap state.
module tb_opcode_ext;
  import mc_pkg::*;
  logic [6:0] opcode;
  upc_t       target, e;
  int checks = 0, failures = 0;

  opcode_ext dut (.opcode(opcode), .target(target));

  initial begin
    #10000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int o = 0; o < 128; o++) begin
      opcode = 7'(o); #1;
      case (7'(o))
        7'b0110011: e = 6'd3;   // OP      -> ALU0
        7'b0010011: e = 6'd6;   // OP-IMM  -> ALUi0
        7'b0000011: e = 6'd9;   // LOAD    -> LW0
        7'b0100011: e = 6'd14;  // STORE   -> SW0
        7'b1101111: e = 6'd19;  // JAL     -> JAL0
        7'b1100111: e = 6'd24;  // JALR    -> JALR0
        7'b1100011: e = 6'd30;  // BRANCH  -> BR0
        7'b0110111: e = 6'd36;  // LUI
        7'b0010111: e = 6'd37;  // AUIPC
        7'b0001011: e = 6'd41;  // custom-0 -> ALUMM0
        7'b0101011: e = 6'd48;  // custom-1 -> RMS0
        7'b1011011: e = 6'd52;  // custom-2 -> RMD0
        default:    e = 6'd57;  // trap
      endcase
      checks++;
      if (target !== e) begin failures++; $display("FAIL opcode=%b target=%0d exp=%0d", opcode, target, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
