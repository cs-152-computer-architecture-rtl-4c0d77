// jump_logic: the microbranch logic of the second RISC-V microcontroller.
//
// Combinational.  From the uJumpType field of the current microinstruction
// and the datapath status inputs zero? and busy it chooses the source of the
// next microPC:
//   next     -> uPC+1
//   spin     -> busy ? uPC : uPC+1     (wait for memory)
//   fetch    -> absolute               (unconditional microjump)
//   dispatch -> op-group of the opcode (decode)
//   ftrue    -> zero ? absolute : uPC+1
//   ffalse   -> zero ? uPC+1 : absolute
// This is exactly the table the controller is specified by; the encoding of
// the select output is this design's own.
module jump_logic
  import mc_pkg::*;
(
  input  ujump_e   jump,
  input  logic     zero,
  input  logic     busy,
  output upc_src_e src
);

  always_comb begin
    unique case (jump)
      UJ_NEXT:     src = SRC_INC;
      UJ_SPIN:     src = busy ? SRC_HOLD : SRC_INC;
      UJ_FETCH:    src = SRC_ABS;
      UJ_DISPATCH: src = SRC_DISPATCH;
      UJ_FTRUE:    src = zero ? SRC_ABS : SRC_INC;
      UJ_FFALSE:   src = zero ? SRC_INC : SRC_ABS;
      default:     src = SRC_ABS;
    endcase
  end

endmodule
