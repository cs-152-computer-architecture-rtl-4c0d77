// ucontroller: the second (jump-type) RISC-V microcontroller.
//
// The microPC register addresses the control ROM.  The ROM word supplies the
// datapath control signals and a microbranch type; the jump logic turns the
// type, the ALU's zero? flag and the memory's busy flag into the select of a
// four-input multiplexer that loads the microPC with one of: microPC+1,
// microPC (hold), the ROM's absolute target, or the op-group entry that the
// ext block derives from the opcode in IR.  Because opcode and status bits
// no longer address the ROM, it is only 2^UPC_W words tall.
//
// Timing: one microinstruction per clock.  The control outputs are
// combinational from the microPC register; zero, busy and opcode are sampled
// at the rising edge that ends the microinstruction.  Reset (active low,
// asynchronous) puts the microPC at the first fetch state.  `halted` is high
// while the trap state (entered on an unknown opcode) holds the microPC.
//
// Follows the source: the structure (microPC, +1, ext, absolute, jump logic,
// multiplexer, control ROM) and the six microbranch types.  Own choices: the
// reset state, the trap state and the `halted` output.
module ucontroller
  import mc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [6:0] opcode,
  input  logic       zero,
  input  logic       busy,
  output ctrl_t      ctrl,
  output upc_t       upc,
  output ujump_e     jump,
  output logic       halted
);

  uinst_t   word;
  upc_t     upc_inc;
  upc_t     op_group;
  upc_t     upc_next;
  upc_src_e src;

  control_rom u_rom (.addr(upc), .word(word));
  opcode_ext  u_ext (.opcode(opcode), .target(op_group));
  jump_logic  u_jl  (.jump(word.jump), .zero(zero), .busy(busy), .src(src));

  assign upc_inc = upc + 1'b1;

  always_comb begin
    unique case (src)
      SRC_INC:      upc_next = upc_inc;
      SRC_HOLD:     upc_next = upc;
      SRC_ABS:      upc_next = word.abs_target;
      SRC_DISPATCH: upc_next = op_group;
      default:      upc_next = UA_TRAP;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) upc <= UA_FETCH;
    else        upc <= upc_next;
  end

  assign ctrl   = word.ctrl;
  assign jump   = word.jump;
  assign halted = (upc == UA_TRAP);

endmodule
