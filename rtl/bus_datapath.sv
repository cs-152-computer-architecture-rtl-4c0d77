// bus_datapath: the bus-based RISC-V datapath.
//
// Every transfer goes over one 32-bit bus.  Four units can drive it, each
// through its own enable: the Immed Select unit (enImm), the ALU (enALU), the
// register file (enReg) and the memory (its `mem_dout_en`, raised by the
// memory for a load).  Five destinations load from it: IR (ldIR), A (ldA),
// B (ldB), MA (ldMA) and the register file (RegWrt); the memory takes the bus
// as its write data.  The register file has one port whose address RegSel
// picks from rs1, rs2, rd (fields of IR) and 32, the PC.  The ALU works on A
// and B; its zero? output and the opcode field of IR go to the controller,
// MA goes to the memory address.
//
// The bus is a multiplexer on the driver enables, not tri-state wires; an
// assertion checks that at most one driver is enabled in any cycle.  All
// registers load at the rising clock edge; the bus and ALU are
// combinational.
//
// ALUOp decoding: for func(A,B) (R-type and the three complex operations) and
// Op(A,B) (I-type) the ALU operation comes from funct3 and funct7 bit 30 of
// IR as the RV32I encoding defines it; for the branch compare funct3 picks
// a comparison whose result is zero when the branch is taken.
//
// Follows the source: the units, registers, control names, the RegSel
// inputs and the single shared bus.  Own choices: the multiplexed bus, the
// funct3-driven ALU decoding and the reset of IR, A, B, MA to zero.
module bus_datapath
  import mc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  ctrl_t           ctrl,
  // memory side
  input  logic [XLEN-1:0] mem_dout,
  input  logic            mem_dout_en,
  output logic [XLEN-1:0] ma,
  output logic [XLEN-1:0] bus,
  // controller side
  output logic [6:0]      opcode,
  output logic            zero
);

  logic [XLEN-1:0] ir, a, b;
  logic [XLEN-1:0] imm, alu_y, reg_rdata;
  logic [5:0]      reg_addr;
  alu_op_e         alu_op;

  // ---- datapath registers ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir <= '0; a <= '0; b <= '0; ma <= '0;
    end else begin
      if (ctrl.ld_ir) ir <= bus;
      if (ctrl.ld_a)  a  <= bus;
      if (ctrl.ld_b)  b  <= bus;
      if (ctrl.ld_ma) ma <= bus;
    end
  end

  assign opcode = ir[6:0];

  // ---- register file with RegSel multiplexer ----
  always_comb begin
    unique case (ctrl.reg_sel)
      REG_RS1: reg_addr = {1'b0, ir[19:15]};
      REG_RS2: reg_addr = {1'b0, ir[24:20]};
      REG_RD:  reg_addr = {1'b0, ir[11:7]};
      REG_PC:  reg_addr = 6'd32;
      default: reg_addr = 6'd0;
    endcase
  end

  reg_file #(.NREGS(33)) u_rf (
    .clk(clk), .rst_n(rst_n), .addr(reg_addr), .we(ctrl.reg_wrt),
    .wdata(bus), .rdata(reg_rdata)
  );

  // ---- immediate select ----
  imm_select u_imm (.ir(ir), .sel(ctrl.imm_sel), .imm(imm));

  // ---- ALU operation decode ----
  always_comb begin
    unique case (ctrl.alu_op)
      UOP_FUNC, UOP_FUNCI: begin
        unique case (ir[14:12])
          3'b000:  alu_op = (ctrl.alu_op == UOP_FUNC && ir[30]) ? ALU_SUB : ALU_ADD;
          3'b001:  alu_op = ALU_SLL;
          3'b010:  alu_op = ALU_SLT;
          3'b011:  alu_op = ALU_SLTU;
          3'b100:  alu_op = ALU_XOR;
          3'b101:  alu_op = ir[30] ? ALU_SRA : ALU_SRL;
          3'b110:  alu_op = ALU_OR;
          default: alu_op = ALU_AND;
        endcase
      end
      UOP_BRCMP: begin
        unique case (ir[14:12])
          3'b001:  alu_op = ALU_SEQ;   // BNE: zero when A != B
          3'b100:  alu_op = ALU_SGE;   // BLT
          3'b101:  alu_op = ALU_SLT;   // BGE
          3'b110:  alu_op = ALU_SGEU;  // BLTU
          3'b111:  alu_op = ALU_SLTU;  // BGEU
          default: alu_op = ALU_SUB;   // BEQ: zero when A == B
        endcase
      end
      UOP_COPY_A: alu_op = ALU_PASS_A;
      UOP_COPY_B: alu_op = ALU_PASS_B;
      UOP_INC4:   alu_op = ALU_INC4;
      UOP_DEC4:   alu_op = ALU_DEC4;
      UOP_JTARG:  alu_op = ALU_JTARG;
      default:    alu_op = ALU_ADD;
    endcase
  end

  alu u_alu (.op(alu_op), .a(a), .b(b), .y(alu_y), .zero(zero));

  // ---- the bus ----
  always_comb begin
    bus = '0;
    if (ctrl.en_imm)  bus = imm;
    if (ctrl.en_alu)  bus = alu_y;
    if (ctrl.en_reg)  bus = reg_rdata;
    if (mem_dout_en)  bus = mem_dout;
  end

  // At most one unit may drive the bus.
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ctrl.en_imm, ctrl.en_alu, ctrl.en_reg, mem_dout_en}))
    else $error("bus driven by more than one unit");

endmodule
