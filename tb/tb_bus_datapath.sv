// tb_bus_datapath: self-checking test of the bus-based datapath.
// The testbench plays controller and memory: it applies one control word per
// clock and, where the memory would drive the bus, supplies the data itself.
// It checks register-to-register transfers through every bus driver and
// into every register, the RegSel inputs (rs1, rs2, rd, PC), x0, the ALU
// function decoded from funct3/funct7 for R-type and I-type instructions,
// the branch compares on zero?, the A+4/A-4 and JumpTarg transfers, and the
// MA output.  Expected values are computed here from the RV32I definitions.
module tb_bus_datapath;
  import mc_pkg::*;

  logic        clk = 0, rst_n = 0;
  ctrl_t       ctrl;
  logic [31:0] mem_dout, ma, bus;
  logic        mem_dout_en;
  logic [6:0]  opcode;
  logic        zero;
  int checks = 0, failures = 0;

  bus_datapath dut (.clk(clk), .rst_n(rst_n), .ctrl(ctrl), .mem_dout(mem_dout),
                    .mem_dout_en(mem_dout_en), .ma(ma), .bus(bus), .opcode(opcode), .zero(zero));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Apply one control word for one clock; memory drives `md` when `men`.
  task automatic step(ctrl_t c, bit men = 0, logic [31:0] md = 0);
    @(negedge clk);
    ctrl = c; mem_dout_en = men; mem_dout = md;
    @(posedge clk); #1;
    ctrl = CTRL_NOP; mem_dout_en = 0;
  endtask

  // Observe a value on the bus in the current cycle without a clock edge.
  task automatic peek(ctrl_t c, output logic [31:0] v);
    @(negedge clk);
    ctrl = c; mem_dout_en = 0; #1;
    v = bus;
  endtask

  function automatic ctrl_t c_mem_to_ir();
    ctrl_t c = CTRL_NOP; c.ld_ir = 1; return c;
  endfunction
  function automatic ctrl_t c_reg_to(reg_sel_e rs, bit la, bit lb, bit lm);
    ctrl_t c = CTRL_NOP; c.reg_sel = rs; c.en_reg = 1; c.ld_a = la; c.ld_b = lb; c.ld_ma = lm; return c;
  endfunction
  function automatic ctrl_t c_alu_to_reg(uop_e op, reg_sel_e rs);
    ctrl_t c = CTRL_NOP; c.alu_op = op; c.en_alu = 1; c.reg_sel = rs; c.reg_wrt = 1; return c;
  endfunction
  function automatic ctrl_t c_mem_to_reg(reg_sel_e rs);
    ctrl_t c = CTRL_NOP; c.reg_sel = rs; c.reg_wrt = 1; return c;
  endfunction
  function automatic ctrl_t c_imm_to(imm_sel_e is, bit lb, bit wr, reg_sel_e rs);
    ctrl_t c = CTRL_NOP; c.imm_sel = is; c.en_imm = 1; c.ld_b = lb; c.reg_wrt = wr; c.reg_sel = rs; return c;
  endfunction
  function automatic ctrl_t c_alu_to(uop_e op, bit la, bit lb, bit lm);
    ctrl_t c = CTRL_NOP; c.alu_op = op; c.en_alu = 1; c.ld_a = la; c.ld_b = lb; c.ld_ma = lm; return c;
  endfunction

  function automatic logic [31:0] rtype(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                        logic [2:0] f3, logic [4:0] rd, logic [6:0] opc);
    return {f7, rs2, rs1, f3, rd, opc};
  endfunction

  // Write a register through the bus from "memory" (Reg[rd] <= Memory).
  task automatic set_reg(logic [4:0] r, logic [31:0] v);
    step(c_mem_to_ir(), 1, rtype(0, 0, 0, 0, r, 7'b0000011));
    step(c_mem_to_reg(REG_RD), 1, v);
  endtask

  task automatic read_reg(reg_sel_e rs, output logic [31:0] v);
    peek(c_reg_to(rs, 0, 0, 0), v);
  endtask

  function automatic logic [31:0] ref_op(logic [2:0] f3, bit alt, logic [31:0] x, logic [31:0] y);
    case (f3)
      3'd0: return alt ? x - y : x + y;
      3'd1: return x << y[4:0];
      3'd2: return ($signed(x) < $signed(y)) ? 1 : 0;
      3'd3: return (x < y) ? 1 : 0;
      3'd4: return x ^ y;
      3'd5: return alt ? $unsigned($signed(x) >>> y[4:0]) : x >> y[4:0];
      3'd6: return x | y;
      default: return x & y;
    endcase
  endfunction

  function automatic bit ref_taken(logic [2:0] f3, logic [31:0] x, logic [31:0] y);
    case (f3)
      3'd0: return x == y;
      3'd1: return x != y;
      3'd4: return $signed(x) < $signed(y);
      3'd5: return $signed(x) >= $signed(y);
      3'd6: return x < y;
      default: return x >= y;
    endcase
  endfunction

  initial begin
    logic [31:0] v, x, y, e;
    logic [2:0]  f3;
    bit          alt;
    ctrl = CTRL_NOP; mem_dout = 0; mem_dout_en = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // PC: load from memory, MA, A <= PC, PC <= A + 4, read back
    step(c_mem_to_reg(REG_PC), 1, 32'h0000_0100);
    step(c_reg_to(REG_PC, 1, 0, 1));
    check(ma == 32'h100, $sformatf("MA <= PC gave %h", ma));
    step(c_alu_to_reg(UOP_INC4, REG_PC));
    read_reg(REG_PC, v);
    check(v == 32'h104, $sformatf("PC <= A+4 gave %h", v));

    // x0 ignores writes
    set_reg(0, 32'hdead_beef);
    step(c_mem_to_ir(), 1, rtype(0, 0, 0, 0, 0, 7'b0110011));
    read_reg(REG_RD, v);
    check(v == 0, "x0 stays zero");

    // LUI-style transfer: Reg[rd] <= UImm
    step(c_mem_to_ir(), 1, 32'h12345_0b7);  // lui x1, 0x12345
    check(opcode == 7'b0110111, "opcode output");
    step(c_imm_to(IMM_U, 0, 1, REG_RD));
    read_reg(REG_RD, v);
    check(v == 32'h1234_5000, $sformatf("x1 <= UImm gave %h", v));

    // Random R-type and I-type operations through A, B and the ALU
    for (int k = 0; k < 300; k++) begin
      x = $urandom; y = $urandom;
      if (k % 4 == 0) y = x;
      set_reg(5, x); set_reg(6, y);
      f3 = 3'($urandom_range(0, 7));
      alt = (f3 == 0 || f3 == 5) ? 1'($urandom_range(0, 1)) : 1'b0;
      // R-type: rd = x7
      step(c_mem_to_ir(), 1, rtype(alt ? 7'b0100000 : 7'b0, 5'd6, 5'd5, f3, 5'd7, 7'b0110011));
      step(c_reg_to(REG_RS1, 1, 0, 0));
      step(c_reg_to(REG_RS2, 0, 1, 0));
      step(c_alu_to_reg(UOP_FUNC, REG_RD));
      read_reg(REG_RD, v);
      e = ref_op(f3, alt, x, y);
      check(v == e, $sformatf("R-type f3=%0d alt=%0d %h,%h -> %h exp %h", f3, alt, x, y, v, e));
      // I-type: rd = x8, imm from the instruction
      begin
        logic [11:0] i12;
        logic [31:0] inst;
        i12 = 12'($urandom);
        if (f3 == 1 || f3 == 5) i12 = {1'b0, alt, 5'b0, i12[4:0]};
        inst = {i12, 5'd5, f3, 5'd8, 7'b0010011};
        step(c_mem_to_ir(), 1, inst);
        step(c_reg_to(REG_RS1, 1, 0, 0));
        step(c_imm_to(IMM_I, 1, 0, REG_RS1));
        step(c_alu_to_reg(UOP_FUNCI, REG_RD));
        read_reg(REG_RD, v);
        e = ref_op(f3, (f3 == 5) ? alt : 1'b0, x, 32'($signed(i12)));
        check(v == e, $sformatf("I-type f3=%0d %h,%h -> %h exp %h", f3, x, 32'($signed(i12)), v, e));
      end
      // Branch compare on zero?
      begin
        logic [2:0] bf3;
        ctrl_t c;
        bf3 = 3'($urandom_range(0, 5));
        if (bf3 >= 2) bf3 = bf3 + 3'd2;
        step(c_mem_to_ir(), 1, rtype(0, 5'd6, 5'd5, bf3, 0, 7'b1100011));
        step(c_reg_to(REG_RS1, 1, 0, 0));
        step(c_reg_to(REG_RS2, 0, 1, 0));
        c = c_reg_to(REG_PC, 0, 0, 0); c.alu_op = UOP_BRCMP;
        @(negedge clk); ctrl = c; #1;
        check(zero == ref_taken(bf3, x, y), $sformatf("branch f3=%0d %h,%h zero=%b", bf3, x, y, zero));
      end
    end

    // JumpTarg: A <= PC, A <= A-4, B <= IR, PC <= JumpTarg(A,B).  jal x0,-8
    step(c_mem_to_reg(REG_PC), 1, 32'h0000_0204);
    step(c_mem_to_ir(), 1, 32'hff9f_f06f);
    step(c_reg_to(REG_PC, 1, 0, 0));
    step(c_alu_to(UOP_DEC4, 1, 0, 0));
    step(c_imm_to(IMM_IR, 1, 0, REG_RS1));
    step(c_alu_to_reg(UOP_JTARG, REG_PC));
    read_reg(REG_PC, v);
    check(v == 32'h1f8, $sformatf("JumpTarg gave %h", v));

    // Branch target: B <= BImm, PC <= A + B.  beq x0,x0,+16 at 0x1f8
    step(c_mem_to_ir(), 1, 32'h0000_0863);
    step(c_reg_to(REG_PC, 1, 0, 0));
    step(c_imm_to(IMM_B, 1, 0, REG_RS1));
    step(c_alu_to_reg(UOP_ADD, REG_PC));
    read_reg(REG_PC, v);
    check(v == 32'h208, $sformatf("branch target gave %h", v));

    // MA <= A + B
    step(c_alu_to(UOP_ADD, 0, 0, 1));
    check(ma == 32'h208, $sformatf("MA <= A+B gave %h", ma));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
