// tb_control_rom: checks the microprogram word by word against the register
// transfer table of the second controller: the bus driver, the loaded
// registers, the memory controls and the microbranch of every state.
module tb_control_rom;
  import mc_pkg::*;
  upc_t   addr;
  uinst_t w;
  int checks = 0, failures = 0;

  control_rom dut (.addr(addr), .word(w));

  initial begin
    #10000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Expected word as a compact string:
  //   driver(I/A/R/M/-) loads(irabm: IR,A,B,MA,Reg) memwrite regsel imm aluop jump target
  task automatic expect_word(upc_t a, string drv, string lds, bit mw, reg_sel_e rs,
                             imm_sel_e is, uop_e op, ujump_e j, upc_t tgt);
    string got_drv, got_lds;
    bit ok;
    addr = a; #1;
    got_drv = w.ctrl.en_imm ? "I" : w.ctrl.en_alu ? "A" : w.ctrl.en_reg ? "R" :
              (w.ctrl.en_mem && !w.ctrl.mem_wrt) ? "M" : "-";
    if (int'(w.ctrl.en_imm) + int'(w.ctrl.en_alu) + int'(w.ctrl.en_reg) +
        int'(w.ctrl.en_mem && !w.ctrl.mem_wrt) > 1) got_drv = "X";
    got_lds = {w.ctrl.ld_ir ? "i" : "", w.ctrl.ld_a ? "a" : "", w.ctrl.ld_b ? "b" : "",
               w.ctrl.ld_ma ? "m" : "", w.ctrl.reg_wrt ? "r" : "",
               (w.ctrl.en_mem && w.ctrl.mem_wrt) ? "w" : ""};
    ok = (got_drv == drv) && (got_lds == lds) && (w.jump == j);
    if (w.ctrl.en_mem != (drv == "M" || mw)) ok = 0;
    if ((w.ctrl.en_reg || w.ctrl.reg_wrt) && w.ctrl.reg_sel != rs) ok = 0;
    if (w.ctrl.en_imm && w.ctrl.imm_sel != is) ok = 0;
    if ((w.ctrl.en_alu || j inside {UJ_FTRUE, UJ_FFALSE}) && w.ctrl.alu_op != op) ok = 0;
    if (j inside {UJ_FETCH, UJ_FTRUE, UJ_FFALSE} && w.abs_target != tgt) ok = 0;
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL uPC %0d: drv=%s lds=%s jump=%s tgt=%0d", a, got_drv, got_lds, w.jump.name(), w.abs_target);
    end
  endtask

  initial begin
    // fetch
    expect_word(0,  "R", "am",  0, REG_PC,  IMM_I,  UOP_ADD,   UJ_NEXT,     0);
    expect_word(1,  "M", "i",   0, REG_PC,  IMM_I,  UOP_ADD,   UJ_SPIN,     0);
    expect_word(2,  "A", "r",   0, REG_PC,  IMM_I,  UOP_INC4,  UJ_DISPATCH, 0);
    // ALU
    expect_word(3,  "R", "a",   0, REG_RS1, IMM_I,  UOP_ADD,   UJ_NEXT,     0);
    expect_word(4,  "R", "b",   0, REG_RS2, IMM_I,  UOP_ADD,   UJ_NEXT,     0);
    expect_word(5,  "A", "r",   0, REG_RD,  IMM_I,  UOP_FUNC,  UJ_FETCH,    0);
    // ALUi
    expect_word(6,  "R", "a",   0, REG_RS1, IMM_I,  UOP_ADD,   UJ_NEXT,     0);
    expect_word(7,  "I", "b",   0, REG_RS1, IMM_I,  UOP_ADD,   UJ_NEXT,     0);
    expect_word(8,  "A", "r",   0, REG_RD,  IMM_I,  UOP_FUNCI, UJ_FETCH,    0);
    // LW
    expect_word(9,  "R", "a",   0, REG_RS1, IMM_I,  UOP_ADD,   UJ_NEXT,     0);
    expect_word(10, "I", "b",   0, REG_RS1, IMM_I,  UOP_ADD,   UJ_NEXT,     0);
    expect_word(11, "A", "m",   0, REG_RS1, IMM_I,  UOP_ADD,   UJ_NEXT,     0);
    expect_word(12, "M", "r",   0, REG_RD,  IMM_I,  UOP_ADD,   UJ_SPIN,     0);
    expect_word(13, "-", "",    0, REG_RD,  IMM_I,  UOP_ADD,   UJ_FETCH,    0);
    // SW
    expect_word(14, "R", "a",   0, REG_RS1, IMM_I,  UOP_ADD,   UJ_NEXT,     0);
    expect_word(15, "I", "b",   0, REG_RS1, IMM_S,  UOP_ADD,   UJ_NEXT,     0);
    expect_word(16, "A", "m",   0, REG_RS1, IMM_I,  UOP_ADD,   UJ_NEXT,     0);
    expect_word(17, "R", "w",   1, REG_RS2, IMM_I,  UOP_ADD,   UJ_SPIN,     0);
    expect_word(18, "-", "",    0, REG_RD,  IMM_I,  UOP_ADD,   UJ_FETCH,    0);
    // JAL
    expect_word(19, "R", "a",   0, REG_PC,  IMM_I,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(20, "A", "r",   0, REG_RD,  IMM_I,  UOP_COPY_A, UJ_NEXT,    0);
    expect_word(21, "A", "a",   0, REG_RD,  IMM_I,  UOP_DEC4,   UJ_NEXT,    0);
    expect_word(22, "I", "b",   0, REG_RD,  IMM_IR, UOP_ADD,    UJ_NEXT,    0);
    expect_word(23, "A", "r",   0, REG_PC,  IMM_I,  UOP_JTARG,  UJ_FETCH,   0);
    // JALR
    expect_word(24, "R", "a",   0, REG_RS1, IMM_I,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(25, "I", "b",   0, REG_RS1, IMM_I,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(26, "A", "b",   0, REG_RS1, IMM_I,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(27, "R", "a",   0, REG_PC,  IMM_I,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(28, "A", "r",   0, REG_RD,  IMM_I,  UOP_COPY_A, UJ_NEXT,    0);
    expect_word(29, "A", "r",   0, REG_PC,  IMM_I,  UOP_COPY_B, UJ_FETCH,   0);
    // branches
    expect_word(30, "R", "a",   0, REG_RS1, IMM_I,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(31, "R", "b",   0, REG_RS2, IMM_I,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(32, "R", "a",   0, REG_PC,  IMM_I,  UOP_BRCMP,  UJ_FFALSE,  0);
    expect_word(33, "A", "a",   0, REG_PC,  IMM_I,  UOP_DEC4,   UJ_NEXT,    0);
    expect_word(34, "I", "b",   0, REG_PC,  IMM_B,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(35, "A", "r",   0, REG_PC,  IMM_I,  UOP_ADD,    UJ_FETCH,   0);
    // LUI, AUIPC
    expect_word(36, "I", "r",   0, REG_RD,  IMM_U,  UOP_ADD,    UJ_FETCH,   0);
    expect_word(37, "R", "a",   0, REG_PC,  IMM_I,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(38, "A", "a",   0, REG_PC,  IMM_I,  UOP_DEC4,   UJ_NEXT,    0);
    expect_word(39, "I", "b",   0, REG_PC,  IMM_U,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(40, "A", "r",   0, REG_RD,  IMM_I,  UOP_ADD,    UJ_FETCH,   0);
    // memory-memory ALU op
    expect_word(41, "R", "m",   0, REG_RS1, IMM_I,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(42, "M", "a",   0, REG_RS1, IMM_I,  UOP_ADD,    UJ_SPIN,    0);
    expect_word(43, "R", "m",   0, REG_RS2, IMM_I,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(44, "M", "b",   0, REG_RS2, IMM_I,  UOP_ADD,    UJ_SPIN,    0);
    expect_word(45, "R", "m",   0, REG_RD,  IMM_I,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(46, "A", "w",   1, REG_RD,  IMM_I,  UOP_FUNC,   UJ_SPIN,    0);
    expect_word(47, "-", "",    0, REG_RD,  IMM_I,  UOP_ADD,    UJ_FETCH,   0);
    // register-memory-source ALU op
    expect_word(48, "R", "m",   0, REG_RS1, IMM_I,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(49, "M", "a",   0, REG_RS1, IMM_I,  UOP_ADD,    UJ_SPIN,    0);
    expect_word(50, "R", "b",   0, REG_RS2, IMM_I,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(51, "A", "r",   0, REG_RD,  IMM_I,  UOP_FUNC,   UJ_FETCH,   0);
    // register-memory-destination ALU op
    expect_word(52, "R", "a",   0, REG_RS1, IMM_I,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(53, "R", "b",   0, REG_RS2, IMM_I,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(54, "R", "m",   0, REG_RD,  IMM_I,  UOP_ADD,    UJ_NEXT,    0);
    expect_word(55, "A", "w",   1, REG_RD,  IMM_I,  UOP_FUNC,   UJ_SPIN,    0);
    expect_word(56, "-", "",    0, REG_RD,  IMM_I,  UOP_ADD,    UJ_FETCH,   0);
    // trap and every unused word loop on the trap state
    for (int a = 57; a < 64; a++)
      expect_word(upc_t'(a), "-", "", 0, REG_RS1, IMM_I, UOP_ADD, UJ_FETCH, 57);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
