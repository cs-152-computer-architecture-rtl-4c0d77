// tb_imm_select: self-checking test of the immediate select unit.
// Encodes known immediates into instruction words field by field, as the
// instruction formats place them, and checks that each select recovers them.
module tb_imm_select;
  import mc_pkg::*;

  logic [31:0] ir, imm;
  imm_sel_e    sel;
  int checks = 0, failures = 0;

  imm_select dut (.ir(ir), .sel(sel), .imm(imm));

  task automatic expect_imm(imm_sel_e s, logic [31:0] inst, logic [31:0] e);
    ir = inst; sel = s; #1;
    checks++;
    if (imm !== e) begin
      failures++;
      $display("FAIL sel=%s ir=%h imm=%h exp=%h", s.name(), inst, imm, e);
    end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 400; k++) begin
      logic [31:0] r, v, inst;
      logic [11:0] i12; logic [12:0] b13; logic [20:0] j21; logic [19:0] u20;
      r = $urandom;
      // I-type
      i12 = r[11:0];
      inst = $urandom;
      inst[31:20] = i12;
      v = 32'($signed(i12));
      expect_imm(IMM_I, inst, v);
      // S-type
      inst = $urandom;
      inst[31:25] = i12[11:5]; inst[11:7] = i12[4:0];
      expect_imm(IMM_S, inst, v);
      // SB-type (offset multiple of two)
      b13 = {r[12:1], 1'b0};
      inst = $urandom;
      inst[31] = b13[12]; inst[30:25] = b13[10:5]; inst[11:8] = b13[4:1]; inst[7] = b13[11];
      expect_imm(IMM_B, inst, 32'($signed(b13)));
      // U-type
      u20 = r[31:12];
      inst = $urandom; inst[31:12] = u20;
      expect_imm(IMM_U, inst, {u20, 12'd0});
      // UJ-type
      j21 = {r[20:1], 1'b0};
      inst = $urandom;
      inst[31] = j21[20]; inst[30:21] = j21[10:1]; inst[20] = j21[11]; inst[19:12] = j21[19:12];
      expect_imm(IMM_J, inst, 32'($signed(j21)));
      // raw IR
      expect_imm(IMM_IR, inst, inst);
    end
    // literals: addi x1,x0,-1 ; beq x0,x0,-4 ; sw x2,8(x1)
    expect_imm(IMM_I, 32'hfff00093, 32'hffff_ffff);
    expect_imm(IMM_B, 32'hfe000ee3, 32'hffff_fffc);
    expect_imm(IMM_S, 32'h0020a423, 32'd8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
