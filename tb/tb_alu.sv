// tb_alu: self-checking test of the ALU.
// Random and corner operands for every operation are compared with a
// reference computed here from 64-bit arithmetic; zero? is checked with them.
module tb_alu;
  import mc_pkg::*;

  alu_op_e     op;
  logic [31:0] a, b, y;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .y(y), .zero(zero));

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z);
    longint sx, sz;
    logic [31:0] off;
    sx = longint'($signed(x)); sz = longint'($signed(z));
    off = {{11{z[31]}}, z[31], z[19:12], z[20], z[30:21], 1'b0};
    case (o)
      ALU_ADD:    return 32'(longint'(x) + longint'(z));
      ALU_SUB:    return 32'(longint'(x) - longint'(z));
      ALU_SLL:    return 32'(longint'(x) * (longint'(1) << z[4:0]));
      ALU_SLT:    return (sx < sz) ? 32'd1 : 32'd0;
      ALU_SLTU:   return ({1'b0, x} < {1'b0, z}) ? 32'd1 : 32'd0;
      ALU_XOR:    return x ^ z;
      ALU_SRL:    return 32'(longint'(x) / (longint'(1) << z[4:0]));
      ALU_SRA:    return 32'(sx >>> z[4:0]);
      ALU_OR:     return x | z;
      ALU_AND:    return x & z;
      ALU_SEQ:    return (x == z) ? 32'd1 : 32'd0;
      ALU_SGE:    return (sx >= sz) ? 32'd1 : 32'd0;
      ALU_SGEU:   return ({1'b0, x} >= {1'b0, z}) ? 32'd1 : 32'd0;
      ALU_PASS_A: return x;
      ALU_PASS_B: return z;
      ALU_INC4:   return 32'(longint'(x) + 4);
      ALU_DEC4:   return 32'(longint'(x) - 4);
      ALU_JTARG:  return 32'(longint'(x) + longint'(off));
      default:    return 32'd0;
    endcase
  endfunction

  task automatic check_one(alu_op_e o, logic [31:0] x, logic [31:0] z);
    logic [31:0] e;
    op = o; a = x; b = z;
    #1;
    e = ref_alu(o, x, z);
    checks++;
    if (y !== e || zero !== (e == 32'd0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h zero=%b exp=%h", o.name(), x, z, y, zero, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] corners [6] = '{32'd0, 32'd1, 32'hffff_ffff, 32'h8000_0000, 32'h7fff_ffff, 32'd4};

  initial begin
    for (int o = 0; o <= int'(ALU_JTARG); o++) begin
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++)
          check_one(alu_op_e'(o), corners[i], corners[j]);
      for (int k = 0; k < 300; k++)
        check_one(alu_op_e'(o), $urandom, $urandom);
    end
    // JumpTarg with a known instruction: jal x0, -8 (0xff9ff06f) from 0x100
    check_one(ALU_JTARG, 32'h100, 32'hff9f_f06f);
    checks++;
    if (y !== 32'h0f8) begin failures++; $display("FAIL JumpTarg literal y=%h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
