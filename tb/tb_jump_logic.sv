// tb_jump_logic: exhaustive test of the microbranch logic against the
// uJumpType table (next, spin, fetch, dispatch, ftrue, ffalse).
module tb_jump_logic;
  import mc_pkg::*;
  ujump_e   jump;
  logic     zero, busy;
  upc_src_e src, e;
  int checks = 0, failures = 0;

  jump_logic dut (.jump(jump), .zero(zero), .busy(busy), .src(src));

  initial begin
    #10000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int j = 0; j < 6; j++)
      for (int zb = 0; zb < 4; zb++) begin
        jump = ujump_e'(j); zero = zb[0]; busy = zb[1]; #1;
        case (jump)
          UJ_NEXT:     e = SRC_INC;
          UJ_SPIN:     e = busy ? SRC_HOLD : SRC_INC;
          UJ_FETCH:    e = SRC_ABS;
          UJ_DISPATCH: e = SRC_DISPATCH;
          UJ_FTRUE:    e = zero ? SRC_ABS : SRC_INC;
          default:     e = zero ? SRC_INC : SRC_ABS;
        endcase
        checks++;
        if (src !== e) begin
          failures++;
          $display("FAIL %s zero=%b busy=%b src=%s exp=%s", jump.name(), zero, busy, src.name(), e.name());
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
