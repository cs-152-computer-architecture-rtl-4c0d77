// tb_ucontroller: self-checking test of the jump-type microcontroller.
// Drives opcode, zero? and busy and checks the microPC walks the expected
// state sequence for each op-group: the spin states hold while busy, fetch2
// dispatches on the opcode, the branch compare state leaves for fetch when
// zero? is low and continues when it is high, an unknown opcode halts.
module tb_ucontroller;
  import mc_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic [6:0] opcode;
  logic       zero, busy;
  ctrl_t      ctrl;
  upc_t       upc;
  ujump_e     jump;
  logic       halted;
  int checks = 0, failures = 0;

  ucontroller dut (.clk(clk), .rst_n(rst_n), .opcode(opcode), .zero(zero), .busy(busy),
                   .ctrl(ctrl), .upc(upc), .jump(jump), .halted(halted));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_upc(int e, string what);
    checks++;
    if (int'(upc) != e) begin
      failures++; $display("FAIL %s: uPC=%0d expected %0d", what, upc, e);
    end
  endtask

  // Run one instruction from FETCH0.  `busy_n` cycles of busy in each spin
  // state; `z` is the zero? value; `seq` the states expected after fetch2.
  task automatic run(logic [6:0] opc, int busy_n, bit z, int seq[$], string name);
    opcode = 7'h7f; zero = 0; busy = 0;
    check_upc(0, {name, " start"});
    @(negedge clk); check_upc(1, {name, " fetch1"});
    for (int i = 0; i < busy_n; i++) begin
      busy = 1; @(negedge clk); check_upc(1, {name, " fetch1 spin"});
    end
    busy = 0; opcode = opc;
    @(negedge clk); check_upc(2, {name, " fetch2"});
    foreach (seq[k]) begin
      @(negedge clk);
      check_upc(seq[k], $sformatf("%s step %0d", name, k));
      // hold in spin states for busy_n cycles
      if (ctrl.en_mem) begin
        for (int i = 0; i < busy_n; i++) begin
          busy = 1; @(negedge clk); check_upc(seq[k], {name, " spin"});
        end
        busy = 0;
      end
      zero = z;
    end
    @(negedge clk); zero = 0;
  endtask

  initial begin
    opcode = 0; zero = 0; busy = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(7'b0110011, 3, 0, '{3, 4, 5}, "ALU");
    run(7'b0010011, 0, 0, '{6, 7, 8}, "ALUi");
    run(7'b0000011, 4, 0, '{9, 10, 11, 12, 13}, "LW");
    run(7'b0100011, 2, 0, '{14, 15, 16, 17, 18}, "SW");
    run(7'b1101111, 1, 0, '{19, 20, 21, 22, 23}, "JAL");
    run(7'b1100111, 1, 0, '{24, 25, 26, 27, 28, 29}, "JALR");
    run(7'b1100011, 1, 0, '{30, 31, 32}, "branch not taken");
    run(7'b1100011, 1, 1, '{30, 31, 32, 33, 34, 35}, "branch taken");
    run(7'b0110111, 1, 0, '{36}, "LUI");
    run(7'b0010111, 1, 0, '{37, 38, 39, 40}, "AUIPC");
    run(7'b0001011, 2, 0, '{41, 42, 43, 44, 45, 46, 47}, "ALUMM");
    run(7'b0101011, 3, 0, '{48, 49, 50, 51}, "reg-mem-src");
    run(7'b1011011, 1, 0, '{52, 53, 54, 55, 56}, "reg-mem-dst");
    // unknown opcode: trap and stay
    check_upc(0, "trap start");
    @(negedge clk); @(negedge clk); opcode = 7'b1111111;
    @(negedge clk); check_upc(57, "trap");
    repeat (5) @(negedge clk);
    check_upc(57, "trap holds");
    checks++;
    if (!halted) begin failures++; $display("FAIL halted not set"); end
    // reset leaves the trap
    rst_n = 0; #1; check_upc(0, "reset"); rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
