// tb_ucoded_rv32: end-to-end test of the microcoded RV32 machine at its
// default parameters (1024-word memory, 10 busy cycles per memory access).
//
// Each run loads a program into the memory, releases reset and waits for the
// machine to halt on the trap opcode 0x0000007f.  An instruction-level model
// in this testbench executes the same program; afterwards the registers, the
// PC and the data memory of the machine must equal the model's, and the
// number of clock cycles must equal the sum of the microprogram lengths:
// fetch 3+L, then ALU 3, ALUi 3, LW 5+L, SW 5+L, JAL 5, JALR 6, branch 3
// (not taken) or 6 (taken), LUI 1, AUIPC 4, memory-memory op 7+3L,
// register-memory-source op 4+L, register-memory-destination op 5+L.
//
// Programs: a fixed one with a counted loop of stores, loads and a backward
// branch plus a call and return, then random programs of ALU, immediate,
// LUI, AUIPC, load, store, memory-memory, register-memory-source,
// register-memory-destination, forward branch, JAL and
// AUIPC+JALR instructions.  The testbench counts how often each mechanism
// occurred (memory-busy spin cycles, dispatch to every op-group, branch
// taken and not taken for all six conditions, trap) and fails any that
// never happened.
module tb_ucoded_rv32;
  import mc_pkg::*;

  localparam int unsigned DEPTH = 1024;
  localparam longint      LAT   = 10;          // memory busy cycles (top default)
  localparam int unsigned DATA0 = 512;          // first data word (byte 0x800)
  localparam int unsigned NRAND = 1000;         // random programs
  localparam int unsigned PLEN  = 80;           // random program length

  logic        clk = 0, rst_n = 0;
  logic        halted;
  upc_t        upc;
  logic [31:0] bus, ma;
  int checks = 0, failures = 0;
  longint cycles_total = 0;

  ucoded_rv32 dut (.clk(clk), .rst_n(rst_n), .halted(halted), .upc(upc), .bus(bus), .ma(ma));

  always #5 clk = ~clk;

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------------ encoders
  function automatic logic [31:0] r_t(logic [2:0] f3, bit alt, logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2,
                                      logic [6:0] opc = 7'b0110011);
    return {alt ? 7'b0100000 : 7'b0, rs2, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] i_t(logic [2:0] f3, logic [4:0] rd, logic [4:0] rs1, logic [11:0] imm,
                                      logic [6:0] opc = 7'b0010011);
    return {imm, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] s_t(logic [4:0] rs1, logic [4:0] rs2, logic [11:0] imm);
    return {imm[11:5], rs2, rs1, 3'b010, imm[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_t(logic [2:0] f3, logic [4:0] rs1, logic [4:0] rs2, logic [12:0] off);
    return {off[12], off[10:5], rs2, rs1, f3, off[4:1], off[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] u_t(logic [6:0] opc, logic [4:0] rd, logic [19:0] imm);
    return {imm, rd, opc};
  endfunction
  function automatic logic [31:0] j_t(logic [4:0] rd, logic [20:0] off);
    return {off[20], off[10:1], off[11], off[19:12], rd, 7'b1101111};
  endfunction
  localparam logic [31:0] TRAP_INST = 32'h0000_007f;

  // ------------------------------------------------------------ model
  logic [31:0] prog [DEPTH];     // program and initial data
  logic [31:0] mm   [DEPTH];     // model memory
  logic [31:0] mx   [32];        // model registers
  logic [31:0] mpc;
  longint      mcycles;
  int          n_group [13];     // executions per op-group
  int          n_taken [8], n_ntaken [8];

  function automatic logic [31:0] alu_ref(logic [2:0] f3, bit alt, logic [31:0] x, logic [31:0] y);
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

  function automatic int widx(logic [31:0] a);
    return int'(a[11:2]);
  endfunction

  // Runs the model to the trap; returns 0 if it ran away.
  function automatic bit run_model();
    logic [31:0] inst, rs1v, rs2v, nx;
    logic [2:0]  f3;
    logic [4:0]  rd;
    bit          tk;
    int          steps = 0;
    for (int i = 0; i < 32; i++) mx[i] = 0;
    for (int i = 0; i < DEPTH; i++) mm[i] = prog[i];
    mpc = 0; mcycles = 0;
    forever begin
      if (steps++ > 20000) return 0;
      inst = mm[widx(mpc)];
      mcycles += 3 + LAT;
      f3 = inst[14:12]; rd = inst[11:7];
      rs1v = mx[inst[19:15]]; rs2v = mx[inst[24:20]];
      nx = mpc + 4;
      if (inst[6:0] == 7'b0110011) begin
        mx[rd] = alu_ref(f3, inst[30], rs1v, rs2v); mcycles += 3; n_group[0]++;
      end else if (inst[6:0] == 7'b0010011) begin
        mx[rd] = alu_ref(f3, (f3 == 5) && inst[30], rs1v, 32'($signed(inst[31:20]))); mcycles += 3; n_group[1]++;
      end else if (inst[6:0] == 7'b0000011) begin
        mx[rd] = mm[widx(rs1v + 32'($signed(inst[31:20])))]; mcycles += 5 + LAT; n_group[2]++;
      end else if (inst[6:0] == 7'b0100011) begin
        mm[widx(rs1v + 32'($signed({inst[31:25], inst[11:7]})))] = rs2v; mcycles += 5 + LAT; n_group[3]++;
      end else if (inst[6:0] == 7'b1101111) begin
        mx[rd] = mpc + 4;
        nx = mpc + 32'($signed({inst[31], inst[19:12], inst[20], inst[30:21], 1'b0}));
        mcycles += 5; n_group[4]++;
      end else if (inst[6:0] == 7'b1100111) begin
        nx = rs1v + 32'($signed(inst[31:20]));
        mx[rd] = mpc + 4; mcycles += 6; n_group[5]++;
      end else if (inst[6:0] == 7'b1100011) begin
        case (f3)
          3'd0: tk = rs1v == rs2v;
          3'd1: tk = rs1v != rs2v;
          3'd4: tk = $signed(rs1v) < $signed(rs2v);
          3'd5: tk = $signed(rs1v) >= $signed(rs2v);
          3'd6: tk = rs1v < rs2v;
          3'd7: tk = rs1v >= rs2v;
          default: tk = rs1v == rs2v;
        endcase
        if (tk) begin
          nx = mpc + 32'($signed({inst[31], inst[7], inst[30:25], inst[11:8], 1'b0}));
          mcycles += 6; n_taken[f3]++;
        end else begin
          mcycles += 3; n_ntaken[f3]++;
        end
        n_group[6]++;
      end else if (inst[6:0] == 7'b0110111) begin
        mx[rd] = {inst[31:12], 12'd0}; mcycles += 1; n_group[7]++;
      end else if (inst[6:0] == 7'b0010111) begin
        mx[rd] = mpc + {inst[31:12], 12'd0}; mcycles += 4; n_group[8]++;
      end else if (inst[6:0] == 7'b0001011) begin
        mm[widx(mx[rd])] = alu_ref(f3, inst[30], mm[widx(rs1v)], mm[widx(rs2v)]);
        mcycles += 7 + 3 * LAT; n_group[9]++;
      end else if (inst[6:0] == 7'b0101011) begin
        mx[rd] = alu_ref(f3, inst[30], mm[widx(rs1v)], rs2v);
        mcycles += 4 + LAT; n_group[11]++;
      end else if (inst[6:0] == 7'b1011011) begin
        mm[widx(mx[rd])] = alu_ref(f3, inst[30], rs1v, rs2v);
        mcycles += 5 + LAT; n_group[12]++;
      end else begin
        n_group[10]++;
        mpc = nx;          // the machine has incremented the PC in fetch2
        return 1;
      end
      mx[0] = 0;
      mpc = nx;
    end
  endfunction

  // ------------------------------------------------------------ mechanisms
  longint n_spin = 0, n_dispatch = 0, n_ffalse_exit = 0, n_ffalse_cont = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.word.jump == UJ_SPIN && dut.busy) n_spin++;
    if (dut.u_ctrl.word.jump == UJ_DISPATCH) n_dispatch++;
    if (dut.u_ctrl.word.jump == UJ_FFALSE) begin
      if (dut.zero) n_ffalse_cont++; else n_ffalse_exit++;
    end
  end

  // ------------------------------------------------------------ one run
  task automatic run_program(string name);
    longint cyc = 0;
    bit ok;
    logic [31:0] v;
    ok = run_model();
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: model did not halt", name); return; end
    rst_n = 0;
    for (int i = 0; i < DEPTH; i++) dut.u_mem.mem[i] = prog[i];
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    while (!halted && cyc < 200000) begin
      @(negedge clk); cyc++;
    end
    cycles_total += cyc;
    checks++;
    if (!halted) begin failures++; $display("FAIL %s: machine did not halt", name); return; end
    checks++;
    if (cyc != mcycles) begin
      failures++; $display("FAIL %s: %0d cycles, expected %0d", name, cyc, mcycles);
    end
    for (int r = 1; r < 32; r++) begin
      v = dut.u_dp.u_rf.regs[r];
      checks++;
      if (v !== mx[r]) begin failures++; $display("FAIL %s: x%0d=%h expected %h", name, r, v, mx[r]); end
    end
    v = dut.u_dp.u_rf.regs[32];
    checks++;
    if (v !== mpc) begin failures++; $display("FAIL %s: pc=%h expected %h", name, v, mpc); end
    for (int i = 0; i < DEPTH; i++) begin
      if (dut.u_mem.mem[i] !== mm[i]) begin
        checks++; failures++;
        $display("FAIL %s: mem[%0d]=%h expected %h", name, i, dut.u_mem.mem[i], mm[i]);
      end
    end
    checks++;
  endtask

  // ------------------------------------------------------------ programs
  task automatic fixed_program();
    for (int i = 0; i < DEPTH; i++) prog[i] = 0;
    prog[0]  = i_t(0, 31, 0, 12'd2047);            // addi x31, x0, 2047
    prog[1]  = i_t(0, 31, 31, 12'd1);              // addi x31, x31, 1   (0x800)
    prog[2]  = i_t(0, 1, 0, 12'd10);               // addi x1, x0, 10
    prog[3]  = i_t(0, 2, 0, 12'd0);                // addi x2, x0, 0
    prog[4]  = i_t(0, 3, 31, 12'd0);               // addi x3, x31, 0
    prog[5]  = s_t(3, 1, 12'd0);                   // loop: sw x1, 0(x3)
    prog[6]  = i_t(3'b010, 4, 3, 12'd0, 7'b0000011); // lw x4, 0(x3)
    prog[7]  = r_t(0, 0, 2, 2, 4);                 // add x2, x2, x4
    prog[8]  = i_t(0, 3, 3, 12'd4);                // addi x3, x3, 4
    prog[9]  = i_t(0, 1, 1, 12'hfff);              // addi x1, x1, -1
    prog[10] = b_t(3'b001, 1, 0, -13'sd20);        // bne x1, x0, loop
    prog[11] = j_t(5, 21'd20);                     // jal x5, sub (word 16)
    prog[12] = s_t(31, 2, 12'd64);                 // sw x2, 64(x31)
    prog[13] = TRAP_INST;
    prog[16] = i_t(0, 2, 2, 12'd100);              // sub: addi x2, x2, 100
    prog[17] = i_t(0, 0, 5, 12'd0, 7'b1100111);    // jalr x0, 0(x5)
  endtask

  function automatic logic [4:0] rnd_rd();
    return 5'($urandom_range(1, 26));
  endfunction
  function automatic logic [4:0] rnd_rs();
    int k = $urandom_range(0, 9);
    return (k == 0) ? 5'd0 : 5'($urandom_range(1, 8));   // few registers: equal values happen
  endfunction

  task automatic random_program();
    bit is_target [PLEN + 16];
    int p, last;
    for (int i = 0; i < DEPTH; i++) prog[i] = (i >= DATA0) ? $urandom : 32'd0;
    for (int i = 0; i < PLEN + 16; i++) is_target[i] = 0;
    // prologue: data pointers
    prog[0] = u_t(7'b0110111, 31, 20'h00001);            // lui  x31, 1       (0x1000)
    prog[1] = i_t(0, 31, 31, 12'h800);                   // addi x31, x31, -2048 (0x800)
    prog[2] = i_t(0, 28, 31, 12'(4 * $urandom_range(0, 255)));
    prog[3] = i_t(0, 29, 31, 12'(4 * $urandom_range(0, 255)));
    prog[4] = i_t(0, 30, 31, 12'(4 * $urandom_range(0, 255)));
    for (int r = 1; r <= 8; r++) prog[4 + r] = u_t(7'b0110111, 5'(r), 20'($urandom_range(0, 3)));
    p = 13;
    last = PLEN;
    while (p < last) begin
      int kind = $urandom_range(0, 13);
      logic [2:0] f3 = 3'($urandom_range(0, 7));
      bit alt = (f3 == 0 || f3 == 5) && ($urandom_range(0, 1) == 1);
      int maxfwd = last - p;          // target at most the trap slot
      case (kind)
        0, 1: prog[p] = r_t(f3, alt, rnd_rd(), rnd_rs(), rnd_rs());
        2: begin
          logic [11:0] imm = 12'($urandom);
          if (f3 == 1) imm = {7'b0, imm[4:0]};
          if (f3 == 5) imm = {1'b0, alt, 5'b0, imm[4:0]};
          prog[p] = i_t(f3, rnd_rd(), rnd_rs(), imm);
        end
        3: prog[p] = u_t($urandom_range(0, 1) == 1 ? 7'b0110111 : 7'b0010111, rnd_rd(), 20'($urandom));
        4: prog[p] = i_t(3'b010, rnd_rd(), 31, 12'(4 * $urandom_range(0, 255)), 7'b0000011);
        5: prog[p] = s_t(31, rnd_rs(), 12'(4 * $urandom_range(0, 255)));
        6: prog[p] = r_t(f3, alt, 5'($urandom_range(28, 30)), 5'($urandom_range(28, 30)),
                         5'($urandom_range(28, 30)), 7'b0001011);
        12: prog[p] = r_t(f3, alt, rnd_rd(), 5'($urandom_range(28, 30)), rnd_rs(), 7'b0101011);
        13: prog[p] = r_t(f3, alt, 5'($urandom_range(28, 30)), rnd_rs(), rnd_rs(), 7'b1011011);
        7, 8: begin
          logic [2:0] bf3 = 3'($urandom_range(0, 5));
          int k;
          if (bf3 >= 2) bf3 = bf3 + 3'd2;
          k = $urandom_range(1, (maxfwd > 6) ? 6 : maxfwd);
          is_target[p + k] = 1;
          prog[p] = b_t(bf3, rnd_rs(), rnd_rs(), 13'(4 * k));
        end
        9: begin
          int k = $urandom_range(1, (maxfwd > 5) ? 5 : maxfwd);
          is_target[p + k] = 1;
          prog[p] = j_t($urandom_range(0, 3) == 0 ? 5'd0 : rnd_rd(), 21'(4 * k));
        end
        default: begin
          // the JALR must not be a jump target: x27 would be stale there
          if (maxfwd >= 3 && !is_target[p + 1]) begin
            // auipc x27, 0 ; jalr rd, x27, 4*k  (k >= 2 words after the auipc)
            int k = $urandom_range(2, (maxfwd > 6) ? 6 : maxfwd);
            prog[p] = u_t(7'b0010111, 27, 20'd0);
            prog[p + 1] = i_t(0, $urandom_range(0, 3) == 0 ? 5'd0 : rnd_rd(), 27, 12'(4 * k), 7'b1100111);
            is_target[p + k] = 1;
            p++;
          end else prog[p] = i_t(0, 0, 0, 12'd0);     // nop
        end
      endcase
      p++;
    end
    prog[last] = TRAP_INST;
  endtask

  initial begin
    for (int i = 0; i < 13; i++) n_group[i] = 0;
    for (int i = 0; i < 8; i++) begin n_taken[i] = 0; n_ntaken[i] = 0; end
    repeat (2) @(negedge clk);

    fixed_program();
    run_program("fixed");
    checks++;
    if (dut.u_mem.mem[DATA0 + 16] !== 32'd155) begin
      failures++; $display("FAIL fixed: sum %0d, expected 155", dut.u_mem.mem[DATA0 + 16]);
    end

    for (int n = 0; n < NRAND; n++) begin
      random_program();
      run_program($sformatf("random %0d", n));
      if (failures > 20) break;
    end

    // mechanisms
    begin
      static string gname [13] = '{"ALU", "ALUi", "LW", "SW", "JAL", "JALR", "branch", "LUI", "AUIPC",
                            "mem-mem ALU", "trap", "reg-mem-src", "reg-mem-dst"};
      $display("cycles simulated: %0d", cycles_total);
      $display("memory busy spin cycles: %0d", n_spin);
      $display("dispatches: %0d", n_dispatch);
      $display("ffalse to fetch (branch not taken): %0d, fall through (taken): %0d", n_ffalse_exit, n_ffalse_cont);
      checks += 4;
      if (n_spin == 0) begin failures++; $display("FAIL no memory spin"); end
      if (n_dispatch == 0) begin failures++; $display("FAIL no dispatch"); end
      if (n_ffalse_exit == 0) begin failures++; $display("FAIL no untaken branch"); end
      if (n_ffalse_cont == 0) begin failures++; $display("FAIL no taken branch"); end
      for (int g = 0; g < 13; g++) begin
        $display("op-group %-12s executed %0d", gname[g], n_group[g]);
        checks++;
        if (n_group[g] == 0) begin failures++; $display("FAIL op-group %s never ran", gname[g]); end
      end
      foreach (n_taken[c]) if (c != 2 && c != 3) begin
        $display("branch funct3=%0d taken %0d not taken %0d", c, n_taken[c], n_ntaken[c]);
        checks++;
        if (n_taken[c] == 0 || n_ntaken[c] == 0) begin
          failures++; $display("FAIL branch funct3=%0d not seen both ways", c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
