// tb_reg_file: self-checking test of the 32 GPR + PC register file.
// Random writes and reads against a shadow array; x0 must stay zero, entry
// 32 (the PC) must behave like any other register, reset must clear all.
module tb_reg_file;
  logic        clk = 0, rst_n = 0;
  logic [5:0]  addr;
  logic        we;
  logic [31:0] wdata, rdata;
  logic [31:0] shadow [33];
  int checks = 0, failures = 0;

  reg_file dut (.clk(clk), .rst_n(rst_n), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    addr = 0; we = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 33; i++) shadow[i] = 0;
    // after reset every entry reads zero
    for (int i = 0; i < 33; i++) begin
      addr = 6'(i); #1; checks++;
      if (rdata !== 0) begin failures++; $display("FAIL reset r%0d=%h", i, rdata); end
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      addr  = 6'($urandom_range(0, 32));
      we    = $urandom_range(0, 1) == 1;
      wdata = $urandom;
      #1; checks++;
      if (rdata !== shadow[addr]) begin
        failures++; $display("FAIL read r%0d=%h exp=%h", addr, rdata, shadow[addr]);
      end
      @(posedge clk);
      if (we && addr != 0) shadow[addr] = wdata;
    end
    @(negedge clk); we = 0; addr = 0; #1; checks++;
    if (rdata !== 0) begin failures++; $display("FAIL x0 not zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
