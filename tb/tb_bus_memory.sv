// tb_bus_memory: self-checking test of the slow bus memory.
// Performs random word writes and reads the way the microcode does (hold
// enable until busy drops) and checks: busy stays high for exactly LATENCY
// cycles of each access, read data match a shadow copy, the bus drive
// enable is high only for reads, and a store writes nothing before its
// last cycle.
module tb_bus_memory;
  localparam int unsigned DEPTH = 1024;
  localparam int unsigned LAT   = 10;

  logic        clk = 0, rst_n = 0;
  logic [31:0] addr, din, dout;
  logic        enable, write, dout_en, busy;
  logic [31:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  bus_memory dut (.clk(clk), .rst_n(rst_n), .addr(addr), .enable(enable), .write(write),
                  .din(din), .dout(dout), .dout_en(dout_en), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // One access; returns the read data.
  task automatic access(bit wr, logic [31:0] a, logic [31:0] d, output logic [31:0] q);
    int busy_cycles = 0;
    @(negedge clk);
    enable = 1; write = wr; addr = a; din = d;
    #1;
    while (busy) begin
      check(dout_en == !wr, "dout_en while busy");
      busy_cycles++;
      @(negedge clk); #1;
    end
    q = dout;
    check(dout_en == !wr, "dout_en in last cycle");
    check(busy_cycles == LAT, $sformatf("busy for %0d cycles, expected %0d", busy_cycles, LAT));
    @(posedge clk);
    @(negedge clk);
    enable = 0; write = 0;
  endtask

  initial begin
    logic [31:0] q;
    int idx;
    enable = 0; write = 0; addr = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Fill a window of words with known values.
    for (int i = 0; i < 64; i++) begin
      shadow[i] = $urandom;
      access(1, 32'(i * 4), shadow[i], q);
    end
    for (int k = 0; k < 300; k++) begin
      idx = $urandom_range(0, 63);
      if ($urandom_range(0, 2) == 0) begin
        logic [31:0] v;
        v = $urandom;
        // no write before the access completes: an aborted store must not land
        @(negedge clk); enable = 1; write = 1; addr = 32'(idx * 4); din = ~v;
        repeat (LAT / 2) @(negedge clk);
        enable = 0; write = 0;
        @(negedge clk);
        access(0, 32'(idx * 4), 0, q);
        check(q == shadow[idx], $sformatf("aborted store changed word %0d", idx));
        access(1, 32'(idx * 4) | 32'($urandom_range(0, 3)), v, q);
        shadow[idx] = v;
      end else begin
        access(0, 32'(idx * 4), 0, q);
        check(q == shadow[idx], $sformatf("read word %0d = %h, expected %h", idx, q, shadow[idx]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
