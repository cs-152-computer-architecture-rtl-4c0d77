// bus_memory: the slow main memory module that hangs on the datapath bus.
//
// The memory runs independently of the processor and needs several clock
// cycles per access.  The processor holds the address in MA and raises
// `enable` (enMem), with `write` (MemWrt) telling a store from a load, and
// keeps them asserted while `busy` is high; the microcode does this with a
// "spin" microinstruction.  An access therefore occupies LATENCY+1 cycles:
// `busy` is high for the first LATENCY cycles that `enable` is held and low
// in the last one.  A load's data are on `dout` in that last cycle; a store
// writes `din` into the array at the end of it.  Dropping `enable` aborts an
// access and clears the cycle counter.
//
// As drawn for the memory module, the RAM write enable is `write AND enable`
// and the RAM output drives the bus only when `enable AND NOT write`; here the
// bus driver is the `dout_en` output and the datapath's bus multiplexer, since
// the bus is built as a multiplexer rather than with tri-state buffers.
// Addressing is by bytes with 32-bit words: address bits [1:0] are ignored
// and word accesses only.
//
// Own choices: the counter-based busy timing, DEPTH and LATENCY.  LATENCY=10
// reflects the lecture's performance assumption that a RAM access lasts
// about ten microinstruction cycles.
module bus_memory
  import mc_pkg::*;
#(
  parameter int unsigned DEPTH   = 1024,  // 32-bit words
  parameter int unsigned LATENCY = 10     // busy cycles per access
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [XLEN-1:0] addr,
  input  logic            enable,
  input  logic            write,
  input  logic [XLEN-1:0] din,
  output logic [XLEN-1:0] dout,
  output logic            dout_en,
  output logic            busy
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(LATENCY + 2);

  logic [XLEN-1:0] mem [DEPTH];
  logic [CW-1:0]   cnt;
  logic [AW-1:0]   widx;
  logic            done;
  logic            we;

  assign widx    = addr[AW+1:2];
  assign done    = enable && (32'(cnt) == LATENCY);
  assign busy    = enable && !done;
  assign we      = write && enable;
  assign dout_en = enable && !write;
  assign dout    = mem[widx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cnt <= '0;
    else if (!enable)  cnt <= '0;
    else if (done)     cnt <= '0;
    else               cnt <= cnt + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (we && done) mem[widx] <= din;
  end

endmodule
