// reg_file: the "32 GPRs + PC" register file of the bus-based datapath.
//
// One read/write port serves the bus: `addr` (0-31 for x0-x31, 32 for the
// PC) is chosen by the RegSel multiplexer in the datapath.  The read is
// combinational (the datapath drives `rdata` onto the bus when enReg is
// high); a write takes effect at the rising clock edge when `we` (RegWrt) is
// high.  x0 always reads zero and ignores writes.  Reset clears every entry,
// so the PC starts at address 0.
//
// Follows the source: 32 x 32-bit integer registers plus the PC in one
// array, a single bus port, x0 hardwired to zero.  Own choices: the reset
// value 0 of the PC and of the registers, and the synchronous write.
module reg_file
  import mc_pkg::*;
#(
  parameter int unsigned NREGS = 33   // x0-x31 and the PC
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] addr,
  input  logic                     we,
  input  logic [XLEN-1:0]          wdata,
  output logic [XLEN-1:0]          rdata
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && addr != '0 && 32'(addr) < NREGS) begin
      regs[addr] <= wdata;
    end
  end

  assign rdata = (addr == '0 || 32'(addr) >= NREGS) ? '0 : regs[addr];

endmodule
