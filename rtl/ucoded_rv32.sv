// ucoded_rv32: a microcoded RISC-V machine built around one shared bus.
//
// Three parts, as in the classic microprogrammed organisation: the
// microcontroller (microPC, control ROM, jump logic) holds the fixed
// microcode; the bus-based datapath (IR, A, B, MA, ALU, immediate select,
// register file with the PC) executes one register transfer per clock; the
// memory holds the user program and its data and is slow, taking
// MEM_LATENCY+1 cycles per access, which the microcode waits out with spin
// microbranches.  Each RISC-V instruction therefore costs several cycles: a
// fetch of 3 + MEM_LATENCY cycles, then 1 to 7 microinstructions for its
// op-group, plus MEM_LATENCY for each further memory access.
//
// Interface: clock, active-low asynchronous reset; the PC starts at 0.  The
// outputs show the machine's activity: `halted` rises when an unknown opcode
// sends the controller into its trap state; `upc`, `bus` and `ma` are the
// microPC, the bus value and the memory address of the current cycle.
//
// Follows the source: the three-part organisation and the connections
// between the parts (busy, zero?, opcode to the controller; control signals
// to datapath and memory; data and address between datapath and memory).
// Own choices: the output ports, MEM_DEPTH and MEM_LATENCY.
module ucoded_rv32
  import mc_pkg::*;
#(
  parameter int unsigned MEM_DEPTH   = 1024,
  parameter int unsigned MEM_LATENCY = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic            halted,
  output upc_t            upc,
  output logic [XLEN-1:0] bus,
  output logic [XLEN-1:0] ma
);

  ctrl_t           ctrl;
  logic [6:0]      opcode;
  logic            zero, busy;
  logic [XLEN-1:0] mem_dout;
  logic            mem_dout_en;

  ucontroller u_ctrl (
    .clk(clk), .rst_n(rst_n), .opcode(opcode), .zero(zero), .busy(busy),
    .ctrl(ctrl), .upc(upc), .jump(), .halted(halted)
  );

  bus_datapath u_dp (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl),
    .mem_dout(mem_dout), .mem_dout_en(mem_dout_en),
    .ma(ma), .bus(bus), .opcode(opcode), .zero(zero)
  );

  bus_memory #(.DEPTH(MEM_DEPTH), .LATENCY(MEM_LATENCY)) u_mem (
    .clk(clk), .rst_n(rst_n), .addr(ma), .enable(ctrl.en_mem),
    .write(ctrl.mem_wrt), .din(bus), .dout(mem_dout),
    .dout_en(mem_dout_en), .busy(busy)
  );

endmodule
