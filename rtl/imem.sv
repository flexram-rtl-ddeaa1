// imem: the 8-Kbyte, 4-ported SRAM instruction memory of a FlexRAM basic block.
//
// The four P.Arrays of a basic block share it, each through its own read
// port; it holds DEPTH 16-bit instructions (4096 = 8 Kbyte). A read is
// synchronous: the address presented in one cycle gives its instruction in
// the next (one 2.5-ns cycle at 400 MHz). The P.Mem loads programs through the
// write port, one 32-bit word, i.e. two instructions, per cycle: the low half
// goes to the even instruction. The memory is not reset. The size, port count
// and sharing follow the FlexRAM design; the write-port width is this
// design's own choice.
module imem
  import flexram_pkg::*;
#(
  parameter int unsigned DEPTH  = 4096,
  parameter int unsigned NPORTS = 4
) (
  input  logic                     clk,
  input  logic [IADDR_W-1:0]       raddr [NPORTS],
  output logic [15:0]              rdata [NPORTS],
  input  logic                     we,
  input  logic [IADDR_W-2:0]       waddr,   // word (instruction pair) index
  input  logic [31:0]              wdata
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [15:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[{waddr[AW-2:0], 1'b0}] <= wdata[15:0];
      mem[{waddr[AW-2:0], 1'b1}] <= wdata[31:16];
    end
    for (int p = 0; p < NPORTS; p++) rdata[p] <= mem[raddr[p][AW-1:0]];
  end

endmodule
