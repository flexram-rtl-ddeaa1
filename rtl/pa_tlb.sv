// pa_tlb: the 8-entry fully associative data TLB of a P.Array.
//
// Only data references are translated (instruction fetches go straight to the
// instruction memory). Every entry holds a virtual page number, a physical
// page number (2-bit bank target: own, left or right neighbour, plus the page
// inside that 1-Mbyte bank) and a valid bit. Lookup is combinational: all
// entries are compared at once. A fill writes the first invalid entry, or
// else the entries in turn (FIFO order). flush clears every entry. The size
// and full associativity follow the FlexRAM design; the replacement order is
// this design's own choice.
module pa_tlb
  import flexram_pkg::*;
#(
  parameter int unsigned ENTRIES = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic [VPN_W-1:0] vpn,
  output logic             hit,
  output logic [PPN_W-1:0] ppn,
  input  logic             fill,
  input  logic [VPN_W-1:0] fill_vpn,
  input  logic [PPN_W-1:0] fill_ppn
);
  localparam int unsigned EW = $clog2(ENTRIES);

  logic [VPN_W-1:0]   tag [ENTRIES];
  logic [PPN_W-1:0]   pte [ENTRIES];
  logic [ENTRIES-1:0] val;
  logic [EW-1:0]      ptr, slot;

  always_comb begin
    hit = 1'b0;
    ppn = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (val[i] && tag[i] == vpn) begin
        hit = 1'b1;
        ppn = pte[i];
      end
  end

  always_comb begin
    slot = ptr;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!val[i]) slot = EW'(i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      val <= '0;
      ptr <= '0;
    end else if (fill) begin
      tag[slot] <= fill_vpn;
      pte[slot] <= fill_ppn;
      val[slot] <= 1'b1;
      if (&val) ptr <= ptr + 1'b1;
    end
  end

endmodule
