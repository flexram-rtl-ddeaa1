// basic_block: one of the 16 replicated basic blocks of a FlexRAM chip.
//
// It holds 4 P.Arrays (pa_core), their 4 1-Mbyte DRAM banks (dram_bank), each
// behind its switch (bank_switch), one 8-Kbyte 4-ported instruction memory
// (imem) shared by the 4 P.Arrays, and one multiplier (mult_shared) shared by
// them. P.Array k fetches through imem port k and multiplies through
// multiplier port k. The data side is left open at the block's ports: the
// P.Arrays' requests leave the block and the banks' switch ports for the own,
// left and right P.Array enter it, so that the chip can close the ring across
// blocks (pa_ring). The global-bus port of each bank switch and each bank's
// refresh request are ports too (refreshing shows a bank busy refreshing). The block's contents follow the FlexRAM
// floorplan; the DLL that clocks it is not modelled, all logic runs on clk.
module basic_block
  import flexram_pkg::*;
#(
  parameter int unsigned       NPA       = 4,
  parameter int unsigned       IDEPTH    = 4096,
  parameter int unsigned       ROWS      = 512,
  parameter int unsigned       ROW_BYTES = 2048,
  parameter int unsigned       NRB       = 3,
  parameter int unsigned       HIT_CYC   = 4,
  parameter int unsigned       MISS_CYC  = 8,
  parameter logic [BANK_AW-1:0] MAP_BASE = 20'hFF000
) (
  input  logic               clk,
  input  logic               rst_n,
  // P.Array control
  input  logic               start,
  input  logic [IADDR_W-1:0] start_pc,
  output logic [NPA-1:0]     running,
  output logic [NPA-1:0]     halted,
  output logic [NPA-1:0]     fault,
  input  logic               bc_valid,
  input  logic [31:0]        bc_data,
  output logic [NPA-1:0]     notify,
  // instruction memory load
  input  logic               im_we,
  input  logic [IADDR_W-2:0] im_waddr,
  input  logic [31:0]        im_wdata,
  // P.Array data requests (to the ring)
  output logic [NPA-1:0]     pa_valid,
  input  logic [NPA-1:0]     pa_ready,
  output pa_req_t            pa_req [NPA],
  input  logic [NPA-1:0]     pa_rsp_valid,
  input  logic [DL_W-1:0]    pa_rsp_rdata [NPA],
  // bank switch source ports (from the ring and the global bus)
  input  logic [NPA-1:0]     sw_valid [NSRC],
  output logic [NPA-1:0]     sw_ready [NSRC],
  input  bank_req_t          sw_req [NSRC][NPA],
  output logic [NPA-1:0]     sw_rsp_valid [NSRC],
  output bank_rsp_t          bank_rsp [NPA],
  // refresh
  input  logic [NPA-1:0]     ref_req,
  output logic [NPA-1:0]     refreshing
);
  logic [IADDR_W-1:0] iaddr [NPA];
  logic [15:0]        idata [NPA];
  logic [NPA-1:0]     mreq, mdone;
  logic [31:0]        ma [NPA], mb [NPA];
  logic [31:0]        mres;

  imem #(.DEPTH(IDEPTH), .NPORTS(NPA)) u_imem (
    .clk, .raddr(iaddr), .rdata(idata), .we(im_we), .waddr(im_waddr), .wdata(im_wdata)
  );

  mult_shared #(.NREQ(NPA)) u_mul (
    .clk, .rst_n, .req(mreq), .a(ma), .b(mb), .done(mdone), .result(mres)
  );

  for (genvar k = 0; k < NPA; k++) begin : g_pa
    logic [NSRC-1:0] s_valid, s_ready, s_rsp_valid;
    bank_req_t       s_req [NSRC];
    logic            b_valid, b_ready, b_rsp_valid;
    bank_req_t       b_req;
    bank_rsp_t       b_rsp;

    pa_core #(.MAP_BASE(MAP_BASE)) u_pa (
      .clk, .rst_n, .start, .start_pc,
      .running(running[k]), .halted(halted[k]), .fault(fault[k]),
      .imem_addr(iaddr[k]), .imem_rdata(idata[k]),
      .mem_valid(pa_valid[k]), .mem_ready(pa_ready[k]), .mem_req(pa_req[k]),
      .mem_rsp_valid(pa_rsp_valid[k]), .mem_rsp_rdata(pa_rsp_rdata[k]),
      .mul_req(mreq[k]), .mul_a(ma[k]), .mul_b(mb[k]), .mul_done(mdone[k]), .mul_result(mres),
      .bc_valid, .bc_data, .notify(notify[k])
    );

    for (genvar s = 0; s < NSRC; s++) begin : g_src
      assign s_valid[s]         = sw_valid[s][k];
      assign s_req[s]           = sw_req[s][k];
      assign sw_ready[s][k]     = s_ready[s];
      assign sw_rsp_valid[s][k] = s_rsp_valid[s];
    end

    bank_switch u_sw (
      .clk, .rst_n,
      .src_valid(s_valid), .src_ready(s_ready), .src_req(s_req),
      .src_rsp_valid(s_rsp_valid), .rsp(bank_rsp[k]),
      .bank_valid(b_valid), .bank_ready(b_ready), .bank_req(b_req),
      .bank_rsp_valid(b_rsp_valid), .bank_rsp(b_rsp)
    );

    dram_bank #(
      .ROWS(ROWS), .ROW_BYTES(ROW_BYTES), .NRB(NRB), .HIT_CYC(HIT_CYC), .MISS_CYC(MISS_CYC)
    ) u_bank (
      .clk, .rst_n,
      .req_valid(b_valid), .req_ready(b_ready), .req(b_req),
      .rsp_valid(b_rsp_valid), .rsp(b_rsp),
      .ref_req(ref_req[k]), .ref_active(refreshing[k])
    );
  end
endmodule
