// flexram_chip: a FlexRAM intelligent-memory chip.
//
// FlexRAM replaces a DRAM chip of a workstation. To the P.Host it is a plain
// 64-Mbyte (16M x 32) memory; programs written for it can in addition run on
// the chip's own processors, right beside the data: 64 P.Arrays, each working
// on its own 1-Mbyte bank (and able to reach its two neighbours' banks as a
// logical ring), coordinated by one P.Mem processor that can reach all memory.
//
// Structure (NUM_BB = 16 basic blocks of 4 P.Arrays, 4 banks, a shared
// instruction memory and a shared multiplier):
//   basic_block x NUM_BB   P.Arrays, banks and switches, imem, multiplier
//   pa_ring                P.Array requests to own / left / right bank
//   global_bus             P.Host interface and P.Mem to every bank
//   host_if                plain DRAM accesses, START / STATUS registers
//   pmem_mmio              P.Mem's memory-mapped view of the chip
//   sync_unit              notify register with interrupt, broadcast
//   refresh_ctrl           periodic refresh of all banks
//   net_if                 In / Out queues and packaging for the chip network
// The P.Mem itself (a two-issue processor with caches), the memory-bus PHY,
// the PLL, the per-block DLLs and the off-chip network router are outside this
// RTL: the P.Mem's bus (p_*), the host bus (h_*) and the two network links
// (tx_*, rx_*) are ports. pmem_start/pmem_start_addr start the P.Mem when the
// P.Host writes the START register; pmem_irq is the notify-pattern interrupt.
// Everything runs on one clock (400 MHz in the FlexRAM design).
//
// Typical use: the P.Host writes data into the memory and the start address
// of a P.Mem routine into START; the P.Mem loads P.Array code into the
// instruction memories, sets up the mapping tables, broadcasts parameters and
// starts the P.Arrays, waits for their notify bits (or their halt), combines
// results and writes DONE; the P.Host polls STATUS, which answers retry until
// then.
// Lint notes: the per-P.Array running and per-bank refreshing flags and the
// host interface's done flag are status outputs of the sub-blocks that
// nothing on the chip needs (the P.Mem sees halt and fault through STATUS, and
// the P.Host sees done through its STATUS read), so they stay unconnected
// here.
module flexram_chip
  import flexram_pkg::*;
#(
  parameter int unsigned        NUM_BB       = 16,
  parameter int unsigned        ROWS         = 512,
  parameter int unsigned        ROW_BYTES    = 2048,
  parameter int unsigned        NRB          = 3,
  parameter int unsigned        HIT_CYC      = 4,
  parameter int unsigned        MISS_CYC     = 8,
  parameter int unsigned        HOST_HIT     = 8,
  parameter int unsigned        HOST_MISS    = 16,
  parameter int unsigned        IDEPTH       = 4096,
  parameter int unsigned        QDEPTH       = 32,
  parameter int unsigned        REF_INTERVAL = 3200,
  parameter logic [BANK_AW-1:0] MAP_BASE     = 20'hFF000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        chip_id,
  // P.Host memory bus
  input  logic              h_valid,
  output logic              h_ready,
  input  logic              h_ctrl,
  input  word_req_t         h_req,
  output logic              h_rsp_valid,
  output logic [31:0]       h_rsp_rdata,
  output logic              h_rsp_retry,
  // P.Mem processor bus
  input  logic              p_valid,
  output logic              p_ready,
  input  word_req_t         p_req,
  output logic              p_rsp_valid,
  output logic [31:0]       p_rdata,
  output logic              pmem_start,
  output logic [31:0]       pmem_start_addr,
  output logic              pmem_irq,
  // inter-chip network links
  output logic              tx_valid,
  input  logic              tx_ready,
  output logic [1:0][15:0]  tx_beat,
  input  logic              rx_valid,
  output logic              rx_ready,
  input  logic [1:0][15:0]  rx_beat
);
  localparam int unsigned NPA = NUM_BB * 4;

  // ---------------- bank switch source ports, chip wide ----------------
  logic [NPA-1:0]  sw_valid [NSRC];
  logic [NPA-1:0]  sw_ready [NSRC];
  bank_req_t       sw_req   [NSRC][NPA];
  logic [NPA-1:0]  sw_rsp_valid [NSRC];
  bank_rsp_t       bank_rsp [NPA];

  // ---------------- P.Array side ----------------
  logic [NPA-1:0]  pa_valid, pa_ready, pa_rsp_valid;
  pa_req_t         pa_req [NPA];
  logic [DL_W-1:0] pa_rsp_rdata [NPA];
  logic [NPA-1:0]  running, halted, fault, notify, ref_req, refreshing;

  // ---------------- control ----------------
  logic               bc_wr, bc_valid, pa_start, done_set, done, irq;
  logic [31:0]        bc_wdata, bc_data;
  logic [IADDR_W-1:0] pa_start_pc;
  logic [NUM_BB-1:0]  im_we;
  logic [IADDR_W-2:0] im_waddr;
  logic [31:0]        im_wdata;
  logic [NPA-1:0]     notify_reg, mask;

  // ---------------- global bus ----------------
  logic [1:0]  gm_valid, gm_ready, gm_rsp_valid;
  word_req_t   gm_req [2];
  logic [31:0] gm_rdata;
  logic        gm_hit;
  bank_req_t   gb_req;

  // ---------------- network ----------------
  logic        tx_push, send, send_busy, rx_pop;
  logic [31:0] tx_wdata, rx_rdata;
  logic [7:0]  send_dest, send_len, send_type;
  logic [$clog2(QDEPTH):0] out_count, in_count;

  for (genvar b = 0; b < NUM_BB; b++) begin : g_bb
    logic [3:0]      l_sw_valid [NSRC];
    logic [3:0]      l_sw_ready [NSRC];
    bank_req_t       l_sw_req   [NSRC][4];
    logic [3:0]      l_sw_rsp_valid [NSRC];
    bank_rsp_t       l_bank_rsp [4];
    pa_req_t         l_pa_req [4];
    logic [DL_W-1:0] l_pa_rsp_rdata [4];

    for (genvar s = 0; s < NSRC; s++) begin : g_s
      assign l_sw_valid[s] = sw_valid[s][4*b +: 4];
      assign sw_ready[s][4*b +: 4] = l_sw_ready[s];
      assign sw_rsp_valid[s][4*b +: 4] = l_sw_rsp_valid[s];
      for (genvar k = 0; k < 4; k++) begin : g_k
        assign l_sw_req[s][k] = sw_req[s][4*b+k];
      end
    end
    for (genvar k = 0; k < 4; k++) begin : g_p
      assign bank_rsp[4*b+k]    = l_bank_rsp[k];
      assign pa_req[4*b+k]      = l_pa_req[k];
      assign l_pa_rsp_rdata[k]  = pa_rsp_rdata[4*b+k];
    end

    basic_block #(
      .NPA(4), .IDEPTH(IDEPTH), .ROWS(ROWS), .ROW_BYTES(ROW_BYTES), .NRB(NRB),
      .HIT_CYC(HIT_CYC), .MISS_CYC(MISS_CYC), .MAP_BASE(MAP_BASE)
    ) u_bb (
      .clk, .rst_n,
      .start(pa_start), .start_pc(pa_start_pc),
      .running(running[4*b +: 4]), .halted(halted[4*b +: 4]), .fault(fault[4*b +: 4]),
      .bc_valid, .bc_data, .notify(notify[4*b +: 4]),
      .im_we(im_we[b]), .im_waddr, .im_wdata,
      .pa_valid(pa_valid[4*b +: 4]), .pa_ready(pa_ready[4*b +: 4]), .pa_req(l_pa_req),
      .pa_rsp_valid(pa_rsp_valid[4*b +: 4]), .pa_rsp_rdata(l_pa_rsp_rdata),
      .sw_valid(l_sw_valid), .sw_ready(l_sw_ready), .sw_req(l_sw_req),
      .sw_rsp_valid(l_sw_rsp_valid), .bank_rsp(l_bank_rsp),
      .ref_req(ref_req[4*b +: 4]), .refreshing(refreshing[4*b +: 4])
    );
  end

  // ---------------- ring between P.Arrays and banks ----------------
  bank_req_t loc_req [NPA], lpa_req [NPA], rpa_req [NPA];
  for (genvar i = 0; i < NPA; i++) begin : g_req
    assign sw_req[SRC_GBUS][i] = gb_req;
    assign sw_req[SRC_LOC][i]  = loc_req[i];
    assign sw_req[SRC_LPA][i]  = lpa_req[i];
    assign sw_req[SRC_RPA][i]  = rpa_req[i];
  end

  pa_ring #(.N(NPA)) u_ring (
    .pa_valid, .pa_ready, .pa_req, .pa_rsp_valid, .pa_rsp_rdata,
    .loc_valid(sw_valid[SRC_LOC]), .lpa_valid(sw_valid[SRC_LPA]), .rpa_valid(sw_valid[SRC_RPA]),
    .loc_req, .lpa_req, .rpa_req,
    .loc_ready(sw_ready[SRC_LOC]), .lpa_ready(sw_ready[SRC_LPA]), .rpa_ready(sw_ready[SRC_RPA]),
    .loc_rsp_valid(sw_rsp_valid[SRC_LOC]), .lpa_rsp_valid(sw_rsp_valid[SRC_LPA]),
    .rpa_rsp_valid(sw_rsp_valid[SRC_RPA]),
    .bank_rsp
  );

  // ---------------- global bus: master 0 P.Host, master 1 P.Mem ----------------
  global_bus #(.NM(2), .NB(NPA)) u_gbus (
    .clk, .rst_n,
    .m_valid(gm_valid), .m_ready(gm_ready), .m_req(gm_req),
    .m_rsp_valid(gm_rsp_valid), .m_rdata(gm_rdata), .m_hit(gm_hit),
    .b_valid(sw_valid[SRC_GBUS]), .b_ready(sw_ready[SRC_GBUS]), .b_req(gb_req),
    .b_rsp_valid(sw_rsp_valid[SRC_GBUS]), .b_rsp(bank_rsp)
  );

  host_if #(.HIT_CYC(HOST_HIT), .MISS_CYC(HOST_MISS)) u_host (
    .clk, .rst_n,
    .h_valid, .h_ready, .h_ctrl, .h_req, .h_rsp_valid, .h_rsp_rdata, .h_rsp_retry,
    .g_valid(gm_valid[0]), .g_ready(gm_ready[0]), .g_req(gm_req[0]),
    .g_rsp_valid(gm_rsp_valid[0]), .g_rdata(gm_rdata), .g_hit(gm_hit),
    .pmem_start, .pmem_start_addr, .done_set, .done
  );

  pmem_mmio #(.NPA(NPA), .NBB(NUM_BB), .DEPTH(QDEPTH)) u_pmem (
    .clk, .rst_n,
    .p_valid, .p_ready, .p_req, .p_rsp_valid, .p_rdata,
    .g_valid(gm_valid[1]), .g_ready(gm_ready[1]), .g_req(gm_req[1]),
    .g_rsp_valid(gm_rsp_valid[1]), .g_rdata(gm_rdata),
    .im_we, .im_waddr, .im_wdata,
    .notify_reg, .mask, .irq, .bc_wr, .bc_wdata,
    .pa_start, .pa_start_pc, .pa_halted(halted), .pa_fault(fault),
    .done_set,
    .tx_push, .tx_wdata, .send, .send_dest, .send_len, .send_type, .send_busy, .out_count,
    .rx_pop, .rx_rdata, .in_count
  );

  sync_unit #(.NPA(NPA)) u_sync (
    .clk, .rst_n, .notify_in(notify), .notify_reg, .mask, .irq,
    .bc_wr, .bc_wdata, .bc_valid, .bc_data
  );
  assign pmem_irq = irq;

  refresh_ctrl #(.NB(NPA), .INTERVAL(REF_INTERVAL), .BANKS_PER_CMD(2)) u_ref (
    .clk, .rst_n, .ref_req
  );

  net_if #(.DEPTH(QDEPTH)) u_net (
    .clk, .rst_n, .chip_id,
    .tx_push, .tx_wdata, .send, .send_dest, .send_len, .send_type, .send_busy, .out_count,
    .rx_pop, .rx_rdata, .in_count,
    .tx_valid, .tx_ready, .tx_beat, .rx_valid, .rx_ready, .rx_beat
  );
endmodule
