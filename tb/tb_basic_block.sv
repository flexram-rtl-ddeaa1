// tb_basic_block: one basic block (4 P.Arrays, 4 banks, shared instruction
// memory and multiplier) closed into a 4-wide ring by pa_ring, with the test
// bench acting as the global bus on every bank's GBUS port. The bench fills
// the arrays, the TLB tables and the instruction memory, starts the P.Arrays
// and broadcasts K. Each P.Array sums K words of its own array, multiplies
// the first words of its left and right neighbours' arrays (through the
// ring and the shared multiplier), stores both results, notifies and halts.
// Checks: results, notify/halt/fault outputs, GBUS miss latency (MISS_CYC
// edges) and hit latency (HIT_CYC edges), refresh timing, that the P.Arrays cannot start
// before the broadcast.
module tb_basic_block;
  import flexram_pkg::*;
  import pa_asm_pkg::*;
  localparam int NPA = 4, K = 24, HIT = 4, MISS = 8;
  localparam logic [19:0] MAP = 20'hFF000;
  logic clk = 0, rst_n = 0;
  logic start, bc_valid, im_we; logic [IADDR_W-1:0] start_pc; logic [31:0] bc_data, im_wdata;
  logic [IADDR_W-2:0] im_waddr;
  logic [NPA-1:0] running, halted, fault, notify, pa_valid, pa_ready, pa_rsp_valid, ref_req, refreshing;
  pa_req_t pa_req [NPA]; logic [DL_W-1:0] pa_rsp_rdata [NPA];
  logic [NPA-1:0] sw_valid [NSRC], sw_ready [NSRC], sw_rsp_valid [NSRC];
  bank_req_t sw_req [NSRC][NPA]; bank_rsp_t bank_rsp [NPA];
  logic [NPA-1:0] g_valid; bank_req_t g_req [NPA];
  int checks = 0, failures = 0;

  basic_block #(.NPA(NPA), .HIT_CYC(HIT), .MISS_CYC(MISS), .MAP_BASE(MAP)) dut (.*);
  pa_ring #(.N(NPA)) u_ring (.pa_valid, .pa_ready, .pa_req, .pa_rsp_valid, .pa_rsp_rdata,
    .loc_valid(sw_valid[SRC_LOC]), .lpa_valid(sw_valid[SRC_LPA]), .rpa_valid(sw_valid[SRC_RPA]),
    .loc_req(sw_req[SRC_LOC]), .lpa_req(sw_req[SRC_LPA]), .rpa_req(sw_req[SRC_RPA]),
    .loc_ready(sw_ready[SRC_LOC]), .lpa_ready(sw_ready[SRC_LPA]), .rpa_ready(sw_ready[SRC_RPA]),
    .loc_rsp_valid(sw_rsp_valid[SRC_LOC]), .lpa_rsp_valid(sw_rsp_valid[SRC_LPA]),
    .rpa_rsp_valid(sw_rsp_valid[SRC_RPA]), .bank_rsp);
  assign sw_valid[SRC_GBUS] = g_valid;
  assign sw_req[SRC_GBUS]   = g_req;

  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string what, longint got, longint exp);
    checks++; if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // one word access on bank b's GBUS port; lat = edges from acceptance to response
  task automatic gbus(int b, logic we, logic [19:0] addr, logic [31:0] wd, output logic [31:0] rd, output int lat);
    @(negedge clk);
    g_valid[b] = 1'b1;
    g_req[b] = '{we: we, addr: addr, wdata: {4{wd}}, be: 16'hF << (4 * addr[3:2])};
    #1; while (!sw_ready[SRC_GBUS][b]) begin @(negedge clk); #1; end
    @(posedge clk); #1 g_valid[b] = 1'b0;
    lat = 0;
    @(negedge clk);
    while (!sw_rsp_valid[SRC_GBUS][b]) begin lat++; @(negedge clk); end
    rd = bank_rsp[b].rdata[32 * addr[3:2] +: 32];
  endtask

  function automatic logic [31:0] val(int b, int i);
    return 32'(b * 777 + i * 5 + 1);
  endfunction

  logic [15:0] prog [64];
  int np;

  initial begin
    logic [31:0] d; int lat, t0;
    longint exp_sum;
    np = 0;
    prog[np++] = I(OP_BCF, 12, 0);       // wait for the broadcast
    prog[np++] = I(OP_BEQZ, 12, -1);
    prog[np++] = I(OP_BCR, 1, 0);        // r1 = K
    prog[np++] = I(OP_LI, 3, 1);
    prog[np++] = I(OP_SLLI, 3, 22);      // r3 = 0x400000 : own array
    prog[np++] = I(OP_LI, 5, 0);
    prog[np++] = M(OP_LW, 6, 3, 0);      // loop
    prog[np++] = R(OP_ADD, 5, 6);
    prog[np++] = I(OP_ADDI, 3, 4);
    prog[np++] = I(OP_ADDI, 1, -1);
    prog[np++] = I(OP_BNEZ, 1, -4);
    prog[np++] = I(OP_LI, 4, 1);
    prog[np++] = I(OP_SLLI, 4, 12);      // r4 = 0x1000
    prog[np++] = I(OP_LI, 9, 1);
    prog[np++] = I(OP_SLLI, 9, 22);
    prog[np++] = R(OP_ADD, 9, 4);        // left array
    prog[np++] = M(OP_LW, 7, 9, 0);
    prog[np++] = R(OP_ADD, 9, 4);        // right array
    prog[np++] = M(OP_LW, 8, 9, 0);
    prog[np++] = R(OP_MUL, 7, 8);
    prog[np++] = I(OP_LI, 10, 1);
    prog[np++] = I(OP_SLLI, 10, 22);
    prog[np++] = I(OP_LI, 11, 1);
    prog[np++] = I(OP_SLLI, 11, 11);
    prog[np++] = R(OP_ADD, 10, 11);      // 0x400800
    prog[np++] = M(OP_SW, 5, 10, 0);
    prog[np++] = M(OP_SW, 7, 10, 1);
    prog[np++] = I(OP_NTF, 0, 1);
    prog[np++] = I(OP_HALT, 0, 0);
    if (np % 2) prog[np++] = I(OP_HALT, 0, 0);

    start = 0; start_pc = 0; bc_valid = 0; bc_data = 0; im_we = 0; im_waddr = 0; im_wdata = 0;
    ref_req = '0; g_valid = '0;
    for (int b = 0; b < NPA; b++) g_req[b] = '0;
    repeat (4) @(posedge clk); #1 rst_n = 1;

    for (int b = 0; b < NPA; b++) begin
      for (int i = 0; i < K; i++) gbus(b, 1, 20'(4 * i), val(b, i), d, lat);
      gbus(b, 0, 20'h4_0000, 0, d, lat); chk("GBUS miss latency", lat, MISS);
      gbus(b, 0, 20'h8, 0, d, lat);      chk("GBUS hit latency", lat, HIT);
      chk("GBUS read", d, val(b, 2));
      gbus(b, 1, MAP, 3, d, lat);
      gbus(b, 1, MAP + 16, 32'h400, d, lat); gbus(b, 1, MAP + 20, 32'h400, d, lat); gbus(b, 1, MAP + 24, {22'd0, TGT_OWN, 8'h00}, d, lat);
      gbus(b, 1, MAP + 32, 32'h401, d, lat); gbus(b, 1, MAP + 36, 32'h401, d, lat); gbus(b, 1, MAP + 40, {22'd0, TGT_LEFT, 8'h00}, d, lat);
      gbus(b, 1, MAP + 48, 32'h402, d, lat); gbus(b, 1, MAP + 52, 32'h402, d, lat); gbus(b, 1, MAP + 56, {22'd0, TGT_RIGHT, 8'h00}, d, lat);
    end
    for (int w = 0; w < np / 2; w++) begin
      @(negedge clk); im_we = 1; im_waddr = 11'(w); im_wdata = {prog[2*w+1], prog[2*w]};
    end
    @(negedge clk); im_we = 0;
    // refresh request: bank 2 busy for a while
    // the request is latched at the first edge and the refresh starts at the
    // next one; it keeps the bank busy for MISS_CYC cycles
    ref_req = 4'b0100; @(negedge clk); ref_req = '0;
    chk("refresh not yet started", refreshing, 0);
    lat = 0;
    @(negedge clk);
    while (refreshing == 4'b0100) begin lat++; @(negedge clk); end
    chk("refresh cycles on bank 2 only", lat, MISS);

    @(negedge clk); start = 1; start_pc = 0; @(negedge clk); start = 0;
    repeat (50) @(negedge clk);
    chk("running, waiting for the broadcast", running, 4'hF);
    chk("no notify before the broadcast", notify, 0);
    bc_valid = 1; bc_data = K; @(negedge clk); bc_valid = 0;
    t0 = 0;
    while (halted != 4'hF && t0 < 100000) begin @(negedge clk); t0++; end
    $display("P.Arrays done %0d cycles after the broadcast", t0);
    chk("all halted", halted, 4'hF);
    chk("no fault", fault, 0);
    chk("all notified", notify, 4'hF);
    chk("finishes in a bounded time", t0 < 2000, 1);
    for (int b = 0; b < NPA; b++) begin
      exp_sum = 0;
      for (int i = 0; i < K; i++) exp_sum += val(b, i);
      gbus(b, 0, 20'h800, 0, d, lat); chk("sum", d, 32'(exp_sum));
      gbus(b, 0, 20'h804, 0, d, lat);
      chk("neighbour product", d, 32'(val((b + NPA - 1) % NPA, 0) * val((b + 1) % NPA, 0)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
