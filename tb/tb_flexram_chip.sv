// tb_flexram_chip: end-to-end test of a whole FlexRAM chip at its default size
// (16 basic blocks, 64 P.Arrays, 64 banks of 1 Mbyte).
//
// The test plays the P.Host, the P.Mem and the network router:
//  1. The P.Host writes a K-word array into every bank as plain DRAM and reads
//     some back, checking data and the 8/16-cycle hit/miss access times.
//  2. The P.Host starts the P.Mem through START and polls STATUS, which must
//     answer retry while the job runs.
//  3. The P.Mem writes each bank's mapping table, loads the P.Array program
//     into all 16 instruction memories, sets the notify mask, starts the
//     P.Arrays and broadcasts K. Each P.Array sums its own array, multiplies
//     the first words of its left and right neighbours' arrays (the ring,
//     through TLB misses and table walks, on the shared multiplier), stores
//     both results, sets its notify bit and halts. While they run the P.Mem
//     reads DRAM, so the global bus contends with P.Arrays at the switches.
//  4. The P.Mem waits for the notify interrupt, checks every result, sends a
//     message through its network interface (looped back by the router model)
//     and reads it back, then writes DONE; the P.Host's STATUS read succeeds.
// Counted mechanisms, each of which must occur: host row-buffer hits and
// misses, STATUS retries, TLB walks, left and right neighbour accesses,
// multiplier contention, global-bus/P.Array contention at a bank switch,
// refreshes, and network messages.
module tb_flexram_chip;
  import flexram_pkg::*;
  import pa_asm_pkg::*;
  localparam int NPA = 64, K = 8;
  localparam logic [19:0] MAP = 20'hFF000;

  logic clk = 0, rst_n = 0;
  logic [7:0] chip_id = 8'h05;
  logic h_valid = 0, h_ready, h_ctrl = 0, h_rsp_valid, h_rsp_retry;
  word_req_t h_req = '0;
  logic [31:0] h_rsp_rdata;
  logic p_valid = 0, p_ready, p_rsp_valid, pmem_start, pmem_irq;
  word_req_t p_req = '0;
  logic [31:0] p_rdata, pmem_start_addr;
  logic tx_valid, tx_ready, rx_valid, rx_ready;
  logic [1:0][15:0] tx_beat, rx_beat;

  flexram_chip dut (.*);

  // router model: loops the Out link back to the In link
  assign rx_valid = tx_valid;
  assign rx_beat  = tx_beat;
  assign tx_ready = rx_ready;

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_retry = 0, n_walk = 0, n_left = 0, n_right = 0;
  int n_mulc = 0, n_contend = 0, n_ref = 0, n_net = 0;

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NPA; i++) begin
      if (dut.sw_valid[SRC_LPA][i] && dut.sw_ready[SRC_LPA][i]) n_right++;  // a P.Array reached its right bank
      if (dut.sw_valid[SRC_RPA][i] && dut.sw_ready[SRC_RPA][i]) n_left++;
      if (dut.sw_valid[SRC_LOC][i] && dut.sw_ready[SRC_LOC][i] && dut.sw_req[SRC_LOC][i].addr == MAP && !dut.sw_req[SRC_LOC][i].we) n_walk++;
      if (dut.sw_valid[SRC_GBUS][i] && (dut.sw_valid[SRC_LOC][i] || dut.sw_valid[SRC_LPA][i] || dut.sw_valid[SRC_RPA][i])) n_contend++;
    end
    if (|dut.ref_req) n_ref++;
    if ($countones(dut.g_bb[0].u_bb.u_mul.req) > 1) n_mulc++;
    if (tx_valid && tx_ready) n_net++;
  end

  initial begin
    #20000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0h expected %0h", what, got, exp); end
  endtask

  // ---------------- P.Host bus ----------------
  task automatic host(input logic we, input logic ctrl, input logic [31:0] addr, input logic [31:0] wd,
                      output logic [31:0] rd, output logic retry, output int lat);
    @(negedge clk);
    h_valid = 1; h_ctrl = ctrl; h_req.we = we; h_req.addr = addr; h_req.wdata = wd; h_req.be = 4'hf;
    forever begin logic r; #1 r = h_ready; @(posedge clk); if (r) break; @(negedge clk); end
    #1 h_valid = 0;
    lat = 0;
    do begin @(posedge clk); #1 lat++; end while (!h_rsp_valid && lat < 1000);
    rd = h_rsp_rdata; retry = h_rsp_retry;
  endtask

  // ---------------- P.Mem bus ----------------
  task automatic pm(input logic we, input logic [31:0] addr, input logic [31:0] wd, output logic [31:0] rd);
    int t;
    @(negedge clk);
    p_valid = 1; p_req.we = we; p_req.addr = addr; p_req.wdata = wd; p_req.be = 4'hf;
    forever begin logic r; #1 r = p_ready; @(posedge clk); if (r) break; @(negedge clk); end
    #1 p_valid = 0;
    t = 0;
    while (!p_rsp_valid && t < 1000) begin @(posedge clk); #1 t++; end
    rd = p_rdata;
  endtask
  task automatic pmw(input logic [31:0] addr, input logic [31:0] wd);
    logic [31:0] d; pm(1, addr, wd, d);
  endtask

  function automatic logic [31:0] val(int b, int i);
    return 32'(b * 1000 + i * 7 + 3);
  endfunction

  logic [15:0] prog [64];
  int np;

  initial begin
    logic [31:0] d; logic retry; int lat, t0;
    longint exp_sum, exp_prod;
    // ---- P.Array program (SPMD) ----
    np = 0;
    prog[np++] = I(OP_BCF, 12, 0);       // 0: wait for the broadcast
    prog[np++] = I(OP_BEQZ, 12, -1);
    prog[np++] = I(OP_BCR, 1, 0);        // r1 = K
    prog[np++] = I(OP_LI, 3, 1);
    prog[np++] = I(OP_SLLI, 3, 22);      // r3 = 0x400000 : own array
    prog[np++] = I(OP_LI, 5, 0);
    prog[np++] = M(OP_LW, 6, 3, 0);      // 6: loop
    prog[np++] = R(OP_ADD, 5, 6);
    prog[np++] = I(OP_ADDI, 3, 4);
    prog[np++] = I(OP_ADDI, 1, -1);
    prog[np++] = I(OP_BNEZ, 1, -4);
    prog[np++] = I(OP_LI, 4, 1);
    prog[np++] = I(OP_SLLI, 4, 12);      // r4 = 0x1000
    prog[np++] = I(OP_LI, 9, 1);
    prog[np++] = I(OP_SLLI, 9, 22);
    prog[np++] = R(OP_ADD, 9, 4);        // r9 = 0x401000 : left array
    prog[np++] = M(OP_LW, 7, 9, 0);
    prog[np++] = R(OP_ADD, 9, 4);        // r9 = 0x402000 : right array
    prog[np++] = M(OP_LW, 8, 9, 0);
    prog[np++] = R(OP_MUL, 7, 8);
    prog[np++] = I(OP_LI, 10, 1);
    prog[np++] = I(OP_SLLI, 10, 22);
    prog[np++] = I(OP_LI, 11, 1);
    prog[np++] = I(OP_SLLI, 11, 11);
    prog[np++] = R(OP_ADD, 10, 11);      // r10 = 0x400800
    prog[np++] = M(OP_SW, 5, 10, 0);
    prog[np++] = M(OP_SW, 7, 10, 1);
    prog[np++] = I(OP_NTF, 0, 1);
    prog[np++] = I(OP_HALT, 0, 0);
    if (np % 2) prog[np++] = I(OP_HALT, 0, 0);

    repeat (4) @(posedge clk);
    rst_n = 1;

    // ---- 1. P.Host fills the memory as plain DRAM ----
    for (int b = 0; b < NPA; b++)
      for (int i = 0; i < K; i++) host(1, 0, b * 32'h10_0000 + 4 * i, val(b, i), d, retry, lat);
    for (int b = 0; b < NPA; b += 9) begin
      host(0, 0, b * 32'h10_0000 + 32'h8_0000, 0, d, retry, lat);   // a new row: miss
      chk("host miss latency", lat, 16); n_miss++;
      host(0, 0, b * 32'h10_0000 + 4, 0, d, retry, lat);            // kept in a row buffer
      chk("host read", d, val(b, 1));
      chk("host hit latency", lat, 8); n_hit++;
    end

    // ---- 2. P.Host starts the P.Mem ----
    fork
      begin
        @(negedge clk);
        while (!pmem_start) @(negedge clk);
        chk("P.Mem start address", pmem_start_addr, 32'h0000_1234);
      end
      host(1, 1, 32'h0, 32'h0000_1234, d, retry, lat);
    join
    host(0, 1, 32'h4, 0, d, retry, lat);
    chk("STATUS retries while running", retry, 1); if (retry) n_retry++;

    // ---- 3. P.Mem sets up and starts the P.Arrays ----
    for (int b = 0; b < NPA; b++) begin
      int base; base = b * 32'h10_0000 + MAP;
      pmw(base, 3);
      pmw(base + 16, 32'h400); pmw(base + 20, 32'h400); pmw(base + 24, {22'd0, TGT_OWN, 8'h00});
      pmw(base + 32, 32'h401); pmw(base + 36, 32'h401); pmw(base + 40, {22'd0, TGT_LEFT, 8'h00});
      pmw(base + 48, 32'h402); pmw(base + 52, 32'h402); pmw(base + 56, {22'd0, TGT_RIGHT, 8'h00});
    end
    for (int bb = 0; bb < NPA / 4; bb++)
      for (int w = 0; w < np / 2; w++)
        pmw(32'h2000_0000 + bb * 8192 + 4 * w, {prog[2*w+1], prog[2*w]});
    pmw(32'h1000_0008, 32'hffff_ffff);   // mask: all P.Arrays
    pmw(32'h1000_000C, 32'hffff_ffff);
    pmw(32'h1000_0014, 0);               // start the P.Arrays at 0
    pm(0, 32'h1000_0018, 0, d);
    chk("P.Arrays running", d[0], 0);
    pmw(32'h1000_0010, K);               // broadcast K
    t0 = cyc;
    while (!pmem_irq && cyc - t0 < 200000) begin
      pm(0, 32'h0000_0004 + 32'(($urandom_range(NPA - 1)) * 32'h10_0000), 0, d);  // P.Mem keeps using memory
    end
    chk("notify barrier interrupt", pmem_irq, 1);
    $display("P.Arrays finished after %0d cycles", cyc - t0);
    pm(0, 32'h1000_0000, 0, d); chk("notify low", d, 32'hffff_ffff);
    pm(0, 32'h1000_0004, 0, d); chk("notify high", d, 32'hffff_ffff);
    t0 = cyc;
    do pm(0, 32'h1000_0018, 0, d); while (!d[0] && cyc - t0 < 1000);
    chk("all halted, no fault", d[1:0], 2'b01);

    // ---- 4. results ----
    for (int b = 0; b < NPA; b++) begin
      exp_sum = 0;
      for (int i = 0; i < K; i++) exp_sum += val(b, i);
      exp_prod = 64'(32'(val((b + NPA - 1) % NPA, 0) * val((b + 1) % NPA, 0)));
      pm(0, b * 32'h10_0000 + 32'h800, 0, d); chk("sum", d, 32'(exp_sum));
      pm(0, b * 32'h10_0000 + 32'h804, 0, d); chk("neighbour product", d, exp_prod);
    end

    // network: three words to our own chip id, looped back
    pmw(32'h1000_0020, 32'hAAAA_0001);
    pmw(32'h1000_0020, 32'hBBBB_0002);
    pmw(32'h1000_0020, 32'hCCCC_0003);
    pmw(32'h1000_0024, {8'd0, 8'h07, 8'd3, chip_id});
    repeat (20) @(posedge clk);
    pm(0, 32'h1000_002C, 0, d); chk("In queue count", d[31:16], 4);
    pm(0, 32'h1000_0028, 0, d); chk("header", d, {chip_id, chip_id, 8'd3, 8'h07});
    pm(0, 32'h1000_0028, 0, d); chk("payload 0", d, 32'hAAAA_0001);
    pm(0, 32'h1000_0028, 0, d); chk("payload 1", d, 32'hBBBB_0002);
    pm(0, 32'h1000_0028, 0, d); chk("payload 2", d, 32'hCCCC_0003);

    pmw(32'h1000_001C, 1);               // DONE
    host(0, 1, 32'h4, 0, d, retry, lat);
    chk("STATUS done", {retry, d[0]}, 2'b01);

    // ---- mechanisms ----
    $display("hits %0d misses %0d retries %0d walks %0d left %0d right %0d mulc %0d contend %0d refresh %0d net %0d",
             n_hit, n_miss, n_retry, n_walk, n_left, n_right, n_mulc, n_contend, n_ref, n_net);
    chk("row-buffer hits seen", n_hit > 0, 1);
    chk("row-buffer misses seen", n_miss > 0, 1);
    chk("STATUS retry seen", n_retry > 0, 1);
    chk("TLB walks: 3 per P.Array", n_walk, 3 * NPA);
    chk("left-neighbour accesses", n_left, NPA);
    chk("right-neighbour accesses", n_right, NPA);
    chk("multiplier contention seen", n_mulc > 0, 1);
    chk("bus / P.Array contention seen", n_contend > 0, 1);
    chk("refresh seen", n_ref > 0, 1);
    chk("network words", n_net, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
