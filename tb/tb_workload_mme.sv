// tb_workload_mme: a small MPEG-2 motion-estimation kernel (the MME workload)
// run on a whole FlexRAM chip at its default size.
//
// Every P.Array holds, in its own bank, a 16-pixel block of the current frame
// (bytes at 0x000) and a strip of the reference frame (bytes at 0x100). After
// the P.Mem broadcasts the number of candidate displacements N, each P.Array
// computes the sum of absolute differences (SAD) between the block and the
// reference strip at displacements 0..N-1 using byte loads, keeps the
// smallest SAD and its displacement (first one on ties), stores both at
// 0x800 of its bank, notifies and halts. The reference strip of bank b is
// built so that displacement b % N matches exactly. The bench plays the
// P.Mem: it writes the data, mapping tables and program, starts the
// P.Arrays, waits for the notify interrupt and compares every result with a
// model computed here. It also checks that the kernel ends within a cycle
// budget worked out from the instruction count and the bank latencies.
module tb_workload_mme;
  import flexram_pkg::*;
  import pa_asm_pkg::*;
  localparam int NPA = 64, N = 6;
  localparam logic [19:0] MAP = 20'hFF000;

  logic clk = 0, rst_n = 0;
  logic [7:0] chip_id = 8'h01;
  logic h_valid = 0, h_ready, h_ctrl = 0, h_rsp_valid, h_rsp_retry;
  word_req_t h_req = '0;
  logic [31:0] h_rsp_rdata;
  logic p_valid = 0, p_ready, p_rsp_valid, pmem_start, pmem_irq;
  word_req_t p_req = '0;
  logic [31:0] p_rdata, pmem_start_addr;
  logic tx_valid, tx_ready, rx_valid, rx_ready;
  logic [1:0][15:0] tx_beat, rx_beat;

  flexram_chip dut (.*);
  assign rx_valid = 1'b0;
  assign rx_beat  = '0;
  assign tx_ready = 1'b0;

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;
  int checks = 0, failures = 0;

  initial begin
    #50000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

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

  logic [7:0] cur [NPA][16];
  logic [7:0] rf  [NPA][24];
  logic [15:0] prog [64];
  int np;

  initial begin
    logic [31:0] d; int t0, best_d, best_s, s, nstore;
    np = 0;
    prog[np++] = I(OP_BCF, 12, 0);       //  0 wait for the broadcast
    prog[np++] = I(OP_BEQZ, 12, -1);
    prog[np++] = I(OP_BCR, 1, 0);        //  2 r1 = N
    prog[np++] = I(OP_LI, 9, 1);
    prog[np++] = I(OP_SLLI, 9, 30);      //  4 r9 = best SAD so far (large)
    prog[np++] = I(OP_LI, 10, 0);        //  5 r10 = best displacement
    prog[np++] = I(OP_LI, 2, 0);         //  6 r2 = displacement
    prog[np++] = I(OP_LI, 3, 1);         //  7 outer: r3 = 0x400000 (block)
    prog[np++] = I(OP_SLLI, 3, 22);
    prog[np++] = I(OP_LI, 4, 1);
    prog[np++] = I(OP_SLLI, 4, 22);
    prog[np++] = I(OP_LI, 11, 1);
    prog[np++] = I(OP_SLLI, 11, 8);
    prog[np++] = R(OP_ADD, 4, 11);
    prog[np++] = R(OP_ADD, 4, 2);        // 14 r4 = 0x400100 + displacement
    prog[np++] = I(OP_LI, 5, 0);         //    r5 = SAD
    prog[np++] = I(OP_LI, 8, 16);        // 16 r8 = pixels left
    prog[np++] = M(OP_LB, 6, 3, 0);      // 17 inner
    prog[np++] = M(OP_LB, 7, 4, 0);
    prog[np++] = R(OP_SUB, 6, 7);
    prog[np++] = I(OP_LI, 11, 0);
    prog[np++] = R(OP_SLT, 11, 6);       // 21 r11 = (0 < d)
    prog[np++] = I(OP_BNEZ, 11, 4);      //    positive: skip the negation
    prog[np++] = I(OP_LI, 11, 0);
    prog[np++] = R(OP_SUB, 11, 6);
    prog[np++] = R(OP_MOV, 6, 11);       // 25 r6 = |d|
    prog[np++] = R(OP_ADD, 5, 6);
    prog[np++] = I(OP_ADDI, 3, 1);
    prog[np++] = I(OP_ADDI, 4, 1);
    prog[np++] = I(OP_ADDI, 8, -1);
    prog[np++] = I(OP_BNEZ, 8, -13);     // 30 -> 17
    prog[np++] = R(OP_MOV, 11, 5);
    prog[np++] = R(OP_SLT, 11, 9);       // 32 r11 = SAD < best
    prog[np++] = I(OP_BEQZ, 11, 3);
    prog[np++] = R(OP_MOV, 9, 5);
    prog[np++] = R(OP_MOV, 10, 2);
    prog[np++] = I(OP_ADDI, 2, 1);       // 36
    prog[np++] = I(OP_ADDI, 1, -1);
    prog[np++] = I(OP_BNEZ, 1, -31);     // 38 -> 7
    prog[np++] = I(OP_LI, 3, 1);
    prog[np++] = I(OP_SLLI, 3, 22);
    prog[np++] = I(OP_LI, 11, 1);
    prog[np++] = I(OP_SLLI, 11, 11);
    prog[np++] = R(OP_ADD, 3, 11);       // 0x400800
    prog[np++] = M(OP_SW, 9, 3, 0);
    prog[np++] = M(OP_SW, 10, 3, 1);
    prog[np++] = I(OP_NTF, 0, 1);
    prog[np++] = I(OP_HALT, 0, 0);
    if (np % 2) prog[np++] = I(OP_HALT, 0, 0);

    // frames: displacement b % N of bank b matches exactly
    for (int b = 0; b < NPA; b++) begin
      for (int i = 0; i < 16; i++) cur[b][i] = 8'($urandom);
      for (int j = 0; j < 24; j++) rf[b][j] = 8'($urandom);
      for (int i = 0; i < 16; i++) rf[b][i + b % N] = cur[b][i];
    end

    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NPA; b++) begin
      int base; base = b * 32'h10_0000;
      for (int w = 0; w < 4; w++) pmw(base + 4 * w, {cur[b][4*w+3], cur[b][4*w+2], cur[b][4*w+1], cur[b][4*w]});
      for (int w = 0; w < 6; w++) pmw(base + 32'h100 + 4 * w, {rf[b][4*w+3], rf[b][4*w+2], rf[b][4*w+1], rf[b][4*w]});
      pmw(base + MAP, 1);
      pmw(base + MAP + 16, 32'h400); pmw(base + MAP + 20, 32'h400); pmw(base + MAP + 24, {22'd0, TGT_OWN, 8'h00});
    end
    for (int bb = 0; bb < NPA / 4; bb++)
      for (int w = 0; w < np / 2; w++)
        pmw(32'h2000_0000 + bb * 8192 + 4 * w, {prog[2*w+1], prog[2*w]});
    pmw(32'h1000_0008, 32'hffff_ffff);
    pmw(32'h1000_000C, 32'hffff_ffff);
    pmw(32'h1000_0014, 0);
    pmw(32'h1000_0010, N);
    t0 = cyc;
    while (!pmem_irq && cyc - t0 < 200000) @(posedge clk);
    chk("notify interrupt", pmem_irq, 1);
    $display("motion estimation done after %0d cycles", cyc - t0);
    // budget: per pixel about 14 instructions plus two byte loads of at most
    // MISS_CYC (8) cycles each, plus 500 cycles for start-up and table walks
    chk("within cycle budget", (cyc - t0) < N * 16 * (14 + 2 * 8) + 500, 1);
    t0 = cyc;   // halts follow the notify bits once the last stores drain
    do pm(0, 32'h1000_0018, 0, d); while (!d[0] && cyc - t0 < 1000);
    chk("all halted, no fault", d[1:0], 2'b01);
    for (int b = 0; b < NPA; b++) begin
      best_s = 1 << 30; best_d = 0;
      for (int k = 0; k < N; k++) begin
        s = 0;
        for (int i = 0; i < 16; i++) s += (cur[b][i] > rf[b][i + k]) ? cur[b][i] - rf[b][i + k] : rf[b][i + k] - cur[b][i];
        if (s < best_s) begin best_s = s; best_d = k; end
      end
      pm(0, b * 32'h10_0000 + 32'h800, 0, d); chk("best SAD", d, best_s);
      pm(0, b * 32'h10_0000 + 32'h804, 0, d); chk("best displacement", d, best_d);
      chk("matched displacement", best_d, b % N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
