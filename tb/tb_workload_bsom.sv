// tb_workload_bsom: the reduction-and-broadcast loop of a neural-network
// workload (BSOM) at reduced size, run on a whole FlexRAM chip at its default
// size.
//
// Every P.Array holds K input values in its own bank. The run has NROUND rounds. In
// each round the P.Mem broadcasts a weight w. Each P.Array multiplies its K
// inputs by w on the shared multiplier and sums them. It stores the partial
// sum and then flips its notify bit. The P.Mem waits for the barrier, reads
// all 64 partial sums, combines them and broadcasts the next weight. Because
// the notify bits flip every round, odd rounds end with all bits set (seen
// through the notify interrupt) and even rounds with all bits clear (seen by
// polling NOTIFY). A weight of 0 makes the P.Arrays halt. Checks: every
// partial sum and every combined sum against a model computed here, the
// barrier state of each round, that the interrupt is low once all bits clear,
// and a cycle budget per round.
module tb_workload_bsom;
  import flexram_pkg::*;
  import pa_asm_pkg::*;
  localparam int NPA = 64, K = 8, NROUND = 4;
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

  logic [31:0] x [NPA][K];
  logic [15:0] prog [64];
  int np;

  initial begin
    logic [31:0] d, w, part, total, exp_total; int t0;
    np = 0;
    prog[np++] = I(OP_LI, 13, 0);        //  0 r13 = notify parity
    prog[np++] = I(OP_LI, 14, 1);
    prog[np++] = I(OP_LI, 10, 1);
    prog[np++] = I(OP_SLLI, 10, 22);
    prog[np++] = I(OP_LI, 11, 1);
    prog[np++] = I(OP_SLLI, 11, 11);
    prog[np++] = R(OP_ADD, 10, 11);      //  6 r10 = 0x400800 (partial sum)
    prog[np++] = I(OP_BCF, 12, 0);       //  7 round: wait for the weight
    prog[np++] = I(OP_BEQZ, 12, -1);
    prog[np++] = I(OP_BCR, 1, 0);        //  9 r1 = w
    prog[np++] = I(OP_BEQZ, 1, 18);      // 10 w == 0: halt (28)
    prog[np++] = I(OP_LI, 3, 1);
    prog[np++] = I(OP_SLLI, 3, 22);      //    r3 = 0x400000 (inputs)
    prog[np++] = I(OP_LI, 5, 0);
    prog[np++] = I(OP_LI, 8, K);
    prog[np++] = M(OP_LW, 6, 3, 0);      // 15 inner
    prog[np++] = R(OP_MUL, 6, 1);
    prog[np++] = R(OP_ADD, 5, 6);
    prog[np++] = I(OP_ADDI, 3, 4);
    prog[np++] = I(OP_ADDI, 8, -1);
    prog[np++] = I(OP_BNEZ, 8, -5);      // 20 -> 15
    prog[np++] = M(OP_SW, 5, 10, 0);
    prog[np++] = R(OP_XOR, 13, 14);
    prog[np++] = I(OP_BEQZ, 13, 3);      // 23 -> 26
    prog[np++] = I(OP_NTF, 0, 1);
    prog[np++] = J(OP_J, 2);             // 25 -> 27
    prog[np++] = I(OP_NTF, 0, 0);
    prog[np++] = J(OP_J, -20);           // 27 -> 7
    prog[np++] = I(OP_HALT, 0, 0);       // 28
    if (np % 2) prog[np++] = I(OP_HALT, 0, 0);

    for (int b = 0; b < NPA; b++)
      for (int i = 0; i < K; i++) x[b][i] = $urandom_range(65535);

    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NPA; b++) begin
      int base; base = b * 32'h10_0000;
      for (int i = 0; i < K; i++) pmw(base + 4 * i, x[b][i]);
      pmw(base + MAP, 1);
      pmw(base + MAP + 16, 32'h400); pmw(base + MAP + 20, 32'h400); pmw(base + MAP + 24, {22'd0, TGT_OWN, 8'h00});
    end
    for (int bb = 0; bb < NPA / 4; bb++)
      for (int w2 = 0; w2 < np / 2; w2++)
        pmw(32'h2000_0000 + bb * 8192 + 4 * w2, {prog[2*w2+1], prog[2*w2]});
    pmw(32'h1000_0008, 32'hffff_ffff);
    pmw(32'h1000_000C, 32'hffff_ffff);
    pmw(32'h1000_0014, 0);
    w = 32'd3;
    for (int r = 1; r <= NROUND; r++) begin
      pmw(32'h1000_0010, w);
      t0 = cyc;
      if (r % 2) begin
        while (!pmem_irq && cyc - t0 < 100000) @(posedge clk);
        chk("odd round ends with the notify interrupt", pmem_irq, 1);
      end else begin
        logic [31:0] lo, hi;
        do begin
          pm(0, 32'h1000_0000, 0, lo); pm(0, 32'h1000_0004, 0, hi);
        end while ((lo | hi) != 0 && cyc - t0 < 100000);
        chk("even round ends with all notify bits clear", lo | hi, 0);
        chk("no interrupt with all notify bits clear", pmem_irq, 0);
      end
      $display("round %0d: barrier after %0d cycles", r, cyc - t0);
      // per P.Array: K loads (<= 8 cycles), K multiplies (<= 4 waiting + 2),
      // about 6 instructions per element, plus 300 cycles of slack
      chk("round within cycle budget", (cyc - t0) < K * (8 + 6 + 6) + 300, 1);
      total = 0; exp_total = 0;
      for (int b = 0; b < NPA; b++) begin
        logic [31:0] e; e = 0;
        for (int i = 0; i < K; i++) e += x[b][i] * w;
        pm(0, b * 32'h10_0000 + 32'h800, 0, part);
        chk("partial sum", part, e);
        total += part; exp_total += e;
      end
      chk("combined sum", total, exp_total);
      w = (total >> 20) | 32'd1;   // next weight from the combined result
    end
    pmw(32'h1000_0010, 0);           // weight 0: stop
    t0 = cyc;
    do pm(0, 32'h1000_0018, 0, d); while (!d[0] && cyc - t0 < 2000);
    chk("all halted, no fault", d[1:0], 2'b01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
