// tb_pa_core: runs small programs on one P.Array with a behavioural model of
// its three banks (own, left, right; 4- or 8-cycle latency at random) and the
// shared multiplier. Checked: arithmetic, multiply, loops, call/return, loads
// after stores through the store buffer, byte accesses, accesses to both
// neighbour banks through TLB misses and the mapping-table walk, the broadcast
// flag and register, the notify bit, a fault on an unmapped page, and the
// 2-cycle taken-branch penalty measured from start to halt.
module tb_pa_core;
  import flexram_pkg::*;
  import pa_asm_pkg::*;
  localparam logic [BANK_AW-1:0] MAP = 20'hFF000;
  logic clk = 0, rst_n = 0;
  logic start; logic [IADDR_W-1:0] start_pc;
  logic running, halted, fault;
  logic [IADDR_W-1:0] imem_addr; logic [15:0] imem_rdata;
  logic mem_valid, mem_ready, mem_rsp_valid; pa_req_t mem_req; logic [DL_W-1:0] mem_rsp_rdata;
  logic mul_req, mul_done; logic [31:0] mul_a, mul_b, mul_result;
  logic bc_valid, notify; logic [31:0] bc_data;
  logic [15:0] prog [4096];
  logic [127:0] mem [logic [21:0]];
  int checks = 0, failures = 0, walks = 0, cyc = 0;

  pa_core #(.MAP_BASE(MAP)) dut (.*);
  logic [3:0] mreq, mdone; logic [31:0] ma [4], mb [4];
  assign mreq = {3'b0, mul_req}; assign mul_done = mdone[0];
  always_comb begin ma = '{default: 0}; mb = '{default: 0}; ma[0] = mul_a; mb[0] = mul_b; end
  mult_shared u_mul (.clk, .rst_n, .req(mreq), .a(ma), .b(mb), .done(mdone), .result(mul_result));

  always #5 clk = ~clk;
  always @(posedge clk) begin cyc++; imem_rdata <= prog[imem_addr]; end

  // bank model
  int lat = 0; logic busy = 0; pa_req_t cur;
  assign mem_ready = !busy;
  always @(posedge clk) begin
    mem_rsp_valid <= 0;
    if (busy) begin
      if (lat == 1) begin
        logic [21:0] k; logic [127:0] d;
        k = {cur.tgt, cur.req.addr[19:4]};
        d = mem.exists(k) ? mem[k] : '0;
        mem_rsp_rdata <= d;
        if (cur.req.we) begin
          for (int b = 0; b < 16; b++) if (cur.req.be[b]) d[b*8 +: 8] = cur.req.wdata[b*8 +: 8];
          mem[k] = d;
        end
        mem_rsp_valid <= 1; busy <= 0;
      end
      lat <= lat - 1;
    end else if (mem_valid) begin
      cur <= mem_req; busy <= 1; lat <= ($urandom_range(1) == 1) ? 4 : 8;
      if (!mem_req.req.we && mem_req.req.addr == MAP) walks++;
    end
  end

  initial begin #3000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [31:0] rd32(int tgt, int addr);
    logic [21:0] k; k = {2'(tgt), 16'(addr >> 4)};
    if (!mem.exists(k)) return 0;
    return mem[k][(addr % 16) / 4 * 32 +: 32];
  endfunction
  task automatic wr32(int tgt, int addr, logic [31:0] v);
    logic [21:0] k; k = {2'(tgt), 16'(addr >> 4)};
    if (!mem.exists(k)) mem[k] = '0;
    mem[k][(addr % 16) / 4 * 32 +: 32] = v;
  endtask
  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0h expected %0h", what, got, exp); end
  endtask
  task automatic run(int pc, output int cycles);
    int t0;
    @(negedge clk); start = 1; start_pc = 12'(pc); t0 = cyc;
    @(negedge clk); start = 0;
    while (!halted && cyc - t0 < 20000) @(negedge clk);
    cycles = cyc - t0;
  endtask

  initial begin
    int n, c1, c2, jal_pc;
    start = 0; start_pc = 0; bc_valid = 0; bc_data = 0;
    for (int i = 0; i < 4096; i++) prog[i] = 16'h0;
    // mapping table in the own bank
    wr32(0, MAP, 3);
    wr32(0, MAP + 16, 32'h400); wr32(0, MAP + 20, 32'h400); wr32(0, MAP + 24, {22'd0, TGT_OWN, 8'h10});
    wr32(0, MAP + 32, 32'h401); wr32(0, MAP + 36, 32'h402); wr32(0, MAP + 40, {22'd0, TGT_LEFT, 8'h20});
    wr32(0, MAP + 48, 32'h403); wr32(0, MAP + 52, 32'h403); wr32(0, MAP + 56, {22'd0, TGT_RIGHT, 8'h05});
    wr32(0, 32'h10000 + 64, 32'h11223344);
    // ---- program at 0 ----
    n = 0;
    prog[n++] = I(OP_LI, 1, 5);
    prog[n++] = I(OP_LI, 2, 7);
    prog[n++] = R(OP_ADD, 1, 2);          // r1 = 12
    prog[n++] = R(OP_MUL, 1, 2);          // r1 = 84
    prog[n++] = I(OP_LI, 3, 1);
    prog[n++] = I(OP_SLLI, 3, 22);        // r3 = 0x400000 (vpn 0x400)
    prog[n++] = M(OP_SW, 1, 3, 0);        // [0x400000] = 84
    prog[n++] = I(OP_LI, 4, 10);
    prog[n++] = I(OP_LI, 5, 0);
    prog[n++] = R(OP_ADD, 5, 4);          // loop: r5 += r4
    prog[n++] = I(OP_ADDI, 4, -1);
    prog[n++] = I(OP_BNEZ, 4, -2);
    prog[n++] = M(OP_SW, 5, 3, 1);        // [0x400004] = 55
    prog[n++] = M(OP_LW, 6, 3, 0);        // r6 = 84 (store buffer drained first)
    prog[n++] = I(OP_ADDI, 6, 1);
    prog[n++] = M(OP_SW, 6, 3, 2);        // [0x400008] = 85
    prog[n++] = I(OP_ADDI, 3, 32);
    prog[n++] = I(OP_ADDI, 3, 32);        // r3 = 0x400040
    prog[n++] = M(OP_LB, 7, 3, 2);        // r7 = 0x22
    prog[n++] = I(OP_LI, 8, 1);
    prog[n++] = I(OP_SLLI, 8, 12);
    prog[n++] = R(OP_ADD, 8, 3);          // r8 = 0x401040 -> left bank page 0x20
    prog[n++] = M(OP_SB, 7, 8, 5);        // left byte
    prog[n++] = M(OP_SW, 6, 8, 3);        // left word at +12
    prog[n++] = R(OP_MOV, 9, 8);
    prog[n++] = I(OP_LI, 10, 1);
    prog[n++] = I(OP_SLLI, 10, 13);
    prog[n++] = R(OP_ADD, 9, 10);         // r9 = 0x403040 -> right bank page 0x05
    prog[n++] = M(OP_SW, 5, 9, 0);
    jal_pc = n;
    prog[n++] = J(OP_JAL, 30);            // call the subroutine at jal_pc + 30
    prog[n++] = M(OP_SW, 11, 9, 1);       // [right +4] = r11 from sub
    prog[n++] = R(OP_SUB, 11, 6);         // r11 = 50 - 85 = -35
    prog[n++] = R(OP_SLT, 11, 6);         // -35 < 85 = 1
    prog[n++] = M(OP_SW, 11, 9, 2);
    prog[n++] = I(OP_BCF, 12, 0);         // wait: poll broadcast flag
    prog[n++] = I(OP_BEQZ, 12, -1);
    prog[n++] = I(OP_BCR, 13, 0);
    prog[n++] = M(OP_SW, 13, 9, 3);
    prog[n++] = I(OP_NTF, 0, 1);
    prog[n++] = I(OP_HALT, 0, 0);
    prog[jal_pc + 30] = I(OP_LI, 11, 50);
    prog[jal_pc + 31] = R(OP_JR, 15, 0);

    repeat (3) @(posedge clk); rst_n = 1;
    fork
      run(0, c1);
      begin
        repeat (400) @(negedge clk);
        checks++; if (!running) begin failures++; $display("did not wait for broadcast"); end
        bc_valid = 1; bc_data = 32'hCAFE_F00D; @(negedge clk); bc_valid = 0;
      end
    join
    chk("halted", halted, 1);
    chk("no fault", fault, 0);
    chk("mul+add", rd32(0, 32'h10000), 84);
    chk("loop", rd32(0, 32'h10004), 55);
    chk("load-store", rd32(0, 32'h10008), 85);
    chk("left byte", {24'd0, mem[{TGT_LEFT, 16'h2004}][5*8 +: 8]}, 32'h22);
    chk("left word", rd32(1, 32'h2004C), 85);
    chk("right word", rd32(2, 32'h05040), 55);
    chk("call/return", rd32(2, 32'h05044), 50);
    chk("slt", rd32(2, 32'h05048), 1);
    chk("broadcast", rd32(2, 32'h0504C), 32'hCAFEF00D);
    chk("notify", notify, 1);
    chk("walks", walks, 3);

    // ---- branch penalty: straight line vs. one taken jump ----
    for (int i = 0; i < 10; i++) prog[100 + i] = I(OP_ADDI, 1, 1);
    prog[110] = I(OP_HALT, 0, 0);
    for (int i = 0; i < 5; i++) prog[200 + i] = I(OP_ADDI, 1, 1);
    prog[205] = J(OP_J, 1);
    for (int i = 0; i < 5; i++) prog[206 + i] = I(OP_ADDI, 1, 1);
    prog[211] = I(OP_HALT, 0, 0);
    run(100, c1);
    run(200, c2);
    chk("taken branch costs 1 + 2 cycles", c2 - c1, 3);

    // ---- fault on unmapped page ----
    prog[300] = I(OP_LI, 1, 3); prog[301] = I(OP_SLLI, 1, 24); prog[302] = M(OP_LW, 2, 1, 0);
    prog[303] = I(OP_HALT, 0, 0);
    run(300, c1);
    chk("fault", fault, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
