// tb_pmem_mmio: drives the P.Mem side of the memory-mapped decoder (8
// P.Arrays, 4 basic blocks) with a behavioural global bus that answers 3 clock
// edges after accepting. Checks: DRAM reads/writes pass through with data and
// answer exactly 3 edges after acceptance; register and instruction-memory
// accesses answer at the first edge after acceptance; the one-cycle side-
// effect strobes (imem write enable and address, broadcast, start, done,
// network push/send/pop) fire only for their own address; notify, mask,
// status and network status read back correctly.
module tb_pmem_mmio;
  import flexram_pkg::*;
  localparam int NPA = 8, NBB = 4, DEPTH = 32;
  logic clk = 0, rst_n = 0;
  logic p_valid, p_ready, p_rsp_valid; word_req_t p_req; logic [31:0] p_rdata;
  logic g_valid, g_ready, g_rsp_valid; word_req_t g_req; logic [31:0] g_rdata;
  logic [NBB-1:0] im_we; logic [IADDR_W-2:0] im_waddr; logic [31:0] im_wdata;
  logic [NPA-1:0] notify_reg, mask, pa_halted, pa_fault; logic irq;
  logic bc_wr, pa_start, done_set, tx_push, send, send_busy, rx_pop;
  logic [31:0] bc_wdata, tx_wdata, rx_rdata; logic [IADDR_W-1:0] pa_start_pc;
  logic [7:0] send_dest, send_len, send_type;
  logic [$clog2(DEPTH):0] out_count, in_count;
  int checks = 0, failures = 0, gcnt = 0;
  logic [31:0] mem [logic [31:0]];
  // strobes seen in the acceptance cycle
  logic [NBB-1:0] s_im_we; logic [IADDR_W-2:0] s_im_waddr; logic [31:0] s_wd;
  logic s_bc, s_start, s_done, s_push, s_send, s_pop, s_g;

  pmem_mmio #(.NPA(NPA), .NBB(NBB), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) begin
    if (!rst_n) begin g_ready <= 0; g_rsp_valid <= 0; gcnt = 0; end
    else begin
      g_rsp_valid <= 1'b0;
      if (gcnt > 0) begin gcnt--; if (gcnt == 0) g_rsp_valid <= 1'b1; end
      if (g_valid && g_ready) begin
        if (g_req.we) mem[g_req.addr] = g_req.wdata;
        g_rdata <= mem.exists(g_req.addr) ? mem[g_req.addr] : 32'd0;
        gcnt = 2;
      end
      g_ready <= (gcnt == 0);
    end
  end

  task automatic chk(logic c, string what);
    checks++; if (!c) begin failures++; $display("mismatch: %s", what); end
  endtask

  task automatic access(logic we, logic [31:0] addr, logic [31:0] wd, output logic [31:0] rd, output int lat);
    @(negedge clk);
    p_valid = 1; p_req = '{we: we, addr: addr, wdata: wd, be: 4'hF};
    #1; while (!p_ready) begin @(negedge clk); #1; end
    s_im_we = im_we; s_im_waddr = im_waddr; s_wd = im_wdata; s_bc = bc_wr; s_start = pa_start;
    s_done = done_set; s_push = tx_push; s_send = send; s_pop = rx_pop; s_g = g_valid;
    @(posedge clk); #1 p_valid = 0;
    lat = 0;
    @(negedge clk);
    while (!p_rsp_valid) begin lat++; @(negedge clk); end
    rd = p_rdata;
  endtask

  initial begin
    logic [31:0] rd, a, d; int lat;
    p_valid = 0; p_req = '0; notify_reg = '0; irq = 0; pa_halted = '0; pa_fault = '0;
    send_busy = 0; out_count = '0; in_count = '0; rx_rdata = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    // DRAM
    for (int i = 0; i < 100; i++) begin
      a = {4'h0, 6'($urandom_range(63)), 14'($urandom), 2'b00}; d = $urandom;
      access(1, a, d, rd, lat);
      chk(lat == 3 && s_g, "dram write latency");
      access(0, a, 0, rd, lat);
      chk(lat == 3 && rd == d, "dram read");
      chk(!(s_bc | s_start | s_done | s_push | s_send | s_pop) && s_im_we == 0, "dram access raised a strobe");
    end
    // instruction memory writes
    for (int i = 0; i < 50; i++) begin
      int bb, w; bb = $urandom_range(NBB - 1); w = $urandom_range(2047); d = $urandom;
      access(1, 32'h2000_0000 + bb * 8192 + 4 * w, d, rd, lat);
      chk(lat == 0, "imem write latency");
      chk(s_im_we == NBB'(1 << bb) && s_im_waddr == 11'(w) && s_wd == d && !s_g, "imem write strobe");
    end
    // registers
    notify_reg = 8'hA5; irq = 1; pa_halted = '1; pa_fault = 8'h02;
    access(0, 32'h1000_0000, 0, rd, lat); chk(lat == 0 && rd == 32'hA5, "NOTIFY read");
    access(0, 32'h1000_0004, 0, rd, lat); chk(rd == 0, "NOTIFY high read");
    access(1, 32'h1000_0008, 32'h3C, rd, lat); chk(mask == 8'h3C, "MASK write");
    access(0, 32'h1000_0008, 0, rd, lat); chk(rd == 32'h3C, "MASK read");
    access(0, 32'h1000_0018, 0, rd, lat); chk(rd == 32'h7, "STATUS read");
    pa_halted = 8'h7F; pa_fault = 0; irq = 0;
    access(0, 32'h1000_0018, 0, rd, lat); chk(rd == 32'h0, "STATUS read not halted");
    access(1, 32'h1000_0010, 32'hCAFE, rd, lat); chk(s_bc && !s_start && bc_wdata == 32'hCAFE, "BCAST strobe");
    access(1, 32'h1000_0014, 32'h40, rd, lat); chk(s_start && !s_bc && pa_start_pc == 12'h40, "START strobe");
    access(1, 32'h1000_001C, 32'h1, rd, lat); chk(s_done && !s_start, "DONE strobe");
    access(1, 32'h1000_0020, 32'h1234, rd, lat); chk(s_push && !s_send && tx_wdata == 32'h1234, "NET_TX strobe");
    access(1, 32'h1000_0024, 32'h0003_0509, rd, lat);
    chk(s_send && !s_push && send_dest == 8'h09 && send_len == 8'h05 && send_type == 8'h03, "NET_SEND strobe");
    rx_rdata = 32'hBEEF; in_count = 3; out_count = 7; send_busy = 1;
    access(0, 32'h1000_0028, 0, rd, lat); chk(s_pop && rd == 32'hBEEF && lat == 0, "NET_RX pop");
    access(0, 32'h1000_002C, 0, rd, lat); chk(rd == {16'd3, 1'b1, 15'd7} && !s_pop, "NET_STAT read");
    in_count = 0;
    access(0, 32'h1000_0028, 0, rd, lat); chk(rd == 0, "NET_RX empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
