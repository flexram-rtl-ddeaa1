// tb_host_if: a behavioural global bus answers the host interface after a
// random 2..6 cycles with a random row-buffer hit flag. Checks: read data,
// that the P.Host sees the response exactly HIT_CYC cycles after acceptance on
// a hit and MISS_CYC cycles on a miss, the START control write (pmem_start
// pulse with address, clears done) and the STATUS read (retry until done).
module tb_host_if;
  import flexram_pkg::*;
  localparam int HIT = 8, MISS = 16;
  logic clk = 0, rst_n = 0;
  logic h_valid, h_ready, h_ctrl, h_rsp_valid, h_rsp_retry;
  word_req_t h_req; logic [31:0] h_rsp_rdata;
  logic g_valid, g_ready, g_rsp_valid, g_hit; word_req_t g_req; logic [31:0] g_rdata;
  logic pmem_start, done_set, done; logic [31:0] pmem_start_addr;
  int checks = 0, failures = 0, gcnt = 0, starts = 0;
  logic [31:0] mem [logic [31:0]];
  logic [31:0] last_start;

  host_if #(.HIT_CYC(HIT), .MISS_CYC(MISS)) dut (.*);
  always #5 clk = ~clk;
  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // behavioural bus + bank
  logic nxt_hit;
  always @(posedge clk) begin
    if (!rst_n) begin g_ready <= 0; g_rsp_valid <= 0; gcnt = 0; end
    else begin
      g_rsp_valid <= 1'b0;
      if (gcnt > 0) begin gcnt--; if (gcnt == 0) g_rsp_valid <= 1'b1; end
      if (g_valid && g_ready) begin
        if (g_req.we) mem[g_req.addr] = g_req.wdata;
        g_rdata <= mem.exists(g_req.addr) ? mem[g_req.addr] : 32'd0;
        g_hit   <= nxt_hit;
        gcnt = $urandom_range(2, 6);
      end
      g_ready <= (gcnt == 0) && $urandom_range(1);
    end
  end
  always @(negedge clk) if (pmem_start) begin starts++; last_start = pmem_start_addr; end

  task automatic host(logic ctrl, logic we, logic [31:0] addr, logic [31:0] wd,
                      output logic [31:0] rd, output logic retry, output int lat);
    @(negedge clk);
    h_valid = 1; h_ctrl = ctrl; h_req.we = we; h_req.addr = addr; h_req.wdata = wd; h_req.be = 4'hF;
    #1; while (!h_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 h_valid = 0;
    // lat counts clock edges from acceptance to the edge that raises the response
    lat = 0;
    @(negedge clk);
    while (!h_rsp_valid) begin lat++; @(negedge clk); end
    rd = h_rsp_rdata; retry = h_rsp_retry;
  endtask

  initial begin
    logic [31:0] rd; logic rt; int lat; logic [31:0] a, d;
    h_valid = 0; h_ctrl = 0; h_req = '0; done_set = 0; nxt_hit = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      a = {$urandom_range(255), 2'b00}; d = $urandom;
      nxt_hit = $urandom_range(1);
      host(0, 1, a, d, rd, rt, lat);
      checks++; if (lat != (nxt_hit ? HIT : MISS)) begin failures++; $display("write latency %0d hit %b", lat, nxt_hit); end
      nxt_hit = $urandom_range(1);
      host(0, 0, a, 0, rd, rt, lat);
      checks++; if (rd !== d || rt) begin failures++; $display("read data %h exp %h", rd, d); end
      checks++; if (lat != (nxt_hit ? HIT : MISS)) begin failures++; $display("read latency %0d hit %b", lat, nxt_hit); end
    end
    // control: START, STATUS retry, done, STATUS ok
    host(1, 1, 32'h0, 32'h0000_0040, rd, rt, lat);
    checks++; if (starts != 1 || last_start != 32'h40) begin failures++; $display("start %0d %h", starts, last_start); end
    checks++; if (lat != HIT) begin failures++; $display("ctrl latency %0d", lat); end
    host(1, 0, 32'h4, 0, rd, rt, lat);
    checks++; if (!rt || rd != 0) begin failures++; $display("status before done"); end
    @(negedge clk) done_set = 1; @(negedge clk) done_set = 0;
    host(1, 0, 32'h4, 0, rd, rt, lat);
    checks++; if (rt || rd != 1) begin failures++; $display("status after done"); end
    host(1, 1, 32'h0, 32'h0000_0080, rd, rt, lat);
    checks++; if (done || starts != 2 || last_start != 32'h80) begin failures++; $display("restart must clear done %b %0d %h", done, starts, last_start); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
