// tb_bank_switch: four sources issue tagged requests through bank_switch to a
// simple bank model that echoes the write data after a few cycles. Each source
// must get back exactly its own tags, in order. At every grant the global bus
// must win when it is requesting, and with all three P.Arrays requesting the
// same P.Array must never be granted twice in a row.
module tb_bank_switch;
  import flexram_pkg::*;
  localparam int N = 40;
  logic clk = 0, rst_n = 0;
  logic [NSRC-1:0] src_valid, src_ready, src_rsp_valid;
  bank_req_t src_req [NSRC];
  bank_rsp_t rsp, bank_rsp;
  logic bank_valid, bank_ready, bank_rsp_valid;
  bank_req_t bank_req;
  int checks = 0, failures = 0;
  int last_pa = -1, contested = 0, rr_seen = 0;

  bank_switch dut (.*);
  always #5 clk = ~clk;

  // bank model: 3-cycle latency, echoes wdata
  int bcnt = 0; logic busy = 0; logic [127:0] held;
  assign bank_ready = !busy;
  always @(posedge clk) begin
    bank_rsp_valid <= 0;
    if (busy) begin
      bcnt <= bcnt + 1;
      if (bcnt == 2) begin busy <= 0; bank_rsp_valid <= 1; bank_rsp.rdata <= held; bank_rsp.hit <= 1; end
    end else if (bank_valid) begin
      busy <= 1; bcnt <= 0; held <= bank_req.wdata;
    end
  end

  // grant monitor
  always @(posedge clk) if (rst_n && bank_valid && bank_ready) begin
    int w;
    w = -1;
    for (int i = 0; i < NSRC; i++) if (src_ready[i]) w = i;
    checks++;
    if (src_valid[0] && w != 0) begin failures++; $display("gbus not prioritised"); end
    if (!src_valid[0] && src_valid[1] && src_valid[2] && src_valid[3]) begin
      contested++;
      if (w == last_pa) begin failures++; $display("P.Array %0d granted twice", w); end else rr_seen++;
    end
    if (w > 0) last_pa = w;
  end

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int done_cnt = 0;
  for (genvar s = 0; s < NSRC; s++) begin : g_src
    initial begin
      src_valid[s] = 0; src_req[s] = '0;
      wait (rst_n);
      @(posedge clk); #1;
      for (int n = 0; n < N; n++) begin
        logic r; int lat;
        src_req[s].wdata = {96'(s), 32'(n)};
        src_req[s].we = 0;
        src_valid[s] = (s == 0) ? ($urandom_range(3) == 0) : 1;
        while (!src_valid[s]) begin @(posedge clk); #1 src_valid[s] = ($urandom_range(3) == 0); end
        forever begin #0 r = src_ready[s]; @(posedge clk); if (r) break; #1; end
        #1 src_valid[s] = 0;
        lat = 0;
        while (!src_rsp_valid[s] && lat < 200) begin @(posedge clk); #1 lat++; end
        checks++;
        if (rsp.rdata != {96'(s), 32'(n)}) begin failures++; $display("src %0d got %h", s, rsp.rdata[31:0]); end
        @(posedge clk); #1;
      end
      done_cnt++;
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (done_cnt == NSRC);
    checks++;
    if (rr_seen == 0) begin failures++; $display("no contested round-robin grant seen"); end
    $display("contested grants %0d", contested);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
