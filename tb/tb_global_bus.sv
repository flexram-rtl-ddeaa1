// tb_global_bus: two masters issue random word reads and writes to four
// behavioural bank models. Bank b answers exactly 1+b cycles after it accepts
// and randomly drops ready. Checks: read data against a shadow word memory,
// byte enables, that a response reaches only the owning master and arrives
// exactly 1+b cycles after the master's request was accepted, and that
// master 0 (P.Host side) wins when both masters request in the same cycle.
module tb_global_bus;
  import flexram_pkg::*;
  localparam int NM = 2, NB = 4;
  logic clk = 0, rst_n = 0;
  logic [NM-1:0] m_valid, m_ready, m_rsp_valid;
  word_req_t m_req [NM];
  logic [31:0] m_rdata; logic m_hit;
  logic [NB-1:0] b_valid, b_ready, b_rsp_valid;
  bank_req_t b_req;
  bank_rsp_t b_rsp [NB];
  int checks = 0, failures = 0, both = 0, done_m = 0;
  logic [31:0] shadow [logic [31:0]];
  logic [DL_W-1:0] bmem [NB][logic [15:0]];
  int bcnt [NB];
  logic bhit [NB];

  global_bus #(.NM(NM), .NB(NB)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // bank models
  for (genvar b = 0; b < NB; b++) begin : g_bank
    always @(posedge clk) begin
      if (!rst_n) begin
        b_ready[b] <= 1'b0; b_rsp_valid[b] <= 1'b0; bcnt[b] = 0;
      end else begin
        b_rsp_valid[b] <= 1'b0;
        if (bcnt[b] > 0) begin
          bcnt[b]--;
          if (bcnt[b] == 0) b_rsp_valid[b] <= 1'b1;
        end
        if (b_valid[b] && b_ready[b]) begin
          logic [DL_W-1:0] line;
          line = bmem[b].exists(b_req.addr[19:4]) ? bmem[b][b_req.addr[19:4]] : '0;
          if (b_req.we)
            for (int k = 0; k < DL_BE; k++) if (b_req.be[k]) line[8*k +: 8] = b_req.wdata[8*k +: 8];
          bmem[b][b_req.addr[19:4]] = line;
          b_rsp[b].rdata <= line;
          b_rsp[b].hit   <= 1'($urandom_range(1));
          bcnt[b] = 1 + b;   // response raised 1+b edges after acceptance
        end
        b_ready[b] <= (bcnt[b] == 0) && ($urandom_range(3) != 0);
      end
    end
  end

  task automatic master(int m, int n);
    for (int i = 0; i < n; i++) begin
      word_req_t r; int wait_c; logic [31:0] exp; int bank;
      r.we = 1'($urandom_range(1)); r.addr = 32'(($urandom_range(NB - 1) << BANK_AW) | ($urandom_range(63) << 2));
      r.wdata = $urandom; r.be = (i % 3 == 0) ? 4'($urandom_range(15)) : 4'hF;
      bank = int'(r.addr[BANK_AW +: 2]);
      @(negedge clk);
      m_valid[m] = 1'b1; m_req[m] = r;
      #1;
      while (!m_ready[m]) begin
        if (m == 1 && m_valid[0]) begin
          both++;
          checks++; if (m_ready[1]) begin failures++; $display("master 1 granted over master 0"); end
        end
        @(negedge clk); #1;
      end
      if (m == 1 && m_valid[0]) begin failures++; checks++; $display("master 1 granted while master 0 waits"); end
      // transfer happens at the next posedge; update shadow there
      @(posedge clk);
      begin
        logic [31:0] old;
        old = shadow.exists(r.addr) ? shadow[r.addr] : 32'd0;
        if (r.we) begin
          for (int k = 0; k < 4; k++) if (r.be[k]) old[8*k +: 8] = r.wdata[8*k +: 8];
          shadow[r.addr] = old;
        end
        exp = old;
      end
      #1 m_valid[m] = 1'b0;
      // wait_c counts clock edges from acceptance to the edge raising the response
      wait_c = 0;
      @(negedge clk);
      while (!m_rsp_valid[m]) begin wait_c++; @(negedge clk); end
      checks++;
      if (m_rsp_valid[1-m]) begin failures++; $display("response went to both masters"); end
      checks++;
      if (wait_c != 1 + bank) begin failures++; $display("m%0d latency %0d expected %0d", m, wait_c, 1 + bank); end
      if (!r.we) begin
        checks++;
        if (m_rdata !== exp) begin failures++; $display("m%0d read %h got %h exp %h", m, r.addr, m_rdata, exp); end
      end
      @(posedge clk);
    end
    done_m++;
  endtask

  initial begin
    m_valid = '0;
    for (int m = 0; m < NM; m++) m_req[m] = '0;
    for (int b = 0; b < NB; b++) b_rsp[b] = '0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    fork
      master(0, 400);
      master(1, 400);
    join
    checks++; if (both == 0) begin failures++; $display("no contention seen"); end
    $display("contention cycles %0d", both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
