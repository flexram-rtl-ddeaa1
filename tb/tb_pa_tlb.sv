// tb_pa_tlb: fills the TLB with random translations and checks lookups against
// a reference list of the last 8 pages filled (FIFO replacement once full),
// misses on pages never filled, and that flush empties it.
module tb_pa_tlb;
  import flexram_pkg::*;
  logic clk = 0, rst_n = 0, flush = 0, hit, fill = 0;
  logic [VPN_W-1:0] vpn, fill_vpn;
  logic [PPN_W-1:0] ppn, fill_ppn;
  logic [VPN_W-1:0] rv [$];
  logic [PPN_W-1:0] rp [$];
  int checks = 0, failures = 0;
  pa_tlb dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    vpn = '0; fill_vpn = '0; fill_ppn = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      // fill a new distinct page
      fill_vpn = VPN_W'(n * 7 + 3); fill_ppn = PPN_W'($urandom);
      @(negedge clk); fill = 1; @(posedge clk); #1 fill = 0;
      rv.push_back(fill_vpn); rp.push_back(fill_ppn);
      if (rv.size() > 8) begin void'(rv.pop_front()); void'(rp.pop_front()); end
      foreach (rv[i]) begin
        vpn = rv[i]; #1; checks++;
        if (!hit || ppn !== rp[i]) begin failures++; $display("lookup %0h failed hit=%0d ppn=%h exp=%h n=%0d i=%0d", rv[i], hit, ppn, rp[i], n, i); end
      end
      vpn = VPN_W'(n * 7 + 4); #1; checks++;
      if (hit) begin failures++; $display("false hit"); end
      if (n > 8) begin
        vpn = VPN_W'((n - 8) * 7 + 3); #1; checks++;
        if (hit) begin failures++; $display("evicted page still hits"); end
      end
    end
    @(negedge clk); flush = 1; @(posedge clk); #1 flush = 0;
    vpn = rv[7]; #1; checks++;
    if (hit) begin failures++; $display("hit after flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
