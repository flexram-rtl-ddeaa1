// tb_imem: loads random instruction pairs through the write port and reads
// them back on all four ports at once, checking each port's data one cycle
// after its address.
module tb_imem;
  import flexram_pkg::*;
  localparam int DEPTH = 4096;
  logic clk = 0;
  logic [IADDR_W-1:0] raddr [4];
  logic [15:0] rdata [4];
  logic we; logic [IADDR_W-2:0] waddr; logic [31:0] wdata;
  logic [15:0] model [DEPTH];
  int checks = 0, failures = 0;
  imem dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    we = 0; waddr = '0; wdata = '0;
    for (int p = 0; p < 4; p++) raddr[p] = '0;
    @(posedge clk); #1;
    for (int w = 0; w < DEPTH / 2; w++) begin
      we = 1; waddr = 11'(w); wdata = $urandom;
      model[2*w] = wdata[15:0]; model[2*w+1] = wdata[31:16];
      @(posedge clk); #1;
    end
    we = 0;
    for (int n = 0; n < 3000; n++) begin
      int a [4];
      for (int p = 0; p < 4; p++) begin a[p] = $urandom_range(DEPTH - 1); raddr[p] = 12'(a[p]); end
      @(posedge clk); #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rdata[p] !== model[a[p]]) begin failures++; $display("port %0d addr %0d", p, a[p]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
