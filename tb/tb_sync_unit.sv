// tb_sync_unit: notify lines must appear in the notify register one cycle
// later; the interrupt must rise exactly when every masked bit is set (and
// never with an empty mask); a broadcast write must reach the P.Arrays one
// cycle later with its data.
module tb_sync_unit;
  localparam int NPA = 64;
  logic clk = 0, rst_n = 0;
  logic [NPA-1:0] notify_in, notify_reg, mask;
  logic irq, bc_wr, bc_valid; logic [31:0] bc_wdata, bc_data;
  int checks = 0, failures = 0;
  sync_unit #(.NPA(NPA)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    notify_in = '0; mask = '0; bc_wr = 0; bc_wdata = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      logic [NPA-1:0] nv; logic [31:0] w; logic b;
      nv = {$urandom, $urandom};
      if (n % 4 == 0) nv = '1;
      mask = (n % 5 == 0) ? '0 : ((n % 3 == 0) ? '1 : {$urandom, $urandom} & {$urandom, $urandom});
      notify_in = nv; b = $urandom_range(1); w = $urandom;
      bc_wr = b; bc_wdata = w;
      @(posedge clk); #1;
      bc_wr = 0;
      checks++; if (notify_reg !== nv) begin failures++; $display("notify register"); end
      checks++; if (irq !== ((mask != 0) && ((nv & mask) == mask))) begin failures++; $display("irq n=%0d", n); end
      checks++; if (bc_valid !== b || (b && bc_data !== w)) begin failures++; $display("broadcast"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
