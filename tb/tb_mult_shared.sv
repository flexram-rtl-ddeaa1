// tb_mult_shared: four requesters multiply random operands through the shared
// multiplier. Every product is checked against a*b computed here; a lone
// request must finish in exactly 2 cycles, and under full contention all four
// must be served.
module tb_mult_shared;
  logic clk = 0, rst_n = 0;
  logic [3:0] req, done;
  logic [31:0] a [4], b [4], result;
  int checks = 0, failures = 0, finished = 0;
  mult_shared dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic mul(input int i, output int lat);
    logic [31:0] exp;
    a[i] = $urandom; b[i] = $urandom; exp = a[i] * b[i];
    req[i] = 1; lat = 0;
    do begin @(posedge clk); #1 lat++; end while (!done[i] && lat < 100);
    checks++;
    if (result !== exp) begin failures++; $display("req %0d: %h * %h gave %h", i, a[i], b[i], result); end
    req[i] = 0;
  endtask

  for (genvar g = 0; g < 4; g++) begin : g_r
    initial begin
      int lat;
      req[g] = 0; a[g] = 0; b[g] = 0;
      wait (rst_n); @(posedge clk); #1;
      // lone request, in turn
      repeat (g * 10) @(posedge clk);
      #0 mul(g, lat);
      checks++; if (lat != 2) begin failures++; $display("lone latency %0d", lat); end
      repeat ((3 - g) * 10 + 5) @(posedge clk);
      #1;
      // contention
      for (int n = 0; n < 200; n++) begin
        mul(g, lat);
        checks++; if (lat > 8) begin failures++; $display("starved %0d", lat); end
      end
      finished++;
    end
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (finished == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
