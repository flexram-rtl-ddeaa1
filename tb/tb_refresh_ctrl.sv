// tb_refresh_ctrl: with a short interval, refresh commands must come exactly
// INTERVAL cycles apart, each to BANKS_PER_CMD neighbouring banks, walking over
// all banks in turn so that every bank gets the same number of refreshes.
module tb_refresh_ctrl;
  localparam int NB = 16, IV = 20, BPC = 2;
  logic clk = 0, rst_n = 0;
  logic [NB-1:0] ref_req;
  int checks = 0, failures = 0, last = -1, cyc = 0, cmds = 0, grp = 0;
  int per_bank [NB];
  refresh_ctrl #(.NB(NB), .INTERVAL(IV), .BANKS_PER_CMD(BPC)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) if (rst_n) begin
    #1 cyc++;
    if (ref_req != 0) begin
      checks++;
      if (last >= 0 && cyc - last != IV) begin failures++; $display("interval %0d", cyc - last); end
      checks++;
      if (ref_req != NB'(((1 << BPC) - 1) << (grp * BPC))) begin failures++; $display("banks %b", ref_req); end
      grp = (grp + 1) % (NB / BPC);
      last = cyc; cmds++;
      for (int b = 0; b < NB; b++) if (ref_req[b]) per_bank[b]++;
    end
  end
  initial begin
    for (int b = 0; b < NB; b++) per_bank[b] = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    repeat (IV * NB) @(posedge clk);
    #2;
    for (int b = 0; b < NB; b++) begin
      checks++; if (per_bank[b] != BPC) begin failures++; $display("bank %0d refreshed %0d times", b, per_bank[b]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
