// tb_dram_bank: self-checking test of dram_bank at a reduced size.
// Random reads and writes are compared with a byte-array reference; each
// response must arrive exactly HIT_CYC or MISS_CYC cycles after acceptance,
// matching its hit flag. An access to the row used just before must hit, and
// while no more rows than row buffers are in use every repeat access must hit.
// Refresh requests are interleaved and must not disturb data.
module tb_dram_bank;
  import flexram_pkg::*;
  localparam int ROWS = 8, ROW_BYTES = 64, NRB = 3, HIT = 4, MISS = 8;
  localparam int BYTES = ROWS * ROW_BYTES;

  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, rsp_valid, ref_req, ref_active;
  bank_req_t req;
  bank_rsp_t rsp;
  int checks = 0, failures = 0;
  logic [7:0] ref_mem [BYTES];
  logic       known [BYTES];
  int refreshes = 0;

  dram_bank #(.ROWS(ROWS), .ROW_BYTES(ROW_BYTES), .NRB(NRB), .HIT_CYC(HIT), .MISS_CYC(MISS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (ref_active) refreshes++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input logic we, input int addr, input logic [127:0] wd,
                        input logic [15:0] be, output logic hit, output int lat);
    int base;
    base = addr & ~15;
    req.we = we; req.addr = BANK_AW'(addr); req.wdata = wd; req.be = be;
    req_valid = 1;
    forever begin
      logic r;
      #1 r = req_ready;
      @(posedge clk);
      if (r) break;
    end
    #1 req_valid = 0;
    lat = 0;
    do begin @(posedge clk); #1 lat++; end while (!rsp_valid && lat < 100);
    hit = rsp.hit;
    checks++;
    if (lat != (rsp.hit ? HIT : MISS)) begin
      failures++; $display("latency %0d with hit=%0d", lat, rsp.hit);
    end
    if (!we) begin
      for (int b = 0; b < 16; b++) if (known[base+b]) begin
        checks++;
        if (rsp.rdata[b*8 +: 8] !== ref_mem[base+b]) begin
          failures++; $display("data mismatch addr %0h byte %0d", base, b);
        end
      end
    end else begin
      for (int b = 0; b < 16; b++) if (be[b]) begin
        ref_mem[base+b] = wd[b*8 +: 8]; known[base+b] = 1;
      end
    end
  endtask

  initial begin
    logic hit; int lat, a, prev_row, row;
    logic [127:0] wd;
    req_valid = 0; ref_req = 0; req = '0;
    for (int i = 0; i < BYTES; i++) known[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    #1;
    // first touch of a row is a miss, a repeat is a hit (only 3 rows used)
    for (int r = 0; r < NRB; r++) begin
      access(1, r * ROW_BYTES, {4{32'h1000_0000 + r}}, 16'hffff, hit, lat);
      checks++; if (hit) begin failures++; $display("first access to row %0d hit", r); end
    end
    for (int r = 0; r < NRB; r++) begin
      access(0, r * ROW_BYTES, '0, '0, hit, lat);
      checks++; if (!hit) begin failures++; $display("repeat access to row %0d missed", r); end
    end
    // random traffic over all rows, with refreshes in between
    prev_row = -1;
    for (int n = 0; n < 600; n++) begin
      a = $urandom_range(BYTES - 1);
      row = a / ROW_BYTES;
      wd = {$urandom, $urandom, $urandom, $urandom};
      if (n % 50 == 7) begin ref_req = 1; @(posedge clk); #1 ref_req = 0; end
      access(n % 3 == 0 ? 1'b0 : 1'b1, a, wd, 16'($urandom), hit, lat);
      if (row == prev_row) begin
        checks++; if (!hit) begin failures++; $display("same-row access missed"); end
      end
      prev_row = row;
    end
    // read back everything
    for (int a2 = 0; a2 < BYTES; a2 += 16) access(0, a2, '0, '0, hit, lat);
    checks++;
    if (refreshes == 0) begin failures++; $display("no refresh seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
