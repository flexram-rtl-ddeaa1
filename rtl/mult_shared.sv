// mult_shared: the 32-bit integer multiplier shared by the four P.Arrays of a
// FlexRAM basic block.
//
// Each P.Array raises req[i] with its operands and holds them until done[i]
// pulses; the low 32 bits of the product then appear on result. One request
// is granted per cycle, round-robin over the requesters not already in
// flight, and the multiplier is pipelined, so done[i] comes LAT cycles after
// the grant (LAT = 2: one cycle to multiply, one to drive the shared result
// bus). Sharing one multiplier among four P.Arrays follows the FlexRAM design;
// the latency and arbitration are this design's own choices.
module mult_shared #(
  parameter int unsigned NREQ = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NREQ-1:0] req,
  input  logic [31:0]     a [NREQ],
  input  logic [31:0]     b [NREQ],
  output logic [NREQ-1:0] done,
  output logic [31:0]     result
);
  localparam int unsigned IW = $clog2(NREQ);

  logic [NREQ-1:0] inflight, gnt;
  logic [IW-1:0]   ptr, gidx;
  logic            gvalid;
  logic            s1_v;
  logic [IW-1:0]   s1_idx;
  logic [31:0]     s1_p;

  always_comb begin
    gvalid = 1'b0;
    gidx   = '0;
    for (int k = NREQ - 1; k >= 0; k--) begin
      logic [IW-1:0] c;
      c = IW'((int'(ptr) + k) % NREQ);
      if (req[c] && !inflight[c]) begin
        gvalid = 1'b1;
        gidx   = c;
      end
    end
    gnt = '0;
    if (gvalid) gnt[gidx] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      inflight <= '0;
      ptr      <= '0;
      s1_v     <= 1'b0;
      s1_idx   <= '0;
      s1_p     <= '0;
      done     <= '0;
      result   <= '0;
    end else begin
      // stage 1: multiply
      s1_v   <= gvalid;
      s1_idx <= gidx;
      s1_p   <= a[gidx] * b[gidx];
      if (gvalid) ptr <= IW'((int'(gidx) + 1) % NREQ);
      // stage 2: drive the result bus
      done <= '0;
      if (s1_v) begin
        done[s1_idx] <= 1'b1;
        result       <= s1_p;
      end
      inflight <= (inflight | gnt) & ~(done);
    end
  end

endmodule
