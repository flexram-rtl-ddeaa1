// dram_bank: one 1-Mbyte FlexRAM DRAM bank with three 2-Kbyte row buffers.
//
// The bank is ROWS rows of ROW_BYTES bytes (512 x 2 Kbyte). It has a single
// port 128 bits wide, one 128-bit column of a row buffer per access, which is
// what the 128 DRAM data lines of a bank deliver. An access that finds its row
// in one of the NRB row buffers takes HIT_CYC cycles (10 ns at 400 MHz); an
// access that misses takes MISS_CYC cycles (20 ns): the row is sensed into a
// row buffer picked at random among the valid ones (an invalid buffer is used
// first) after a dirty victim is written back to the array. Writes land in the
// row buffer and mark it dirty. There are no caches beyond the row buffers.
//
// Interface: req_valid/req_ready accept one access when the bank is idle; one
// response pulse rsp_valid follows exactly HIT_CYC or MISS_CYC cycles later,
// for reads and writes alike (rsp.hit tells which). A ref_req pulse asks for
// one row refresh; it is done at the next idle cycle, before any new access,
// and keeps the bank busy for MISS_CYC cycles (one activate/precharge).
// Reset is synchronous and clears the row-buffer state only (DRAM cells keep
// their contents). Row-buffer organisation, sizes and latencies follow the FlexRAM design; the
// LFSR used as random source, the write-back policy and the refresh timing are
// this design's own choices.
module dram_bank
  import flexram_pkg::*;
#(
  parameter int unsigned ROWS      = 512,
  parameter int unsigned ROW_BYTES = 2048,
  parameter int unsigned NRB       = 3,
  parameter int unsigned HIT_CYC   = 4,
  parameter int unsigned MISS_CYC  = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req_valid,
  output logic      req_ready,
  input  bank_req_t req,
  output logic      rsp_valid,
  output bank_rsp_t rsp,
  input  logic      ref_req,
  output logic      ref_active
);
  localparam int unsigned ROW_BITS = ROW_BYTES * 8;
  localparam int unsigned COLS     = ROW_BYTES / DL_BE;
  localparam int unsigned CW       = $clog2(COLS);
  localparam int unsigned RW       = $clog2(ROWS);
  localparam int unsigned COL_LSB  = $clog2(DL_BE);
  localparam int unsigned ROW_LSB  = COL_LSB + CW;
  localparam int unsigned BW       = $clog2(NRB);
  localparam int unsigned CNT_W    = $clog2(MISS_CYC + 1);

  typedef enum logic [1:0] {S_IDLE, S_BUSY, S_REF} state_e;

  logic [ROW_BITS-1:0] dram [ROWS];
  logic [ROW_BITS-1:0] rb   [NRB];
  logic [RW-1:0]       rb_tag   [NRB];
  logic [NRB-1:0]      rb_val, rb_dirty;

  state_e              state;
  logic [CNT_W-1:0]    cnt;
  logic [BW-1:0]       sel;
  bank_req_t           cur;
  logic                cur_hit;
  logic                ref_pend;
  logic [RW-1:0]       ref_row;
  logic [7:0]          lfsr;

  logic [RW-1:0]       req_row;
  logic [CW-1:0]       cur_col;
  logic                hit;
  logic [BW-1:0]       hit_idx, victim;

  assign req_row = req.addr[ROW_LSB +: RW];
  assign cur_col = cur.addr[COL_LSB +: CW];

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = 0; i < NRB; i++)
      if (rb_val[i] && rb_tag[i] == req_row) begin
        hit     = 1'b1;
        hit_idx = BW'(i);
      end
  end

  // Victim: first invalid buffer, else a pseudo-random one
  always_comb begin
    logic found;
    found  = 1'b0;
    victim = BW'(lfsr % NRB);
    for (int i = 0; i < NRB; i++)
      if (!rb_val[i] && !found) begin
        victim = BW'(i);
        found  = 1'b1;
      end
  end

  assign req_ready  = (state == S_IDLE) && !ref_pend;
  assign ref_active = (state == S_REF);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lfsr <= 8'h5a;
    end else begin
      lfsr <= {lfsr[6:0], lfsr[7] ^ lfsr[5] ^ lfsr[4] ^ lfsr[3]};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      sel       <= '0;
      cur       <= '0;
      cur_hit   <= 1'b0;
      ref_pend  <= 1'b0;
      ref_row   <= '0;
      rb_val    <= '0;
      rb_dirty  <= '0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
    end else begin
      rsp_valid <= 1'b0;
      if (ref_req) ref_pend <= 1'b1;
      unique case (state)
        S_IDLE: begin
          if (ref_pend) begin
            state    <= S_REF;
            cnt      <= CNT_W'(MISS_CYC - 1);
            ref_pend <= ref_req;
            ref_row  <= ref_row + 1'b1;
          end else if (req_valid) begin
            cur     <= req;
            cur_hit <= hit;
            state   <= S_BUSY;
            if (hit) begin
              sel <= hit_idx;
              cnt <= CNT_W'(HIT_CYC - 1);
            end else begin
              sel <= victim;
              cnt <= CNT_W'(MISS_CYC - 1);
              if (rb_val[victim] && rb_dirty[victim])
                dram[rb_tag[victim]] <= rb[victim];
              rb[victim]       <= dram[req_row];
              rb_tag[victim]   <= req_row;
              rb_val[victim]   <= 1'b1;
              rb_dirty[victim] <= 1'b0;
            end
          end
        end
        S_BUSY: begin
          if (cnt == 0) begin
            state     <= S_IDLE;
            rsp_valid <= 1'b1;
            rsp.hit   <= cur_hit;
            rsp.rdata <= rb[sel][cur_col*DL_W +: DL_W];
            if (cur.we) begin
              for (int b = 0; b < DL_BE; b++)
                if (cur.be[b]) rb[sel][cur_col*DL_W + b*8 +: 8] <= cur.wdata[b*8 +: 8];
              rb_dirty[sel] <= 1'b1;
            end
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_REF: begin
          if (cnt == 0) state <= S_IDLE;
          else          cnt   <= cnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A request must stay stable while it waits for the bank
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n) req_valid && !req_ready |=> req_valid;
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule
