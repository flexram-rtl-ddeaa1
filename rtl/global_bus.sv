// global_bus: the global on-chip bus from the P.Host interface and the P.Mem
// to every DRAM bank of a FlexRAM chip.
//
// Masters present 32-bit word requests (word_req_t). Bits [BW+19:20] of the
// address pick the bank and bits [19:0] the byte inside it; the word is put on
// its lane of the bank's 128-bit port with the matching byte enables. The bus
// carries one transaction at a time: it grants the lowest-numbered requesting
// master (master 0, the P.Host interface, first, so that the chip stays plain
// DRAM to the host), waits for the bank's switch to accept, then returns the
// bank's response word, together with its row-buffer hit flag, to that
// master. Request and response pass through without added cycles. The bus
// and what it connects follow the FlexRAM design; its protocol and priority
// are this design's own choices.
module global_bus
  import flexram_pkg::*;
#(
  parameter int unsigned NM = 2,
  parameter int unsigned NB = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NM-1:0] m_valid,
  output logic [NM-1:0] m_ready,
  input  word_req_t     m_req [NM],
  output logic [NM-1:0] m_rsp_valid,
  output logic [31:0]   m_rdata,
  output logic          m_hit,
  output logic [NB-1:0] b_valid,
  input  logic [NB-1:0] b_ready,
  output bank_req_t     b_req,
  input  logic [NB-1:0] b_rsp_valid,
  input  bank_rsp_t     b_rsp [NB]
);
  localparam int unsigned MW = (NM > 1) ? $clog2(NM) : 1;
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1;

  typedef enum logic {GB_IDLE, GB_WAIT} gb_state_e;

  gb_state_e state;
  logic [MW-1:0] win, owner;
  logic [BW-1:0] sel, cur_bank;
  logic [1:0]    cur_lane;
  logic          any;
  word_req_t     wr;

  always_comb begin
    any = |m_valid;
    win = '0;
    for (int m = NM - 1; m >= 0; m--) if (m_valid[m]) win = MW'(m);
    wr  = m_req[win];
    sel = (NB > 1) ? wr.addr[BANK_AW +: BW] : '0;
    b_req.we    = wr.we;
    b_req.addr  = wr.addr[BANK_AW-1:0];
    b_req.wdata = {4{wr.wdata}};
    b_req.be    = DL_BE'({12'd0, wr.be}) << (wr.addr[3:2] * 4);
    b_valid = '0;
    if (state == GB_IDLE && any) b_valid[sel] = 1'b1;
    m_rsp_valid = '0;
    if (state == GB_WAIT) m_rsp_valid[owner] = b_rsp_valid[cur_bank];
    m_rdata = b_rsp[cur_bank].rdata[cur_lane*32 +: 32];
    m_hit   = b_rsp[cur_bank].hit;
  end

  always_comb begin
    m_ready = '0;
    if (state == GB_IDLE && any) m_ready[win] = b_ready[sel];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= GB_IDLE;
      owner    <= '0;
      cur_bank <= '0;
      cur_lane <= '0;
    end else begin
      unique case (state)
        GB_IDLE: if (any && b_ready[sel]) begin
          state    <= GB_WAIT;
          owner    <= win;
          cur_bank <= sel;
          cur_lane <= wr.addr[3:2];
        end
        GB_WAIT: if (b_rsp_valid[cur_bank]) state <= GB_IDLE;
        default: state <= GB_IDLE;
      endcase
    end
  end
endmodule
