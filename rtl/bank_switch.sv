// bank_switch: the switch in front of a FlexRAM bank's single port.
//
// Four sources compete for the bank: the global on-chip bus (which carries
// P.Host, local P.Mem and remote P.Mem accesses), the bank's own P.Array, and
// the P.Arrays to its left and right that reach it as their neighbour bank.
// A two-state FSM grants one source, forwards its request to the bank, and
// routes the bank's response back to that source only; then the next request
// can be granted. The global bus has fixed priority, so that the chip still
// behaves as plain DRAM to the P.Host; the three P.Arrays share the rest
// round-robin. Which sources exist follows the FlexRAM design; the priority
// order is this design's own choice.
//
// Interface: per source valid/ready request handshake and a response pulse
// src_rsp_valid[i]; the response payload rsp is shared by all sources.
// Timing: the grant is combinational in the idle state, so a request reaches
// the bank in the cycle it is presented; the switch adds no cycle.
module bank_switch
  import flexram_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NSRC-1:0] src_valid,
  output logic [NSRC-1:0] src_ready,
  input  bank_req_t       src_req [NSRC],
  output logic [NSRC-1:0] src_rsp_valid,
  output bank_rsp_t       rsp,
  output logic            bank_valid,
  input  logic            bank_ready,
  output bank_req_t       bank_req,
  input  logic            bank_rsp_valid,
  input  bank_rsp_t       bank_rsp
);
  typedef enum logic {SW_IDLE, SW_WAIT} sw_state_e;

  sw_state_e  state;
  logic [1:0] owner, win, rr;   // rr: P.Array source tried first (1..3)
  logic       any;

  logic [1:0] cand [3];

  always_comb begin
    any = |src_valid;
    win = 2'(SRC_GBUS);
    for (int k = 0; k < 3; k++) cand[k] = 2'(((int'(rr) - 1 + k) % 3) + 1);
    if (!src_valid[SRC_GBUS]) begin
      win = rr;
      for (int k = 2; k >= 0; k--)
        if (src_valid[cand[k]]) win = cand[k];
    end
  end

  always_comb begin
    bank_valid = (state == SW_IDLE) && any;
    bank_req   = src_req[win];
    src_rsp_valid = '0;
    if (state == SW_WAIT) src_rsp_valid[owner] = bank_rsp_valid;
    rsp = bank_rsp;
  end

  always_comb begin
    src_ready = '0;
    if (state == SW_IDLE && any) src_ready[win] = bank_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= SW_IDLE;
      owner <= '0;
      rr    <= 2'd1;
    end else begin
      unique case (state)
        SW_IDLE: if (bank_valid && bank_ready) begin
          state <= SW_WAIT;
          owner <= win;
          if (win != 2'(SRC_GBUS)) rr <= (win == 2'd3) ? 2'd1 : win + 2'd1;
        end
        SW_WAIT: if (bank_rsp_valid) state <= SW_IDLE;
        default: state <= SW_IDLE;
      endcase
    end
  end

  a_onehot_rsp: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(src_rsp_valid));

endmodule
