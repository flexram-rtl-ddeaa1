// pa_ring: the logical ring that lets each P.Array reach its own bank and the
// banks of its two neighbours.
//
// P.Array i sends every request with a target: its own bank i, the bank to its
// left (i-1) or the bank to its right (i+1), indices wrapping around so the N
// P.Arrays form a ring. The request goes to the matching source port of that
// bank's switch: the local port of bank i, the "right P.Array" port of bank
// i-1, or the "left P.Array" port of bank i+1. Since a P.Array has at most one
// access outstanding, its response is simply the one of the three switch ports
// that pulses. The router is purely combinational and adds no cycle. Neighbour
// reach through shared memory follows the FlexRAM design; everything else
// about the router is this design's own choice.
module pa_ring
  import flexram_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]    pa_valid,
  output logic [N-1:0]    pa_ready,
  input  pa_req_t         pa_req [N],
  output logic [N-1:0]    pa_rsp_valid,
  output logic [DL_W-1:0] pa_rsp_rdata [N],
  // per bank: the three P.Array source ports of its switch
  output logic [N-1:0]    loc_valid, lpa_valid, rpa_valid,
  output bank_req_t       loc_req [N],
  output bank_req_t       lpa_req [N],
  output bank_req_t       rpa_req [N],
  input  logic [N-1:0]    loc_ready, lpa_ready, rpa_ready,
  input  logic [N-1:0]    loc_rsp_valid, lpa_rsp_valid, rpa_rsp_valid,
  input  bank_rsp_t       bank_rsp [N]
);
  for (genvar i = 0; i < N; i++) begin : g_pa
    localparam int unsigned L = (i + N - 1) % N;   // bank / P.Array on the left
    localparam int unsigned R = (i + 1) % N;       // bank / P.Array on the right

    // requests arriving at bank i
    assign loc_valid[i] = pa_valid[i] && pa_req[i].tgt == TGT_OWN;
    assign loc_req[i]   = pa_req[i].req;
    assign lpa_valid[i] = pa_valid[L] && pa_req[L].tgt == TGT_RIGHT;
    assign lpa_req[i]   = pa_req[L].req;
    assign rpa_valid[i] = pa_valid[R] && pa_req[R].tgt == TGT_LEFT;
    assign rpa_req[i]   = pa_req[R].req;

    // P.Array i: ready and response from the bank it addressed
    always_comb begin
      unique case (pa_req[i].tgt)
        TGT_LEFT:  pa_ready[i] = rpa_ready[L];
        TGT_RIGHT: pa_ready[i] = lpa_ready[R];
        default:   pa_ready[i] = loc_ready[i];
      endcase
      pa_rsp_valid[i] = loc_rsp_valid[i] || rpa_rsp_valid[L] || lpa_rsp_valid[R];
      if (rpa_rsp_valid[L])      pa_rsp_rdata[i] = bank_rsp[L].rdata;
      else if (lpa_rsp_valid[R]) pa_rsp_rdata[i] = bank_rsp[R].rdata;
      else                       pa_rsp_rdata[i] = bank_rsp[i].rdata;
    end
  end
endmodule
