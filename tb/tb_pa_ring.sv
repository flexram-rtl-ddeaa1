// tb_pa_ring: random stimulus on the purely combinational P.Array-to-bank
// ring (N = 8). Each P.Array picks a target (own bank, left neighbour, right
// neighbour) and each bank answers on at most one of its source ports. Checks
// every routed request, ready and response against a reference model,
// including the wrap-around between P.Array N-1 and P.Array 0. The ring adds
// no delay, so every check is made in the same cycle as the stimulus.
module tb_pa_ring;
  import flexram_pkg::*;
  localparam int N = 8;
  logic [N-1:0] pa_valid, pa_ready, pa_rsp_valid;
  pa_req_t pa_req [N];
  logic [DL_W-1:0] pa_rsp_rdata [N];
  logic [N-1:0] loc_valid, lpa_valid, rpa_valid, loc_ready, lpa_ready, rpa_ready;
  logic [N-1:0] loc_rsp_valid, lpa_rsp_valid, rpa_rsp_valid;
  bank_req_t loc_req [N], lpa_req [N], rpa_req [N];
  bank_rsp_t bank_rsp [N];
  int checks = 0, failures = 0;
  logic clk = 0;

  pa_ring #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic c, string what);
    checks++; if (!c) begin failures++; $display("mismatch: %s", what); end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        pa_valid[i] = 1'($urandom_range(1));
        pa_req[i].tgt = tgt_e'($urandom_range(2));
        pa_req[i].req = '{we: 1'($urandom_range(1)), addr: 20'($urandom), wdata: {4{$urandom}}, be: 16'($urandom)};
        loc_ready[i] = 1'($urandom_range(1)); lpa_ready[i] = 1'($urandom_range(1)); rpa_ready[i] = 1'($urandom_range(1));
        bank_rsp[i].rdata = {4{$urandom}}; bank_rsp[i].hit = 1'($urandom_range(1));
        {loc_rsp_valid[i], lpa_rsp_valid[i], rpa_rsp_valid[i]} = 3'b000;
        case ($urandom_range(3))
          0: loc_rsp_valid[i] = 1'b1;
          1: lpa_rsp_valid[i] = 1'b1;
          2: rpa_rsp_valid[i] = 1'b1;
          default: ;
        endcase
      end
      #1;
      for (int b = 0; b < N; b++) begin
        int l, r; l = (b + N - 1) % N; r = (b + 1) % N;
        chk(loc_valid[b] == (pa_valid[b] && pa_req[b].tgt == TGT_OWN), "loc_valid");
        chk(lpa_valid[b] == (pa_valid[l] && pa_req[l].tgt == TGT_RIGHT), "lpa_valid");
        chk(rpa_valid[b] == (pa_valid[r] && pa_req[r].tgt == TGT_LEFT), "rpa_valid");
        chk(loc_req[b] == pa_req[b].req && lpa_req[b] == pa_req[l].req && rpa_req[b] == pa_req[r].req, "routed request");
      end
      for (int i = 0; i < N; i++) begin
        int l, r, nv; logic er; l = (i + N - 1) % N; r = (i + 1) % N;
        case (pa_req[i].tgt)
          TGT_LEFT:  er = rpa_ready[l];
          TGT_RIGHT: er = lpa_ready[r];
          default:   er = loc_ready[i];
        endcase
        chk(pa_ready[i] == er, "pa_ready");
        nv = int'(loc_rsp_valid[i]) + int'(rpa_rsp_valid[l]) + int'(lpa_rsp_valid[r]);
        chk(pa_rsp_valid[i] == (nv != 0), "pa_rsp_valid");
        if (nv == 1) begin
          if (loc_rsp_valid[i]) chk(pa_rsp_rdata[i] == bank_rsp[i].rdata, "own data");
          if (rpa_rsp_valid[l]) chk(pa_rsp_rdata[i] == bank_rsp[l].rdata, "left data");
          if (lpa_rsp_valid[r]) chk(pa_rsp_rdata[i] == bank_rsp[r].rdata, "right data");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
