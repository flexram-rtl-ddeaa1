// host_if: the logic behind the FlexRAM chip's P.Host (memory bus) interface.
//
// To the P.Host the chip is a plain 16M x 32 DRAM: word reads and writes go
// over the global bus to the banks. The response is held back so that it comes
// HIT_CYC cycles after the request for a row-buffer hit (20 ns at 400 MHz) and
// MISS_CYC cycles after it for a miss (40 ns), the access times the chip shows
// to the P.Host; it can only be later if the bank is busy with other work.
// Requests marked ctrl address two predefined registers (standing for the
// reserved code words of the memory protocol): writing register 0 (START)
// starts the P.Mem at the written code address and clears the done flag;
// reading register 1 (STATUS) returns 1 if the master P.Mem has set done, and
// otherwise answers with retry, after which the memory controller retries the
// read later. The P.Mem sets done through done_set. The electrical interface
// itself is not modelled. Register protocol and latencies follow the FlexRAM
// design; register numbers and the signal-level handshake are this design's
// own choices.
module host_if
  import flexram_pkg::*;
#(
  parameter int unsigned HIT_CYC  = 8,
  parameter int unsigned MISS_CYC = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // P.Host side
  input  logic        h_valid,
  output logic        h_ready,
  input  logic        h_ctrl,
  input  word_req_t   h_req,
  output logic        h_rsp_valid,
  output logic [31:0] h_rsp_rdata,
  output logic        h_rsp_retry,
  // global bus master
  output logic        g_valid,
  input  logic        g_ready,
  output word_req_t   g_req,
  input  logic        g_rsp_valid,
  input  logic [31:0] g_rdata,
  input  logic        g_hit,
  // P.Mem control
  output logic        pmem_start,
  output logic [31:0] pmem_start_addr,
  input  logic        done_set,
  output logic        done
);
  localparam int unsigned CW = $clog2(MISS_CYC + 1) + 1;

  typedef enum logic {H_IDLE, H_WAIT} h_state_e;

  h_state_e     state;
  logic [CW-1:0] cnt;
  logic         have, is_ctrl, rhit;
  logic [31:0]  rdata;
  logic         retry;
  logic [CW-1:0] target;

  assign g_req   = h_req;
  assign g_valid = (state == H_IDLE) && h_valid && !h_ctrl;
  assign h_ready = (state == H_IDLE) && (h_ctrl || g_ready);
  assign target  = (is_ctrl || rhit) ? CW'(HIT_CYC) : CW'(MISS_CYC);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state           <= H_IDLE;
      cnt             <= '0;
      have            <= 1'b0;
      is_ctrl         <= 1'b0;
      rhit            <= 1'b0;
      rdata           <= '0;
      retry           <= 1'b0;
      h_rsp_valid     <= 1'b0;
      h_rsp_rdata     <= '0;
      h_rsp_retry     <= 1'b0;
      pmem_start      <= 1'b0;
      pmem_start_addr <= '0;
      done            <= 1'b0;
    end else begin
      h_rsp_valid <= 1'b0;
      pmem_start  <= 1'b0;
      if (done_set) done <= 1'b1;
      unique case (state)
        H_IDLE: if (h_valid && h_ready) begin
          state   <= H_WAIT;
          cnt     <= '0;
          is_ctrl <= h_ctrl;
          have    <= h_ctrl;
          rhit    <= 1'b0;
          retry   <= 1'b0;
          rdata   <= '0;
          if (h_ctrl) begin
            if (h_req.we && h_req.addr[2] == 1'b0) begin        // START
              pmem_start      <= 1'b1;
              pmem_start_addr <= h_req.wdata;
              done            <= 1'b0;
            end else if (!h_req.we && h_req.addr[2] == 1'b1) begin  // STATUS
              rdata <= {31'd0, done || done_set};
              retry <= !(done || done_set);
            end
          end
        end
        H_WAIT: begin
          cnt <= cnt + 1'b1;
          if (g_rsp_valid && !is_ctrl) begin
            have  <= 1'b1;
            rhit  <= g_hit;
            rdata <= g_rdata;
          end
          if (have && cnt + 1'b1 >= target) begin
            state       <= H_IDLE;
            h_rsp_valid <= 1'b1;
            h_rsp_rdata <= rdata;
            h_rsp_retry <= retry;
          end
        end
        default: state <= H_IDLE;
      endcase
    end
  end
endmodule
