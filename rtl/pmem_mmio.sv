// pmem_mmio: the P.Mem's processor interface on a FlexRAM chip.
//
// The P.Mem reaches everything on the chip through memory-mapped locations,
// and this block decodes its 32-bit word requests:
//   0x0xxx_xxxx  the chip's DRAM, over the global bus (all banks visible)
//   0x1000_00xx  control registers (word index = addr[7:2]):
//     0 NOTIFY[31:0]  1 NOTIFY[63:32]        read: notify register
//     2 MASK[31:0]    3 MASK[63:32]          read/write: interrupt mask
//     4 BCAST   write: broadcast the word to all P.Arrays
//     5 START   write: start all P.Arrays at instruction index wdata
//     6 STATUS  read: bit0 all P.Arrays halted, bit1 any fault, bit2 irq
//     7 DONE    write: tell the P.Host (through host_if) the job is done
//     8 NET_TX  write: push a payload word into the Out queue
//     9 NET_SEND write: send {type[23:16], len[15:8], dest[7:0]}
//    10 NET_RX  read: pop the In queue (0 when empty)
//    11 NET_STAT read: {in_count[31:16], send_busy[15], out_count[14:0]}
//   0x2000_0000 + bb*8K + 4*w   write: instruction pair w of basic block bb's
//                               instruction memory
// DRAM accesses answer when the bank does; all other accesses answer in the
// next cycle. Reads of write-only locations return 0. One access is
// outstanding at a time. That the P.Mem loads the instruction memories, starts
// the P.Arrays, broadcasts, reads the notify register and signals the host
// through memory-mapped locations follows the FlexRAM design; the address map
// is this design's own choice.
module pmem_mmio
  import flexram_pkg::*;
#(
  parameter int unsigned NPA   = 64,
  parameter int unsigned NBB   = 16,
  parameter int unsigned DEPTH = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 p_valid,
  output logic                 p_ready,
  input  word_req_t            p_req,
  output logic                 p_rsp_valid,
  output logic [31:0]          p_rdata,
  output logic                 g_valid,
  input  logic                 g_ready,
  output word_req_t            g_req,
  input  logic                 g_rsp_valid,
  input  logic [31:0]          g_rdata,
  output logic [NBB-1:0]       im_we,
  output logic [IADDR_W-2:0]   im_waddr,
  output logic [31:0]          im_wdata,
  input  logic [NPA-1:0]       notify_reg,
  output logic [NPA-1:0]       mask,
  input  logic                 irq,
  output logic                 bc_wr,
  output logic [31:0]          bc_wdata,
  output logic                 pa_start,
  output logic [IADDR_W-1:0]   pa_start_pc,
  input  logic [NPA-1:0]       pa_halted,
  input  logic [NPA-1:0]       pa_fault,
  output logic                 done_set,
  output logic                 tx_push,
  output logic [31:0]          tx_wdata,
  output logic                 send,
  output logic [7:0]           send_dest,
  output logic [7:0]           send_len,
  output logic [7:0]           send_type,
  input  logic                 send_busy,
  input  logic [$clog2(DEPTH):0] out_count,
  output logic                 rx_pop,
  input  logic [31:0]          rx_rdata,
  input  logic [$clog2(DEPTH):0] in_count
);
  localparam int unsigned BBW = (NBB > 1) ? $clog2(NBB) : 1;

  typedef enum logic {P_IDLE, P_DRAM} p_state_e;

  p_state_e    state;
  logic        is_dram, is_reg, is_im, acc;
  logic [5:0]  ri;
  logic [63:0] notify64, mask64;
  logic [31:0] reg_rdata;

  assign is_dram = p_req.addr[31:28] == 4'h0;
  assign is_reg  = p_req.addr[31:28] == 4'h1;
  assign is_im   = p_req.addr[31:28] == 4'h2;
  assign ri      = p_req.addr[7:2];
  assign notify64 = 64'(notify_reg);
  assign mask64   = 64'(mask);

  assign g_req   = p_req;
  assign g_valid = (state == P_IDLE) && p_valid && is_dram;
  assign p_ready = (state == P_IDLE) && (!is_dram || g_ready);
  assign acc     = (state == P_IDLE) && p_valid && p_ready;

  // side effects of register and instruction-memory accesses
  always_comb begin
    im_we       = '0;
    im_waddr    = p_req.addr[IADDR_W:2];
    im_wdata    = p_req.wdata;
    bc_wr       = 1'b0;
    bc_wdata    = p_req.wdata;
    pa_start    = 1'b0;
    pa_start_pc = p_req.wdata[IADDR_W-1:0];
    done_set    = 1'b0;
    tx_push     = 1'b0;
    tx_wdata    = p_req.wdata;
    send        = 1'b0;
    send_dest   = p_req.wdata[7:0];
    send_len    = p_req.wdata[15:8];
    send_type   = p_req.wdata[23:16];
    rx_pop      = 1'b0;
    if (acc && is_im && p_req.we) im_we[p_req.addr[IADDR_W+1 +: BBW]] = 1'b1;
    if (acc && is_reg) begin
      if (p_req.we) unique case (ri)
        6'd4: bc_wr    = 1'b1;
        6'd5: pa_start = 1'b1;
        6'd7: done_set = 1'b1;
        6'd8: tx_push  = 1'b1;
        6'd9: send     = 1'b1;
        default: ;
      endcase
      else if (ri == 6'd10) rx_pop = 1'b1;
    end
  end

  always_comb begin
    unique case (ri)
      6'd0:  reg_rdata = notify64[31:0];
      6'd1:  reg_rdata = notify64[63:32];
      6'd2:  reg_rdata = mask64[31:0];
      6'd3:  reg_rdata = mask64[63:32];
      6'd6:  reg_rdata = {29'd0, irq, |pa_fault, &pa_halted};
      6'd10: reg_rdata = (in_count != 0) ? rx_rdata : 32'd0;
      6'd11: reg_rdata = {16'(in_count), send_busy, 15'(out_count)};
      default: reg_rdata = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= P_IDLE;
      mask        <= '0;
      p_rsp_valid <= 1'b0;
      p_rdata     <= '0;
    end else begin
      p_rsp_valid <= 1'b0;
      unique case (state)
        P_IDLE: if (acc) begin
          if (is_dram) state <= P_DRAM;
          else begin
            p_rsp_valid <= 1'b1;
            p_rdata     <= (is_reg && !p_req.we) ? reg_rdata : 32'd0;
          end
          if (is_reg && p_req.we && ri == 6'd2) mask <= NPA'({mask64[63:32], p_req.wdata});
          if (is_reg && p_req.we && ri == 6'd3) mask <= NPA'({p_req.wdata, mask64[31:0]});
        end
        P_DRAM: if (g_rsp_valid) begin
          state       <= P_IDLE;
          p_rsp_valid <= 1'b1;
          p_rdata     <= g_rdata;
        end
        default: state <= P_IDLE;
      endcase
    end
  end
endmodule
