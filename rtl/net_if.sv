// net_if: the inter-chip network interface of a FlexRAM chip.
//
// Only the minimum sits on chip: an Out queue, an In queue and simple message
// packaging logic; routing is left to an off-chip router. Each queue is 32 bits
// wide and DEPTH words deep (32 words: two 64-byte cache lines).
// Sending: the P.Mem pushes the payload words into the Out queue (tx_push),
// then issues send with destination chip, length and message type. The
// packaging logic transmits the header word {dest, src = chip_id, len, type}
// and then len payload words from the Out queue. Receiving: the header and the
// payload of an arriving message are written into the In queue, from which the
// P.Mem pops them (rx_pop); the link is held off while the In queue is full.
// Link: each port has 16 data pins clocked at twice the core clock, so each
// core cycle carries one 32-bit word as two 16-bit beats, beat 0 being the low
// half (tx_beat / rx_beat with valid/ready per word). The double-rate pin
// circuits are not modelled. Queue sizes, widths and pin counts follow the
// FlexRAM design; the header layout and handshake are this design's own
// choices. send_busy is high while a header waits; a send issued then is lost.
module net_if
  import flexram_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        chip_id,
  // P.Mem side
  input  logic              tx_push,
  input  logic [31:0]       tx_wdata,
  input  logic              send,
  input  logic [7:0]        send_dest,
  input  logic [7:0]        send_len,
  input  logic [7:0]        send_type,
  output logic              send_busy,
  output logic [$clog2(DEPTH):0] out_count,
  input  logic              rx_pop,
  output logic [31:0]       rx_rdata,
  output logic [$clog2(DEPTH):0] in_count,
  // link
  output logic              tx_valid,
  input  logic              tx_ready,
  output logic [1:0][15:0]  tx_beat,
  input  logic              rx_valid,
  output logic              rx_ready,
  input  logic [1:0][15:0]  rx_beat
);
  localparam int unsigned AW = $clog2(DEPTH);

  // ---------------- Out queue and packaging ----------------
  logic [31:0]   oq [DEPTH];
  logic [AW-1:0] oq_wp, oq_rp;
  logic          hdr_pend, sending;
  net_hdr_t      hdr;
  logic [7:0]    left;
  logic          oq_pop;

  assign send_busy = hdr_pend || sending;
  assign tx_valid  = (hdr_pend && out_count >= (AW+1)'(hdr.len)) || sending;
  assign tx_beat   = (hdr_pend && !sending) ? hdr : oq[oq_rp];
  assign oq_pop    = sending && tx_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      oq_wp <= '0; oq_rp <= '0; out_count <= '0;
      hdr_pend <= 1'b0; sending <= 1'b0; hdr <= '0; left <= '0;
    end else begin
      if (tx_push) begin
        oq[oq_wp] <= tx_wdata;
        oq_wp     <= oq_wp + 1'b1;
      end
      if (oq_pop) oq_rp <= oq_rp + 1'b1;
      out_count <= out_count + (AW+1)'(tx_push) - (AW+1)'(oq_pop);
      if (send && !send_busy) begin
        hdr_pend <= 1'b1;
        hdr      <= '{dest: send_dest, src: chip_id, len: send_len, mtype: send_type};
      end
      if (tx_valid && tx_ready) begin
        if (!sending) begin            // header went out
          hdr_pend <= 1'b0;
          sending  <= (hdr.len != 0);
          left     <= hdr.len;
        end else begin
          left <= left - 1'b1;
          if (left == 8'd1) sending <= 1'b0;
        end
      end
    end
  end

  // ---------------- In queue ----------------
  logic [31:0]   iq [DEPTH];
  logic [AW-1:0] iq_wp, iq_rp;
  logic          iq_push, iq_pop;

  assign rx_ready = in_count < (AW+1)'(DEPTH);
  assign iq_push  = rx_valid && rx_ready;
  assign iq_pop   = rx_pop && in_count != 0;
  assign rx_rdata = iq[iq_rp];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      iq_wp <= '0; iq_rp <= '0; in_count <= '0;
    end else begin
      if (iq_push) begin
        iq[iq_wp] <= rx_beat;
        iq_wp     <= iq_wp + 1'b1;
      end
      if (iq_pop) iq_rp <= iq_rp + 1'b1;
      in_count <= in_count + (AW+1)'(iq_push) - (AW+1)'(iq_pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(tx_push && out_count == (AW+1)'(DEPTH) && !oq_pop));
endmodule
