// sync_unit: the notify and broadcast primitives between the P.Mem and the
// P.Arrays, from which a global P.Array barrier is built.
//
// Notification: every P.Array drives one line into the P.Mem's notify
// register, one bit per P.Array, sampled every cycle. The P.Mem can poll the
// register, or set a mask and be interrupted (irq) when all masked bits are
// set: with the mask covering every P.Array this is a barrier.
// Broadcast: a P.Mem write of a 32-bit word (bc_wr) is registered and, one
// cycle later, delivered to every P.Array at once (bc_valid, bc_data); each
// P.Array keeps it in a register and sets its broadcast flag. Broadcasting
// into the P.Arrays' memories is deliberately not offered, since some banks
// might be busy. The two primitives and their use follow the FlexRAM design;
// the "all masked bits set" interrupt condition is this design's own choice.
module sync_unit #(
  parameter int unsigned NPA = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NPA-1:0] notify_in,
  output logic [NPA-1:0] notify_reg,
  input  logic [NPA-1:0] mask,
  output logic           irq,
  input  logic           bc_wr,
  input  logic [31:0]    bc_wdata,
  output logic           bc_valid,
  output logic [31:0]    bc_data
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      notify_reg <= '0;
      bc_valid   <= 1'b0;
      bc_data    <= '0;
    end else begin
      notify_reg <= notify_in;
      bc_valid   <= bc_wr;
      if (bc_wr) bc_data <= bc_wdata;
    end
  end

  assign irq = (|mask) && ((notify_reg & mask) == mask);
endmodule
