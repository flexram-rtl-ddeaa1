// refresh_ctrl: DRAM refresh control for the banks of a FlexRAM chip.
//
// Every INTERVAL cycles one refresh command is issued; it asks BANKS_PER_CMD
// neighbouring banks to refresh their next row (each bank keeps its own row
// counter and does the refresh when its port is idle). Commands walk over the
// banks in turn. With the defaults, 3200 cycles at 400 MHz (8 us) and 2 banks
// of 16-Kbit rows per command, the 64 x 512 rows of a chip are refreshed by
// 16,384 commands in 131 ms, i.e. about 16,000 refreshes per 128 ms with 32 K
// cells each, the refresh rate assumed for FlexRAM. The command schedule is
// this design's own choice.
module refresh_ctrl #(
  parameter int unsigned NB            = 64,
  parameter int unsigned INTERVAL      = 3200,
  parameter int unsigned BANKS_PER_CMD = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [NB-1:0] ref_req
);
  localparam int unsigned NGRP = NB / BANKS_PER_CMD;
  localparam int unsigned GW   = (NGRP > 1) ? $clog2(NGRP) : 1;
  localparam int unsigned CW   = $clog2(INTERVAL);

  logic [CW-1:0] cnt;
  logic [GW-1:0] grp;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      grp     <= '0;
      ref_req <= '0;
    end else begin
      ref_req <= '0;
      if (cnt == CW'(INTERVAL - 1)) begin
        cnt <= '0;
        for (int b = 0; b < BANKS_PER_CMD; b++)
          ref_req[int'(grp) * BANKS_PER_CMD + b] <= 1'b1;
        grp <= (int'(grp) == NGRP - 1) ? '0 : grp + 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
