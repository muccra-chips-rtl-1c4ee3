// conn_block: input connection block of a PE or edge unit.
//
// Picks one of the 2*W wires of a routing-channel segment (W tracks in each
// direction; tracks 0..W-1 run east/south, W..2W-1 run west/north) and hands
// it to the unit. The track number comes from the current context word.
// Combinational. An out-of-range selector gives zero.
module conn_block
  import muccra_pkg::*;
#(
  parameter int unsigned G = DEF_G,
  parameter int unsigned W = DEF_W
) (
  input  logic [2*W-1:0][G-1:0] seg,
  input  logic [2:0]            sel,
  output logic [G-1:0]          y
);
  always_comb begin
    y = '0;
    for (int k = 0; k < 2*W; k++)
      if (32'(sel) == k) y = seg[k];
  end

  initial assert (2*W <= 8) else $error("conn_block: 2*W must fit a 3-bit selector");
endmodule
