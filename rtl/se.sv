// se: switching element at a crossing of a horizontal and a vertical channel.
//
// W independent switching modules, one per track. In module w, the outgoing
// link on side d (N, E, S, W) is driven by a selector from the context word:
//   0            : zero (link unused)
//   1 .. F_SW    : the entering link of track w from another side, taken in
//                  the order opposite side, side d+1, side d+3 (mod 4); with
//                  this order each entering link can reach exactly F_SW
//                  other sides, which is the SE flexibility F_sw;
//   F_SW+1..+4   : the corner output of the cell to the NW, NE, SE or SW of
//                  the crossing (a PE, an edge unit, or zero at the rim).
// Combinational: a word crosses any number of SEs in the cycle it leaves a
// PE's output register. The fabric has combinational paths through chains of
// SEs that a configuration could close into a loop; the configuration must
// not do so, as in any island-style routing fabric, so a lint tool may
// report a structural loop through the array. The per-track switching
// modules and F_sw follow the architecture; the unidirectional links, the
// choice of F_sw target sides and the corner injection are this design's.
module se
  import muccra_pkg::*;
#(
  parameter int unsigned G      = DEF_G,
  parameter int unsigned W      = DEF_W,
  parameter int unsigned C      = DEF_C,
  parameter int unsigned F_SW   = DEF_FSW,
  parameter int unsigned ROW_ID = 0,
  parameter int unsigned COL_ID = 0
) (
  input  logic                         clk,
  input  cfg_pkt_t                     cfg_bus,
  input  logic [$clog2(C)-1:0]         ptr,
  input  logic [3:0][W-1:0][G-1:0]     link_in,
  input  logic [3:0][G-1:0]            corner_in,
  output logic [3:0][W-1:0][G-1:0]     link_out
);
  localparam int unsigned CW = 4 * W * SE_SEL_W;

  logic [CW-1:0] word;

  ctx_mem #(.WIDTH(CW), .C(C), .KIND(K_SE), .ROW_ID(ROW_ID), .COL_ID(COL_ID)) u_cmem (
    .clk, .cfg_bus, .ptr, .word
  );

  always_comb begin
    for (int d = 0; d < 4; d++) begin
      for (int w = 0; w < W; w++) begin
        int unsigned sel;
        sel = 32'(word[(d*W + w)*SE_SEL_W +: SE_SEL_W]);
        link_out[d][w] = '0;
        if (sel >= 1 && sel <= F_SW) begin
          // entering sides in order: opposite, d+1, d+3
          case (sel)
            1:       link_out[d][w] = link_in[(d + 2) % 4][w];
            2:       link_out[d][w] = link_in[(d + 1) % 4][w];
            default: link_out[d][w] = link_in[(d + 3) % 4][w];
          endcase
        end else if (sel > F_SW && sel <= F_SW + 4) begin
          link_out[d][w] = corner_in[sel - F_SW - 1];
        end
      end
    end
  end

  initial begin
    assert (F_SW >= 1 && F_SW <= 3) else $error("se: F_SW must be 1..3");
    assert (CW <= DATA_W) else $error("se: configuration word too wide");
  end
endmodule
