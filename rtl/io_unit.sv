// io_unit: data input/output port at the left or right edge of a PE row.
//
// Connects one external input word and one external output word to the
// channel segment beside it. Each cycle the unit registers ext_in and drives
// it into the switching elements at its corners. Its context word
// (edge_cfg_t) picks a track of the segment with sel_a; with op[0] set, that
// track's word is registered to ext_out and ext_valid is raised for one
// cycle. Registers advance only while en (array running) is high. The unit's
// context memory sits at extended-grid position (ROW_ID, COL_ID) for
// multicast addressing. The edge I/O ports follow the array diagram; their
// registering and valid flag are this design's choice.
module io_unit
  import muccra_pkg::*;
#(
  parameter int unsigned G      = DEF_G,
  parameter int unsigned W      = DEF_W,
  parameter int unsigned C      = DEF_C,
  parameter int unsigned ROW_ID = 0,
  parameter int unsigned COL_ID = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  cfg_pkt_t              cfg_bus,
  input  logic [$clog2(C)-1:0]  ptr,
  input  logic [2*W-1:0][G-1:0] seg,
  output logic [3:0][G-1:0]     corner_out,
  input  logic [G-1:0]          ext_in,
  output logic [G-1:0]          ext_out,
  output logic                  ext_valid
);
  localparam int unsigned CW = $bits(edge_cfg_t);
  logic [CW-1:0] word;
  edge_cfg_t     cfg;
  logic [G-1:0]  a, in_q;

  ctx_mem #(.WIDTH(CW), .C(C), .KIND(K_EDGE), .ROW_ID(ROW_ID), .COL_ID(COL_ID)) u_cmem (
    .clk, .cfg_bus, .ptr, .word
  );
  assign cfg = edge_cfg_t'(word);

  conn_block #(.G(G), .W(W)) u_cb (.seg, .sel(cfg.sel_a), .y(a));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q      <= '0;
      ext_out   <= '0;
      ext_valid <= 1'b0;
    end else begin
      ext_valid <= 1'b0;
      if (en) begin
        in_q <= ext_in;
        if (cfg.op[0]) begin
          ext_out   <= a;
          ext_valid <= 1'b1;
        end
      end
    end
  end

  assign corner_out = {4{in_q}};
endmodule
