// mult_macro: multiplier hard macro at the array edge.
//
// The PEs of the first prototype have no multiply operation; multipliers sit
// beside the array instead. This unit takes two operands from tracks sel_a
// and sel_b of its channel segment and registers the product:
//   op 0 : hold, op 1 : low G bits, op 2 : high G bits (unsigned),
//   op 3 : high G bits (signed).
// One cycle latency; the result goes to the switching elements at both of its
// corners. Registers advance only while en is high. The operation codes and
// the single-cycle latency are this design's choice.
module mult_macro
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
  output logic [3:0][G-1:0]     corner_out
);
  localparam int unsigned CW = $bits(edge_cfg_t);
  logic [CW-1:0]  word;
  edge_cfg_t      cfg;
  logic [G-1:0]   a, b, q;
  logic [2*G-1:0] pu, ps;

  ctx_mem #(.WIDTH(CW), .C(C), .KIND(K_EDGE), .ROW_ID(ROW_ID), .COL_ID(COL_ID)) u_cmem (
    .clk, .cfg_bus, .ptr, .word
  );
  assign cfg = edge_cfg_t'(word);

  conn_block #(.G(G), .W(W)) u_cba (.seg, .sel(cfg.sel_a), .y(a));
  conn_block #(.G(G), .W(W)) u_cbb (.seg, .sel(cfg.sel_b), .y(b));

  assign pu = {{G{1'b0}}, a} * {{G{1'b0}}, b};
  assign ps = $signed({{G{a[G-1]}}, a}) * $signed({{G{b[G-1]}}, b});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else if (en) begin
      unique case (cfg.op)
        2'd0: q <= q;
        2'd1: q <= pu[G-1:0];
        2'd2: q <= pu[2*G-1:G];
        2'd3: q <= ps[2*G-1:G];
      endcase
    end
  end

  assign corner_out = {4{q}};
endmodule
