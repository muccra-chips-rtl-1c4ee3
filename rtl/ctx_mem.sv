// ctx_mem: the context memory attached to every reconfigurable element.
//
// Holds C configuration words of WIDTH bits. The word selected by the
// broadcast context pointer is read combinationally, so switching to another
// stored context takes effect in the same cycle the pointer changes (a
// single-cycle dynamic reconfiguration). New words arrive on the broadcast
// configuration bus: a packet is stored when its kind equals KIND and both
// the row bit ROW_ID of its row mask and the column bit COL_ID of its column
// mask are set (row/column multicast), at the slot it names; this may happen
// while another slot is being executed.
//
// Interface: cfg_bus (one packet per cycle), ptr (context pointer), word
// (current configuration). Writes take effect at the clock edge. The contents
// are not reset; every slot must be written before it is executed.
module ctx_mem
  import muccra_pkg::*;
#(
  parameter int unsigned WIDTH  = 51,
  parameter int unsigned C      = DEF_C,
  parameter cfg_kind_e   KIND   = K_PE,
  parameter int unsigned ROW_ID = 0,
  parameter int unsigned COL_ID = 0
) (
  input  logic                 clk,
  input  cfg_pkt_t             cfg_bus,
  input  logic [$clog2(C)-1:0] ptr,
  output logic [WIDTH-1:0]     word
);
  logic [WIDTH-1:0] mem [C];
  logic             hit;

  assign hit = cfg_bus.valid && (cfg_bus.w.kind == KIND) &&
               cfg_bus.w.row_mask[ROW_ID] && cfg_bus.w.col_mask[COL_ID] &&
               (32'(cfg_bus.w.slot) < C);

  always_ff @(posedge clk) begin
    if (hit) mem[cfg_bus.w.slot[$clog2(C)-1:0]] <= cfg_bus.w.data[WIDTH-1:0];
  end

  assign word = mem[ptr];

  initial begin
    assert (WIDTH <= DATA_W) else $error("ctx_mem: WIDTH exceeds configuration payload");
    assert (ROW_ID < MASK_W && COL_ID < MASK_W) else $error("ctx_mem: position outside mask");
  end
endmodule
