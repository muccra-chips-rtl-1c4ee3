// dbuf_mem: double-buffered distributed data memory at the array edge.
//
// Two banks of DEPTH words of G bits. At any time one bank belongs to the PE
// array and the other to the outside (host) port; a swap pulse, given when a
// task on the array has finished, exchanges them, so that the next task's
// input and the previous task's results move through the host port while the
// array computes. Array side, per context word (edge_cfg_t): op 1 reads the
// word at the address on track sel_a, op 2 writes the word on track sel_b
// there, op 0 and 3 do nothing; read data is registered (one cycle) and goes
// to the switching elements at both corners. Array accesses happen only while
// en is high. Host side: synchronous write, registered read of the other
// bank. bank_sel tells which bank the array owns. The double buffering and
// the swap at task end follow the architecture; depth, latency and the
// operation codes are this design's choice.
module dbuf_mem
  import muccra_pkg::*;
#(
  parameter int unsigned G      = DEF_G,
  parameter int unsigned W      = DEF_W,
  parameter int unsigned C      = DEF_C,
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned ROW_ID = 0,
  parameter int unsigned COL_ID = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  cfg_pkt_t                 cfg_bus,
  input  logic [$clog2(C)-1:0]     ptr,
  input  logic [2*W-1:0][G-1:0]    seg,
  output logic [3:0][G-1:0]        corner_out,
  input  logic                     swap,
  output logic                     bank_sel,
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  logic                     host_we,
  input  logic [G-1:0]             host_wdata,
  output logic [G-1:0]             host_rdata
);
  localparam int unsigned CW = $bits(edge_cfg_t);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [CW-1:0] word;
  edge_cfg_t     cfg;
  logic [G-1:0]  a, b, q;
  logic [G-1:0]  bank0 [DEPTH];
  logic [G-1:0]  bank1 [DEPTH];
  logic [AW-1:0] arr_addr;
  logic          arr_rd, arr_wr;

  ctx_mem #(.WIDTH(CW), .C(C), .KIND(K_EDGE), .ROW_ID(ROW_ID), .COL_ID(COL_ID)) u_cmem (
    .clk, .cfg_bus, .ptr, .word
  );
  assign cfg = edge_cfg_t'(word);

  conn_block #(.G(G), .W(W)) u_cba (.seg, .sel(cfg.sel_a), .y(a));
  conn_block #(.G(G), .W(W)) u_cbb (.seg, .sel(cfg.sel_b), .y(b));

  assign arr_addr = a[AW-1:0];
  assign arr_rd   = en && (cfg.op == 2'd1);
  assign arr_wr   = en && (cfg.op == 2'd2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bank_sel <= 1'b0;
    else if (swap) bank_sel <= ~bank_sel;
  end

  // bank 0: array when bank_sel == 0, host otherwise
  always_ff @(posedge clk) begin
    if (!bank_sel && arr_wr) bank0[arr_addr]  <= b;
    if (bank_sel && host_we) bank0[host_addr] <= host_wdata;
  end
  always_ff @(posedge clk) begin
    if (bank_sel && arr_wr)   bank1[arr_addr]  <= b;
    if (!bank_sel && host_we) bank1[host_addr] <= host_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q          <= '0;
      host_rdata <= '0;
    end else begin
      if (arr_rd) q <= bank_sel ? bank1[arr_addr] : bank0[arr_addr];
      host_rdata <= bank_sel ? bank0[host_addr] : bank1[host_addr];
    end
  end

  assign corner_out = {4{q}};
endmodule
