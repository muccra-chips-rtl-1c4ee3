// pe_rf: register file of the PE core.
//
// DEPTH words of G bits, one write port and one combinational read port, both
// addressed by fields of the context word. A write happens at the clock edge
// when we and en (array running) are both high. Reset clears every word, so a
// read before the first write returns zero. The depth is this design's
// choice; the register file itself and its selectable input are the
// architecture's.
module pe_rf
  import muccra_pkg::*;
#(
  parameter int unsigned G     = DEF_G,
  parameter int unsigned DEPTH = DEF_RF
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [G-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [G-1:0]             rdata
);
  logic [G-1:0] regs [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (en && we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata = regs[raddr];
endmodule
