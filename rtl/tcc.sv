// tcc: configuration controller with the central configuration data memory.
//
// Holds configuration words (cfg_word_t) written by the host, including those
// of contexts that do not fit in the distributed context memories, and
// streams them onto the broadcast configuration bus: a start pulse with a
// base address and a length sends words base .. base+len-1, one per cycle,
// while the array may keep executing other contexts (virtual hardware). Each
// word carries a row mask and a column mask, so one word can fill the same
// context slot of many elements at once (row/column multicast).
// Timing: the memory read is registered; the first word reaches the bus two
// cycles after start; busy is high from the cycle after start until the last
// word has left. A start while busy is ignored. Depth and command interface
// are this design's choice.
module tcc
  import muccra_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     host_we,
  input  logic [$clog2(DEPTH)-1:0] host_addr,
  input  cfg_word_t                host_wdata,
  input  logic                     start,
  input  logic [$clog2(DEPTH)-1:0] base,
  input  logic [$clog2(DEPTH):0]   len,
  output logic                     busy,
  output cfg_pkt_t                 cfg_bus
);
  localparam int unsigned AW = $clog2(DEPTH);
  cfg_word_t            mem [DEPTH];
  logic [AW-1:0]        rd_addr;
  logic [AW:0]          remain;

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_addr <= '0;
      remain  <= '0;
      cfg_bus <= '0;
    end else begin
      cfg_bus.valid <= 1'b0;
      if (remain != '0) begin
        cfg_bus.valid <= 1'b1;
        cfg_bus.w     <= mem[rd_addr];
        rd_addr       <= rd_addr + 1'b1;
        remain        <= remain - 1'b1;
      end else if (start) begin
        rd_addr <= base;
        remain  <= len;
      end
    end
  end

  assign busy = (remain != '0) || cfg_bus.valid;
endmodule
