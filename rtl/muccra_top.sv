// muccra_top: one MuCCRA core, a dynamically reconfigurable processor array
// with its fixed control part.
//
// Configurable part: the PE array with switching elements, I/O units,
// multiplier macros and double-buffered data memories (muccra_array), sized
// by the parameters below. Fixed part: the configuration controller with the
// central configuration memory (tcc), which multicasts configuration words
// into the context memories of all elements, and the context switching
// controller (csc), which broadcasts the context pointer and sequences a
// task. At the end of every task the data memories swap banks.
//
// Defaults are those of the first prototype: G = 24-bit, 4x4 PEs, 64
// contexts, F_unit = F_pi = 4, F_sw = 2, multipliers beside the array and
// memories. The second prototype is G = 16, C = 16, F_sw = 3, PE_MUL = 1,
// HAS_MULT_MACRO = 0. The channel width W, the register-file depth and the
// memory depths are this design's choice.
//
// Use: write configuration words through host_cfg_*; pulse tcc_start with a
// base and length to send them (tcc_busy while sending); pulse csc_start with
// the first context; the task runs while csc_busy is high and csc_done pulses
// at its end. Array I/O words are io_in / io_out (io_valid marks a word
// written out). The host reaches the data-memory banks not in use by the array
// through mem_*.
module muccra_top
  import muccra_pkg::*;
#(
  parameter int unsigned G              = DEF_G,
  parameter int unsigned ROWS           = DEF_ROWS,
  parameter int unsigned COLS           = DEF_COLS,
  parameter int unsigned C              = DEF_C,
  parameter int unsigned W              = DEF_W,
  parameter int unsigned F_UNIT         = DEF_FUNIT,
  parameter int unsigned FPI            = DEF_FPI,
  parameter int unsigned F_SW           = DEF_FSW,
  parameter int unsigned RF             = DEF_RF,
  parameter bit          PE_MUL         = 1'b0,
  parameter bit          HAS_MULT_MACRO = 1'b1,
  parameter int unsigned MEM_DEPTH      = 256,
  parameter int unsigned CONF_DEPTH     = 1024
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // central configuration memory
  input  logic                          host_cfg_we,
  input  logic [$clog2(CONF_DEPTH)-1:0] host_cfg_addr,
  input  cfg_word_t                     host_cfg_wdata,
  input  logic                          tcc_start,
  input  logic [$clog2(CONF_DEPTH)-1:0] tcc_base,
  input  logic [$clog2(CONF_DEPTH):0]   tcc_len,
  output logic                          tcc_busy,
  // task control
  input  logic                          csc_start,
  input  logic [$clog2(C)-1:0]          csc_start_ctx,
  output logic                          csc_busy,
  output logic                          csc_done,
  output logic                          csc_stall,
  output logic [$clog2(C)-1:0]          ctx_ptr,
  // streaming I/O at the left (index 0) and right (index 1) of each row
  input  logic [G-1:0]                  io_in    [ROWS][2],
  output logic [G-1:0]                  io_out   [ROWS][2],
  output logic                          io_valid [ROWS][2],
  // host side of the double-buffered data memories, one per column
  output logic                          mem_bank [COLS],
  input  logic [$clog2(MEM_DEPTH)-1:0]  mem_addr [COLS],
  input  logic                          mem_we   [COLS],
  input  logic [G-1:0]                  mem_wdata[COLS],
  output logic [G-1:0]                  mem_rdata[COLS]
);
  cfg_pkt_t cfg_bus;
  logic     run;

  tcc #(.DEPTH(CONF_DEPTH)) u_tcc (
    .clk, .rst_n,
    .host_we(host_cfg_we), .host_addr(host_cfg_addr), .host_wdata(host_cfg_wdata),
    .start(tcc_start), .base(tcc_base), .len(tcc_len),
    .busy(tcc_busy), .cfg_bus
  );

  csc #(.C(C)) u_csc (
    .clk, .rst_n, .cfg_bus,
    .start(csc_start), .start_ctx(csc_start_ctx), .cfg_busy(tcc_busy),
    .ptr(ctx_ptr), .run, .busy(csc_busy), .stall(csc_stall), .done(csc_done)
  );

  muccra_array #(
    .G(G), .ROWS(ROWS), .COLS(COLS), .C(C), .W(W), .F_UNIT(F_UNIT), .FPI(FPI),
    .F_SW(F_SW), .RF(RF), .PE_MUL(PE_MUL), .HAS_MULT_MACRO(HAS_MULT_MACRO),
    .MEM_DEPTH(MEM_DEPTH)
  ) u_array (
    .clk, .rst_n, .en(run), .cfg_bus, .ptr(ctx_ptr),
    .io_in, .io_out, .io_valid,
    .mem_swap(csc_done), .mem_bank, .mem_addr, .mem_we, .mem_wdata, .mem_rdata
  );
endmodule
