// muccra_array: the reconfigurable PE array with its island-style routing.
//
// ROWS x COLS PEs, each surrounded by channel segments; a switching element
// (SE) sits at each of the (ROWS+1) x (COLS+1) channel crossings. A segment
// joins two neighbouring SEs and carries W tracks in each direction, each
// track G bits wide. Around the array, on an extended grid of
// (ROWS+2) x (COLS+2) cells with the PEs in the middle, sit the edge units:
// an I/O unit at both ends of every PE row, a multiplier hard macro above
// every column (when HAS_MULT_MACRO is set) and a double-buffered data memory
// below every column.
//
// Wiring. A cell (PE or edge unit) reads the segments on its sides through
// connection blocks and drives its four corner outputs into the SEs at its
// corners. SE (r,c) has entering links from its four neighbouring SEs and the
// corner outputs of the four cells around it.
//
// Configuration addressing (row mask bit, column mask bit): PE (r,c) at
// (r,c); SE (r,c) at (r,c); edge units at their extended-grid position
// (row 0 = top, row ROWS+1 = bottom, column 0 = left, column COLS+1 = right).
//
// All elements switch context together on the broadcast pointer ptr and
// their registers advance only while en is high. The layout follows the
// array diagram (SEs at every crossing, I/O at the left and right, hard macros
// at the top and bottom); the unidirectional track pairs and the corner
// injection are this design's choice. Combinational paths through chains of
// SEs are part of any such fabric; configurations must not close them into a
// loop.
module muccra_array
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
  parameter int unsigned MEM_DEPTH      = 256
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  cfg_pkt_t                     cfg_bus,
  input  logic [$clog2(C)-1:0]         ptr,
  input  logic [G-1:0]                 io_in    [ROWS][2],
  output logic [G-1:0]                 io_out   [ROWS][2],
  output logic                         io_valid [ROWS][2],
  input  logic                         mem_swap,
  output logic                         mem_bank [COLS],
  input  logic [$clog2(MEM_DEPTH)-1:0] mem_addr [COLS],
  input  logic                         mem_we   [COLS],
  input  logic [G-1:0]                 mem_wdata[COLS],
  output logic [G-1:0]                 mem_rdata[COLS]
);
  localparam int unsigned ER = ROWS + 2;
  localparam int unsigned EC = COLS + 2;

  logic [3:0][2*W-1:0][G-1:0] cell_side [ER][EC];
  logic [3:0][G-1:0]          cell_out  [ER][EC];
  logic [3:0][W-1:0][G-1:0]   se_out    [ROWS+1][COLS+1];

  // ---------------- segment wires seen by each cell ----------------
  for (genvar er = 0; er < ER; er++) begin : g_sr
    for (genvar ec = 0; ec < EC; ec++) begin : g_sc
      for (genvar w = 0; w < W; w++) begin : g_sw
        // north side: horizontal segment between SE(er-1,ec-1) and SE(er-1,ec)
        if (er >= 1 && ec >= 1 && ec <= COLS) begin : g_n
          assign cell_side[er][ec][NORTH][w]   = se_out[er-1][ec-1][EAST][w];
          assign cell_side[er][ec][NORTH][W+w] = se_out[er-1][ec][WEST][w];
        end else begin : g_nz
          assign cell_side[er][ec][NORTH][w]   = '0;
          assign cell_side[er][ec][NORTH][W+w] = '0;
        end
        // south side: horizontal segment between SE(er,ec-1) and SE(er,ec)
        if (er <= ROWS && ec >= 1 && ec <= COLS) begin : g_s
          assign cell_side[er][ec][SOUTH][w]   = se_out[er][ec-1][EAST][w];
          assign cell_side[er][ec][SOUTH][W+w] = se_out[er][ec][WEST][w];
        end else begin : g_sz
          assign cell_side[er][ec][SOUTH][w]   = '0;
          assign cell_side[er][ec][SOUTH][W+w] = '0;
        end
        // west side: vertical segment between SE(er-1,ec-1) and SE(er,ec-1)
        if (ec >= 1 && er >= 1 && er <= ROWS) begin : g_w
          assign cell_side[er][ec][WEST][w]   = se_out[er-1][ec-1][SOUTH][w];
          assign cell_side[er][ec][WEST][W+w] = se_out[er][ec-1][NORTH][w];
        end else begin : g_wz
          assign cell_side[er][ec][WEST][w]   = '0;
          assign cell_side[er][ec][WEST][W+w] = '0;
        end
        // east side: vertical segment between SE(er-1,ec) and SE(er,ec)
        if (ec <= COLS && er >= 1 && er <= ROWS) begin : g_e
          assign cell_side[er][ec][EAST][w]   = se_out[er-1][ec][SOUTH][w];
          assign cell_side[er][ec][EAST][W+w] = se_out[er][ec][NORTH][w];
        end else begin : g_ez
          assign cell_side[er][ec][EAST][w]   = '0;
          assign cell_side[er][ec][EAST][W+w] = '0;
        end
      end
    end
  end

  // ---------------- cells ----------------
  for (genvar er = 0; er < ER; er++) begin : g_r
    for (genvar ec = 0; ec < EC; ec++) begin : g_c
      localparam bit TOP    = (er == 0);
      localparam bit BOTTOM = (er == ER - 1);
      localparam bit LEFT   = (ec == 0);
      localparam bit RIGHT  = (ec == EC - 1);
      if ((TOP || BOTTOM) && (LEFT || RIGHT)) begin : g_corner
        assign cell_out[er][ec] = '0;
      end else if (!TOP && !BOTTOM && !LEFT && !RIGHT) begin : g_pe
        pe #(.G(G), .W(W), .C(C), .F_UNIT(F_UNIT), .FPI(FPI), .RF(RF), .HAS_MUL(PE_MUL),
             .ROW_ID(er - 1), .COL_ID(ec - 1)) u_pe (
          .clk, .rst_n, .en, .cfg_bus, .ptr,
          .side_in(cell_side[er][ec]), .corner_out(cell_out[er][ec])
        );
      end else if (LEFT || RIGHT) begin : g_io
        io_unit #(.G(G), .W(W), .C(C), .ROW_ID(er), .COL_ID(ec)) u_io (
          .clk, .rst_n, .en, .cfg_bus, .ptr,
          .seg(cell_side[er][ec][LEFT ? EAST : WEST]), .corner_out(cell_out[er][ec]),
          .ext_in(io_in[er-1][RIGHT ? 1 : 0]),
          .ext_out(io_out[er-1][RIGHT ? 1 : 0]),
          .ext_valid(io_valid[er-1][RIGHT ? 1 : 0])
        );
      end else if (TOP) begin : g_top
        if (HAS_MULT_MACRO) begin : g_mul
          mult_macro #(.G(G), .W(W), .C(C), .ROW_ID(er), .COL_ID(ec)) u_mul (
            .clk, .rst_n, .en, .cfg_bus, .ptr,
            .seg(cell_side[er][ec][SOUTH]), .corner_out(cell_out[er][ec])
          );
        end else begin : g_none
          assign cell_out[er][ec] = '0;
        end
      end else begin : g_mem
        dbuf_mem #(.G(G), .W(W), .C(C), .DEPTH(MEM_DEPTH), .ROW_ID(er), .COL_ID(ec)) u_mem (
          .clk, .rst_n, .en, .cfg_bus, .ptr,
          .seg(cell_side[er][ec][NORTH]), .corner_out(cell_out[er][ec]),
          .swap(mem_swap), .bank_sel(mem_bank[ec-1]),
          .host_addr(mem_addr[ec-1]), .host_we(mem_we[ec-1]),
          .host_wdata(mem_wdata[ec-1]), .host_rdata(mem_rdata[ec-1])
        );
      end
    end
  end

  // ---------------- switching elements ----------------
  for (genvar r = 0; r <= ROWS; r++) begin : g_ser
    for (genvar c = 0; c <= COLS; c++) begin : g_sec
      logic [3:0][W-1:0][G-1:0] lin;
      logic [3:0][G-1:0]        cin;
      if (r > 0)    begin : g_ln assign lin[NORTH] = se_out[r-1][c][SOUTH]; end
      else          begin : g_lnz assign lin[NORTH] = '0; end
      if (r < ROWS) begin : g_ls assign lin[SOUTH] = se_out[r+1][c][NORTH]; end
      else          begin : g_lsz assign lin[SOUTH] = '0; end
      if (c > 0)    begin : g_lw assign lin[WEST]  = se_out[r][c-1][EAST]; end
      else          begin : g_lwz assign lin[WEST]  = '0; end
      if (c < COLS) begin : g_le assign lin[EAST]  = se_out[r][c+1][WEST]; end
      else          begin : g_lez assign lin[EAST]  = '0; end
      // cells around the crossing (extended coordinates): NW, NE, SE, SW,
      // each giving the corner output that touches this crossing
      assign cin[0] = cell_out[r][c][2];
      assign cin[1] = cell_out[r][c+1][3];
      assign cin[2] = cell_out[r+1][c+1][0];
      assign cin[3] = cell_out[r+1][c][1];
      se #(.G(G), .W(W), .C(C), .F_SW(F_SW), .ROW_ID(r), .COL_ID(c)) u_se (
        .clk, .cfg_bus, .ptr, .link_in(lin), .corner_in(cin), .link_out(se_out[r][c])
      );
    end
  end

  initial assert (ER <= MASK_W && EC <= MASK_W) else $error("muccra_array: array too large for masks");
endmodule
