// pe: processing element of the array.
//
// A PE is a PE core (register file, Shift & Mask Unit, ALU), input connection
// blocks, output selectors and its own context memory, all as the
// architecture lays out. Each cycle the context word selected by the
// broadcast context pointer sets every selector and operation:
//   - FPI input connection blocks, one per side (N, E, S, W), each picking a
//     track of that side's channel segment -> PE inputs pin[0..3];
//   - the register file write data picks among F_UNIT sources
//     {ALU, pin0, pin1, pin2}; its read port feeds the SMU and ALU;
//   - the SMU input picks among F_UNIT sources {RF, pin0, pin1, pin2};
//   - each ALU operand picks among F_UNIT sources {SMU, RF, pin0, pin1};
//   - output j (corner j: NW, NE, SE, SW, driving the switching element at
//     that corner) picks among FPO sources {ALU, SMU, RF, pin j}.
// A selector value at or above the flexibility gives zero, so a smaller
// F_UNIT or FPI builds narrower multiplexers.
// Timing: inputs -> SMU -> ALU is combinational; outputs and register-file
// writes are registered and only advance while en is high. One hop from a PE
// output through the routing to the next PE's output register therefore
// takes one cycle. Which sources each selector sees is this design's reading
// of the PE diagram; the input/output counts and unit flexibilities are the
// architecture's parameters.
module pe
  import muccra_pkg::*;
#(
  parameter int unsigned G       = DEF_G,
  parameter int unsigned W       = DEF_W,
  parameter int unsigned C       = DEF_C,
  parameter int unsigned F_UNIT  = DEF_FUNIT,
  parameter int unsigned FPI     = DEF_FPI,
  parameter int unsigned RF      = DEF_RF,
  parameter bit          HAS_MUL = 1'b0,
  parameter int unsigned ROW_ID  = 0,
  parameter int unsigned COL_ID  = 0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  cfg_pkt_t                      cfg_bus,
  input  logic [$clog2(C)-1:0]          ptr,
  input  logic [3:0][2*W-1:0][G-1:0]    side_in,
  output logic [3:0][G-1:0]             corner_out
);
  localparam int unsigned CW = $bits(pe_cfg_t);

  logic [CW-1:0]       word;
  pe_cfg_t             cfg;
  logic [3:0][G-1:0]   pin;
  logic [G-1:0]        rf_q, rf_d, smu_x, smu_y, alu_a, alu_b, alu_y;

  ctx_mem #(.WIDTH(CW), .C(C), .KIND(K_PE), .ROW_ID(ROW_ID), .COL_ID(COL_ID)) u_cmem (
    .clk, .cfg_bus, .ptr, .word
  );
  assign cfg = pe_cfg_t'(word);

  for (genvar i = 0; i < 4; i++) begin : g_cb
    if (i < FPI) begin : g_on
      conn_block #(.G(G), .W(W)) u_cb (.seg(side_in[i]), .sel(cfg.in_sel[i]), .y(pin[i]));
    end else begin : g_off
      assign pin[i] = '0;
    end
  end

  function automatic logic [G-1:0] pick4(logic [1:0] sel, int unsigned f,
                                         logic [G-1:0] s0, logic [G-1:0] s1,
                                         logic [G-1:0] s2, logic [G-1:0] s3);
    if (32'(sel) >= f) return '0;
    case (sel)
      2'd0:    return s0;
      2'd1:    return s1;
      2'd2:    return s2;
      default: return s3;
    endcase
  endfunction

  assign rf_d  = pick4(cfg.rf_src,  F_UNIT, alu_y, pin[0], pin[1], pin[2]);
  assign smu_x = pick4(cfg.smu_src, F_UNIT, rf_q,  pin[0], pin[1], pin[2]);
  assign alu_a = pick4(cfg.alu_a,   F_UNIT, smu_y, rf_q,   pin[0], pin[1]);
  assign alu_b = pick4(cfg.alu_b,   F_UNIT, smu_y, rf_q,   pin[0], pin[1]);

  pe_rf #(.G(G), .DEPTH(RF)) u_rf (
    .clk, .rst_n, .en, .we(cfg.rf_we),
    .waddr(cfg.rf_waddr[$clog2(RF)-1:0]), .wdata(rf_d),
    .raddr(cfg.rf_raddr[$clog2(RF)-1:0]), .rdata(rf_q)
  );

  pe_smu #(.G(G)) u_smu (
    .op(cfg.smu_op), .shamt(cfg.smu_shamt), .mlen(cfg.smu_mlen), .x(smu_x), .y(smu_y)
  );

  pe_alu #(.G(G), .HAS_MUL(HAS_MUL)) u_alu (.op(cfg.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      corner_out <= '0;
    end else if (en) begin
      for (int j = 0; j < 4; j++)
        corner_out[j] <= pick4(cfg.out_sel[j], FPI, alu_y, smu_y, rf_q, pin[j]);
    end
  end

  initial begin
    assert (F_UNIT >= 1 && F_UNIT <= 4) else $error("pe: F_UNIT must be 1..4");
    assert (FPI >= 1 && FPI <= 4) else $error("pe: FPI must be 1..4");
    assert (RF >= 2 && RF <= 8) else $error("pe: RF depth must be 2..8");
  end
endmodule
