// tb_se: loads random switch settings into four contexts of a switching
// element (W = 4, F_sw = 2) and checks every outgoing link, for random
// entering words and context pointers, against the selection rule: 0 gives
// zero, 1 the opposite side, 2 the side clockwise after it, 3..6 a corner
// cell, 7 zero.
module tb_se;
  import muccra_pkg::*;
  localparam int unsigned G = 24, W = 4, C = 4, FSW = 2;
  logic clk = 0;
  cfg_pkt_t cfg_bus;
  logic [1:0] ptr;
  logic [3:0][W-1:0][G-1:0] link_in, link_out;
  logic [3:0][G-1:0] corner_in;
  logic [DATA_W-1:0] ctx [C];
  int checks = 0, failures = 0;

  se #(.G(G), .W(W), .C(C), .F_SW(FSW), .ROW_ID(1), .COL_ID(3)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_bus = '0; ptr = 0;
    for (int k = 0; k < C; k++) begin
      ctx[k] = {$urandom, $urandom};
      @(negedge clk);
      cfg_bus.valid = 1;
      cfg_bus.w = mk_word(K_SE, 8'b0000_0010, 8'b0000_1000, k, ctx[k]);
    end
    @(negedge clk);
    cfg_bus.valid = 0;
    for (int i = 0; i < 400; i++) begin
      ptr = 2'($urandom);
      for (int d = 0; d < 4; d++) begin
        corner_in[d] = G'($urandom);
        for (int w = 0; w < W; w++) link_in[d][w] = G'($urandom);
      end
      #1;
      for (int d = 0; d < 4; d++)
        for (int w = 0; w < W; w++) begin
          int s;
          logic [G-1:0] e;
          s = int'(ctx[ptr][(d*W + w)*3 +: 3]);
          if (s == 1)                e = link_in[(d + 2) % 4][w];
          else if (s == 2)           e = link_in[(d + 1) % 4][w];
          else if (s >= 3 && s <= 6) e = corner_in[s - 3];
          else                       e = '0;
          checks++;
          if (link_out[d][w] !== e) begin
            failures++;
            if (failures < 10) $display("side %0d track %0d sel %0d: %h exp %h", d, w, s, link_out[d][w], e);
          end
        end
      #4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
