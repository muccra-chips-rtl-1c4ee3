// tb_mult_macro: random operands on two tracks of the segment; checks the
// registered low product, high unsigned product, high signed product and
// hold, one cycle after each operation, against 64-bit arithmetic.
module tb_mult_macro;
  import muccra_pkg::*;
  localparam int unsigned G = 24, W = 4, C = 4;
  logic clk = 0, rst_n = 0, en;
  cfg_pkt_t cfg_bus;
  logic [1:0] ptr;
  logic [2*W-1:0][G-1:0] seg;
  logic [3:0][G-1:0] corner_out;
  int checks = 0, failures = 0;

  mult_macro #(.G(G), .W(W), .C(C), .ROW_ID(0), .COL_ID(3)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [G-1:0] exp_q;
    cfg_bus = '0; ptr = 0; en = 0; seg = '0; exp_q = '0;
    #12 rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      edge_cfg_t e;
      e.op = 2'(k); e.sel_a = 3'(2 + k); e.sel_b = 3'(7 - k);
      @(negedge clk);
      cfg_bus.valid = 1;
      cfg_bus.w = mk_word(K_EDGE, 8'h01, 8'h08, k, DATA_W'(e));
    end
    @(negedge clk) cfg_bus.valid = 0;
    for (int i = 0; i < 500; i++) begin
      longint unsigned ua, ub;
      longint sa, sb;
      logic [2*G-1:0] pu, ps;
      @(negedge clk);
      for (int t = 0; t < 2*W; t++) seg[t] = G'($urandom);
      ptr = 2'($urandom); en = ($urandom % 4) != 0;
      ua = seg[2 + ptr]; ub = seg[7 - ptr];
      sa = longint'($signed(seg[2 + ptr])); sb = longint'($signed(seg[7 - ptr]));
      pu = (2*G)'(ua * ub); ps = (2*G)'(sa * sb);
      @(posedge clk);
      if (en) case (ptr)
        2'd1: exp_q = pu[G-1:0];
        2'd2: exp_q = pu[2*G-1:G];
        2'd3: exp_q = ps[2*G-1:G];
        default: ;
      endcase
      #1;
      checks++;
      if (corner_out[2] !== exp_q || corner_out[0] !== exp_q) begin
        failures++; if (failures < 10) $display("op %0d: %h expected %h", ptr, corner_out[2], exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
