// tb_io_unit: checks that the external input word appears, registered, on
// the corner outputs, and that under a context with output enabled the word
// on the selected track is registered to ext_out with ext_valid, while a
// context without output leaves ext_out unchanged and ext_valid low.
module tb_io_unit;
  import muccra_pkg::*;
  localparam int unsigned G = 24, W = 4, C = 4;
  logic clk = 0, rst_n = 0, en, ext_valid;
  cfg_pkt_t cfg_bus;
  logic [1:0] ptr;
  logic [2*W-1:0][G-1:0] seg;
  logic [3:0][G-1:0] corner_out;
  logic [G-1:0] ext_in, ext_out;
  int checks = 0, failures = 0;

  io_unit #(.G(G), .W(W), .C(C), .ROW_ID(2), .COL_ID(5)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [G-1:0] exp_in, exp_out;
    logic exp_v;
    cfg_bus = '0; ptr = 0; en = 0; seg = '0; ext_in = '0; exp_in = '0; exp_out = '0;
    #12 rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      edge_cfg_t e;
      e.op = 2'(k & 1); e.sel_a = 3'(k * 2 + 1); e.sel_b = '0;
      @(negedge clk);
      cfg_bus.valid = 1;
      cfg_bus.w = mk_word(K_EDGE, 8'h04, 8'h20, k, DATA_W'(e));
    end
    @(negedge clk) cfg_bus.valid = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      for (int t = 0; t < 2*W; t++) seg[t] = G'($urandom);
      ext_in = G'($urandom); ptr = 2'($urandom); en = ($urandom % 4) != 0;
      exp_v = 0;
      if (en) begin
        exp_in = ext_in;
        if (ptr[0]) begin exp_out = seg[ptr * 2 + 1]; exp_v = 1; end
      end
      @(posedge clk);
      #1;
      checks++;
      if (corner_out[1] !== exp_in || ext_out !== exp_out || ext_valid !== exp_v) begin
        failures++;
        if (failures < 10) $display("ctx %0d en %0d: in %h/%h out %h/%h v %0d", ptr, en, corner_out[1], exp_in, ext_out, exp_out, ext_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
