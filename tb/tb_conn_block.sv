// tb_conn_block: checks that every selector value picks the right track of a
// segment and that out-of-range selectors give zero.
module tb_conn_block;
  localparam int unsigned G = 24, W = 3;
  logic [2*W-1:0][G-1:0] seg;
  logic [2:0] sel;
  logic [G-1:0] y;
  int checks = 0, failures = 0;

  conn_block #(.G(G), .W(W)) dut (.seg, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      for (int k = 0; k < 2*W; k++) seg[k] = G'($urandom);
      sel = 3'(i % 8);
      #1; checks++;
      if (y !== ((int'(sel) < 2*W) ? seg[sel] : '0)) begin
        failures++; $display("sel=%0d y=%h", sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
