// tb_dbuf_mem: exercises the double-buffered memory. The array side writes
// and reads words through its segment tracks under two contexts while the
// host fills and reads the other bank; after a swap each side must see the
// data the other side wrote. Also checks the one-cycle array read latency
// and that nothing happens while the run enable is low.
module tb_dbuf_mem;
  import muccra_pkg::*;
  localparam int unsigned G = 24, W = 4, C = 4, D = 32;
  logic clk = 0, rst_n = 0, en, swap, bank_sel, host_we;
  cfg_pkt_t cfg_bus;
  logic [1:0] ptr;
  logic [2*W-1:0][G-1:0] seg;
  logic [3:0][G-1:0] corner_out;
  logic [4:0] host_addr;
  logic [G-1:0] host_wdata, host_rdata;
  logic [G-1:0] arr_img [D], host_img [D];
  int checks = 0, failures = 0;

  dbuf_mem #(.G(G), .W(W), .C(C), .DEPTH(D), .ROW_ID(5), .COL_ID(2)) dut (.*);
  always #5 clk = ~clk;

  task automatic put(int slot, logic [1:0] op, int a, int b);
    edge_cfg_t e;
    e.op = op; e.sel_a = 3'(a); e.sel_b = 3'(b);
    @(negedge clk);
    cfg_bus.valid = 1;
    cfg_bus.w = mk_word(K_EDGE, 8'b0010_0000, 8'b0000_0100, slot, DATA_W'(e));
    @(negedge clk) cfg_bus.valid = 0;
  endtask

  task automatic chk(logic [G-1:0] got, logic [G-1:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("%s: %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_bus = '0; ptr = 0; en = 0; swap = 0; host_we = 0; host_addr = 0; host_wdata = 0; seg = '0;
    #12 rst_n = 1;
    put(0, 2'd2, 1, 6);   // context 0: write word on track 6 at address on track 1
    put(1, 2'd1, 3, 0);   // context 1: read address on track 3
    chk(G'(bank_sel), '0, "bank after reset");
    // array writes bank 0 while the host writes bank 1
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      arr_img[i] = G'($urandom); host_img[i] = G'($urandom);
      en = 1; ptr = 0; seg[1] = G'(i); seg[6] = arr_img[i];
      host_we = 1; host_addr = 5'(i); host_wdata = host_img[i];
    end
    @(negedge clk) en = 0; host_we = 0;
    // with en low an array write must not happen
    ptr = 0; seg[1] = 0; seg[6] = ~arr_img[0];
    @(negedge clk);
    // array reads back its own bank (one cycle latency)
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      en = 1; ptr = 1; seg[3] = G'(i);
      @(negedge clk);
      en = 0;
      chk(corner_out[0], arr_img[i], "array read before swap");
      chk(corner_out[3], arr_img[i], "array read corner 3");
    end
    // swap: host now sees what the array wrote, array sees host data
    @(negedge clk) swap = 1;
    @(negedge clk) swap = 0;
    chk(G'(bank_sel), G'(1), "bank after swap");
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      host_addr = 5'(i); en = 1; ptr = 1; seg[3] = G'(i);
      @(negedge clk);
      en = 0;
      chk(host_rdata, arr_img[i], "host read after swap");
      chk(corner_out[1], host_img[i], "array read after swap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
