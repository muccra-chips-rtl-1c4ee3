// tb_ctx_mem: sends multicast configuration packets with random row/column
// masks, kinds and slots to a context memory at row 2, column 1, and checks
// that exactly the packets addressed to it are stored, and that the read
// port follows the context pointer in the same cycle.
module tb_ctx_mem;
  import muccra_pkg::*;
  localparam int unsigned C = 16, WD = 40;
  logic clk = 0;
  cfg_pkt_t cfg_bus;
  logic [3:0] ptr;
  logic [WD-1:0] word;
  logic [WD-1:0] shadow [C];
  logic known [C];
  int checks = 0, failures = 0, accepted = 0, rejected = 0;

  ctx_mem #(.WIDTH(WD), .C(C), .KIND(K_SE), .ROW_ID(2), .COL_ID(1)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_bus = '0; ptr = 0;
    for (int i = 0; i < C; i++) known[i] = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      cfg_bus.valid      = ($urandom % 4) != 0;
      cfg_bus.w.kind     = (i % 3 == 0) ? K_PE : K_SE;
      cfg_bus.w.row_mask = 8'($urandom);
      cfg_bus.w.col_mask = 8'($urandom);
      cfg_bus.w.slot     = 8'($urandom % (C + 2));
      cfg_bus.w.data     = {$urandom, $urandom};
      @(posedge clk);
      if (cfg_bus.valid && cfg_bus.w.kind == K_SE && cfg_bus.w.row_mask[2] &&
          cfg_bus.w.col_mask[1] && cfg_bus.w.slot < C) begin
        shadow[cfg_bus.w.slot] = cfg_bus.w.data[WD-1:0];
        known[cfg_bus.w.slot]  = 1;
        accepted++;
      end else rejected++;
      #1;
      ptr = 4'($urandom);
      #1;
      if (known[ptr]) begin
        checks++;
        if (word !== shadow[ptr]) begin failures++; $display("slot %0d wrong", ptr); end
      end
    end
    checks++;
    if (accepted == 0 || rejected == 0) failures++;
    $display("accepted=%0d rejected=%0d", accepted, rejected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
