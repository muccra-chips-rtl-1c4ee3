// tb_tcc: fills the central configuration memory with random words and
// checks that a start command sends exactly words base .. base+len-1, in
// order, one per cycle, first word two cycles after start, with busy high
// until the last one has been sent; repeated for several ranges.
module tb_tcc;
  import muccra_pkg::*;
  localparam int unsigned D = 64;
  logic clk = 0, rst_n = 0, host_we, start, busy;
  logic [5:0] host_addr, base;
  logic [6:0] len;
  cfg_word_t host_wdata;
  cfg_pkt_t cfg_bus;
  cfg_word_t img [D];
  int checks = 0, failures = 0;

  tcc #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_we = 0; start = 0; base = 0; len = 0; host_addr = 0; host_wdata = '0;
    #12 rst_n = 1;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      img[i] = cfg_word_t'({$urandom, $urandom, $urandom});
      host_we = 1; host_addr = 6'(i); host_wdata = img[i];
    end
    @(negedge clk) host_we = 0;
    for (int t = 0; t < 6; t++) begin
      int b, n, got, cyc, first;
      b = $urandom % 40; n = 1 + $urandom % 20; got = 0; cyc = 0; first = -1;
      @(negedge clk);
      start = 1; base = 6'(b); len = 7'(n);
      @(negedge clk);
      start = 0;
      while (busy) begin
        cyc++;
        if (cfg_bus.valid) begin
          if (first < 0) first = cyc;
          checks++;
          if (cfg_bus.w !== img[b + got]) begin failures++; $display("word %0d wrong", b + got); end
          got++;
        end
        @(negedge clk);
      end
      checks++;
      if (got != n || first != 2 || cyc != n + 1) begin
        failures++; $display("range %0d+%0d: got %0d first %0d busy %0d", b, n, got, first, cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
