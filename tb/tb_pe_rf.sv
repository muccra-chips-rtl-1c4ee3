// tb_pe_rf: writes and reads the PE register file at random, checking reads
// against a shadow copy, the write enable, the run enable and the reset.
module tb_pe_rf;
  localparam int unsigned G = 24, D = 8;
  logic clk = 0, rst_n = 0, en, we;
  logic [2:0] waddr, raddr;
  logic [G-1:0] wdata, rdata;
  logic [G-1:0] shadow [D];
  int checks = 0, failures = 0;

  pe_rf #(.G(G), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < D; i++) shadow[i] = '0;
    #12 rst_n = 1;
    for (int i = 0; i < D; i++) begin
      raddr = 3'(i); #1; checks++;
      if (rdata !== '0) begin failures++; $display("reset value wrong at %0d", i); end
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0; we = $urandom % 2;
      waddr = 3'($urandom); wdata = G'($urandom); raddr = 3'($urandom);
      #1; checks++;
      if (rdata !== shadow[raddr]) begin failures++; $display("read mismatch at %0d", raddr); end
      @(posedge clk);
      if (en && we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
