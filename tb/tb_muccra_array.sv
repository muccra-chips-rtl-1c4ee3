// tb_muccra_array: drives the PE array directly (configuration bus, context
// pointer, run enable) and checks a vertical pipeline through column 0 that
// ends in a memory write:
//   left I/O of row 0 -> PE(0,0) -> PE(1,0) -> PE(2,0) -> PE(3,0), each PE
//   rotating its input left by (row + 1) in its Shift & Mask Unit and passing
//   the result through its south-west corner to the channel below;
//   from below PE(3,0) the word runs east through SE(4,0) and SE(4,1) into the
//   memory of column 1 as write data, with the write address coming from the
//   left I/O of row 3 along a parallel track.
// After 60 cycles the banks are swapped and the host reads back every written
// address, compared with a model of the pipeline. A second phase with the run
// enable held low checks that nothing in the array moves.
module tb_muccra_array;
  import muccra_pkg::*;
  localparam int unsigned G = 24, ROWS = 4, COLS = 4, C = 4, W = 4, FSW = 2, MD = 256;
  logic clk = 0, rst_n = 0, en, mem_swap;
  cfg_pkt_t cfg_bus;
  logic [1:0] ptr;
  logic [G-1:0] io_in [ROWS][2];
  logic [G-1:0] io_out [ROWS][2];
  logic io_valid [ROWS][2];
  logic mem_bank [COLS];
  logic [7:0] mem_addr [COLS];
  logic mem_we [COLS];
  logic [G-1:0] mem_wdata [COLS];
  logic [G-1:0] mem_rdata [COLS];
  int checks = 0, failures = 0;

  muccra_array #(.G(G), .ROWS(ROWS), .COLS(COLS), .C(C), .W(W), .F_SW(FSW), .MEM_DEPTH(MD)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [G-1:0] rol(logic [G-1:0] x, int s);
    logic [2*G-1:0] d = {x, x} << s;
    return d[2*G-1:G];
  endfunction

  task automatic send(cfg_word_t w);
    @(negedge clk);
    cfg_bus.valid = 1; cfg_bus.w = w;
    @(negedge clk);
    cfg_bus.valid = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [G-1:0] q0, q3;
    logic [G-1:0] o [4];
    logic [G-1:0] img [MD];
    bit written [MD];
    logic [DATA_W-1:0] d;
    pe_cfg_t p;
    edge_cfg_t e;
    cfg_bus = '0; ptr = 0; en = 0; mem_swap = 0;
    for (int r = 0; r < ROWS; r++) begin io_in[r][0] = '0; io_in[r][1] = '0; end
    for (int c = 0; c < COLS; c++) begin mem_addr[c] = '0; mem_we[c] = 0; mem_wdata[c] = '0; end
    for (int a = 0; a < MD; a++) written[a] = 0;
    q0 = '0; q3 = '0; for (int i = 0; i < 4; i++) o[i] = '0;
    #12 rst_n = 1;
    // clear context 0 of everything
    send(mk_word(K_PE, 8'hff, 8'hff, 0, '0));
    send(mk_word(K_SE, 8'hff, 8'hff, 0, '0));
    send(mk_word(K_EDGE, 8'hff, 8'hff, 0, '0));
    // PEs of column 0: rotate by row+1, output SMU on the SW corner
    for (int r = 0; r < ROWS; r++) begin
      p = '0; p.in_sel[NORTH] = 3'd0; p.smu_src = 2'd1; p.smu_op = SMU_ROL;
      p.smu_shamt = 5'(r + 1); p.out_sel[3] = 2'd1;
      send(mk_word(K_PE, 8'(1 << r), 8'h01, 0, DATA_W'(p)));
    end
    // SE(0,0): east track 0 <- SW cell (left I/O of row 0)
    send(mk_word(K_SE, 8'h01, 8'h01, 0, se_set('0, W, EAST, 0, FSW + 1 + 3)));
    // SE(1..3,0): east track 0 <- NE cell (PE above-right = PE(r-1,0))
    send(mk_word(K_SE, 8'h0e, 8'h01, 0, se_set('0, W, EAST, 0, FSW + 1 + 1)));
    // SE(4,0): east track 0 <- NE cell (PE(3,0)), east track 1 <- NW cell (left I/O row 3)
    d = se_set('0, W, EAST, 0, FSW + 1 + 1);
    d = se_set(d, W, EAST, 1, FSW + 1 + 0);
    send(mk_word(K_SE, 8'h10, 8'h01, 0, d));
    // SE(4,1): both tracks straight on to the east
    d = se_set('0, W, EAST, 0, 1);
    d = se_set(d, W, EAST, 1, 1);
    send(mk_word(K_SE, 8'h10, 8'h02, 0, d));
    // memory of column 1: write data track 0 at address track 1
    e = '0; e.op = 2'd2; e.sel_a = 3'd1; e.sel_b = 3'd0;
    send(mk_word(K_EDGE, 8'h20, 8'h04, 0, DATA_W'(e)));

    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      en = 1;
      io_in[0][0] = G'($urandom);
      io_in[3][0] = G'($urandom % 64);
      @(posedge clk);
      img[q3[7:0]] = o[3]; written[q3[7:0]] = 1;
      o[3] = rol(o[2], 4); o[2] = rol(o[1], 3); o[1] = rol(o[0], 2); o[0] = rol(q0, 1);
      q0 = io_in[0][0]; q3 = io_in[3][0];
    end
    // run enable low: inputs change, nothing may be written
    for (int i = 0; i < 10; i++) begin
      @(negedge clk);
      en = 0;
      io_in[0][0] = G'($urandom);
      io_in[3][0] = G'($urandom % 64);
    end
    @(negedge clk) mem_swap = 1;
    @(negedge clk) mem_swap = 0;
    checks++;
    if (mem_bank[1] !== 1'b1) begin failures++; $display("bank not swapped"); end
    for (int a = 0; a < 64; a++) if (written[a]) begin
      @(negedge clk) mem_addr[1] = 8'(a);
      @(negedge clk);
      checks++;
      if (mem_rdata[1] !== img[a]) begin
        failures++; $display("address %0d: %h expected %h", a, mem_rdata[1], img[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
