// tb_alpha_blend_m2: alpha blending of two 8-bit pixel streams on the
// second-prototype configuration of the core (16-bit PEs, 16 contexts,
// F_sw = 3, multiply in every PE, no multiplier macros), four pixel streams
// in parallel, one per PE row:
//     out = (a * alpha + b * (128 - alpha)) >> 7
// Context 0 (2 cycles) loads alpha, entering from the left I/O unit, into the
// register file of PE(r,0) and 128 - alpha, entering from the right I/O unit,
// into PE(r,1). Context 1 streams: a from the left I/O unit goes to PE(r,0)
// (a * alpha); b from the right I/O unit runs west along the channel to
// PE(r,1) (b * beta), whose product turns north through a switching element
// (an F_sw = 3 turn) into the east side of PE(r,2), which adds the two
// products; PE(r,3) shifts right by 7 and the right I/O unit outputs the
// pixel. Every output pixel is compared with the formula, and the number of
// cycles per task is checked against the pipeline depth.
module tb_alpha_blend_m2;
  import muccra_pkg::*;
  localparam int unsigned G = 16, ROWS = 4, COLS = 4, C = 16, W = 4, FSW = 3, CD = 256, MD = 64;
  localparam int unsigned CA = $clog2(CD), PA = $clog2(C);
  localparam int unsigned NPIX = 120;   // pixels per row and frame

  logic clk = 0, rst_n = 0;
  logic host_cfg_we, tcc_start, tcc_busy, csc_start, csc_busy, csc_done, csc_stall;
  logic [CA-1:0] host_cfg_addr, tcc_base;
  logic [CA:0] tcc_len;
  cfg_word_t host_cfg_wdata;
  logic [PA-1:0] csc_start_ctx, ctx_ptr;
  logic [G-1:0] io_in [ROWS][2];
  logic [G-1:0] io_out [ROWS][2];
  logic io_valid [ROWS][2];
  logic mem_bank [COLS];
  logic [5:0] mem_addr [COLS];
  logic mem_we [COLS];
  logic [G-1:0] mem_wdata [COLS];
  logic [G-1:0] mem_rdata [COLS];

  muccra_top #(.G(G), .ROWS(ROWS), .COLS(COLS), .C(C), .W(W), .F_SW(FSW), .PE_MUL(1'b1),
               .HAS_MULT_MACRO(1'b0), .MEM_DEPTH(MD), .CONF_DEPTH(CD)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  cfg_word_t prog [$];
  logic [DATA_W-1:0] se_word [ROWS+1][COLS+1];

  function automatic logic [7:0] bit8(int i); return 8'(1 << i); endfunction

  task automatic se_route(int r, int c, int side, int track, int sel);
    se_word[r][c] = se_set(se_word[r][c], W, side, track, sel);
  endtask

  task automatic build(int alpha_ctx, int stream_ctx, int n_stream);
    pe_cfg_t p;
    edge_cfg_t e;
    csc_entry_t ce;
    for (int s = 0; s < 2; s++) begin
      prog.push_back(mk_word(K_PE,   8'hff, 8'hff, s, '0));
      prog.push_back(mk_word(K_SE,   8'hff, 8'hff, s, '0));
      prog.push_back(mk_word(K_EDGE, 8'hff, 8'hff, s, '0));
    end
    // routing, identical in both contexts
    for (int r = 0; r <= ROWS; r++) for (int c = 0; c <= COLS; c++) se_word[r][c] = '0;
    for (int r = 0; r < ROWS; r++) begin
      se_route(r, 0, EAST, 0, FSW + 1 + 3);       // a from left I/O -> PE(r,0) north, track 0
      se_route(r, COLS, WEST, 0, FSW + 1 + 2);    // b from right I/O, westbound track 0
      se_route(r, 3, WEST, 0, 1);
      se_route(r, 2, WEST, 0, 1);                 // -> PE(r,1) north, track W+0
      se_route(r, 1, EAST, 1, FSW + 1 + 3);       // a*alpha from PE(r,0) -> eastbound track 1
      se_route(r, 2, EAST, 1, 1);                 // -> PE(r,2) north, track 1
      se_route(r + 1, 2, EAST, 2, FSW + 1 + 0);   // b*beta from PE(r,1) SE corner, eastbound track 2
      se_route(r + 1, 3, NORTH, 2, 3);            // turn north -> PE(r,2) east side, track W+2
      se_route(r, 3, EAST, 2, FSW + 1 + 3);       // sum from PE(r,2) -> PE(r,3) north, track 2
      se_route(r, COLS, SOUTH, 3, FSW + 1 + 3);   // pixel from PE(r,3) -> right I/O, track 3
    end
    for (int s = 0; s < 2; s++)
      for (int c = 0; c <= COLS; c++) begin
        // SE rows 1..ROWS-1 carry identical words: one multicast word for them
        prog.push_back(mk_word(K_SE, bit8(0), bit8(c), s, se_word[0][c]));
        prog.push_back(mk_word(K_SE, 8'((1 << ROWS) - 2), bit8(c), s, se_word[1][c]));
        prog.push_back(mk_word(K_SE, bit8(ROWS), bit8(c), s, se_word[ROWS][c]));
      end
    // context 0: register files take the coefficients
    p = '0; p.in_sel[NORTH] = 3'd0; p.rf_we = 1; p.rf_src = 2'd1;
    prog.push_back(mk_word(K_PE, 8'h0f, bit8(0), alpha_ctx, DATA_W'(p)));
    p = '0; p.in_sel[NORTH] = 3'(W + 0); p.rf_we = 1; p.rf_src = 2'd1;
    prog.push_back(mk_word(K_PE, 8'h0f, bit8(1), alpha_ctx, DATA_W'(p)));
    // context 1: the blend
    p = '0; p.in_sel[NORTH] = 3'd0; p.alu_a = 2'd2; p.alu_b = 2'd1; p.alu_op = ALU_MUL; p.out_sel[1] = 2'd0;
    prog.push_back(mk_word(K_PE, 8'h0f, bit8(0), stream_ctx, DATA_W'(p)));
    p = '0; p.in_sel[NORTH] = 3'(W + 0); p.alu_a = 2'd2; p.alu_b = 2'd1; p.alu_op = ALU_MUL; p.out_sel[2] = 2'd0;
    prog.push_back(mk_word(K_PE, 8'h0f, bit8(1), stream_ctx, DATA_W'(p)));
    p = '0; p.in_sel[NORTH] = 3'd1; p.in_sel[EAST] = 3'(W + 2); p.alu_a = 2'd2; p.alu_b = 2'd3;
    p.alu_op = ALU_ADD; p.out_sel[1] = 2'd0;
    prog.push_back(mk_word(K_PE, 8'h0f, bit8(2), stream_ctx, DATA_W'(p)));
    p = '0; p.in_sel[NORTH] = 3'd2; p.smu_src = 2'd1; p.smu_op = SMU_SRL; p.smu_shamt = 5'd7; p.out_sel[1] = 2'd1;
    prog.push_back(mk_word(K_PE, 8'h0f, bit8(3), stream_ctx, DATA_W'(p)));
    e = '0; e.op = 2'd1; e.sel_a = 3'd3;
    prog.push_back(mk_word(K_EDGE, 8'h1e, bit8(COLS + 1), stream_ctx, DATA_W'(e)));
    // controller: 2 cycles of context 0, then n_stream cycles of context 1
    ce = '0; ce.stay = 8'd1; ce.next = SLOT_W'(stream_ctx);
    prog.push_back(mk_word(K_CSC, 8'h01, 8'h01, alpha_ctx, DATA_W'(ce)));
    ce = '0; ce.stay = 8'(n_stream - 1); ce.last = 1;
    prog.push_back(mk_word(K_CSC, 8'h01, 8'h01, stream_ctx, DATA_W'(ce)));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int alpha [ROWS];
    int a_q [$][ROWS];
    int pix [ROWS][$];
    int exp_px [ROWS][$];
    int cyc, n_out;
    // pipeline: a/b enter the I/O registers, then 4 register stages to the output
    localparam int DEPTH = 4;
    host_cfg_we = 0; host_cfg_addr = '0; host_cfg_wdata = '0;
    tcc_start = 0; tcc_base = '0; tcc_len = '0; csc_start = 0; csc_start_ctx = '0;
    for (int c = 0; c < COLS; c++) begin mem_addr[c] = '0; mem_we[c] = 0; mem_wdata[c] = '0; end
    for (int r = 0; r < ROWS; r++) begin io_in[r][0] = '0; io_in[r][1] = '0; end
    build(0, 1, NPIX + DEPTH);
    #12 rst_n = 1;
    foreach (prog[i]) begin
      @(negedge clk);
      host_cfg_we = 1; host_cfg_addr = CA'(i); host_cfg_wdata = prog[i];
    end
    @(negedge clk) host_cfg_we = 0;
    tcc_start = 1; tcc_base = '0; tcc_len = (CA+1)'(prog.size());
    @(negedge clk) tcc_start = 0;
    while (tcc_busy) @(negedge clk);

    for (int r = 0; r < ROWS; r++) begin
      alpha[r] = $urandom % 129;
      io_in[r][0] = G'(alpha[r]);
      io_in[r][1] = G'(128 - alpha[r]);
    end
    csc_start = 1; csc_start_ctx = '0;
    @(negedge clk) csc_start = 0;
    cyc = 0; n_out = 0;
    while (csc_busy) begin
      // coefficients are presented during context 0, pixels from then on
      if (cyc >= 1) for (int r = 0; r < ROWS; r++) begin
        int a = $urandom % 256, b = $urandom % 256;
        io_in[r][0] = G'(a); io_in[r][1] = G'(b);
        exp_px[r].push_back((a * alpha[r] + b * (128 - alpha[r])) >> 7);
      end
      @(posedge clk);
      cyc++;
      #1;
      for (int r = 0; r < ROWS; r++) if (io_valid[r][1]) begin
        // the first DEPTH outputs of the stream flush the pipeline
        pix[r].push_back(int'(io_out[r][1]));
      end
      @(negedge clk);
    end
    checks++;
    if (cyc != 2 + NPIX + DEPTH) begin
      failures++; $display("task took %0d cycles, expected %0d", cyc, 2 + NPIX + DEPTH);
    end
    for (int r = 0; r < ROWS; r++) begin
      checks++;
      if (pix[r].size() != NPIX + DEPTH) begin
        failures++; $display("row %0d: %0d outputs", r, pix[r].size());
      end
      for (int i = 0; i < NPIX; i++) begin
        checks++;
        if (pix[r][i + DEPTH] != exp_px[r][i]) begin
          failures++;
          if (failures < 20) $display("row %0d pixel %0d: %0d expected %0d (alpha %0d)", r, i, pix[r][i + DEPTH], exp_px[r][i], alpha[r]);
        end else n_out++;
      end
    end
    $display("blended %0d pixels on 4 rows in %0d cycles", n_out, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
