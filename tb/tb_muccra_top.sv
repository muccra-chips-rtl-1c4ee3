// tb_muccra_top: end-to-end test of a MuCCRA core at its default size
// (24-bit, 4x4 PEs, 64 contexts, W = 4, F_sw = 2, multipliers and memories).
//
// All configuration goes through the central configuration memory and the
// multicast bus; most words address several elements at once.
//
// Task 1 (contexts 0 and 1, 5 cycles each): every PE row is a four-stage
// pipeline fed by the row's left I/O unit and emptied by its right I/O unit,
// the words travelling along the horizontal channel above the row:
//   PE(r,0): 2x            PE(r,1): acc += x (context 0) / acc -= x (context 1)
//   PE(r,2): (x << 3) masked to 20 bits
//   PE(r,3): x (context 0) / ~x (context 1)
// While task 1 runs, the configuration controller loads task 2 into context
// 2 (virtual hardware); context 1 waits for that load, which makes the
// controller stall. The end of task 1 swaps the data-memory banks, giving the
// array the bank the host filled beforehand.
// Task 2 (context 2): the left I/O unit of row 3 streams addresses into the
// column-0 memory; the word read climbs the west vertical channel to the
// column-0 multiplier, is multiplied by the word from the left I/O unit of
// row 0, and the product runs along the top channel to the right I/O unit of
// row 0. The end of task 2 swaps the banks back.
//
// A cycle-level model of the configured datapaths predicts every word on the
// right-hand I/O outputs; the context sequence, cycle counts, bank swaps and
// memory contents are checked too, and each mechanism is counted.
module tb_muccra_top;
  import muccra_pkg::*;
  localparam int unsigned G = DEF_G, ROWS = DEF_ROWS, COLS = DEF_COLS, C = DEF_C, W = DEF_W;
  localparam int unsigned FSW = DEF_FSW, CD = 1024, MD = 256;
  localparam int unsigned CA = $clog2(CD), PA = $clog2(C);
  localparam logic [G-1:0] MASK20 = G'((1 << 20) - 1);

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
  logic [7:0] mem_addr [COLS];
  logic mem_we [COLS];
  logic [G-1:0] mem_wdata [COLS];
  logic [G-1:0] mem_rdata [COLS];

  muccra_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_ctx_switch = 0, n_stall = 0, n_vh_load = 0, n_multicast = 0, n_swap = 0;
  int n_mem_read = 0, n_mult = 0, n_io_out = 0, n_route_hops = 0;

  task automatic chk(logic [G-1:0] got, logic [G-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------- configuration program ----------------
  cfg_word_t prog [$];

  function automatic logic [7:0] bit8(int i); return 8'(1 << i); endfunction

  function automatic pe_cfg_t pe_base();
    pe_cfg_t p = '0;
    p.in_sel[NORTH] = 3'd0;        // eastbound track 0 of the channel above
    return p;
  endfunction

  task automatic clear_slot(int s);
    prog.push_back(mk_word(K_PE,   8'hff, 8'hff, s, '0));
    prog.push_back(mk_word(K_SE,   8'hff, 8'hff, s, '0));
    prog.push_back(mk_word(K_EDGE, 8'hff, 8'hff, s, '0));
  endtask

  task automatic task1_ctx(int s, bit second);
    pe_cfg_t p;
    logic [DATA_W-1:0] d;
    edge_cfg_t e;
    // column 0: 2x
    p = pe_base(); p.alu_a = 2'd2; p.alu_b = 2'd2; p.alu_op = ALU_ADD; p.out_sel[1] = 2'd0;
    prog.push_back(mk_word(K_PE, 8'h0f, bit8(0), s, DATA_W'(p)));
    // column 1: accumulate
    p = pe_base(); p.alu_a = 2'd1; p.alu_b = 2'd2; p.alu_op = second ? ALU_SUB : ALU_ADD;
    p.rf_we = 1; p.rf_waddr = 0; p.rf_raddr = 0; p.rf_src = 2'd0; p.out_sel[1] = 2'd0;
    prog.push_back(mk_word(K_PE, 8'h0f, bit8(1), s, DATA_W'(p)));
    // column 2: shift & mask
    p = pe_base(); p.smu_src = 2'd1; p.smu_op = SMU_SLL; p.smu_shamt = 5'd3; p.smu_mlen = 5'd20;
    p.out_sel[1] = 2'd1;
    prog.push_back(mk_word(K_PE, 8'h0f, bit8(2), s, DATA_W'(p)));
    // column 3: pass or invert
    p = pe_base(); p.alu_a = 2'd2; p.alu_op = second ? ALU_NOTA : ALU_PASSA; p.out_sel[1] = 2'd0;
    prog.push_back(mk_word(K_PE, 8'h0f, bit8(3), s, DATA_W'(p)));
    // SEs of rows 0..3, columns 0..3: east track 0 <- SW corner cell
    d = se_set('0, W, EAST, 0, FSW + 1 + 3);
    prog.push_back(mk_word(K_SE, 8'h0f, 8'h0f, s, d));
    // SEs of column 4: south track 0 <- SW corner cell (last PE of the row)
    d = se_set('0, W, SOUTH, 0, FSW + 1 + 3);
    prog.push_back(mk_word(K_SE, 8'h0f, bit8(4), s, d));
    // right I/O units (extended column 5, rows 1..4): output track 0
    e = '0; e.op = 2'd1; e.sel_a = 3'd0;
    prog.push_back(mk_word(K_EDGE, 8'h1e, bit8(COLS + 1), s, DATA_W'(e)));
  endtask

  task automatic task2_ctx(int s);
    logic [DATA_W-1:0] d;
    edge_cfg_t e;
    // SE(4,0): east track 0 <- NW cell (left I/O of row 3); north track 1 <- SE cell (memory 0)
    d = se_set('0, W, EAST, 0, FSW + 1 + 0);
    d = se_set(d, W, NORTH, 1, FSW + 1 + 2);
    prog.push_back(mk_word(K_SE, bit8(4), bit8(0), s, d));
    // SE(1..3,0): north track 1 <- entering from south (straight)
    d = se_set('0, W, NORTH, 1, 1);
    prog.push_back(mk_word(K_SE, 8'h0e, bit8(0), s, d));
    // SE(0,0): east track 1 <- entering from south (turn); east track 2 <- SW cell (left I/O row 0)
    d = se_set('0, W, EAST, 1, 2);
    d = se_set(d, W, EAST, 2, FSW + 1 + 3);
    prog.push_back(mk_word(K_SE, bit8(0), bit8(0), s, d));
    // SE(0,1): east track 3 <- NW cell (multiplier 0)
    d = se_set('0, W, EAST, 3, FSW + 1 + 0);
    prog.push_back(mk_word(K_SE, bit8(0), bit8(1), s, d));
    // SE(0,2), SE(0,3): east track 3 straight
    d = se_set('0, W, EAST, 3, 1);
    prog.push_back(mk_word(K_SE, bit8(0), 8'h0c, s, d));
    // SE(0,4): south track 3 <- entering from west
    d = se_set('0, W, SOUTH, 3, 2);
    prog.push_back(mk_word(K_SE, bit8(0), bit8(4), s, d));
    // memory of column 0 (extended (5,1)): read at address on track 0
    e = '0; e.op = 2'd1; e.sel_a = 3'd0;
    prog.push_back(mk_word(K_EDGE, bit8(ROWS + 1), bit8(1), s, DATA_W'(e)));
    // multiplier of column 0 (extended (0,1)): tracks 1 x 2, low product
    e = '0; e.op = 2'd1; e.sel_a = 3'd1; e.sel_b = 3'd2;
    prog.push_back(mk_word(K_EDGE, bit8(0), bit8(1), s, DATA_W'(e)));
    // right I/O of row 0 (extended (1,5)): output track 3
    e = '0; e.op = 2'd1; e.sel_a = 3'd3;
    prog.push_back(mk_word(K_EDGE, bit8(1), bit8(COLS + 1), s, DATA_W'(e)));
  endtask

  task automatic csc_entry(int s, int stay, int nxt, bit last, bit wt);
    csc_entry_t c = '0;
    c.stay = 8'(stay); c.next = SLOT_W'(nxt); c.last = last; c.wait_cfg = wt;
    prog.push_back(mk_word(K_CSC, 8'h01, 8'h01, s, DATA_W'(c)));
  endtask

  // ---------------- reference model ----------------
  logic [G-1:0] m_in [ROWS];
  logic [G-1:0] m_o [ROWS][4];
  logic [G-1:0] m_acc [ROWS];
  logic [G-1:0] m_out [ROWS];
  logic         m_val [ROWS];
  logic [G-1:0] m_mem_q, m_mul_q;
  logic [G-1:0] host_img [MD];

  task automatic model_step(int ctx);
    logic [G-1:0] n_o [ROWS][4];
    logic [G-1:0] n_acc [ROWS];
    logic [G-1:0] n_out [ROWS];
    logic [G-1:0] n_mem, n_mul;
    n_mem = m_mem_q; n_mul = m_mul_q;
    for (int r = 0; r < ROWS; r++) begin
      n_o[r] = m_o[r]; n_acc[r] = m_acc[r]; n_out[r] = m_out[r]; m_val[r] = 0;
    end
    if (ctx == 0 || ctx == 1) begin
      for (int r = 0; r < ROWS; r++) begin
        n_o[r][0] = m_in[r] + m_in[r];
        n_acc[r]  = (ctx == 0) ? m_acc[r] + m_o[r][0] : m_acc[r] - m_o[r][0];
        n_o[r][1] = n_acc[r];
        n_o[r][2] = (m_o[r][1] << 3) & MASK20;
        n_o[r][3] = (ctx == 0) ? m_o[r][2] : ~m_o[r][2];
        n_out[r]  = m_o[r][3];
        m_val[r]  = 1;
      end
    end else begin
      n_mem = host_img[m_in[ROWS-1][7:0]];
      n_mul = G'(m_mem_q * m_in[0]);
      n_out[0] = m_mul_q;
      m_val[0] = 1;
    end
    for (int r = 0; r < ROWS; r++) begin
      m_in[r] = io_in[r][0]; m_o[r] = n_o[r]; m_acc[r] = n_acc[r]; m_out[r] = n_out[r];
    end
    m_mem_q = n_mem; m_mul_q = n_mul;
  endtask

  // run a task: start it, drive random inputs, step the model, compare
  task automatic run_task(int start_ctx, int a_first, int a_len, output int cycles,
                          output int trace [$]);
    int prev = -1;
    cycles = 0;
    trace = {};
    @(negedge clk);
    csc_start = 1; csc_start_ctx = PA'(start_ctx);
    if (a_len > 0) begin tcc_start = 1; tcc_base = CA'(a_first); tcc_len = (CA+1)'(a_len); end
    @(negedge clk);
    csc_start = 0; tcc_start = 0;
    while (csc_busy) begin
      bit run;
      int ctx;
      for (int r = 0; r < ROWS; r++) begin
        io_in[r][0] = G'($urandom);
        io_in[r][1] = G'($urandom);
      end
      if (start_ctx == 2) io_in[ROWS-1][0] = G'($urandom % MD);
      run = csc_busy && !csc_stall;
      ctx = int'(ctx_ptr);
      if (csc_stall) n_stall++;
      if (dut.u_tcc.cfg_bus.valid) n_vh_load++;
      if (run) begin
        trace.push_back(ctx);
        if (prev >= 0 && prev != ctx) n_ctx_switch++;
        prev = ctx;
      end
      @(posedge clk);
      cycles++;
      if (run) model_step(ctx);
      #1;
      if (run) begin
        for (int r = 0; r < ROWS; r++) begin
          checks++;
          if (io_valid[r][1] !== m_val[r]) begin
            failures++; $display("row %0d valid %0d expected %0d (ctx %0d)", r, io_valid[r][1], m_val[r], ctx);
          end else if (m_val[r]) begin
            n_io_out++;
            chk(io_out[r][1], m_out[r], $sformatf("row %0d output, context %0d", r, ctx));
          end
        end
        if (ctx == 2) begin
          n_mem_read++;
          if (m_mul_q != 0) n_mult++;
        end else n_route_hops += ROWS * 5;
      end
      @(negedge clk);
    end
    // let the task-end pulse pass
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && csc_done) n_swap++;

  initial begin
    int a_len, b_first, b_len, cyc;
    int tr [$];
    int exp_tr1 [$] = '{0, 0, 0, 0, 0, 1, 1, 1, 1, 1};
    int exp_tr2 [$];
    host_cfg_we = 0; host_cfg_addr = '0; host_cfg_wdata = '0;
    tcc_start = 0; tcc_base = '0; tcc_len = '0; csc_start = 0; csc_start_ctx = '0;
    for (int r = 0; r < ROWS; r++) begin io_in[r][0] = '0; io_in[r][1] = '0; end
    for (int c = 0; c < COLS; c++) begin mem_addr[c] = '0; mem_we[c] = 0; mem_wdata[c] = '0; end
    for (int r = 0; r < ROWS; r++) begin
      m_in[r] = '0; m_acc[r] = '0; m_out[r] = '0; m_val[r] = 0;
      for (int j = 0; j < 4; j++) m_o[r][j] = '0;
    end
    m_mem_q = '0; m_mul_q = '0;

    // program A: clear contexts 0..2, task 1, controller entries
    for (int s = 0; s < 3; s++) clear_slot(s);
    task1_ctx(0, 0);
    task1_ctx(1, 1);
    csc_entry(0, 4, 1, 0, 0);
    csc_entry(1, 4, 0, 1, 1);
    a_len = prog.size();
    // program B: task 2, loaded while task 1 runs
    b_first = a_len;
    task2_ctx(2);
    csc_entry(2, 29, 0, 1, 0);
    b_len = prog.size() - a_len;
    foreach (prog[i]) if ($countones(prog[i].row_mask) * $countones(prog[i].col_mask) > 1) n_multicast++;

    #12 rst_n = 1;
    // host writes the configuration words
    foreach (prog[i]) begin
      @(negedge clk);
      host_cfg_we = 1; host_cfg_addr = CA'(i); host_cfg_wdata = prog[i];
    end
    // host fills the bank of memory 0 that the array does not own
    for (int a = 0; a < MD; a++) begin
      @(negedge clk);
      host_cfg_we = 0;
      host_img[a] = G'($urandom);
      mem_we[0] = 1; mem_addr[0] = 8'(a); mem_wdata[0] = host_img[a];
    end
    @(negedge clk) mem_we[0] = 0; host_cfg_we = 0;
    checks++;
    if (mem_bank[0] !== 1'b0) begin failures++; $display("bank not 0 after reset"); end
    // send program A
    @(negedge clk); tcc_start = 1; tcc_base = '0; tcc_len = (CA+1)'(a_len);
    @(negedge clk); tcc_start = 0;
    while (tcc_busy) @(negedge clk);

    // task 1, with program B loaded in the background
    run_task(0, b_first, b_len, cyc, tr);
    checks++;
    if (tr != exp_tr1) begin failures++; $display("task 1 contexts %p", tr); end
    checks++;
    // 10 executed cycles; the load of B (b_len words + 1) ends after that
    if (cyc != b_len + 2) begin failures++; $display("task 1 took %0d cycles, expected %0d", cyc, b_len + 2); end
    checks++;
    if (mem_bank[0] !== 1'b1) begin failures++; $display("bank not swapped after task 1"); end

    // task 2
    run_task(2, 0, 0, cyc, tr);
    for (int i = 0; i < 30; i++) exp_tr2.push_back(2);
    checks++;
    if (tr != exp_tr2 || cyc != 30) begin failures++; $display("task 2: %0d cycles, contexts %p", cyc, tr); end
    checks++;
    if (mem_bank[0] !== 1'b0) begin failures++; $display("bank not swapped back after task 2"); end
    // host reads its bank again: contents untouched by the array's reads
    for (int a = 0; a < MD; a += 17) begin
      @(negedge clk) mem_addr[0] = 8'(a);
      @(negedge clk) chk(mem_rdata[0], host_img[a], $sformatf("host read %0d", a));
    end

    $display("mechanisms: context switches %0d, stalls %0d, background loads %0d, multicast words %0d, swaps %0d, memory reads %0d, products %0d, outputs %0d",
             n_ctx_switch, n_stall, n_vh_load, n_multicast, n_swap, n_mem_read, n_mult, n_io_out);
    if (n_ctx_switch == 0) begin failures++; $display("no context switch happened"); end
    if (n_stall == 0)      begin failures++; $display("no configuration stall happened"); end
    if (n_vh_load == 0)    begin failures++; $display("no background configuration load happened"); end
    if (n_multicast == 0)  begin failures++; $display("no multicast word was sent"); end
    if (n_swap != 2)       begin failures++; $display("bank swaps %0d", n_swap); end
    if (n_mem_read == 0)   begin failures++; $display("no memory read happened"); end
    if (n_mult == 0)       begin failures++; $display("no nonzero product happened"); end
    if (n_io_out == 0)     begin failures++; $display("no output word happened"); end
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
