// tb_csc: programs the context switching controller with a three-context
// task (context 3 for 3 cycles, context 5 which waits for configuration
// loading to be idle, context 1 for 2 cycles, end) and checks the sequence
// of executed contexts, the stall while loading is busy, the task length in
// cycles and the single task-end pulse. Runs the task twice, once with and
// once without the loading-busy condition.
module tb_csc;
  import muccra_pkg::*;
  localparam int unsigned C = 8;
  logic clk = 0, rst_n = 0, start, cfg_busy;
  cfg_pkt_t cfg_bus;
  logic [2:0] start_ctx, ptr;
  logic run, busy, stall, done;
  int checks = 0, failures = 0;

  csc #(.C(C)) dut (.*);
  always #5 clk = ~clk;

  task automatic put(int slot, csc_entry_t e);
    @(negedge clk);
    cfg_bus.valid = 1;
    cfg_bus.w = mk_word(K_CSC, 8'h01, 8'h01, slot, DATA_W'(e));
  endtask

  task automatic run_task(int busy_cycles, int exp_len, int exp_stall);
    int trace [$];
    int cyc = 0, stalls = 0, dones = 0;
    int exp_trace [$] = '{3, 3, 3, 5, 1, 1};
    @(negedge clk);
    start = 1; start_ctx = 3; cfg_busy = (busy_cycles > 0);
    @(negedge clk);
    start = 0;
    while (busy || cyc == 0) begin
      if (run) trace.push_back(int'(ptr));
      if (stall) stalls++;
      @(posedge clk);
      cyc++;
      #1;
      if (done) dones++;
      if (cyc >= busy_cycles) cfg_busy = 0;
      @(negedge clk);
    end
    checks++;
    if (trace != exp_trace) begin
      failures++; $display("trace wrong: %p", trace);
    end
    checks++;
    if (cyc != exp_len) begin failures++; $display("task took %0d cycles, expected %0d", cyc, exp_len); end
    checks++;
    if (stalls != exp_stall) begin failures++; $display("stalls %0d expected %0d", stalls, exp_stall); end
    checks++;
    if (dones != 1) begin failures++; $display("done pulses %0d", dones); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    csc_entry_t e;
    cfg_bus = '0; start = 0; start_ctx = 0; cfg_busy = 0;
    #12 rst_n = 1;
    e = '0; e.stay = 2; e.next = 5; put(3, e);
    e = '0; e.stay = 0; e.next = 1; e.wait_cfg = 1; put(5, e);
    e = '0; e.stay = 1; e.next = 7; e.last = 1; put(1, e);
    @(negedge clk) cfg_bus.valid = 0;
    checks++;
    if (run || busy) begin failures++; $display("running before start"); end
    // no loading activity: 6 executed cycles, no stall
    run_task(0, 6, 0);
    // loading busy for 8 cycles: context 5 waits from cycle 3 to cycle 8
    run_task(8, 11, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
