// csc: context switching controller.
//
// Sequences the contexts of a task and broadcasts the context pointer to every
// PE, SE and edge unit. Its own context memory holds one csc_entry_t per
// context slot (written by configuration packets of kind K_CSC addressed to
// row 0, column 0): how many extra cycles to stay, which context follows,
// whether the task ends there, and whether to wait for configuration loading
// to go idle before leaving.
// Operation: a start pulse sets the pointer to start_ctx and raises run. The
// array executes the pointed context in every cycle with run high. After
// stay+1 executed cycles the controller moves to the next context at the
// clock edge; after the last context it drops run and pulses done for one
// cycle. If the entry asks to wait and cfg_busy is high when the context
// would be left, run is held low (stall) until cfg_busy falls, so that a
// context slot being refilled from the central configuration memory (virtual
// hardware) is not entered early. The broadcast pointer and the one-cycle
// switch follow the architecture; the entry format and the wait rule are this
// design's.
module csc
  import muccra_pkg::*;
#(
  parameter int unsigned C = DEF_C
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  cfg_pkt_t             cfg_bus,
  input  logic                 start,
  input  logic [$clog2(C)-1:0] start_ctx,
  input  logic                 cfg_busy,
  output logic [$clog2(C)-1:0] ptr,
  output logic                 run,
  output logic                 busy,
  output logic                 stall,
  output logic                 done
);
  localparam int unsigned CW = $bits(csc_entry_t);
  logic [CW-1:0] word;
  csc_entry_t    e;
  logic [7:0]    cnt;
  logic          active, leave;

  ctx_mem #(.WIDTH(CW), .C(C), .KIND(K_CSC), .ROW_ID(0), .COL_ID(0)) u_cmem (
    .clk, .cfg_bus, .ptr, .word
  );
  assign e = csc_entry_t'(word);

  assign stall = active && (cnt == e.stay) && e.wait_cfg && cfg_busy;
  assign run   = active && !stall;
  assign leave = run && (cnt == e.stay);
  assign busy  = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      ptr    <= '0;
      cnt    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (start) begin
          active <= 1'b1;
          ptr    <= start_ctx;
          cnt    <= '0;
        end
      end else if (leave) begin
        cnt <= '0;
        if (e.last) begin
          active <= 1'b0;
          done   <= 1'b1;
        end else begin
          ptr <= e.next[$clog2(C)-1:0];
        end
      end else if (run) begin
        cnt <= cnt + 8'd1;
      end
    end
  end

  // the task-end pulse is only given once the controller has stopped
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !active);
endmodule
