// tb_pe: loads random context words into four contexts of a PE and runs it
// for many cycles with random segment inputs, context pointers and run
// enable. A cycle-level reference model of the PE (input selection, register
// file, shift & mask, ALU, output selection and register) predicts every
// registered corner output.
module tb_pe;
  import muccra_pkg::*;
  localparam int unsigned G = 24, W = 4, C = 4;
  logic clk = 0, rst_n = 0, en;
  cfg_pkt_t cfg_bus;
  logic [1:0] ptr;
  logic [3:0][2*W-1:0][G-1:0] side_in;
  logic [3:0][G-1:0] corner_out, exp_out;
  pe_cfg_t ctx [C];
  logic [G-1:0] rf [8];
  int checks = 0, failures = 0;

  pe #(.G(G), .W(W), .C(C), .F_UNIT(4), .FPI(4), .RF(8), .HAS_MUL(1'b0),
       .ROW_ID(2), .COL_ID(0)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [G-1:0] m_smu(pe_cfg_t k, logic [G-1:0] x);
    logic [2*G-1:0] d;
    logic [G-1:0] r;
    int s = int'(k.smu_shamt);
    case (k.smu_op)
      SMU_SLL: r = (s >= G) ? '0 : G'(x << s);
      SMU_SRL: r = (s >= G) ? '0 : G'(x >> s);
      SMU_SRA: r = G'($signed(x) >>> s);
      default: begin d = {x, x} << (s % G); r = d[2*G-1:G]; end
    endcase
    if (k.smu_mlen != 0 && int'(k.smu_mlen) < G) r = r & ((G'(1) << k.smu_mlen) - 1);
    return r;
  endfunction

  function automatic logic [G-1:0] m_alu(alu_op_e o, logic [G-1:0] a, logic [G-1:0] b);
    case (o)
      ALU_ADD: return a + b;
      ALU_SUB: return a - b;
      ALU_AND: return a & b;
      ALU_OR:  return a | b;
      ALU_XOR: return a ^ b;
      ALU_PASSA: return a;
      ALU_PASSB: return b;
      ALU_MUL: return '0;
      default: return '0;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_op_e ops [8] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_PASSA, ALU_PASSB, ALU_MUL};
    cfg_bus = '0; ptr = 0; en = 0; side_in = '0; exp_out = '0;
    for (int i = 0; i < 8; i++) rf[i] = '0;
    #12 rst_n = 1;
    for (int k = 0; k < C; k++) begin
      ctx[k] = pe_cfg_t'({$urandom, $urandom});
      ctx[k].alu_op = ops[$urandom % 8];
      @(negedge clk);
      cfg_bus.valid = 1;
      cfg_bus.w = mk_word(K_PE, 8'b0000_0100, 8'b0000_0001, k, DATA_W'(ctx[k]));
    end
    @(negedge clk);
    cfg_bus.valid = 0;
    for (int i = 0; i < 2000; i++) begin
      pe_cfg_t k;
      logic [3:0][G-1:0] p;
      logic [G-1:0] rq, sx, sy, a, b, ay, rd;
      @(negedge clk);
      ptr = 2'($urandom);
      en  = ($urandom % 5) != 0;
      for (int s = 0; s < 4; s++) for (int t = 0; t < 2*W; t++) side_in[s][t] = G'($urandom);
      k = ctx[ptr];
      for (int s = 0; s < 4; s++) p[s] = side_in[s][k.in_sel[s]];
      rq = rf[k.rf_raddr];
      sx = (k.smu_src == 0) ? rq : p[int'(k.smu_src) - 1];
      sy = m_smu(k, sx);
      a  = (k.alu_a == 0) ? sy : (k.alu_a == 1) ? rq : p[int'(k.alu_a) - 2];
      b  = (k.alu_b == 0) ? sy : (k.alu_b == 1) ? rq : p[int'(k.alu_b) - 2];
      ay = m_alu(k.alu_op, a, b);
      rd = (k.rf_src == 0) ? ay : p[int'(k.rf_src) - 1];
      @(posedge clk);
      if (en) begin
        if (k.rf_we) rf[k.rf_waddr] = rd;
        for (int j = 0; j < 4; j++)
          case (k.out_sel[j])
            2'd0: exp_out[j] = ay;
            2'd1: exp_out[j] = sy;
            2'd2: exp_out[j] = rq;
            default: exp_out[j] = p[j];
          endcase
      end
      #1;
      checks++;
      if (corner_out !== exp_out) begin
        failures++;
        if (failures < 10) $display("cycle %0d ctx %0d: out %h exp %h", i, ptr, corner_out, exp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
