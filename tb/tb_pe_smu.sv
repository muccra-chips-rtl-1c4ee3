// tb_pe_smu: random self-check of the Shift & Mask Unit (all shift kinds,
// shift amounts and mask lengths) against a bit-by-bit reference model.
module tb_pe_smu;
  import muccra_pkg::*;
  localparam int unsigned G = 24;
  smu_op_e      op;
  logic [4:0]   shamt, mlen;
  logic [G-1:0] x, y, e;
  int checks = 0, failures = 0;

  pe_smu #(.G(G)) dut (.op, .shamt, .mlen, .x, .y);

  function automatic logic [G-1:0] model(smu_op_e o, int s, int m, logic [G-1:0] v);
    logic [G-1:0] r;
    for (int i = 0; i < G; i++) begin
      int src;
      case (o)
        SMU_SLL: begin src = i - s; r[i] = (src >= 0) ? v[src] : 1'b0; end
        SMU_SRL: begin src = i + s; r[i] = (src < G) ? v[src] : 1'b0; end
        SMU_SRA: begin src = i + s; r[i] = (src < G) ? v[src] : v[G-1]; end
        default: begin src = ((i - (s % G)) + G) % G; r[i] = v[src]; end
      endcase
      if (m != 0 && m < G && i >= m) r[i] = 1'b0;
    end
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      op    = smu_op_e'(2'(i % 4));
      shamt = 5'($urandom);
      mlen  = (i % 3 == 0) ? 5'd0 : 5'($urandom);
      x     = G'($urandom);
      #1;
      e = model(op, int'(shamt), int'(mlen), x);
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("SMU mismatch op=%0d s=%0d m=%0d x=%h y=%h exp=%h", op, shamt, mlen, x, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
