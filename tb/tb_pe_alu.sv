// tb_pe_alu: random self-check of every ALU operation against a reference
// model, for a 24-bit ALU with the multiply operation enabled.
module tb_pe_alu;
  import muccra_pkg::*;
  localparam int unsigned G = 24;
  alu_op_e      op;
  logic [G-1:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  pe_alu #(.G(G), .HAS_MUL(1'b1)) dut (.op, .a, .b, .y);

  function automatic logic [G-1:0] model(alu_op_e o, logic [G-1:0] x, logic [G-1:0] z);
    longint unsigned ux = x, uz = z;
    longint sx = longint'($signed(x)), sz = longint'($signed(z));
    case (o)
      ALU_PASSA: return x;
      ALU_ADD:   return G'(ux + uz);
      ALU_SUB:   return G'(ux - uz);
      ALU_AND:   return x & z;
      ALU_OR:    return x | z;
      ALU_XOR:   return x ^ z;
      ALU_NOTA:  return ~x;
      ALU_LTU:   return (ux < uz) ? G'(1) : G'(0);
      ALU_LTS:   return (sx < sz) ? G'(1) : G'(0);
      ALU_EQ:    return (ux == uz) ? G'(1) : G'(0);
      ALU_MINU:  return (ux < uz) ? x : z;
      ALU_MAXU:  return (ux < uz) ? z : x;
      ALU_MUL:   return G'(ux * uz);
      ALU_PASSB: return z;
      default:   return '0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      op = alu_op_e'(4'(i % 14));
      a  = G'($urandom);
      b  = (i % 7 == 0) ? a : G'($urandom);
      if (i % 11 == 0) a = {1'b1, a[G-2:0]};
      #1;
      exp_y = model(op, a, b);
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("ALU mismatch op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
