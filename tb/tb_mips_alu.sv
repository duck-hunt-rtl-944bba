// tb_mips_alu: drives every ALU operation with random and corner-case
// operands and compares result and overflow flag with a reference computed
// here from the MIPS instruction definitions.
module tb_mips_alu;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op;
  logic [31:0] a, b, y;
  logic ovf;
  mips_alu dut (.op(op), .a(a), .b(b), .y(y), .ovf(ovf));

  function automatic logic [32:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z);
    logic signed [32:0] s;
    case (o)
      ALU_ADD:  begin s = 33'($signed(x)) + 33'($signed(z)); return {s[32] != s[31], s[31:0]}; end
      ALU_SUB:  begin s = 33'($signed(x)) - 33'($signed(z)); return {s[32] != s[31], s[31:0]}; end
      ALU_AND:  return {1'b0, x & z};
      ALU_OR:   return {1'b0, x | z};
      ALU_XOR:  return {1'b0, x ^ z};
      ALU_NOR:  return {1'b0, ~(x | z)};
      ALU_SLT:  return {1'b0, 31'b0, $signed(x) < $signed(z)};
      ALU_SLTU: return {1'b0, 31'b0, x < z};
      ALU_SLL:  return {1'b0, z << x[4:0]};
      ALU_SRL:  return {1'b0, z >> x[4:0]};
      ALU_SRA:  begin
        logic [31:0] r;
        r = z;
        for (int i = 0; i < 32; i++) if (i < int'(x[4:0])) r = {z[31], r[31:1]};
        return {1'b0, r};
      end
      ALU_LUI:  return {1'b0, z[15:0], 16'b0};
      default:  return '0;
    endcase
  endfunction

  localparam logic [31:0] CORNER [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h8000_0001};

  initial begin
    for (int o = 0; o <= int'(ALU_LUI); o++) begin
      for (int i = 0; i < 400 + 36; i++) begin
        op = alu_op_e'(o);
        if (i < 36) begin a = CORNER[i % 6]; b = CORNER[i / 6]; end
        else begin a = $urandom; b = $urandom; end
        #1;
        checks++;
        if ({ovf, y} != ref_alu(op, a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL: %s %h %h -> %h ovf %b", op.name(), a, b, y, ovf);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
