// mips_alu: the integer arithmetic-logic unit of the EX stage.
//
// Purely combinational. `a` and `b` are the two operands after forwarding;
// for shifts `a` carries the shift amount (from the shamt field or rs) and
// `b` the value shifted, for LUI `b` carries the immediate. `ovf` flags signed
// two's-complement overflow of ADD/SUB; the pipeline turns it into an overflow
// exception only for the trapping instructions (add, addi, sub).
module mips_alu
  import mips_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        ovf
);
  logic [31:0] sum, diff;
  assign sum  = a + b;
  assign diff = a - b;

  always_comb begin
    ovf = 1'b0;
    unique case (op)
      ALU_ADD:  begin y = sum;  ovf = (a[31] == b[31]) && (sum[31] != a[31]); end
      ALU_SUB:  begin y = diff; ovf = (a[31] != b[31]) && (diff[31] != a[31]); end
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'b0, a < b};
      ALU_SLL:  y = b << a[4:0];
      ALU_SRL:  y = b >> a[4:0];
      ALU_SRA:  y = 32'($signed(b) >>> a[4:0]);
      ALU_LUI:  y = {b[15:0], 16'b0};
      default:  y = '0;
    endcase
  end
endmodule
