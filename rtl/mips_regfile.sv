// mips_regfile: the 32 x 32-bit general register file of the MIPS core.
//
// Two combinational read ports (ID stage) and one write port (WB stage),
// written on the rising clock edge. Register $0 always reads zero. A read of
// the register being written in the same cycle returns the new value, so the
// WB stage needs no separate bypass into ID.
module mips_regfile (
  input  logic        clk,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  output logic [31:0] rd1,
  output logic [31:0] rd2,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd
);
  logic [31:0] regs [32];

  always_ff @(posedge clk) begin
    if (we && wa != 5'd0) regs[wa] <= wd;
  end

  always_comb begin
    rd1 = (ra1 == 5'd0) ? '0 : (we && wa == ra1) ? wd : regs[ra1];
    rd2 = (ra2 == 5'd0) ? '0 : (we && wa == ra2) ? wd : regs[ra2];
  end
endmodule
