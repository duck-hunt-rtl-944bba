// tb_mips_muldiv: random signed and unsigned multiplies and divides, plus
// divide-by-zero and the most negative dividend. Checks HI/LO against
// reference arithmetic, that a multiply completes in one cycle, that a
// divide keeps busy for exactly 32 cycles, and the MTHI/MTLO writes.
module tb_mips_muldiv;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic start = 0, wr_hi = 0, wr_lo = 0, busy;
  md_op_e op = MD_MULT;
  logic [31:0] a = 0, b = 0, wdata = 0, hi, lo;
  mips_muldiv dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [63:0] ref_md(md_op_e o, logic [31:0] x, logic [31:0] y);
    case (o)
      MD_MULT:  return 64'($signed(x) * $signed(y));
      MD_MULTU: return 64'(64'(x) * 64'(y));
      MD_DIV:   if (y == 0) return {x, 32'hFFFF_FFFF};
                else if (x == 32'h8000_0000 && y == 32'hFFFF_FFFF) return {32'h0, 32'h8000_0000};
                else return {32'($signed(x) % $signed(y)), 32'($signed(x) / $signed(y))};
      default:  if (y == 0) return {x, 32'hFFFF_FFFF};
                else return {x % y, x / y};
    endcase
  endfunction

  task automatic run(md_op_e o, logic [31:0] x, logic [31:0] y);
    int cyc = 0;
    @(negedge clk); op = o; a = x; b = y; start = 1;
    @(negedge clk); start = 0;
    while (busy) begin cyc++; @(negedge clk); end
    check({hi, lo} == ref_md(o, x, y), $sformatf("%s %h %h -> %h:%h", o.name(), x, y, hi, lo));
    if ((o == MD_DIV || o == MD_DIVU) && y != 0) check(cyc == 32, $sformatf("divide took %0d cycles", cyc));
    else check(cyc == 0, "multiply in one cycle");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(MD_DIV, 32'h8000_0000, 32'hFFFF_FFFF);
    run(MD_DIV, 32'd100, 32'd0);
    run(MD_DIVU, 32'd7, 32'd0);
    run(MD_DIV, -32'd17, 32'd5);
    run(MD_DIV, 32'd17, -32'd5);
    for (int i = 0; i < 400; i++)
      run(md_op_e'(i % 4), $urandom, (i % 8 < 4) ? $urandom : $urandom % 1000);
    @(negedge clk); wdata = 32'h1234_5678; wr_hi = 1;
    @(negedge clk); wr_hi = 0; wdata = 32'h9ABC_DEF0; wr_lo = 1;
    @(negedge clk); wr_lo = 0;
    check(hi == 32'h1234_5678 && lo == 32'h9ABC_DEF0, "MTHI/MTLO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
