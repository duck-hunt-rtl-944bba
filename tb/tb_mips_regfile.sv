// tb_mips_regfile: random writes and two random reads per cycle against a
// reference array. Checks that register 0 always reads zero and that a read
// of the register being written in the same cycle returns the new value.
module tb_mips_regfile;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = !clk;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic we;
  logic [31:0] model [32];
  mips_regfile dut (.clk(clk), .ra1(ra1), .ra2(ra2), .rd1(rd1), .rd2(rd2), .we(we), .wa(wa), .wd(wd));

  function automatic logic [31:0] expect_rd(logic [4:0] r);
    if (r == 0) return 0;
    if (we && wa == r) return wd;
    return model[r];
  endfunction

  initial begin
    we = 1;
    for (int r = 0; r < 32; r++) begin
      wa = 5'(r); wd = $urandom; model[r] = (r == 0) ? 0 : wd;
      @(posedge clk); #1;
    end
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = (i % 4 == 0) ? wa : 5'($urandom);
      #1;
      checks += 2;
      if (rd1 != expect_rd(ra1)) begin failures++; $display("FAIL: r%0d = %h", ra1, rd1); end
      if (rd2 != expect_rd(ra2)) begin failures++; $display("FAIL: r%0d = %h", ra2, rd2); end
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      #1;
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
