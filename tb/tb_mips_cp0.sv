// tb_mips_cp0: exercises the system coprocessor on its own: reset values,
// Status writes, Count/Compare timer interrupt and its clearing, hardware
// interrupt masking, exception entry (EPC, Cause code, branch-delay bit,
// BadVAddr, EXL) and ERET; then random Status/Cause/line combinations
// against a model of the pending rule, and MTC0 writes of EPC and Count.
module tb_mips_cp0;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic [4:0] rd_addr = 0, wr_addr = 0, exc_code = 0, hw_irq = 0;
  logic [31:0] rd_data, wr_data = 0, exc_epc = 0, exc_badvaddr = 0, epc, exc_vector;
  logic we = 0, exc = 0, exc_bd = 0, exc_badv_we = 0, eret = 0, irq_pending, timer_irq;
  mips_cp0 dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [31:0] rv;
  task automatic rdv(logic [4:0] r);
    rd_addr = r; #1; rv = rd_data;
  endtask
  task automatic wr(logic [4:0] r, logic [31:0] v);
    @(negedge clk); we = 1; wr_addr = r; wr_data = v;
    @(negedge clk); we = 0;
  endtask

  initial begin
    logic [31:0] c0, c1;
    repeat (2) @(negedge clk);
    rst = 0;
    rdv(CP0_STATUS); check(rv == 32'h0040_0000, "Status after reset: BEV set, interrupts off");
    check(exc_vector == 32'hBFC0_0380, "boot exception vector");
    rdv(CP0_COUNT); c0 = rv;
    repeat (10) @(negedge clk);
    rdv(CP0_COUNT); c1 = rv;
    check(c1 - c0 == 10, $sformatf("Count advances once a cycle (%0d)", c1 - c0));
    // hardware interrupt 2 with IE set but masked, then unmasked
    wr(CP0_STATUS, 32'h0040_0001);
    hw_irq = 5'b00100; #1;
    check(!irq_pending, "masked interrupt not pending");
    rdv(CP0_CAUSE); check(rv == 32'h0000_1000, "Cause.IP4 shows hardware line 2");
    wr(CP0_STATUS, 32'h0040_1001); #1;
    check(irq_pending, "unmasked interrupt pending");
    hw_irq = 0;
    // timer
    rdv(CP0_COUNT); c0 = rv;
    wr(CP0_COMPARE, c0 + 20);
    wr(CP0_STATUS, 32'h0040_8001);
    check(!timer_irq, "timer quiet before Compare");
    repeat (25) @(negedge clk);
    check(timer_irq && irq_pending, "timer interrupt after Count reaches Compare");
    wr(CP0_COMPARE, c0 + 1000);
    check(!timer_irq, "writing Compare clears the timer interrupt");
    // exception entry
    @(negedge clk); exc = 1; exc_code = EXC_ADEL; exc_epc = 32'hBFC0_0040; exc_bd = 1;
    exc_badv_we = 1; exc_badvaddr = 32'hB000_0000;
    @(negedge clk); exc = 0; exc_badv_we = 0;
    rdv(CP0_EPC); check(epc == 32'hBFC0_0040 && rv == 32'hBFC0_0040, "EPC written");
    rdv(CP0_CAUSE); check(rv == {1'b1, 24'b0, EXC_ADEL, 2'b0} , $sformatf("Cause %h", rv));
    rdv(CP0_BADVADDR); check(rv == 32'hB000_0000, "BadVAddr written");
    rdv(CP0_STATUS); check(rv == 32'h0040_8003, "EXL set");
    wr(CP0_STATUS, 32'h0040_FF03);
    hw_irq = 5'b00100; #1;
    check(!irq_pending, "EXL blocks interrupts");
    @(negedge clk); eret = 1;
    @(negedge clk); eret = 0;
    rdv(CP0_STATUS); check(rv == 32'h0040_FF01, "ERET clears EXL");
    check(irq_pending, "interrupt pending again after ERET");
    hw_irq = 0;
    wr(CP0_STATUS, 32'h0000_0000);
    check(exc_vector == 32'h8000_0180, "normal exception vector");
    rdv(CP0_PRID); check(rv != 0, "PRId readable");
    // random Status / software-IP / hardware-line combinations against a
    // model of the pending rule: IE and not EXL and any IP bit under IM
    wr(CP0_COMPARE, 32'hFFFF_0000);
    for (int i = 0; i < 300; i++) begin
      logic [7:0] im_r, ip_exp;
      logic [1:0] sw_r;
      logic [4:0] hw_r;
      logic ie_r, exl_r;
      im_r = 8'($urandom); sw_r = 2'($urandom); hw_r = 5'($urandom);
      ie_r = 1'($urandom); exl_r = ($urandom % 4) == 0;
      wr(CP0_STATUS, {9'b0, 1'b1, 6'b0, im_r, 6'b0, exl_r, ie_r});
      wr(CP0_CAUSE, {22'b0, sw_r, 8'b0});
      hw_irq = hw_r; #1;
      ip_exp = {1'b0, hw_r, sw_r};
      check(irq_pending == (ie_r && !exl_r && |(ip_exp & im_r)),
            $sformatf("pending with IE %b EXL %b IM %h IP %h", ie_r, exl_r, im_r, ip_exp));
      rdv(CP0_CAUSE); check(rv[15:8] == ip_exp, $sformatf("Cause.IP %h, expected %h", rv[15:8], ip_exp));
      rdv(CP0_STATUS); check(rv == {9'b0, 1'b1, 6'b0, im_r, 6'b0, exl_r, ie_r}, "Status read-back");
    end
    hw_irq = 0;
    // EPC and Count are writable by MTC0
    for (int i = 0; i < 50; i++) begin
      logic [31:0] v;
      v = $urandom;
      wr(CP0_EPC, v); rdv(CP0_EPC); check(rv == v && epc == v, "EPC write/read-back");
      v = $urandom & 32'h7FFF_FFFF;
      wr(CP0_COUNT, v); rdv(CP0_COUNT); check(rv == v, "Count write/read-back");
      @(negedge clk); rdv(CP0_COUNT); check(rv == v + 1, "Count counts on from the written value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
