// tb_zapper: pulls the light-gun trigger with and without light at the sensor
// and reads the gun register over the bus. Checks the trigger and hit flags,
// the interrupt, that a read clears both, and that light without a trigger
// pull records nothing.
module tb_zapper;
  import soc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #4 clk = !clk;
  logic trigger_n = 1, light = 0;
  bus_t bus = BUS_IDLE, drv;
  logic t_cmd = 0, t_we = 0, t_ready, irq;
  zapper dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic read(output logic [1:0] d);
    @(negedge clk); t_cmd = 1; bus.addr = IO_BASE + 29'h300;
    @(negedge clk); t_cmd = 0;
    check(drv.valid, "reply one cycle after the command");
    d = drv.data[1:0];
  endtask

  initial begin
    logic [1:0] d;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    check(!irq, "no interrupt after reset");
    // light alone
    light = 1; repeat (10) @(negedge clk); light = 0;
    read(d);
    check(d == 2'b00 && !irq, "light without trigger ignored");
    // trigger, no light
    trigger_n = 0; repeat (10) @(negedge clk); trigger_n = 1;
    check(irq, "trigger raises the interrupt");
    read(d);
    check(d == 2'b01, $sformatf("trigger without hit reads %b", d));
    @(negedge clk);
    check(!irq, "read clears the interrupt");
    // trigger, then light
    for (int i = 0; i < 10; i++) begin
      trigger_n = 0; repeat (5) @(negedge clk);
      repeat ($urandom % 20) @(negedge clk);
      light = 1; repeat (5) @(negedge clk); light = 0; trigger_n = 1;
      repeat (5) @(negedge clk);
      read(d);
      check(d == 2'b11, $sformatf("trigger with hit reads %b", d));
      read(d);
      check(d == 2'b00, "flags cleared by the read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
