// tb_ps2_kbd: sends PS/2 frames (start bit, eight data bits LSB first, odd
// parity, stop bit; data changes while the device clock is high) and reads the
// key register over the bus. Checks the received code, the interrupt line,
// that a read clears it, and that a frame with bad parity sets the error bit
// and raises no key.
module tb_ps2_kbd;
  import soc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #4 clk = !clk;
  logic ps2_clk = 1, ps2_data = 1;
  bus_t bus = BUS_IDLE, drv;
  logic t_cmd = 0, t_we = 0, t_ready, irq;
  ps2_kbd dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic send(logic [7:0] key, bit bad_parity);
    logic [10:0] fr;
    fr = {1'b1, (~^key) ^ bad_parity, key, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = fr[i];
      #400 ps2_clk = 0;
      #400 ps2_clk = 1;
    end
    #400;
  endtask
  task automatic read(output logic [63:0] d);
    @(negedge clk); t_cmd = 1; bus.addr = IO_BASE + 29'h200;
    @(negedge clk); t_cmd = 0;
    check(drv.valid, "reply one cycle after the command");
    d = drv.data;
  endtask

  initial begin
    logic [63:0] d;
    repeat (3) @(negedge clk);
    rst = 0;
    check(t_ready && !irq, "idle after reset");
    for (int i = 0; i < 20; i++) begin
      logic [7:0] k;
      k = 8'($urandom);
      send(k, 0);
      check(irq, "interrupt after a frame");
      read(d);
      check(d[9:0] == {2'b01, k}, $sformatf("key %h read as %h", k, d[9:0]));
      @(negedge clk);
      check(!irq, "read clears the interrupt");
    end
    send(8'h5A, 1);
    check(!irq, "no key from a bad frame");
    read(d);
    check(d[9:8] == 2'b10, $sformatf("error bit after bad parity (%h)", d[9:0]));
    send(8'h1C, 0);
    read(d);
    check(d[9:0] == 10'h11C, "recovers after an error");
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
