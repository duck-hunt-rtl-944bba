// tb_boot_rom: fills the ROM array with a pattern, then issues single and
// four-beat burst reads as the bus arbiter would. Checks the data of every
// beat, that a burst starts at the aligned 32-byte line, the two-cycle
// latency from command to first beat, and that t_ready is low while busy.
module tb_boot_rom;
  import soc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #4 clk = !clk;
  bus_t bus = BUS_IDLE, drv;
  logic t_cmd = 0, t_burst = 0, t_ready;
  boot_rom #(.WORDS(256)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [63:0] pat(int i);
    return {32'(i) ^ 32'hA5A5_0000, ~32'(i)};
  endfunction

  task automatic read(int word, bit burst);
    int lat = 0, beat = 0, first;
    @(negedge clk);
    bus.addr = ROM_BASE[ADDR_W-1:0] + ADDR_W'(word * 8);
    t_cmd = 1; t_burst = burst;
    @(negedge clk);
    t_cmd = 0;
    check(!t_ready, "busy after a command");
    first = burst ? (word & ~3) : word;
    while (beat < (burst ? 4 : 1)) begin
      lat++;
      if (drv.valid) begin
        check(drv.data == pat(first + beat), $sformatf("beat %0d of word %0d: %h", beat, word, drv.data));
        if (beat == 0) check(lat == 2, $sformatf("first beat after %0d cycles", lat));
        beat++;
      end
      check(lat < 10, "beat arrives");
      if (lat >= 10) break;
      @(negedge clk);
    end
    @(negedge clk);
    check(!drv.valid && t_ready, "idle after the transfer");
  endtask

  initial begin
    for (int i = 0; i < 256; i++) dut.mem[i] = pat(i);
    repeat (3) @(negedge clk);
    rst = 0;
    check(t_ready && !drv.valid, "ready after reset");
    for (int i = 0; i < 60; i++) read($urandom % 256, i % 2 == 0);
    read(255, 0);
    read(7, 1);
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
