// tb_dma_ctrl: the DMA controller between a bus model and a slow consumer in
// another clock domain. The bus model grants requests after a random delay
// and returns four beats whose data encode their address. Checks register
// read-back, that the consumer receives buffer 0 then buffer 1 then buffer 0
// again word by word, the interrupt and status flip at each buffer end and
// the interrupt clearing on a status read, that the FIFO never holds more
// than its depth (requests stop at the programmed-full level), and that a
// refused request switches the controller off.
module tb_dma_ctrl;
  import soc_pkg::*;
  localparam int DEPTH = 16;
  localparam logic [ADDR_W-1:0] B0 = 29'h0000_1000, B1 = 29'h0000_8000;
  localparam int LEN0 = 96, LEN1 = 64;   // bytes
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, dev_clk = 0;
  always #4 clk = !clk;
  always #13 dev_clk = !dev_clk;
  bus_t bus = BUS_IDLE, drv;
  logic t_cmd = 0, t_we = 0, t_ready, m_req, m_gnt = 0, m_err = 0, irq;
  logic [ADDR_W-1:0] m_addr;
  logic dev_rd_en = 0, dev_empty;
  logic [63:0] dev_data;
  dma_ctrl #(.FIFO_DEPTH(DEPTH)) dut (.*, .dev_rst(rst));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [63:0] mem(logic [ADDR_W-1:0] a);
    return {3'b0, a, 3'b0, ~a};
  endfunction

  bit refuse = 0;
  int bursts = 0, in_fifo_max = 0;
  semaphore bus_lock = new(1);

  task automatic reg_wr(int r, logic [ADDR_W-1:0] v);
    bus_lock.get();
    @(negedge clk); t_cmd = 1; t_we = 1; bus.addr = IO_BASE + ADDR_W'(8 * r); bus.data = 64'(v);
    @(negedge clk); t_cmd = 0; t_we = 0;
    bus_lock.put();
  endtask
  task automatic reg_rd(int r, output logic [63:0] v);
    bus_lock.get();
    @(negedge clk); t_cmd = 1; bus.addr = IO_BASE + ADDR_W'(8 * r);
    @(negedge clk); t_cmd = 0;
    v = drv.data;
    check(drv.valid, "register reply");
    bus_lock.put();
  endtask

  // bus model for the DMA master port
  initial begin
    forever begin
      @(negedge clk);
      if (m_req) begin
        logic [ADDR_W-1:0] a;
        repeat ($urandom % 4) @(negedge clk);
        bus_lock.get();
        a = m_addr;
        check(a[4:0] == 0, "burst address aligned");
        if (refuse) begin
          m_err = 1; @(negedge clk); m_err = 0;
        end else begin
          m_gnt = 1; @(negedge clk); m_gnt = 0;
          for (int k = 0; k < 4; k++) begin
            repeat ($urandom % 2) @(negedge clk);
            bus.valid = 1; bus.data = mem(a + ADDR_W'(8 * k)); bus.addr = a + ADDR_W'(8 * k);
            @(negedge clk); bus.valid = 0;
          end
          bursts++;
        end
        bus_lock.put();
      end
    end
  end
  always @(posedge clk) if (!rst && dut.fifo_count > in_fifo_max) in_fifo_max = dut.fifo_count;

  // consumer
  logic [ADDR_W-1:0] expect_a;
  int nwords = 0, irqs = 0;
  bit consume = 0;
  initial begin
    expect_a = B0;
    forever begin
      @(negedge dev_clk);
      dev_rd_en = 0;
      if (consume && !dev_empty && $urandom % 3 == 0) begin
        check(dev_data == mem(expect_a), $sformatf("word %0d: %h, expected address %h", nwords, dev_data, expect_a));
        dev_rd_en = 1;
        @(posedge dev_clk); #1 dev_rd_en = 0;
        nwords++;
        expect_a += 8;
        if (expect_a == B0 + LEN0) expect_a = B1;
        else if (expect_a == B1 + LEN1) expect_a = B0;
      end
    end
  end

  initial begin
    logic [63:0] v;
    repeat (3) @(negedge clk);
    rst = 0;
    reg_wr(0, B0); reg_wr(1, B0 + LEN0); reg_wr(2, B1); reg_wr(3, B1 + LEN1);
    reg_rd(0, v); check(v == 64'(B0), "buffer 0 start read back");
    reg_rd(3, v); check(v == 64'(B1 + LEN1), "buffer 1 end read back");
    reg_wr(4, 1);
    repeat (400) @(negedge clk);
    check(bursts == DEPTH / 4, $sformatf("%0d bursts fill the FIFO and then stop", bursts));
    check(in_fifo_max <= DEPTH, "FIFO never overfilled");
    consume = 1;
    for (int n = 0; n < 4; n++) begin
      wait (irq);
      irqs++;
      reg_rd(5, v);
      check(v[0] == 1'((n + 1) % 2), $sformatf("status %0d after buffer end %0d", v[0], n));
      @(negedge clk);
      check(!irq, "status read clears the interrupt");
    end
    wait (nwords >= 2 * (LEN0 + LEN1) / 8);
    refuse = 1;
    repeat (400) @(negedge clk);
    reg_rd(4, v);
    check(v[0] == 0, "a refused request switches the controller off");
    check(nwords >= 2 * (LEN0 + LEN1) / 8, "consumer received two rounds of both buffers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #500000;
    $display("FAIL: watchdog (words %0d, irqs %0d, bursts %0d)", nwords, irqs, bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
