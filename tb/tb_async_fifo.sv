// tb_async_fifo: writes a random stream from one clock domain and reads it in
// another of unrelated period, with random stalls on both sides. Checks data
// order, that nothing is lost or duplicated, that full and prog_full rise at
// the configured fill levels, and that empty is raised when drained.
module tb_async_fifo;
  localparam int DEPTH = 16, PF = DEPTH - 4;
  int checks = 0, failures = 0;
  logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
  always #4 wclk = !wclk;
  always #7 rclk = !rclk;
  logic wr_en = 0, rd_en = 0, full, prog_full, empty;
  logic [15:0] din = 0, dout;
  logic [$clog2(DEPTH):0] wr_count;
  async_fifo #(.WIDTH(16), .DEPTH(DEPTH), .PROG_FULL(PF)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] q[$];
  int n_written = 0, n_read = 0;
  bit reading = 0;
  localparam int TOTAL = 2000;

  // writer
  initial begin
    repeat (4) @(posedge wclk);
    wrst = 0;
    @(negedge wclk);
    // fill until full with the reader stopped
    while (!full) begin
      wr_en = 1; din = 16'($urandom);
      @(posedge wclk); q.push_back(din); n_written++;
      @(negedge wclk);
      wr_en = 0;
      #0;
      if (n_written == PF + 1) check(prog_full, "prog_full above the programmed level");
      if (n_written == PF) check(!prog_full, "prog_full not yet at the level");
    end
    check(n_written == DEPTH, $sformatf("full after %0d writes", n_written));
    check(wr_count == DEPTH, "write count at full");
    reading = 1;
    while (n_written < TOTAL) begin
      @(negedge wclk);
      wr_en = 0;
      if (!full && ($urandom % 3 != 0)) begin
        wr_en = 1; din = 16'($urandom);
        @(posedge wclk); q.push_back(din); n_written++;
        #1 wr_en = 0;
      end
    end
    wr_en = 0;
  end

  // reader
  initial begin
    repeat (4) @(posedge rclk);
    rrst = 0;
    wait (reading);
    while (n_read < TOTAL) begin
      @(negedge rclk);
      rd_en = 0;
      if (!empty && ($urandom % 4 != 0)) begin
        checks++;
        if (q.size() == 0 || dout != q[0]) begin
          failures++;
          $display("FAIL: read %0d got %h", n_read, dout);
        end
        if (q.size() != 0) void'(q.pop_front());
        rd_en = 1;
        @(posedge rclk); n_read++;
        #1 rd_en = 0;
      end
    end
    repeat (6) @(posedge rclk);
    check(empty, "empty after draining");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    $display("FAIL: watchdog (written %0d read %0d)", n_written, n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
