// tb_mig_ctrl: the DDR2 bridge between a bus driver (acting as the arbiter
// would) and the behavioural memory-controller model. Random burst and single
// reads and writes with gaps between write beats; checks that every read
// beat returns the memory contents, that writes land in memory (a single
// write changes only its own 64-bit word), that each transaction issues
// exactly one address command with the read/write codes 1/0, that a line
// write takes two 128-bit data writes, and that t_ready is low until the
// memory has finished initialising.
`timescale 1ns/1ps
module tb_mig_ctrl;
  import soc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #4 clk = !clk;
  bus_t bus = BUS_IDLE, drv;
  logic t_cmd = 0, t_we = 0, t_burst = 0, t_ready;
  logic phy_init_done, af_wren, af_afull, wdf_wren, wdf_afull, rd_valid;
  logic [2:0] af_cmd;
  logic [30:0] af_addr;
  logic [127:0] wdf_data, rd_data;
  logic [15:0] wdf_mask;
  mig_ctrl dut (
    .clk(clk), .rst(rst), .bus(bus), .t_cmd(t_cmd), .t_we(t_we), .t_burst(t_burst),
    .t_ready(t_ready), .drv(drv), .phy_init_done(phy_init_done), .app_af_cmd(af_cmd),
    .app_af_addr(af_addr), .app_af_wren(af_wren), .app_af_afull(af_afull),
    .app_wdf_data(wdf_data), .app_wdf_mask_data(wdf_mask), .app_wdf_wren(wdf_wren),
    .app_wdf_afull(wdf_afull), .rd_data_valid(rd_valid), .rd_data_fifo_out(rd_data));
  mig_model #(.INIT_CYCLES(40)) u_mem (
    .clk(clk), .rst(rst), .phy_init_done(phy_init_done), .app_af_cmd(af_cmd),
    .app_af_addr(af_addr), .app_af_wren(af_wren), .app_af_afull(af_afull),
    .app_wdf_data(wdf_data), .app_wdf_mask_data(wdf_mask), .app_wdf_wren(wdf_wren),
    .app_wdf_afull(wdf_afull), .rd_data_valid(rd_valid), .rd_data_fifo_out(rd_data));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_rd_cmd = 0, n_wr_cmd = 0, n_wdf = 0, n_bad_cmd = 0;
  always @(posedge clk) begin
    if (af_wren && !rst) begin
      if (af_cmd == 3'b001) n_rd_cmd++;
      else if (af_cmd == 3'b000) n_wr_cmd++;
      else n_bad_cmd++;
    end
    if (wdf_wren && !rst) n_wdf++;
  end

  logic [63:0] shadow [int unsigned];   // expected memory, by byte address / 8
  function automatic logic [63:0] sh(logic [ADDR_W-1:0] a);
    return shadow.exists(a[28:3]) ? shadow[a[28:3]] : 64'h0;
  endfunction

  task automatic wait_ready();
    @(negedge clk);
    while (!t_ready) @(negedge clk);
  endtask

  task automatic do_read(logic [ADDR_W-1:0] a, bit burst);
    int nb, k, w;
    int r0;
    r0 = n_rd_cmd;
    wait_ready();
    bus.addr = a; t_cmd = 1; t_we = 0; t_burst = burst;
    @(negedge clk); t_cmd = 0; bus = BUS_IDLE;
    nb = burst ? 4 : 1;
    k = 0; w = 0;
    while (k < nb && w < 100) begin
      if (drv.valid) begin
        check(drv.data == sh(a + ADDR_W'(8 * k)), $sformatf("read %h beat %0d: %h, expected %h",
              a, k, drv.data, sh(a + ADDR_W'(8 * k))));
        k++;
      end
      w++;
      @(negedge clk);
    end
    check(k == nb, "all read beats returned");
    check(n_rd_cmd == r0 + 1, "one read command per read");
  endtask

  task automatic do_write(logic [ADDR_W-1:0] a, bit burst);
    int nb, w0, d0;
    w0 = n_wr_cmd; d0 = n_wdf;
    wait_ready();
    nb = burst ? 4 : 1;
    for (int k = 0; k < nb; k++) begin
      logic [63:0] d;
      d = {$urandom, $urandom};
      shadow[(a + ADDR_W'(8 * k)) >> 3] = d;
      bus = '{addr: a + ADDR_W'(8 * k), data: d, valid: 1'b1};
      t_cmd = k == 0; t_we = 1; t_burst = burst;
      @(negedge clk);
      t_cmd = 0; bus = BUS_IDLE;
      repeat ($urandom % 2) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    check(n_wr_cmd == w0 + 1, "one write command per write");
    check(n_wdf == d0 + 2, $sformatf("two data writes per line (%0d)", n_wdf - d0));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!t_ready, "not ready while memory initialises");
    for (int i = 0; i < 64; i++) begin
      logic [63:0] d;
      d = {$urandom, $urandom};
      u_mem.poke64(i * 8, d);
      shadow[i] = d;
    end
    for (int n = 0; n < 300; n++) begin
      logic [ADDR_W-1:0] a;
      a = ADDR_W'(($urandom % 64) * 8);
      case ($urandom % 4)
        0: do_read(a & ~29'h1F, 1);
        1: do_read(a, 0);
        2: do_write(a & ~29'h1F, 1);
        default: do_write(a, 0);
      endcase
    end
    for (int i = 0; i < 64; i++)
      check(u_mem.peek64(i * 8) == shadow[i], $sformatf("memory word %0d", i));
    check(n_bad_cmd == 0, "no command codes other than read and write");
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
