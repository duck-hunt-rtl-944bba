// tb_soc_top: end-to-end test of the whole system at a reduced video size.
//
// The boot ROM is loaded with the test program of tb_prog_pkg; DDR2 is the
// behavioural controller model. The program runs through the adapter, the
// bus and the memory controller, handles a syscall, an overflow, a bus error,
// a timer interrupt and a keyboard interrupt (the bench sends a PS/2 key once
// the program rings its doorbell), reads the light gun (trigger pulled and
// light seen beforehand), and finally starts both DMA controllers. The bench
// then checks every result word in memory, the first two video frames pixel
// by pixel against the frame buffers (and that no pixel lacked data), the
// first audio samples and the codec set-up commands on the AC-link, and the
// I2C set-up bytes of the DVI chip.
// It also counts how often each pipeline, bus and DMA mechanism occurred and
// fails any that never did.
`timescale 1ns/1ps
module tb_soc_top;
  import tb_prog_pkg::*;

  localparam int H_ACT = 16, V_ACT = 4;
  localparam int FRAME_BYTES = H_ACT * V_ACT;
  localparam int AC_BYTES = 32;
  localparam logic [31:0] DVI_B0 = 32'h2000, DVI_B1 = 32'h3000;
  localparam logic [31:0] AC_B0 = 32'h4000, AC_B1 = 32'h4100;
  localparam int N_FRAMES_CHECK = 2;
  localparam int N_SAMPLES_CHECK = 48;
  localparam logic [7:0] KEY = 8'h1C;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic clk_core = 0, clk_bus = 0, clk_pix = 0, bit_clk = 0;
  logic rst_bus = 1;
  always #10   clk_core = !clk_core;
  always #4    clk_bus  = !clk_bus;
  always #10.5 clk_pix  = !clk_pix;
  always #41   bit_clk  = !bit_clk;

  logic         phy_init_done, af_wren, af_afull, wdf_wren, wdf_afull, rd_valid;
  logic [2:0]   af_cmd;
  logic [30:0]  af_addr;
  logic [127:0] wdf_data, rd_data;
  logic [15:0]  wdf_mask;
  logic [11:0]  d_rise, d_fall;
  logic         hsync, vsync, de, scl_low, sda_low;
  logic         ac_sync, ac_sdo, ac_reset_n;
  logic         ps2_clk = 1, ps2_data = 1, trig_n = 1, light = 0;

  soc_top #(
    .DVI_H_ACTIVE (H_ACT), .DVI_H_FP (2), .DVI_H_SYNC (2), .DVI_H_BP (2),
    .DVI_V_ACTIVE (V_ACT), .DVI_V_FP (1), .DVI_V_SYNC (1), .DVI_V_BP (1),
    .PIX_CLK_HZ (4_000_000)
  ) dut (
    .clk_core (clk_core), .clk_bus (clk_bus), .clk_pix (clk_pix),
    .ac97_bit_clk (bit_clk), .rst_bus (rst_bus),
    .mig_phy_init_done (phy_init_done), .mig_app_af_cmd (af_cmd),
    .mig_app_af_addr (af_addr), .mig_app_af_wren (af_wren), .mig_app_af_afull (af_afull),
    .mig_app_wdf_data (wdf_data), .mig_app_wdf_mask_data (wdf_mask),
    .mig_app_wdf_wren (wdf_wren), .mig_app_wdf_afull (wdf_afull),
    .mig_rd_data_valid (rd_valid), .mig_rd_data_fifo_out (rd_data),
    .dvi_d_rise (d_rise), .dvi_d_fall (d_fall), .dvi_hsync (hsync), .dvi_vsync (vsync),
    .dvi_de (de), .dvi_scl_low (scl_low), .dvi_sda_low (sda_low), .dvi_sda_in (!sda_low),
    .ac97_sync (ac_sync), .ac97_sdata_out (ac_sdo), .ac97_sdata_in (1'b1),
    .ac97_reset_n (ac_reset_n),
    .ps2_clk (ps2_clk), .ps2_data (ps2_data),
    .gun_trigger_n (trig_n), .gun_light (light)
  );

  mig_model u_ddr (
    .clk (clk_bus), .rst (rst_bus), .phy_init_done (phy_init_done),
    .app_af_cmd (af_cmd), .app_af_addr (af_addr), .app_af_wren (af_wren),
    .app_af_afull (af_afull), .app_wdf_data (wdf_data), .app_wdf_mask_data (wdf_mask),
    .app_wdf_wren (wdf_wren), .app_wdf_afull (wdf_afull),
    .rd_data_valid (rd_valid), .rd_data_fifo_out (rd_data)
  );

  // ------------------------------------------------------------ stimulus data
  function automatic logic [7:0] pix_byte(int buffer, int k);
    return buffer == 0 ? 8'(k * 7 + 3) : 8'(k * 5 + 1);
  endfunction
  function automatic logic [15:0] sample(int n);
    int m;
    m = n % (2 * AC_BYTES / 2);
    return m < AC_BYTES / 2 ? 16'('h1000 + m) : 16'('h2000 + m - AC_BYTES / 2);
  endfunction

  task automatic load_memory();
    build(DVI_B0, DVI_B1, FRAME_BYTES, AC_B0, AC_B1, AC_BYTES);
    for (int i = 0; i < 1024; i++) dut.u_rom.mem[i] = {code[2*i+1], code[2*i]};
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < FRAME_BYTES; k += 8) begin
        logic [63:0] w;
        for (int j = 0; j < 8; j++) w[8*j +: 8] = pix_byte(b, k + j);
        u_ddr.poke64((b == 0 ? DVI_B0 : DVI_B1) + k, w);
      end
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < AC_BYTES; k += 8) begin
        logic [63:0] w;
        for (int j = 0; j < 4; j++) w[16*j +: 16] = sample(b * AC_BYTES / 2 + k / 2 + j);
        u_ddr.poke64((b == 0 ? AC_B0 : AC_B1) + k, w);
      end
    u_ddr.poke64(32'h1000 + D_BELL, 64'hFFFF_FFFF_FFFF_FFFF);
  endtask

  task automatic ps2_send(logic [7:0] key);
    logic [10:0] fr;
    fr = {1'b1, ~^key, key, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = fr[i];
      #1000 ps2_clk = 0;
      #1000 ps2_clk = 1;
    end
    ps2_data = 1;
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_lu, n_fwd, n_squash, n_mdstall, n_int, n_exc, n_conflict, n_buserr;
  int n_burst, n_single, n_rmw, n_dma_switch, n_pfull, n_migw, n_migr;

  always @(posedge clk_core) if (!rst_bus) begin
    if (dut.u_core.advance && dut.u_core.lu_stall) n_lu++;
    if (dut.u_core.advance && dut.u_core.ex_valid && dut.u_core.fwd_mem_ok &&
        (dut.u_core.mem_c.dest == dut.u_core.ex_rs || dut.u_core.mem_c.dest == dut.u_core.ex_rt)) n_fwd++;
    if (dut.u_core.advance && dut.u_core.ex_redirect) n_squash++;
    if (dut.u_core.ex_md_stall) n_mdstall++;
    if (dut.u_core.exc_taken && dut.u_core.wb_code == 5'd0) n_int++;
    if (dut.u_core.exc_taken && dut.u_core.wb_code != 5'd0) n_exc++;
  end
  always @(posedge clk_bus) if (!rst_bus) begin
    if (!$onehot0(dut.m_req)) n_conflict++;
    if (|dut.m_err) n_buserr++;
    if (|dut.m_gnt && dut.u_arb.burst_q) n_burst++;
    if (|dut.m_gnt && !dut.u_arb.burst_q) n_single++;
    if (dut.m_gnt[4]) n_rmw++;
    if (dut.u_dvi_dma.mstate == 2 && dut.bus.valid && dut.u_dvi_dma.beat == 3 &&
        dut.u_dvi_dma.cur + 32 >= dut.u_dvi_dma.buf_end[dut.u_dvi_dma.status]) n_dma_switch++;
    if (dut.u_dvi_dma.fifo_pfull) n_pfull++;
    if (af_wren && af_cmd == 3'b000) n_migw++;
    if (af_wren && af_cmd == 3'b001) n_migr++;
  end

  // ------------------------------------------------------------ DVI monitor
  int pix_n = 0;
  always @(negedge clk_pix) begin
    if (dut.u_dvi.running && de && pix_n < N_FRAMES_CHECK * FRAME_BYTES) begin
      logic [7:0] p, r, g, b;
      int f, k;
      f = pix_n / FRAME_BYTES;
      k = pix_n % FRAME_BYTES;
      p = pix_byte(f % 2, k);
      r = {p[7:5], p[7:5], p[7:6]};
      g = {p[4:2], p[4:2], p[4:3]};
      b = {p[1:0], p[1:0], p[1:0], p[1:0]};
      check(d_rise == {g[3:0], b} && d_fall == {r, g[7:4]},
            $sformatf("pixel %0d of frame %0d: %h/%h", k, f, d_rise, d_fall));
      pix_n++;
    end
  end

  // ------------------------------------------------------------ AC-link monitor
  logic [255:0] acf;
  int ac_bits = -1, smp_n = 0, cmd_n = 0;
  logic prev_sync = 0;
  localparam logic [6:0]  CMD_REG [3] = '{7'h02, 7'h04, 7'h18};
  localparam logic [15:0] CMD_VAL [3] = '{16'h0000, 16'h0000, 16'h0808};
  always @(negedge bit_clk) begin
    if (ac_sync && !prev_sync) ac_bits = 0;
    prev_sync = ac_sync;
    if (ac_bits >= 0) begin
      acf = {acf[254:0], ac_sdo};
      ac_bits++;
      if (ac_bits == 256) begin
        ac_bits = -1;
        if (acf[254]) begin
          check(cmd_n < 3 && acf[253] && acf[238:232] == CMD_REG[cmd_n % 3] &&
                acf[219:204] == CMD_VAL[cmd_n % 3] && !acf[239],
                $sformatf("AC'97 command %0d", cmd_n));
          cmd_n++;
        end
        if (acf[252] && smp_n < N_SAMPLES_CHECK) begin
          check(acf[251] && acf[199:184] == sample(smp_n) && acf[179:164] == sample(smp_n + 1),
                $sformatf("AC'97 samples %0d: %h %h", smp_n, acf[199:184], acf[179:164]));
          smp_n += 2;
        end
      end
    end
  end

  // ------------------------------------------------------------ I2C monitor
  int i2c_bits = 0, i2c_bytes = 0, i2c_starts = 0;
  logic [8:0] i2c_sh;
  logic scl_q = 1, sda_q = 1;
  localparam logic [7:0] I2C_EXP [15] = '{8'hEC, 8'h49, 8'hC0, 8'hEC, 8'h21, 8'h09,
    8'hEC, 8'h33, 8'h08, 8'hEC, 8'h34, 8'h16, 8'hEC, 8'h36, 8'h60};
  always @(posedge clk_pix) begin
    if (!scl_low && scl_q && !sda_low == 1'b0 && sda_q) begin i2c_starts++; i2c_bits = 0; end
    if (!scl_low && !scl_q) begin
      i2c_sh = {i2c_sh[7:0], !sda_low};
      i2c_bits++;
      if (i2c_bits == 9) begin
        i2c_bits = 0;
        if (i2c_bytes < 15)
          check(i2c_sh[8:1] == I2C_EXP[i2c_bytes], $sformatf("I2C byte %0d = %h", i2c_bytes, i2c_sh[8:1]));
        i2c_bytes++;
      end
    end
    scl_q = !scl_low;
    sda_q = !sda_low;
  end

  // ------------------------------------------------------------ main
  initial begin
    load_memory();
    #200 rst_bus = 0;
    #3000 trig_n = 0;
    #500  light = 1;
    #500  light = 0;
    #2000 trig_n = 1;
  end

  initial begin
    wait (!rst_bus);
    while (u_ddr.peek32(32'h1000 + D_BELL) != 32'h0) #1000;
    #5000 ps2_send(KEY);
  end

  initial begin
    wait (!rst_bus);
    // bounded waits: a program or stream that stalls is reported with all
    // the result checks rather than only by the watchdog
    for (int t = 0; t < 8000 && u_ddr.peek32(32'h1000 + D_DONE) != 32'h600D; t++) #1000;
    check(u_ddr.peek32(32'h1000 + D_DONE) == 32'h600D, "program reached its end marker");
    for (int t = 0; t < 8000 && !(pix_n >= N_FRAMES_CHECK * FRAME_BYTES &&
                                  smp_n >= N_SAMPLES_CHECK && i2c_bytes >= 15); t++) #1000;
    check(pix_n >= N_FRAMES_CHECK * FRAME_BYTES, $sformatf("pixels checked: %0d", pix_n));
    check(smp_n >= N_SAMPLES_CHECK, $sformatf("audio samples checked: %0d", smp_n));
    check(i2c_bytes >= 15, $sformatf("I2C bytes checked: %0d", i2c_bytes));
    #1000;
    for (int i = 0; i < N_CHECKED; i++) begin
      logic [31:0] got, exp;
      got = u_ddr.peek32(32'h1000 + CHECKED_OFFS[i]);
      exp = expected(CHECKED_OFFS[i], {23'b0, 1'b1, KEY});
      check(got == exp, $sformatf("data[%h] = %h, expected %h", CHECKED_OFFS[i], got, exp));
    end
    for (int i = 0; i < 3; i++)
      check((u_ddr.peek32(32'h1000 + D_CAUSE + 4 * i) & 32'h7C) == CAUSES[i],
            $sformatf("cause %0d = %h", i, u_ddr.peek32(32'h1000 + D_CAUSE + 4 * i)));
    check(cmd_n == 3, $sformatf("AC'97 commands sent: %0d", cmd_n));
    check(dut.u_dvi.underruns == 0, $sformatf("video pixels without data: %0d", dut.u_dvi.underruns));
    check(i2c_starts == 5, $sformatf("I2C transactions: %0d", i2c_starts));
    $display("mechanisms: load-use %0d, forward %0d, branch-squash %0d, muldiv-stall %0d, interrupts %0d, exceptions %0d",
             n_lu, n_fwd, n_squash, n_mdstall, n_int, n_exc);
    $display("bus: same-cycle requests %0d, bus errors %0d, bursts %0d, singles %0d, core writes %0d, DMA buffer switches %0d, FIFO prog-full cycles %0d, MIG reads %0d writes %0d",
             n_conflict, n_buserr, n_burst, n_single, n_rmw, n_dma_switch, n_pfull, n_migr, n_migw);
    check(n_lu > 0, "load-use stall seen");
    check(n_fwd > 0, "forwarding seen");
    check(n_squash > 0, "branch squash seen");
    check(n_mdstall > 0, "multiply/divide stall seen");
    check(n_int == 2, "two interrupts taken");
    check(n_exc == 3, "three exceptions taken");
    check(n_conflict > 0, "simultaneous bus requests seen");
    check(n_buserr > 0, "bus error seen");
    check(n_burst > 0 && n_single > 0, "burst and single transfers seen");
    check(n_rmw > 0, "read-modify-write stores seen");
    check(n_dma_switch > 0, "DMA buffer switch seen");
    check(n_pfull > 0, "DMA FIFO programmed-full seen");
    check(n_migr > 0 && n_migw > 0, "memory reads and writes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog (pixels %0d, samples %0d, i2c bytes %0d, done %h)", pix_n, smp_n, i2c_bytes,
             u_ddr.peek32(32'h1000 + D_DONE));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
