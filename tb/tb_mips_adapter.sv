// tb_mips_adapter: the core-to-bus bridge in its real surroundings - bus
// arbiter, DDR2 bridge with the memory-controller model, boot ROM, and a
// register-file model standing in for the four I/O devices - driven from the
// core side by two independent random streams: instruction fetches (ROM and
// memory) and data accesses (word loads, stores with random byte enables,
// register reads and writes, and accesses to unmapped addresses). Checks
// every returned word against a shadow copy, the bus-error flag on exactly
// the unmapped accesses, the final memory contents, and that the two core
// clocks and the bus clock are unrelated.
`timescale 1ns/1ps
module tb_mips_adapter;
  import soc_pkg::*;
  int checks = 0, failures = 0;
  logic clk_core = 0, clk_bus = 0, rst = 1;
  always #10 clk_core = !clk_core;
  always #4.1 clk_bus = !clk_bus;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        imem_req = 0, imem_ready, imem_err;
  logic [31:0] imem_addr = 0, imem_rdata;
  logic        dmem_req = 0, dmem_we = 0, dmem_ready, dmem_err;
  logic [31:0] dmem_addr = 0, dmem_wdata = 0, dmem_rdata;
  logic [3:0]  dmem_be = 0;

  logic [N_MASTERS-1:0] m_req, m_we, m_burst, m_busy, m_gnt, m_err;
  logic [ADDR_W-1:0] m_addr [N_MASTERS];
  logic [ADDR_W-1:0] core_addr;
  bus_t bus, drv, drv_ad, drv_mig, drv_rom, drv_io;
  logic [N_TARGETS-1:0] t_cmd, t_ready;
  logic t_we, t_burst;

  assign m_req[M_AC97:M_DVI] = '0;
  assign m_we[M_AC97:M_DVI] = '0;
  assign m_burst[M_AC97:M_DVI] = '0;
  assign m_addr[M_DVI] = '0;
  assign m_addr[M_AC97] = '0;
  assign m_addr[M_CDR] = core_addr;
  assign m_addr[M_CIR] = core_addr;
  assign m_addr[M_CDW] = core_addr;

  mips_adapter dut (
    .clk_core(clk_core), .rst_core(rst), .imem_req, .imem_addr, .imem_rdata, .imem_ready, .imem_err,
    .dmem_req, .dmem_we, .dmem_addr, .dmem_be, .dmem_wdata, .dmem_rdata, .dmem_ready, .dmem_err,
    .clk_bus(clk_bus), .rst_bus(rst),
    .m_req(m_req[M_CDW:M_CDR]), .m_we(m_we[M_CDW:M_CDR]), .m_burst(m_burst[M_CDW:M_CDR]),
    .m_addr(core_addr), .m_gnt(m_gnt[M_CDW:M_CDR]), .m_err(m_err[M_CDW:M_CDR]),
    .bus(bus), .drv(drv_ad));

  always_comb begin
    drv.addr  = drv_ad.addr  | drv_mig.addr  | drv_rom.addr  | drv_io.addr;
    drv.data  = drv_ad.data  | drv_mig.data  | drv_rom.data  | drv_io.data;
    drv.valid = drv_ad.valid | drv_mig.valid | drv_rom.valid | drv_io.valid;
  end

  bus_arbiter #(.ROM_BYTES(2048)) u_arb (
    .clk(clk_bus), .rst(rst), .m_req, .m_we, .m_burst, .m_addr, .m_busy, .m_gnt, .m_err,
    .drv, .bus, .t_cmd, .t_we, .t_burst, .t_ready);

  logic phy_init_done, af_wren, af_afull, wdf_wren, wdf_afull, rd_valid;
  logic [2:0] af_cmd;
  logic [30:0] af_addr;
  logic [127:0] wdf_data, rd_data;
  logic [15:0] wdf_mask;
  mig_ctrl u_mig (
    .clk(clk_bus), .rst(rst), .bus(bus), .t_cmd(t_cmd[T_MIG]), .t_we(t_we), .t_burst(t_burst),
    .t_ready(t_ready[T_MIG]), .drv(drv_mig), .phy_init_done(phy_init_done), .app_af_cmd(af_cmd),
    .app_af_addr(af_addr), .app_af_wren(af_wren), .app_af_afull(af_afull),
    .app_wdf_data(wdf_data), .app_wdf_mask_data(wdf_mask), .app_wdf_wren(wdf_wren),
    .app_wdf_afull(wdf_afull), .rd_data_valid(rd_valid), .rd_data_fifo_out(rd_data));
  mig_model u_mem (
    .clk(clk_bus), .rst(rst), .phy_init_done(phy_init_done), .app_af_cmd(af_cmd),
    .app_af_addr(af_addr), .app_af_wren(af_wren), .app_af_afull(af_afull),
    .app_wdf_data(wdf_data), .app_wdf_mask_data(wdf_mask), .app_wdf_wren(wdf_wren),
    .app_wdf_afull(wdf_afull), .rd_data_valid(rd_valid), .rd_data_fifo_out(rd_data));
  boot_rom #(.WORDS(256)) u_rom (
    .clk(clk_bus), .rst(rst), .bus(bus), .t_cmd(t_cmd[T_ROM]), .t_burst(t_burst),
    .t_ready(t_ready[T_ROM]), .drv(drv_rom));

  // I/O register model: reads return a code of the address, writes are stored
  logic [63:0] io_regs [4];
  assign t_ready[T_GUN:T_DVI] = '1;
  always @(posedge clk_bus) begin
    drv_io <= BUS_IDLE;
    if (|t_cmd[T_GUN:T_DVI]) begin
      if (t_we) io_regs[bus.addr[9:8]] <= bus.data;
      else drv_io <= '{addr: bus.addr, data: {35'h0, bus.addr}, valid: 1'b1};
    end
  end

  // shadow memory: 32-bit words of DDR, index = physical byte address / 4
  localparam int MEM_WORDS = 512;
  logic [31:0] shadow [MEM_WORDS];
  function automatic logic [31:0] rom_word(int i);
    return 32'(i) * 32'h0101_0001 ^ 32'h5A00_0000;
  endfunction

  int n_fetch = 0, n_data = 0, n_err = 0, n_io = 0;
  bit fetch_done = 0;

  // instruction-fetch stream
  initial begin
    wait (!rst);
    @(negedge clk_core);
    for (int n = 0; n < 150; n++) begin
      bit from_rom;
      int i;
      from_rom = $urandom % 2;
      i = from_rom ? $urandom % 512 : MEM_WORDS / 2 + $urandom % (MEM_WORDS / 2);
      imem_req = 1;
      imem_addr = from_rom ? 32'hBFC0_0000 + 32'(i * 4) : 32'h8000_0000 + 32'(i * 4);
      @(negedge clk_core);
      while (!imem_ready) @(negedge clk_core);
      check(!imem_err && imem_rdata == (from_rom ? rom_word(i) : shadow[i]),
            $sformatf("fetch %h: %h err %b", imem_addr, imem_rdata, imem_err));
      imem_req = 0;
      n_fetch++;
      @(negedge clk_core);
    end
    fetch_done = 1;
  end

  // data stream
  initial begin
    wait (!rst);
    @(negedge clk_core);
    for (int n = 0; n < 300; n++) begin
      int kind, i;
      logic [31:0] exp;
      bit exp_err;
      kind = $urandom % 8;
      i = $urandom % MEM_WORDS;
      exp_err = 0;
      dmem_req = 1; dmem_we = 0; dmem_be = 4'hF;
      case (kind)
        0, 1, 2: begin dmem_addr = 32'hA000_0000 + 32'(i * 4); exp = shadow[i]; end
        3, 4, 5: begin
          i = i % (MEM_WORDS / 2);     // fetches read the upper half
          dmem_addr = (kind == 3 ? 32'h8000_0000 : 32'hA000_0000) + 32'(i * 4);
          dmem_we = 1; dmem_be = 4'($urandom % 15 + 1); dmem_wdata = $urandom;
          for (int b = 0; b < 4; b++) if (dmem_be[b]) shadow[i][8*b +: 8] = dmem_wdata[8*b +: 8];
        end
        6: begin
          dmem_addr = 32'hBF00_0000 + 32'(($urandom % 4) << 8) + 32'(8 * ($urandom % 6)) + 32'(4 * ($urandom % 2));
          exp = dmem_addr[2] ? 32'h0 : {3'b0, dmem_addr[28:0]};
          n_io++;
        end
        default: begin dmem_addr = 32'hB000_0000 + 32'(i * 4); exp_err = 1; end
      endcase
      @(negedge clk_core);
      while (!dmem_ready) @(negedge clk_core);
      check(dmem_err == exp_err, $sformatf("bus error flag %b for %h", dmem_err, dmem_addr));
      if (!dmem_we && !exp_err)
        check(dmem_rdata == exp, $sformatf("load %h: %h expected %h", dmem_addr, dmem_rdata, exp));
      if (exp_err) n_err++;
      dmem_req = 0;
      n_data++;
      @(negedge clk_core);
    end
    wait (fetch_done);
    for (int i = 0; i < MEM_WORDS; i++)
      check(u_mem.peek32(i * 4) == shadow[i], $sformatf("memory word %0d", i));
    $display("fetches %0d, data accesses %0d, register accesses %0d, bus errors %0d", n_fetch, n_data, n_io, n_err);
    check(n_err > 0 && n_io > 0, "errors and register accesses occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < MEM_WORDS; i += 2) begin
      shadow[i] = $urandom; shadow[i + 1] = $urandom;
      u_mem.poke64(i * 4, {shadow[i + 1], shadow[i]});
    end
    for (int i = 0; i < 256; i++) u_rom.mem[i] = {rom_word(2 * i + 1), rom_word(2 * i)};
    repeat (5) @(negedge clk_core);
    rst = 0;
  end
  initial begin
    #2ms;
    $display("FAIL: watchdog (fetches %0d, data %0d)", n_fetch, n_data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
