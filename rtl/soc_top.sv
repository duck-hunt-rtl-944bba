// soc_top: the complete system - a MIPS core with its bus adapter, the shared
// 64-bit system bus and its arbiter, the DDR2 controller wrapper, the boot
// ROM, the DVI and AC'97 DMA output paths, the PS/2 keyboard and the NES
// Zapper light gun.
//
// Clock domains: `clk_core` (50 MHz, MIPS core and the core side of the
// adapter), `clk_bus` (125 MHz, supplied by the memory controller: bus,
// arbiter, memory wrapper, ROM, DMA registers, keyboard and gun), `clk_pix`
// (50 MHz, DVI output and its I2C set-up), `ac97_bit_clk` (12.288 MHz from
// the codec) and the keyboard's own clock, sampled in the bus domain. The
// adapter and the DMA controllers cross domains through FIFOs.
// `rst_bus` is the reset produced by the memory controller; it is
// synchronised into every other domain here.
// Interrupts run point to point into the core: DVI DMA on IP2, AC'97 DMA on
// IP3, keyboard on IP4, gun on IP5 (each synchronised into the core clock);
// the Count/Compare timer uses IP7 inside the core.
// The DDR2 controller itself (vendor IP) is outside: its user interface is
// brought out as the `mig_*` ports. DVI data leaves as the two 12-bit halves
// of each pixel for a double-data-rate output register at the pins.
module soc_top
  import soc_pkg::*;
#(
  parameter int    ROM_WORDS      = 2048,
  parameter string ROM_INIT       = "",
  parameter int    DMA_FIFO_DEPTH = 1024,
  parameter int    DVI_H_ACTIVE = 800, parameter int DVI_H_FP = 56,
  parameter int    DVI_H_SYNC   = 120, parameter int DVI_H_BP = 64,
  parameter int    DVI_V_ACTIVE = 600, parameter int DVI_V_FP = 37,
  parameter int    DVI_V_SYNC   = 6,   parameter int DVI_V_BP = 23,
  parameter int    PIX_CLK_HZ   = 50_000_000
) (
  input  logic         clk_core,
  input  logic         clk_bus,
  input  logic         clk_pix,
  input  logic         ac97_bit_clk,
  input  logic         rst_bus,
  // DDR2 memory controller user interface
  input  logic         mig_phy_init_done,
  output logic [2:0]   mig_app_af_cmd,
  output logic [30:0]  mig_app_af_addr,
  output logic         mig_app_af_wren,
  input  logic         mig_app_af_afull,
  output logic [127:0] mig_app_wdf_data,
  output logic [15:0]  mig_app_wdf_mask_data,
  output logic         mig_app_wdf_wren,
  input  logic         mig_app_wdf_afull,
  input  logic         mig_rd_data_valid,
  input  logic [127:0] mig_rd_data_fifo_out,
  // Chrontel CH7301C
  output logic [11:0]  dvi_d_rise,
  output logic [11:0]  dvi_d_fall,
  output logic         dvi_hsync,
  output logic         dvi_vsync,
  output logic         dvi_de,
  output logic         dvi_scl_low,
  output logic         dvi_sda_low,
  input  logic         dvi_sda_in,
  // AD1981B AC-link
  output logic         ac97_sync,
  output logic         ac97_sdata_out,
  input  logic         ac97_sdata_in,
  output logic         ac97_reset_n,
  // PS/2 keyboard and NES Zapper
  input  logic         ps2_clk,
  input  logic         ps2_data,
  input  logic         gun_trigger_n,
  input  logic         gun_light
);
  // ---------------------------------------------------------------- resets
  logic [1:0] rst_core_s, rst_pix_s, rst_ac_s;
  logic       rst_core, rst_pix, rst_ac;

  always_ff @(posedge clk_core or posedge rst_bus)
    if (rst_bus) rst_core_s <= '1; else rst_core_s <= {rst_core_s[0], 1'b0};
  always_ff @(posedge clk_pix or posedge rst_bus)
    if (rst_bus) rst_pix_s <= '1; else rst_pix_s <= {rst_pix_s[0], 1'b0};
  always_ff @(posedge ac97_bit_clk or posedge rst_bus)
    if (rst_bus) rst_ac_s <= '1; else rst_ac_s <= {rst_ac_s[0], 1'b0};
  assign rst_core = rst_core_s[1];
  assign rst_pix  = rst_pix_s[1];
  assign rst_ac   = rst_ac_s[1];
  assign ac97_reset_n = !rst_bus;

  // ---------------------------------------------------------------- core
  logic        imem_req, imem_ready, imem_err;
  logic [31:0] imem_addr, imem_rdata;
  logic        dmem_req, dmem_we, dmem_ready, dmem_err;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;
  logic [3:0]  dmem_be;
  logic [4:0]  irq_bus, irq_s1, irq_s2;

  mips_core u_core (
    .clk (clk_core), .rst (rst_core),
    .imem_req, .imem_addr, .imem_rdata, .imem_ready, .imem_err,
    .dmem_req, .dmem_we, .dmem_addr, .dmem_be, .dmem_wdata,
    .dmem_rdata, .dmem_ready, .dmem_err,
    .hw_irq (irq_s2),
    .retire (), .exc_taken ()
  );

  always_ff @(posedge clk_core) begin
    irq_s1 <= irq_bus;
    irq_s2 <= irq_s1;
  end

  // ---------------------------------------------------------------- bus
  logic [N_MASTERS-1:0] m_req, m_we, m_burst, m_busy, m_gnt, m_err;
  logic [ADDR_W-1:0]    m_addr [N_MASTERS];
  logic [N_TARGETS-1:0] t_cmd, t_ready;
  logic                 t_we, t_burst;
  bus_t                 bus, drv;
  bus_t                 drv_ad, drv_mig, drv_rom, drv_dvi, drv_ac, drv_ps2, drv_gun;
  logic [ADDR_W-1:0]    core_addr, dvi_addr, ac_addr;

  mips_adapter u_adapter (
    .clk_core (clk_core), .rst_core (rst_core),
    .imem_req, .imem_addr, .imem_rdata, .imem_ready, .imem_err,
    .dmem_req, .dmem_we, .dmem_addr, .dmem_be, .dmem_wdata,
    .dmem_rdata, .dmem_ready, .dmem_err,
    .clk_bus (clk_bus), .rst_bus (rst_bus),
    .m_req   (m_req[M_CDW:M_CDR]),
    .m_we    (m_we[M_CDW:M_CDR]),
    .m_burst (m_burst[M_CDW:M_CDR]),
    .m_addr  (core_addr),
    .m_gnt   (m_gnt[M_CDW:M_CDR]),
    .m_err   (m_err[M_CDW:M_CDR]),
    .bus (bus), .drv (drv_ad)
  );

  assign m_addr[M_DVI]  = dvi_addr;
  assign m_addr[M_AC97] = ac_addr;
  assign m_addr[M_CDR]  = core_addr;
  assign m_addr[M_CIR]  = core_addr;
  assign m_addr[M_CDW]  = core_addr;
  assign m_we[M_AC97:M_DVI]    = 2'b00;
  assign m_burst[M_AC97:M_DVI] = 2'b11;

  // every device drives the bus through an AND-OR merge
  always_comb begin
    drv.addr  = drv_ad.addr  | drv_mig.addr  | drv_rom.addr  | drv_dvi.addr  |
                drv_ac.addr  | drv_ps2.addr  | drv_gun.addr;
    drv.data  = drv_ad.data  | drv_mig.data  | drv_rom.data  | drv_dvi.data  |
                drv_ac.data  | drv_ps2.data  | drv_gun.data;
    drv.valid = drv_ad.valid | drv_mig.valid | drv_rom.valid | drv_dvi.valid |
                drv_ac.valid | drv_ps2.valid | drv_gun.valid;
  end

  bus_arbiter #(.ROM_BYTES(8 * ROM_WORDS)) u_arb (
    .clk (clk_bus), .rst (rst_bus),
    .m_req, .m_we, .m_burst, .m_addr, .m_busy, .m_gnt, .m_err,
    .drv, .bus,
    .t_cmd, .t_we, .t_burst, .t_ready
  );

  // ---------------------------------------------------------------- memory
  mig_ctrl u_mig (
    .clk (clk_bus), .rst (rst_bus),
    .bus, .t_cmd (t_cmd[T_MIG]), .t_we, .t_burst, .t_ready (t_ready[T_MIG]),
    .drv (drv_mig),
    .phy_init_done     (mig_phy_init_done),
    .app_af_cmd        (mig_app_af_cmd),
    .app_af_addr       (mig_app_af_addr),
    .app_af_wren       (mig_app_af_wren),
    .app_af_afull      (mig_app_af_afull),
    .app_wdf_data      (mig_app_wdf_data),
    .app_wdf_mask_data (mig_app_wdf_mask_data),
    .app_wdf_wren      (mig_app_wdf_wren),
    .app_wdf_afull     (mig_app_wdf_afull),
    .rd_data_valid     (mig_rd_data_valid),
    .rd_data_fifo_out  (mig_rd_data_fifo_out)
  );

  boot_rom #(.WORDS(ROM_WORDS), .INIT_FILE(ROM_INIT)) u_rom (
    .clk (clk_bus), .rst (rst_bus),
    .bus, .t_cmd (t_cmd[T_ROM]), .t_burst, .t_ready (t_ready[T_ROM]),
    .drv (drv_rom)
  );

  // ---------------------------------------------------------------- DVI
  logic        dvi_fifo_rd, dvi_fifo_empty, dvi_irq;
  logic [63:0] dvi_fifo_data;

  dma_ctrl #(.FIFO_DEPTH(DMA_FIFO_DEPTH)) u_dvi_dma (
    .clk (clk_bus), .rst (rst_bus),
    .bus, .t_cmd (t_cmd[T_DVI]), .t_we, .t_ready (t_ready[T_DVI]), .drv (drv_dvi),
    .m_req (m_req[M_DVI]), .m_addr (dvi_addr),
    .m_gnt (m_gnt[M_DVI]), .m_err (m_err[M_DVI]), .irq (dvi_irq),
    .dev_clk (clk_pix), .dev_rst (rst_pix), .dev_rd_en (dvi_fifo_rd),
    .dev_data (dvi_fifo_data), .dev_empty (dvi_fifo_empty)
  );

  dvi_ctrl #(
    .H_ACTIVE (DVI_H_ACTIVE), .H_FP (DVI_H_FP), .H_SYNC (DVI_H_SYNC), .H_BP (DVI_H_BP),
    .V_ACTIVE (DVI_V_ACTIVE), .V_FP (DVI_V_FP), .V_SYNC (DVI_V_SYNC), .V_BP (DVI_V_BP)
  ) u_dvi (
    .clk (clk_pix), .rst (rst_pix),
    .fifo_data (dvi_fifo_data), .fifo_empty (dvi_fifo_empty), .fifo_rd (dvi_fifo_rd),
    .d_rise (dvi_d_rise), .d_fall (dvi_d_fall),
    .hsync (dvi_hsync), .vsync (dvi_vsync), .de (dvi_de),
    .frame_start (), .underruns ()
  );

  ch7301_i2c #(.CLK_HZ (PIX_CLK_HZ)) u_i2c (
    .clk (clk_pix), .rst (rst_pix),
    .scl_low (dvi_scl_low), .sda_low (dvi_sda_low), .sda_in (dvi_sda_in),
    .done (), .nacks ()
  );

  // ---------------------------------------------------------------- AC'97
  logic        ac_fifo_rd, ac_fifo_empty, ac_irq;
  logic [63:0] ac_fifo_data;

  dma_ctrl #(.FIFO_DEPTH(DMA_FIFO_DEPTH)) u_ac97_dma (
    .clk (clk_bus), .rst (rst_bus),
    .bus, .t_cmd (t_cmd[T_AC97]), .t_we, .t_ready (t_ready[T_AC97]), .drv (drv_ac),
    .m_req (m_req[M_AC97]), .m_addr (ac_addr),
    .m_gnt (m_gnt[M_AC97]), .m_err (m_err[M_AC97]), .irq (ac_irq),
    .dev_clk (ac97_bit_clk), .dev_rst (rst_ac), .dev_rd_en (ac_fifo_rd),
    .dev_data (ac_fifo_data), .dev_empty (ac_fifo_empty)
  );

  ac97_ctrl u_ac97 (
    .bit_clk (ac97_bit_clk), .rst (rst_ac),
    .sync (ac97_sync), .sdata_out (ac97_sdata_out), .sdata_in (ac97_sdata_in),
    .fifo_data (ac_fifo_data), .fifo_empty (ac_fifo_empty), .fifo_rd (ac_fifo_rd),
    .cmds_done (), .frames (), .underruns ()
  );

  // ---------------------------------------------------------------- input devices
  logic ps2_irq, gun_irq;

  ps2_kbd u_ps2 (
    .clk (clk_bus), .rst (rst_bus), .ps2_clk, .ps2_data,
    .bus, .t_cmd (t_cmd[T_PS2]), .t_we, .t_ready (t_ready[T_PS2]), .drv (drv_ps2),
    .irq (ps2_irq)
  );

  zapper u_gun (
    .clk (clk_bus), .rst (rst_bus), .trigger_n (gun_trigger_n), .light (gun_light),
    .bus, .t_cmd (t_cmd[T_GUN]), .t_we, .t_ready (t_ready[T_GUN]), .drv (drv_gun),
    .irq (gun_irq)
  );

  assign irq_bus = {1'b0, gun_irq, ps2_irq, ac_irq, dvi_irq};
endmodule
