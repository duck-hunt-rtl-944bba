// soc_pkg: types and constants shared by the bus, its masters and its targets.
//
// The system bus carries a 29-bit physical byte address, 64 bits of data and a
// data-valid bit (widths as the design specifies). All devices drive the bus
// through an AND-OR merge of `bus_t` values; the arbiter registers the merged
// value, which gives the bus its one-cycle latency. The address map and the
// register offsets below are this implementation's own choice: the design only
// fixes the boot ROM at physical 0x1FC00000 (virtual 0xBFC00000) and main
// memory as 256 MB of DDR2.
package soc_pkg;

  localparam int ADDR_W = 29;
  localparam int DATA_W = 64;

  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
    logic              valid;
  } bus_t;

  localparam bus_t BUS_IDLE = '{addr: '0, data: '0, valid: 1'b0};

  // Masters, listed from highest to lowest grant priority.
  localparam int N_MASTERS = 5;
  localparam int M_DVI  = 0;  // DVI DMA read
  localparam int M_AC97 = 1;  // AC'97 DMA read
  localparam int M_CDR  = 2;  // core data read
  localparam int M_CIR  = 3;  // core instruction read
  localparam int M_CDW  = 4;  // core data write

  // Targets.
  localparam int N_TARGETS = 6;
  localparam int T_MIG  = 0;
  localparam int T_ROM  = 1;
  localparam int T_DVI  = 2;
  localparam int T_AC97 = 3;
  localparam int T_PS2  = 4;
  localparam int T_GUN  = 5;

  // Burst length in 64-bit beats; a burst moves one 256-bit line.
  localparam int BURST_BEATS = 4;

  // Physical address map (29-bit byte addresses).
  localparam logic [ADDR_W-1:0] DDR_BASE  = 29'h0000_0000;
  localparam logic [ADDR_W-1:0] DDR_SIZE  = 29'h1000_0000;  // 256 MB
  localparam logic [ADDR_W-1:0] IO_BASE   = 29'h1F00_0000;
  localparam logic [ADDR_W-1:0] ROM_BASE  = 29'h1FC0_0000;
  localparam logic [ADDR_W-1:0] ROM_SPAN  = 29'h0004_0000;  // largest ROM the map allows

  // I/O page: bits [9:8] of the address select the device, [5:3] the register.
  localparam logic [1:0] IO_DVI  = 2'd0;
  localparam logic [1:0] IO_AC97 = 2'd1;
  localparam logic [1:0] IO_PS2  = 2'd2;
  localparam logic [1:0] IO_GUN  = 2'd3;

  function automatic logic is_ddr(input logic [ADDR_W-1:0] a);
    return a < DDR_SIZE;
  endfunction

  function automatic logic is_rom(input logic [ADDR_W-1:0] a);
    return a >= ROM_BASE && a < ROM_BASE + ROM_SPAN;
  endfunction

  function automatic logic is_io(input logic [ADDR_W-1:0] a);
    return a[ADDR_W-1:10] == IO_BASE[ADDR_W-1:10] && a[7:6] == 2'b00;
  endfunction

  // Burst (cacheable line) accesses go to memory; registers take single beats.
  function automatic logic is_burst_region(input logic [ADDR_W-1:0] a);
    return is_ddr(a) || is_rom(a);
  endfunction

endpackage
