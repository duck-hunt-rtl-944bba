// boot_rom: block-RAM boot ROM on the system bus, mapped at physical
// 0x1FC00000 so that the MIPS reset vector 0xBFC00000 fetches its first word.
//
// WORDS 64-bit words. The content comes from INIT_FILE ($readmemh, one 64-bit
// little-endian word per line) when one is given, as the FPGA flow fills the
// block RAM; the array is otherwise left to the loader. A read command
// (`t_cmd` with `t_we` low, address on the bus in the same cycle) returns 4
// beats of an aligned 32-byte line (burst) or the single addressed beat, one
// beat per cycle starting two cycles after the command (synchronous RAM read
// plus output register). Writes are refused by the arbiter, never seen here.
// Bits of `drv` this target never uses (its address field and, for narrow
// registers, the upper data bits) are held at zero so the OR-merged bus is
// unaffected by them.
module boot_rom
  import soc_pkg::*;
#(
  parameter int    WORDS     = 2048,
  parameter string INIT_FILE = ""
) (
  input  logic clk,
  input  logic rst,
  input  bus_t bus,
  input  logic t_cmd,
  input  logic t_burst,
  output logic t_ready,
  output bus_t drv
);
  localparam int AW = $clog2(WORDS);

  logic [63:0] mem [WORDS];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  logic          active;
  logic [AW-1:0] idx;
  logic [2:0]    left;

  assign t_ready = !active;

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      drv    <= BUS_IDLE;
      left   <= '0;
      idx    <= '0;
    end else begin
      drv <= BUS_IDLE;
      if (t_cmd) begin
        active <= 1'b1;
        idx    <= t_burst ? {bus.addr[AW+2:5], 2'b00} : bus.addr[AW+2:3];
        left   <= t_burst ? 3'(BURST_BEATS) : 3'd1;
      end else if (active) begin
        drv.valid <= 1'b1;
        drv.data  <= mem[idx];
        idx  <= idx + 1'b1;
        left <= left - 1'b1;
        if (left == 3'd1) active <= 1'b0;
      end
    end
  end
endmodule
