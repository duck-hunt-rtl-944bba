// ps2_kbd: PS/2 keyboard receiver on the system bus.
//
// The keyboard clock and data are sampled at the bus clock through two
// flip-flops; a falling edge of the synchronised keyboard clock shifts in one
// bit. A frame is a 0 start bit, 8 data bits LSB first, an odd-parity bit and
// a 1 stop bit. A complete frame with correct start, stop and parity stores
// the key code and raises `irq`; a bad parity or framing sets the error flag
// instead. Register (single 64-bit read at any address of the device page):
// bits [7:0] key code, bit 8 key valid, bit 9 parity/framing error. Reading
// clears valid, error and `irq`. Writes are accepted and ignored.
// Bits of `drv` this target never uses (its address field and, for narrow
// registers, the upper data bits) are held at zero so the OR-merged bus is
// unaffected by them.
module ps2_kbd
  import soc_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic ps2_clk,
  input  logic ps2_data,
  input  bus_t bus,
  input  logic t_cmd,
  input  logic t_we,
  output logic t_ready,
  output bus_t drv,
  output logic irq
);
  logic [2:0]  clk_s;
  logic [1:0]  dat_s;
  logic [3:0]  nbits;
  logic [10:0] sh;
  logic [7:0]  key;
  logic        valid, err;
  logic        fall;
  logic [10:0] frame;

  assign t_ready = 1'b1;
  assign irq     = valid;
  assign fall    = clk_s[2] && !clk_s[1];
  assign frame   = {dat_s[1], sh[10:1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_s <= '1; dat_s <= '1; nbits <= '0; sh <= '0;
      key <= '0; valid <= 1'b0; err <= 1'b0; drv <= BUS_IDLE;
    end else begin
      clk_s <= {clk_s[1:0], ps2_clk};
      dat_s <= {dat_s[0], ps2_data};
      drv   <= BUS_IDLE;
      if (fall) begin
        sh <= frame;
        if (nbits == 4'd10) begin
          nbits <= '0;
          // frame[0] start, [8:1] data, [9] parity, [10] stop
          if (!frame[0] && frame[10] && ^frame[9:1]) begin
            key   <= frame[8:1];
            valid <= 1'b1;
          end else begin
            err <= 1'b1;
          end
        end else begin
          nbits <= nbits + 1'b1;
        end
      end
      if (t_cmd && !t_we) begin
        drv.valid <= 1'b1;
        drv.addr  <= bus.addr;
        drv.data  <= {54'b0, err, valid, key};
        valid <= 1'b0;
        err   <= 1'b0;
      end
    end
  end
endmodule
