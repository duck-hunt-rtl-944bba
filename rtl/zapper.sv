// zapper: interface to the NES Zapper light gun, on the system bus.
//
// The gun has a low-active trigger and a high-active light sensor; both are
// synchronised to the bus clock. Pulling the trigger (a falling edge) latches
// the trigger flag and raises `irq`. From then until the CPU reads the
// interface, any cycle with light detected latches the detected flag.
// Register (single 64-bit read): bit 0 trigger latched, bit 1 light detected.
// Reading clears both flags and `irq`. Writes are accepted and ignored.
// Bits of `drv` this target never uses (its address field and, for narrow
// registers, the upper data bits) are held at zero so the OR-merged bus is
// unaffected by them.
module zapper
  import soc_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic trigger_n,
  input  logic light,
  input  bus_t bus,
  input  logic t_cmd,
  input  logic t_we,
  output logic t_ready,
  output bus_t drv,
  output logic irq
);
  logic [2:0] trig_s;
  logic [1:0] light_s;
  logic       trig_q, det_q;

  assign t_ready = 1'b1;
  assign irq     = trig_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      trig_s <= '1; light_s <= '0; trig_q <= 1'b0; det_q <= 1'b0; drv <= BUS_IDLE;
    end else begin
      trig_s  <= {trig_s[1:0], trigger_n};
      light_s <= {light_s[0], light};
      drv     <= BUS_IDLE;
      if (trig_s[2] && !trig_s[1]) trig_q <= 1'b1;
      if ((trig_q || (trig_s[2] && !trig_s[1])) && light_s[1]) det_q <= 1'b1;
      if (t_cmd && !t_we) begin
        drv.valid <= 1'b1;
        drv.addr  <= bus.addr;
        drv.data  <= {62'b0, det_q, trig_q};
        trig_q <= 1'b0;
        det_q  <= 1'b0;
      end
    end
  end
endmodule
