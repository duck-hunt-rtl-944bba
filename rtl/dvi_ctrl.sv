// dvi_ctrl: video output for the Chrontel CH7301C DVI transmitter.
//
// Runs in the 50 MHz pixel clock domain. Default timing is VESA 800x600 at
// 72 Hz, whose pixel clock is exactly 50 MHz (1040 x 666 clocks per frame,
// positive sync pulses); all numbers are parameters. The frame buffer holds
// one byte per pixel (colour RRRGGGBB) packed little-endian into 64-bit
// words, so one FIFO word feeds 8 pixels: pixel 0 is bits [7:0]. The word at
// the FIFO head is used for 8 active pixels and then popped. An empty FIFO
// during the active area shows black and counts an underrun. Output starts
// at the first frame boundary at which the FIFO holds data, so that the first
// byte of the buffer lands on the top-left pixel; black is shown before that.
// Each pixel is widened to 24-bit colour by bit replication and sent to the
// CH7301C as 12 bits per clock edge: `d_rise` = {G[3:0], B[7:0]} for the
// rising edge and `d_fall` = {R[7:0], G[7:4]} for the falling edge (to be
// combined by a double-data-rate output register at the pin). All outputs are
// registered: they lag the internal counters by one clock.
module dvi_ctrl #(
  parameter int H_ACTIVE = 800, parameter int H_FP = 56,
  parameter int H_SYNC   = 120, parameter int H_BP = 64,
  parameter int V_ACTIVE = 600, parameter int V_FP = 37,
  parameter int V_SYNC   = 6,   parameter int V_BP = 23
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] fifo_data,
  input  logic        fifo_empty,
  output logic        fifo_rd,
  output logic [11:0] d_rise,
  output logic [11:0] d_fall,
  output logic        hsync,
  output logic        vsync,
  output logic        de,
  output logic        frame_start,
  output logic [15:0] underruns
);
  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [11:0] hcnt, vcnt;
  logic        active, running, show;
  logic [7:0]  pix;
  logic [7:0]  r, g, b;

  assign active  = hcnt < 12'(H_ACTIVE) && vcnt < 12'(V_ACTIVE);
  assign show    = running || (hcnt == '0 && vcnt == '0 && !fifo_empty);
  assign pix     = (fifo_empty || !show) ? 8'h00 : fifo_data[8*hcnt[2:0] +: 8];
  assign fifo_rd = active && show && !fifo_empty && hcnt[2:0] == 3'd7;
  assign r = {pix[7:5], pix[7:5], pix[7:6]};
  assign g = {pix[4:2], pix[4:2], pix[4:3]};
  assign b = {4{pix[1:0]}};

  always_ff @(posedge clk) begin
    if (rst) begin
      hcnt <= '0; vcnt <= '0;
      hsync <= 1'b0; vsync <= 1'b0; de <= 1'b0;
      d_rise <= '0; d_fall <= '0;
      frame_start <= 1'b0;
      underruns <= '0;
      running <= 1'b0;
    end else begin
      if (show) running <= 1'b1;
      if (hcnt == 12'(H_TOTAL - 1)) begin
        hcnt <= '0;
        vcnt <= (vcnt == 12'(V_TOTAL - 1)) ? '0 : vcnt + 1'b1;
      end else begin
        hcnt <= hcnt + 1'b1;
      end
      de    <= active;
      hsync <= hcnt >= 12'(H_ACTIVE + H_FP) && hcnt < 12'(H_ACTIVE + H_FP + H_SYNC);
      vsync <= vcnt >= 12'(V_ACTIVE + V_FP) && vcnt < 12'(V_ACTIVE + V_FP + V_SYNC);
      frame_start <= hcnt == '0 && vcnt == '0;
      d_rise <= active ? {g[3:0], b} : '0;
      d_fall <= active ? {r, g[7:4]} : '0;
      if (active && show && fifo_empty) underruns <= underruns + 1'b1;
    end
  end
endmodule
