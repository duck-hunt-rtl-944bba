// async_fifo: dual-clock first-in first-out queue used at every clock-domain
// crossing (core <-> bus in the MIPS adapter, bus -> DVI and bus -> AC'97 in
// the DMA controllers). It stands in for the vendor-generated FIFOs of the
// original system: any clock ratio, any width, simultaneous read and write.
//
// Write and read pointers are kept in binary and Gray code; each Gray pointer
// crosses to the other domain through two flip-flops. The read side is
// first-word fall-through: `dout` shows the head entry whenever `empty` is low,
// and `rd_en` pops it. `wr_count` is the conservative fill level seen from the
// write side and `prog_full` is high while it exceeds PROG_FULL; the DMA
// controllers use this to ask for a burst only when a whole burst fits.
// DEPTH must be a power of two (the document's 1025-entry queue is a 1024-entry
// store plus the fall-through output register of the vendor core).
module async_fifo #(
  parameter int WIDTH     = 64,
  parameter int DEPTH     = 1024,
  parameter int PROG_FULL = DEPTH - 4
) (
  input  logic             wclk,
  input  logic             wrst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  output logic             prog_full,
  output logic [$clog2(DEPTH):0] wr_count,

  input  logic             rclk,
  input  logic             rrst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             empty
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic [AW:0] rbin_w;
  assign rbin_w    = gray2bin(rgray_w2);
  assign wr_count  = wbin - rbin_w;
  assign full      = wr_count == (AW+1)'(DEPTH);
  assign prog_full = wr_count > (AW+1)'(PROG_FULL);

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= din;
  end

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // ---------------- read domain ----------------
  assign empty = rgray == wgray_r2;
  assign dout  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

`ifndef SYNTHESIS
  a_no_overflow: assert property (@(posedge wclk) disable iff (wrst) !(wr_en && full))
    else $error("async_fifo: write while full");
  a_no_underflow: assert property (@(posedge rclk) disable iff (rrst) !(rd_en && empty))
    else $error("async_fifo: read while empty");
`endif
endmodule
