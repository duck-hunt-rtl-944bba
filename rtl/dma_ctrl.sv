// dma_ctrl: DMA controller that streams a double-buffered region of main
// memory to a device in another clock domain (one instance for DVI video,
// one for AC'97 audio).
//
// Registers (bus target, single 64-bit accesses, value in the low bits; the
// register is selected by address bits [5:3]):
//   0 buffer 0 start (29 bits)   1 buffer 0 end (29 bits)
//   2 buffer 1 start (29 bits)   3 buffer 1 end (29 bits)
//   4 control (1 bit, read/write) - set when both buffers are ready to read
//   5 status  (1 bit, read only)  - buffer being read now (0 or 1)
// Ends are exclusive. Writing control from 0 to 1 restarts at buffer 0.
//
// While control is 1 the controller reads the buffers one 32-byte burst at a
// time, as bus master, into a 64-bit wide FIFO (FIFO_DEPTH entries) that
// crosses into the device clock; it asks for a burst only while the FIFO is
// not "programmed-full", i.e. has room for a whole burst. When the read
// address reaches the end of a buffer it moves to the start of the other
// buffer, flips `status` and raises `irq` (a level, cleared when the CPU
// reads the status register), so software knows which buffer it may refill.
// A bus error stops the controller (control returns to 0).
// Device side: first-word fall-through FIFO read port in the device clock.
// Bits of `drv` this target never uses (its address field and, for narrow
// registers, the upper data bits) are held at zero so the OR-merged bus is
// unaffected by them.
module dma_ctrl
  import soc_pkg::*;
#(
  parameter int FIFO_DEPTH = 1024
) (
  input  logic              clk,
  input  logic              rst,
  // register target
  input  bus_t              bus,
  input  logic              t_cmd,
  input  logic              t_we,
  output logic              t_ready,
  output bus_t              drv,
  // bus master (burst reads)
  output logic              m_req,
  output logic [ADDR_W-1:0] m_addr,
  input  logic              m_gnt,
  input  logic              m_err,
  output logic              irq,
  // device side
  input  logic              dev_clk,
  input  logic              dev_rst,
  input  logic              dev_rd_en,
  output logic [63:0]       dev_data,
  output logic              dev_empty
);
  logic [ADDR_W-1:0] buf_start [2];
  logic [ADDR_W-1:0] buf_end   [2];
  logic              control, status;
  logic [ADDR_W-1:0] cur;

  typedef enum logic [1:0] {M_IDLE, M_REQ, M_DATA} mstate_e;
  mstate_e mstate;
  logic [1:0] beat;

  logic fifo_wr, fifo_full, fifo_pfull;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;

  assign t_ready = 1'b1;
  assign fifo_wr = mstate == M_DATA && bus.valid;

  async_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH), .PROG_FULL(FIFO_DEPTH - BURST_BEATS)) u_fifo (
    .wclk (clk), .wrst (rst), .wr_en (fifo_wr), .din (bus.data),
    .full (fifo_full), .prog_full (fifo_pfull), .wr_count (fifo_count),
    .rclk (dev_clk), .rrst (dev_rst), .rd_en (dev_rd_en),
    .dout (dev_data), .empty (dev_empty)
  );

  assign m_req  = mstate == M_REQ;
  assign m_addr = cur;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 2; i++) begin
        buf_start[i] <= '0;
        buf_end[i]   <= '0;
      end
      control <= 1'b0;
      status  <= 1'b0;
      irq     <= 1'b0;
      cur     <= '0;
      mstate  <= M_IDLE;
      beat    <= '0;
      drv     <= BUS_IDLE;
    end else begin
      drv <= BUS_IDLE;
      // ---- register access
      if (t_cmd && t_we) begin
        unique case (bus.addr[5:3])
          3'd0: buf_start[0] <= bus.data[ADDR_W-1:0];
          3'd1: buf_end[0]   <= bus.data[ADDR_W-1:0];
          3'd2: buf_start[1] <= bus.data[ADDR_W-1:0];
          3'd3: buf_end[1]   <= bus.data[ADDR_W-1:0];
          3'd4: begin
            control <= bus.data[0];
            if (bus.data[0] && !control) begin
              status <= 1'b0;
              cur    <= buf_start[0];
            end
          end
          default: ;
        endcase
      end else if (t_cmd) begin
        drv.valid <= 1'b1;
        drv.addr  <= bus.addr;
        unique case (bus.addr[5:3])
          3'd0: drv.data <= 64'(buf_start[0]);
          3'd1: drv.data <= 64'(buf_end[0]);
          3'd2: drv.data <= 64'(buf_start[1]);
          3'd3: drv.data <= 64'(buf_end[1]);
          3'd4: drv.data <= 64'(control);
          3'd5: begin drv.data <= 64'(status); irq <= 1'b0; end
          default: drv.data <= '0;
        endcase
      end
      // ---- burst reads
      unique case (mstate)
        M_IDLE: if (control && !fifo_pfull) mstate <= M_REQ;
        M_REQ: begin
          if (m_err) begin
            control <= 1'b0;
            mstate  <= M_IDLE;
          end else if (m_gnt) begin
            mstate <= M_DATA;
            beat   <= '0;
          end
        end
        M_DATA: if (bus.valid) begin
          beat <= beat + 1'b1;
          if (beat == 2'(BURST_BEATS - 1)) begin
            mstate <= M_IDLE;
            if (cur + ADDR_W'(8 * BURST_BEATS) >= buf_end[status]) begin
              status <= !status;
              cur    <= buf_start[!status];
              irq    <= 1'b1;
            end else begin
              cur <= cur + ADDR_W'(8 * BURST_BEATS);
            end
          end
        end
        default: mstate <= M_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_fifo_room: assert property (@(posedge clk) disable iff (rst) !(fifo_wr && fifo_full))
    else $error("dma_ctrl: burst overran the FIFO");
`endif
endmodule
