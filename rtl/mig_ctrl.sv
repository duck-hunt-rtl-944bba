// mig_ctrl: wrapper between the system bus and the user ("app") interface of
// the vendor DDR2 memory controller (MIG), which moves 128 bits per word and
// 256 bits (two words) per burst.
//
// Read: the bus address (a byte address) is passed to the MIG as a 64-bit-word
// address with command 3'b001. The two 128-bit words that come back are kept
// in two 128-bit buffers and put on the bus as four 64-bit beats on
// consecutive cycles (one beat, the addressed one, for a single read).
// Write: the 64-bit beats from the bus go through a chain of three 64-bit
// registers; when the fourth beat is on the bus the command (3'b000) and the
// first 128-bit word are written to the MIG, and the second word one cycle
// later, both taken through a 128-bit multiplexer from the register chain.
// A single-beat write sends both words with a byte mask that keeps only the
// addressed 8 bytes. The MIG reports no write errors, so writes are assumed to
// succeed. `t_ready` is low while a transfer is in progress, before the MIG's
// initialisation is done, or while its command or write-data FIFO is almost
// full.
module mig_ctrl
  import soc_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  // bus target
  input  bus_t         bus,
  input  logic         t_cmd,
  input  logic         t_we,
  input  logic         t_burst,
  output logic         t_ready,
  output bus_t         drv,
  // MIG user interface
  input  logic         phy_init_done,
  output logic [2:0]   app_af_cmd,
  output logic [30:0]  app_af_addr,
  output logic         app_af_wren,
  input  logic         app_af_afull,
  output logic [127:0] app_wdf_data,
  output logic [15:0]  app_wdf_mask_data,
  output logic         app_wdf_wren,
  input  logic         app_wdf_afull,
  input  logic         rd_data_valid,
  input  logic [127:0] rd_data_fifo_out
);
  typedef enum logic [2:0] {S_IDLE, S_RD_WAIT, S_RD_OUT, S_WR_COLLECT, S_WR_SECOND} state_e;
  state_e state;

  logic [ADDR_W-1:0] addr_q;
  logic              burst_q;
  logic [127:0]      rbuf [2];
  logic              rword;
  logic [1:0]        beat;
  logic [63:0]       wreg [3];     // wreg[0] newest
  logic [15:0]       mask1_q;

  localparam logic [2:0] CMD_WRITE = 3'b000;
  localparam logic [2:0] CMD_READ  = 3'b001;

  assign t_ready = state == S_IDLE && phy_init_done && !app_af_afull && !app_wdf_afull;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      drv <= BUS_IDLE;
      app_af_wren <= 1'b0;
      app_wdf_wren <= 1'b0;
      app_af_cmd <= CMD_READ;
      app_af_addr <= '0;
      app_wdf_data <= '0;
      app_wdf_mask_data <= '0;
      rword <= 1'b0;
      beat <= '0;
      addr_q <= '0;
      burst_q <= 1'b0;
      mask1_q <= '0;
    end else begin
      drv <= BUS_IDLE;
      app_af_wren  <= 1'b0;
      app_wdf_wren <= 1'b0;
      unique case (state)
        S_IDLE: if (t_cmd) begin
          addr_q  <= bus.addr;
          burst_q <= t_burst;
          beat    <= '0;
          rword   <= 1'b0;
          if (!t_we) begin
            app_af_wren <= 1'b1;
            app_af_cmd  <= CMD_READ;
            app_af_addr <= {5'b0, bus.addr[ADDR_W-1:5], 2'b00};
            state <= S_RD_WAIT;
          end else if (t_burst) begin
            wreg[0] <= bus.data;
            beat    <= 2'd1;
            state   <= S_WR_COLLECT;
          end else begin
            // single beat: both words carry the data, the mask keeps one lane
            app_af_wren  <= 1'b1;
            app_af_cmd   <= CMD_WRITE;
            app_af_addr  <= {5'b0, bus.addr[ADDR_W-1:5], 2'b00};
            app_wdf_wren <= 1'b1;
            app_wdf_data <= {bus.data, bus.data};
            app_wdf_mask_data <= bus.addr[4] ? 16'hFFFF :
                                 (bus.addr[3] ? 16'h00FF : 16'hFF00);
            mask1_q <= !bus.addr[4] ? 16'hFFFF :
                       (bus.addr[3] ? 16'h00FF : 16'hFF00);
            wreg[0] <= bus.data;
            wreg[1] <= bus.data;
            state <= S_WR_SECOND;
          end
        end
        S_RD_WAIT: if (rd_data_valid) begin
          rbuf[rword] <= rd_data_fifo_out;
          rword <= 1'b1;
          if (rword) begin
            state <= S_RD_OUT;
            beat  <= burst_q ? 2'd0 : addr_q[4:3];
          end
        end
        S_RD_OUT: begin
          drv.valid <= 1'b1;
          drv.addr  <= {addr_q[ADDR_W-1:5], beat, 3'b000};
          drv.data  <= beat[0] ? rbuf[beat[1]][127:64] : rbuf[beat[1]][63:0];
          beat <= beat + 1'b1;
          if (!burst_q || beat == 2'd3) state <= S_IDLE;
        end
        S_WR_COLLECT: if (bus.valid) begin
          wreg[0] <= bus.data;
          wreg[1] <= wreg[0];
          wreg[2] <= wreg[1];
          beat    <= beat + 1'b1;
          if (beat == 2'd3) begin
            // beats 0..2 are in wreg[2..0], beat 3 is on the bus
            app_af_wren  <= 1'b1;
            app_af_cmd   <= CMD_WRITE;
            app_af_addr  <= {5'b0, addr_q[ADDR_W-1:5], 2'b00};
            app_wdf_wren <= 1'b1;
            app_wdf_data <= {wreg[1], wreg[2]};
            app_wdf_mask_data <= '0;
            mask1_q <= '0;
            state <= S_WR_SECOND;
          end
        end
        S_WR_SECOND: begin
          app_wdf_wren <= 1'b1;
          app_wdf_data <= {wreg[0], wreg[1]};
          app_wdf_mask_data <= mask1_q;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
