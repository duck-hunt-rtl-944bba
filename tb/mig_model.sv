// mig_model: behavioural model of the user interface of the DDR2 memory
// controller, for simulation only (the real controller is vendor IP).
//
// Commands (app_af_cmd 3'b000 write, 3'b001 read; address in 64-bit words,
// burst-aligned) and write data (two 128-bit words per write burst, a mask
// bit per byte, 1 = keep the old byte) are queued as written. A read returns
// its two 128-bit words on consecutive cycles READ_LAT cycles after the
// command. phy_init_done rises INIT_CYCLES after reset. Memory is sparse and
// reads zero where nothing was written; tasks give back-door access.
module mig_model #(
  parameter int READ_LAT    = 6,
  parameter int INIT_CYCLES = 20
) (
  input  logic         clk,
  input  logic         rst,
  output logic         phy_init_done,
  input  logic [2:0]   app_af_cmd,
  input  logic [30:0]  app_af_addr,
  input  logic         app_af_wren,
  output logic         app_af_afull,
  input  logic [127:0] app_wdf_data,
  input  logic [15:0]  app_wdf_mask_data,
  input  logic         app_wdf_wren,
  output logic         app_wdf_afull,
  output logic         rd_data_valid,
  output logic [127:0] rd_data_fifo_out
);
  logic [63:0] mem [int unsigned];   // key: byte address / 8
  logic [33:0] cmdq [$];             // {cmd, addr}
  logic [143:0] wdfq [$];            // {mask, data}
  int          init_cnt;
  int          busy;
  int unsigned rd_word;
  int          rd_left;
  int          reads, writes;

  assign app_af_afull  = cmdq.size() > 8;
  assign app_wdf_afull = wdfq.size() > 16;

  function automatic logic [63:0] peek64(int unsigned byte_addr);
    if (mem.exists(byte_addr >> 3)) return mem[byte_addr >> 3];
    return 64'h0;
  endfunction

  function automatic void poke64(int unsigned byte_addr, logic [63:0] v);
    mem[byte_addr >> 3] = v;
  endfunction

  function automatic logic [31:0] peek32(int unsigned byte_addr);
    logic [63:0] w;
    w = peek64(byte_addr);
    return byte_addr[2] ? w[63:32] : w[31:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      init_cnt <= 0;
      phy_init_done <= 1'b0;
      rd_data_valid <= 1'b0;
      rd_data_fifo_out <= '0;
      busy <= 0;
      rd_left <= 0;
      rd_word <= 0;
      reads <= 0;
      writes <= 0;
      cmdq.delete();
      wdfq.delete();
    end else begin
      if (init_cnt < INIT_CYCLES) init_cnt <= init_cnt + 1;
      else phy_init_done <= 1'b1;
      if (app_af_wren) cmdq.push_back({app_af_cmd, app_af_addr});
      if (app_wdf_wren) wdfq.push_back({app_wdf_mask_data, app_wdf_data});
      rd_data_valid <= 1'b0;
      if (rd_left > 0) begin
        if (busy > 0) busy <= busy - 1;
        else begin
          rd_data_valid    <= 1'b1;
          rd_data_fifo_out <= {peek64((rd_word + 1) * 8), peek64(rd_word * 8)};
          rd_word <= rd_word + 2;
          rd_left <= rd_left - 1;
        end
      end else if (cmdq.size() > 0) begin
        logic [33:0] c;
        c = cmdq[0];
        if (c[33:31] == 3'b001) begin
          void'(cmdq.pop_front());
          rd_word <= int'(c[30:0]);
          rd_left <= 2;
          busy    <= READ_LAT;
          reads   <= reads + 1;
        end else if (wdfq.size() >= 2) begin
          void'(cmdq.pop_front());
          for (int w = 0; w < 2; w++) begin
            logic [143:0] d;
            d = wdfq.pop_front();
            for (int h = 0; h < 2; h++) begin
              logic [63:0] old;
              int unsigned a;
              a = (int'(c[30:0]) + 2 * w + h) * 8;
              old = peek64(a);
              for (int b = 0; b < 8; b++)
                if (!d[128 + 8 * h + b]) old[8*b +: 8] = d[64 * h + 8 * b +: 8];
              poke64(a, old);
            end
          end
          writes <= writes + 1;
        end
      end
    end
  end
endmodule
