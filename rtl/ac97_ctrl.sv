// ac97_ctrl: AC-link controller for the Analog Devices AD1981B codec.
//
// Runs on the codec's bit clock (nominally 12.288 MHz). Every frame is 256
// bits, sent MSB first: a 16-bit tag slot and twelve 20-bit slots, with SYNC
// high during the tag slot; frames repeat at 48 kHz, the sample rate of the
// audio. Data changes on the rising edge of the bit clock (the codec samples
// on the falling edge).
// Slot 1 (command address: bit 19 = read, bits 18:12 = register) and slot 2
// (command data in bits 19:4) set up the codec: once the codec reports ready
// (tag bit 15 of its input frame) the N_CMDS writes of CMD_TABLE go out, one
// per frame. The default table turns the master, headphone and PCM-out
// volumes up from their muted reset values. Slots 3 and 4 carry the left and
// right 16-bit samples (bits 19:4). Samples come from the DMA FIFO: one 64-bit
// word holds four samples, little-endian, in the order left, right, left,
// right, so a word lasts two frames. With no sample ready, slots 3 and 4 are
// marked invalid and `underruns` counts. Slots 5 to 12 are not used.
module ac97_ctrl #(
  parameter int          N_CMDS = 3,
  parameter logic [22:0] CMD_TABLE [N_CMDS] = '{
    {7'h02, 16'h0000},   // master volume: 0 dB, unmuted
    {7'h04, 16'h0000},   // headphone volume: 0 dB, unmuted
    {7'h18, 16'h0808}    // PCM-out volume: 0 dB, unmuted
  }
) (
  input  logic        bit_clk,
  input  logic        rst,
  output logic        sync,
  output logic        sdata_out,
  input  logic        sdata_in,
  input  logic [63:0] fifo_data,
  input  logic        fifo_empty,
  output logic        fifo_rd,
  output logic        cmds_done,
  output logic [15:0] frames,
  output logic [15:0] underruns
);
  logic [7:0]   bitcnt;
  logic [255:0] shreg;
  logic         codec_ready;
  logic [$clog2(N_CMDS+1)-1:0] cmd_i;
  logic         half;                 // which sample pair of the word
  logic         have_cmd, have_pcm;
  logic [15:0]  left, right, tag;
  logic [19:0]  slot1, slot2, slot3, slot4;

  assign have_cmd  = codec_ready && cmd_i != ($clog2(N_CMDS+1))'(N_CMDS);
  assign have_pcm  = !fifo_empty;
  assign left      = half ? fifo_data[47:32] : fifo_data[15:0];
  assign right     = half ? fifo_data[63:48] : fifo_data[31:16];
  assign tag       = {1'b1, have_cmd, have_cmd, have_pcm, have_pcm, 11'b0};
  assign slot1     = {1'b0, CMD_TABLE[have_cmd ? cmd_i : '0][22:16], 12'b0};
  assign slot2     = {CMD_TABLE[have_cmd ? cmd_i : '0][15:0], 4'b0};
  assign slot3     = have_pcm ? {left, 4'b0} : '0;
  assign slot4     = have_pcm ? {right, 4'b0} : '0;
  assign fifo_rd   = bitcnt == 8'd255 && have_pcm && half;
  assign cmds_done = cmd_i == ($clog2(N_CMDS+1))'(N_CMDS);

  always_ff @(posedge bit_clk) begin
    if (rst) begin
      bitcnt <= 8'd255; shreg <= '0; sync <= 1'b0; sdata_out <= 1'b0;
      codec_ready <= 1'b0; cmd_i <= '0; half <= 1'b0;
      frames <= '0; underruns <= '0;
    end else begin
      bitcnt <= bitcnt + 1'b1;
      if (bitcnt == 8'd1) codec_ready <= sdata_in;
      if (bitcnt == 8'd255) begin
        // load the next frame; its first bit goes out now
        shreg     <= {tag[14:0], slot1, slot2, slot3, slot4, 160'b0, 1'b0};
        sdata_out <= tag[15];
        sync      <= 1'b1;
        frames    <= frames + 1'b1;
        if (have_cmd) cmd_i <= cmd_i + 1'b1;
        if (have_pcm) half <= !half;
        else underruns <= underruns + 1'b1;
      end else begin
        sdata_out <= shreg[255];
        shreg     <= {shreg[254:0], 1'b0};
        if (bitcnt == 8'd15) sync <= 1'b0;
      end
    end
  end
endmodule
