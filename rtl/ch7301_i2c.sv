// ch7301_i2c: I2C (IIC) master that configures the Chrontel CH7301C after
// reset, at a 100 kHz bus clock.
//
// It writes N_REGS register/value pairs, one I2C transaction each: START,
// device address byte (7-bit address DEV_ADDR, write), register byte, value
// byte, STOP, checking the slave's acknowledge after each byte. SCL and SDA
// are open-drain: `scl_low`/`sda_low` high pulls the line low, otherwise the
// line floats high; `sda_in` is the line as seen at the pin. Every bit takes
// four quarter-periods of CLK_HZ / I2C_HZ / 4 clocks: SDA changes while SCL
// is low, SCL rises, SDA is sampled, SCL falls. `done` rises after the last
// STOP; `nacks` counts missing acknowledges.
// The register table is this design's own choice (the CH7301C data sheet
// values for DVI output of a pixel clock below 65 MHz, with the DVI
// transmitter and DAC powered up); override REG_TABLE for another set-up.
module ch7301_i2c #(
  parameter int          CLK_HZ   = 50_000_000,
  parameter int          I2C_HZ   = 100_000,
  parameter logic [6:0]  DEV_ADDR = 7'h76,
  parameter int          N_REGS   = 5,
  parameter logic [15:0] REG_TABLE [N_REGS] =
    '{16'h49C0, 16'h2109, 16'h3308, 16'h3416, 16'h3660}
) (
  input  logic       clk,
  input  logic       rst,
  output logic       scl_low,
  output logic       sda_low,
  input  logic       sda_in,
  output logic       done,
  output logic [7:0] nacks
);
  localparam int QDIV = CLK_HZ / I2C_HZ / 4;

  typedef enum logic [2:0] {S_WAIT, S_START, S_BITS, S_STOP, S_DONE} state_e;
  state_e state;

  logic [$clog2(QDIV+1)-1:0] qcnt;
  logic        tick;
  logic [1:0]  phase;
  logic [4:0]  bitn;              // 0..26: 3 x (8 data + 1 ack)
  logic [$clog2(N_REGS+1)-1:0] reg_i;
  logic [23:0] frame;
  logic        is_ack;
  logic        out_bit;

  assign tick   = qcnt == '0;
  assign frame  = {DEV_ADDR, 1'b0, REG_TABLE[reg_i]};
  assign is_ack = bitn == 5'd8 || bitn == 5'd17 || bitn == 5'd26;
  assign out_bit = frame[5'd23 - (bitn - bitn / 5'd9)];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_WAIT; qcnt <= '0; phase <= '0; bitn <= '0; reg_i <= '0;
      scl_low <= 1'b0; sda_low <= 1'b0; done <= 1'b0; nacks <= '0;
    end else begin
      qcnt <= tick ? ($clog2(QDIV+1))'(QDIV - 1) : qcnt - 1'b1;
      if (tick) begin
        phase <= phase + 1'b1;
        unique case (state)
          S_WAIT: if (phase == 2'd3) state <= S_START;
          S_START: unique case (phase)
            2'd0: begin scl_low <= 1'b0; sda_low <= 1'b0; end
            2'd1: sda_low <= 1'b1;            // SDA falls while SCL high
            2'd2: scl_low <= 1'b1;
            default: begin state <= S_BITS; bitn <= '0; end
          endcase
          S_BITS: unique case (phase)
            2'd0: sda_low <= is_ack ? 1'b0 : !out_bit;
            2'd1: scl_low <= 1'b0;
            2'd2: if (is_ack && sda_in) nacks <= nacks + 1'b1;
            default: begin
              scl_low <= 1'b1;
              if (bitn == 5'd26) state <= S_STOP;
              else bitn <= bitn + 1'b1;
            end
          endcase
          S_STOP: unique case (phase)
            2'd0: sda_low <= 1'b1;
            2'd1: scl_low <= 1'b0;
            2'd2: sda_low <= 1'b0;            // SDA rises while SCL high
            default: begin
              if (reg_i == ($clog2(N_REGS+1))'(N_REGS - 1)) state <= S_DONE;
              else begin reg_i <= reg_i + 1'b1; state <= S_START; end
            end
          endcase
          default: done <= 1'b1;
        endcase
      end
    end
  end
endmodule
