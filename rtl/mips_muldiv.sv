// mips_muldiv: the multiply/divide co-processor that owns HI and LO.
//
// MULT/MULTU finish one cycle after `start` (a registered 32x32 product).
// DIV/DIVU run a restoring divider that retires one quotient bit per cycle,
// so `busy` stays high for 32 cycles; the pipeline stalls MFHI/MFLO and any new
// multiply or divide while `busy` is set. Signed division works on magnitudes
// and fixes the signs at the end (quotient truncated toward zero, remainder
// with the dividend's sign). Division by zero gives LO = all ones and HI = the
// dividend, as MIPS leaves that result undefined. MTHI/MTLO write directly.
module mips_muldiv
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  md_op_e      op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        wr_hi,
  input  logic        wr_lo,
  input  logic [31:0] wdata,
  output logic        busy,
  output logic [31:0] hi,
  output logic [31:0] lo
);
  logic [5:0]  count;
  logic [31:0] quot, divisor;
  logic [32:0] rem;
  logic        neg_q, neg_r;
  logic [31:0] dividend_abs, divisor_abs;
  logic signed [63:0] sprod;
  logic [63:0] uprod;
  logic [32:0] trial;

  assign dividend_abs = (op == MD_DIV && a[31]) ? -a : a;
  assign divisor_abs  = (op == MD_DIV && b[31]) ? -b : b;
  assign sprod = $signed(a) * $signed(b);
  assign uprod = a * b;
  assign trial = {rem[31:0], quot[31]} - {1'b0, divisor};
  assign busy  = count != 6'd0;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      hi <= '0;
      lo <= '0;
    end else if (busy) begin
      // one restoring-division step
      if (!trial[32]) begin
        rem  <= trial;
        quot <= {quot[30:0], 1'b1};
      end else begin
        rem  <= {rem[31:0], quot[31]};
        quot <= {quot[30:0], 1'b0};
      end
      count <= count - 1'b1;
      if (count == 6'd1) begin
        lo <= neg_q ? -(trial[32] ? {quot[30:0], 1'b0} : {quot[30:0], 1'b1})
                    :  (trial[32] ? {quot[30:0], 1'b0} : {quot[30:0], 1'b1});
        hi <= neg_r ? -(trial[32] ? {rem[30:0], quot[31]} : trial[31:0])
                    :  (trial[32] ? {rem[30:0], quot[31]} : trial[31:0]);
      end
    end else if (start) begin
      unique case (op)
        MD_MULT:  {hi, lo} <= sprod;
        MD_MULTU: {hi, lo} <= uprod;
        default: begin
          if (b == 32'd0) begin
            lo <= '1;
            hi <= a;
          end else begin
            quot    <= dividend_abs;
            divisor <= divisor_abs;
            rem     <= '0;
            neg_q   <= (op == MD_DIV) && (a[31] ^ b[31]);
            neg_r   <= (op == MD_DIV) && a[31];
            count   <= 6'd32;
          end
        end
      endcase
    end else begin
      if (wr_hi) hi <= wdata;
      if (wr_lo) lo <= wdata;
    end
  end
endmodule
