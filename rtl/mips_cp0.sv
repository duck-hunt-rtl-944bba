// mips_cp0: coprocessor 0 of the MIPS core - the Status/Cause/EPC registers
// that the exception handler reads, and the Count/Compare timer that gives
// the operating system its periodic scheduling interrupt.
//
// Registers (MIPS32 numbering): BadVAddr(8), Count(9), Compare(11),
// Status(12: BEV bit 22, IM bits 15:8, EXL bit 1, IE bit 0), Cause(13: BD bit
// 31, IP bits 15:8, ExcCode bits 6:2), EPC(14), PRId(15, read-only).
// Count increments every clock. Count == Compare sets the timer interrupt on
// IP7, cleared by writing Compare. The five hardware interrupt lines appear
// on IP6..IP2; IP1..IP0 are software-writable.
// `exc` (one cycle, from the WB stage) records code, EPC, BD and BadVAddr and
// sets EXL; `eret` clears EXL. `irq_pending` is high when an unmasked
// interrupt is pending with IE=1 and EXL=0. Reads are combinational; writes
// (MTC0, from the MEM stage) take effect at the clock edge. Reset sets BEV,
// clears IE and EXL, so the exception vector is 0xBFC00380 until software
// clears BEV, then 0x80000180.
module mips_cp0
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  rd_addr,
  output logic [31:0] rd_data,
  input  logic        we,
  input  logic [4:0]  wr_addr,
  input  logic [31:0] wr_data,
  input  logic        exc,
  input  logic [4:0]  exc_code,
  input  logic [31:0] exc_epc,
  input  logic        exc_bd,
  input  logic        exc_badv_we,
  input  logic [31:0] exc_badvaddr,
  input  logic        eret,
  input  logic [4:0]  hw_irq,
  output logic [31:0] epc,
  output logic [31:0] exc_vector,
  output logic        irq_pending,
  output logic        timer_irq
);
  logic [31:0] count, compare, badvaddr;
  logic        bev, exl, ie;
  logic [7:0]  im;
  logic [1:0]  ip_sw;
  logic        bd;
  logic [4:0]  exc_code_q;
  logic [7:0]  ip;

  assign ip = {timer_irq, hw_irq, ip_sw};
  assign irq_pending = ie && !exl && |(ip & im);
  assign exc_vector  = bev ? 32'hBFC0_0380 : 32'h8000_0180;

  always_comb begin
    unique case (rd_addr)
      CP0_BADVADDR: rd_data = badvaddr;
      CP0_COUNT:    rd_data = count;
      CP0_COMPARE:  rd_data = compare;
      CP0_STATUS:   rd_data = {9'b0, bev, 6'b0, im, 6'b0, exl, ie};
      CP0_CAUSE:    rd_data = {bd, 15'b0, ip, 1'b0, exc_code_q, 2'b0};
      CP0_EPC:      rd_data = epc;
      CP0_PRID:     rd_data = 32'h0001_8000;
      default:      rd_data = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0; compare <= '1; badvaddr <= '0; epc <= '0;
      bev <= 1'b1; exl <= 1'b0; ie <= 1'b0; im <= '0; ip_sw <= '0;
      bd <= 1'b0; exc_code_q <= '0; timer_irq <= 1'b0;
    end else begin
      count <= count + 1'b1;
      if (count == compare) timer_irq <= 1'b1;
      if (we) begin
        unique case (wr_addr)
          CP0_COUNT:   count <= wr_data;
          CP0_COMPARE: begin compare <= wr_data; timer_irq <= 1'b0; end
          CP0_STATUS:  begin bev <= wr_data[22]; im <= wr_data[15:8];
                             exl <= wr_data[1]; ie <= wr_data[0]; end
          CP0_CAUSE:   ip_sw <= wr_data[9:8];
          CP0_EPC:     epc <= wr_data;
          default: ;
        endcase
      end
      if (exc) begin
        exl        <= 1'b1;
        exc_code_q <= exc_code;
        epc        <= exc_epc;
        bd         <= exc_bd;
        if (exc_badv_we) badvaddr <= exc_badvaddr;
      end else if (eret) begin
        exl <= 1'b0;
      end
    end
  end
endmodule
