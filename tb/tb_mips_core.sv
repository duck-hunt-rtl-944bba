// tb_mips_core: runs the shared test program (tb_prog_pkg) on the pipeline
// alone, with instruction and data memory models that answer after a random
// number of cycles. The data model has byte enables, a keyboard register and
// a light-gun register in the I/O page, and answers any other address in
// 0xB0000000-0xBEFFFFFF with a bus error. A keyboard interrupt line is raised
// once the program writes its doorbell word and dropped when the handler
// reads the key. Checks every result word and the logged exception causes,
// and counts load-use stalls, forwarding, branch squashes, multiply/divide
// stalls, interrupts and exceptions, failing any that never happened. A
// program that never reaches its end marker is reported after 150000 cycles.
`timescale 1ns/1ps
module tb_mips_core;
  import tb_prog_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic        imem_req, imem_ready = 0, imem_err = 0;
  logic [31:0] imem_addr, imem_rdata = 0;
  logic        dmem_req, dmem_we, dmem_ready = 0, dmem_err = 0;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata = 0;
  logic [3:0]  dmem_be;
  logic [4:0]  hw_irq = 0;
  logic        retire, exc_taken;
  mips_core dut (.*);

  logic [31:0] data [int unsigned];
  localparam logic [31:0] KEY_REG = 32'h0000_011C;

  function automatic logic [31:0] peek(logic [31:0] va);
    int unsigned k;
    k = va[28:2];
    return data.exists(k) ? data[k] : 32'h0;
  endfunction

  int iwait = 0, dwait = 0;
  always @(negedge clk) begin
    imem_ready = 0; imem_err = 0;
    if (!rst && imem_req) begin
      if (iwait == 0) begin
        imem_ready = 1;
        if (imem_addr[31:16] == 16'hBFC0) imem_rdata = code[imem_addr[12:2]];
        else begin imem_err = 1; imem_rdata = 0; end
        iwait = $urandom % 3;
      end else iwait--;
    end
    dmem_ready = 0; dmem_err = 0;
    if (!rst && dmem_req) begin
      if (dwait == 0) begin
        dmem_ready = 1;
        dwait = $urandom % 4;
        if (dmem_addr[31:20] == 12'hBF0) begin
          dmem_rdata = 0;
          if (!dmem_we && dmem_addr[9:8] == 2'd2) begin dmem_rdata = KEY_REG; hw_irq[2] = 0; end
          if (!dmem_we && dmem_addr[9:8] == 2'd3) dmem_rdata = 32'd3;
        end else if (dmem_addr[31:28] == 4'hB) begin
          dmem_err = 1;
        end else if (dmem_we) begin
          logic [31:0] w;
          w = peek(dmem_addr);
          for (int b = 0; b < 4; b++) if (dmem_be[b]) w[8*b +: 8] = dmem_wdata[8*b +: 8];
          data[dmem_addr[28:2]] = w;
          if (dmem_addr == DATA_BASE + D_BELL) hw_irq[2] = 1;
        end else begin
          dmem_rdata = peek(dmem_addr);
        end
      end else dwait--;
    end
  end

  int n_lu, n_fwd, n_squash, n_md, n_int, n_exc, n_ret;
  always @(posedge clk) if (!rst) begin
    if (dut.advance && dut.lu_stall) n_lu++;
    if (dut.advance && dut.ex_valid && dut.fwd_mem_ok &&
        (dut.mem_c.dest == dut.ex_rs || dut.mem_c.dest == dut.ex_rt)) n_fwd++;
    if (dut.advance && dut.ex_redirect) n_squash++;
    if (dut.ex_md_stall) n_md++;
    if (exc_taken && dut.wb_code == 5'd0) n_int++;
    if (exc_taken && dut.wb_code != 5'd0) n_exc++;
    if (retire) n_ret++;
  end

  initial begin
    build(32'h2000, 32'h3000, 64, 32'h4000, 32'h4100, 32);
    repeat (3) @(negedge clk);
    rst = 0;
    // wait for the program's end marker, but give up in time to report
    // which results are wrong if the program never gets there
    for (int c = 0; c < 150000 && peek(DATA_BASE + D_DONE) != 32'h600D; c++) @(negedge clk);
    check(peek(DATA_BASE + D_DONE) == 32'h600D, "program reached its end marker");
    for (int i = 0; i < N_CHECKED; i++) begin
      logic [31:0] got, exp;
      got = peek(DATA_BASE + CHECKED_OFFS[i]);
      exp = expected(CHECKED_OFFS[i], KEY_REG);
      check(got == exp, $sformatf("data[%h] = %h, expected %h", CHECKED_OFFS[i], got, exp));
    end
    for (int i = 0; i < 3; i++)
      check((peek(DATA_BASE + D_CAUSE + 4 * i) & 32'h7C) == CAUSES[i], $sformatf("cause %0d", i));
    $display("load-use %0d, forward %0d, squash %0d, muldiv stall %0d, interrupts %0d, exceptions %0d, retired %0d",
             n_lu, n_fwd, n_squash, n_md, n_int, n_exc, n_ret);
    check(n_lu > 0, "load-use stall seen");
    check(n_fwd > 0, "forwarding seen");
    check(n_squash > 0, "branch squash seen");
    check(n_md >= 64, "divide stalls seen");
    check(n_int == 2, "two interrupts");
    check(n_exc == 3, "three exceptions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
