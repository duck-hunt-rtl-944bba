// mips_core: five-stage pipelined MIPS32 integer core (little-endian, no TLB).
//
// Stages: IF fetches the word at PC; ID decodes and reads the register file;
// EX runs the ALU, resolves branches and jumps and starts multiply/divide;
// MEM performs loads and stores and reads/writes coprocessor 0; WB writes the
// register file and takes exceptions.
//
// Hazards. Results are forwarded into EX from the MEM and WB stages. A load
// or MFC0 followed by an instruction that uses its result stalls IF/ID for one
// cycle and inserts a bubble in EX. Branches have the MIPS delay slot and are
// resolved in EX: on a taken branch the instruction after the delay slot,
// already fetched, is squashed.
//
// Memory ports. Both ports are level request / single-cycle `ready` pulse.
// The request and address stay stable until `ready`; the core freezes the whole
// pipeline while a fetch or data access is outstanding, or while the
// multiply/divide unit is busy and EX needs it. A fetch that completes during
// a stall is parked in an instruction buffer.
//
// Exceptions and interrupts are handled alike: an exception is recorded with
// the instruction and carried to WB, where the pipeline is flushed and PC is
// sent to the vector. An interrupt is latched onto the instruction in EX,
// which is then not executed. Once an instruction with an exception (or ERET)
// is in MEM or WB, younger instructions are cancelled before they reach MEM.
// ERET is handled in WB like an exception, returning to EPC.
// Supported: the MIPS-I integer instruction set without unaligned loads and
// stores (lwl/lwr/swl/swr) and without coprocessors other than CP0; anything
// else raises a reserved-instruction exception.
module mips_core
  import mips_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'hBFC0_0000
) (
  input  logic        clk,
  input  logic        rst,
  // instruction port
  output logic        imem_req,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  input  logic        imem_ready,
  input  logic        imem_err,
  // data port
  output logic        dmem_req,
  output logic        dmem_we,
  output logic [31:0] dmem_addr,
  output logic [3:0]  dmem_be,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  input  logic        dmem_ready,
  input  logic        dmem_err,
  // hardware interrupts (Cause.IP6..IP2)
  input  logic [4:0]  hw_irq,
  // observation: one pulse per retired instruction / per exception taken
  output logic        retire,
  output logic        exc_taken
);

  // ------------------------------------------------------------------ decode
  function automatic ctrl_t decode(input logic [31:0] in);
    ctrl_t c;
    logic [5:0] opc, fn;
    logic [4:0] rs, rt, rd;
    logic [31:0] simm, zimm;
    opc = in[31:26]; fn = in[5:0];
    rs = in[25:21]; rt = in[20:16]; rd = in[15:11];
    simm = {{16{in[15]}}, in[15:0]};
    zimm = {16'b0, in[15:0]};
    c = '0;
    c.alu_op = ALU_ADD;
    c.br     = BR_NONE;
    c.md_op  = MD_MULT;
    c.imm    = simm;
    unique case (opc)
      6'h00: begin
        c.use_rs = 1'b1; c.use_rt = 1'b1; c.reg_write = 1'b1; c.dest = rd;
        unique case (fn)
          6'h00: begin c.alu_op = ALU_SLL; c.a_shamt = 1'b1; c.use_rs = 1'b0; end
          6'h02: begin c.alu_op = ALU_SRL; c.a_shamt = 1'b1; c.use_rs = 1'b0; end
          6'h03: begin c.alu_op = ALU_SRA; c.a_shamt = 1'b1; c.use_rs = 1'b0; end
          6'h04: c.alu_op = ALU_SLL;
          6'h06: c.alu_op = ALU_SRL;
          6'h07: c.alu_op = ALU_SRA;
          6'h08: begin c.br = BR_JR; c.use_rt = 1'b0; c.reg_write = 1'b0; end
          6'h09: begin c.br = BR_JR; c.use_rt = 1'b0; c.link = 1'b1; end
          6'h0C: begin c.exc = 1'b1; c.exc_code = EXC_SYS; c.reg_write = 1'b0; end
          6'h0D: begin c.exc = 1'b1; c.exc_code = EXC_BP;  c.reg_write = 1'b0; end
          6'h10: begin c.mfhi = 1'b1; c.use_rs = 1'b0; c.use_rt = 1'b0; end
          6'h11: begin c.mthi = 1'b1; c.use_rt = 1'b0; c.reg_write = 1'b0; end
          6'h12: begin c.mflo = 1'b1; c.use_rs = 1'b0; c.use_rt = 1'b0; end
          6'h13: begin c.mtlo = 1'b1; c.use_rt = 1'b0; c.reg_write = 1'b0; end
          6'h18: begin c.md_start = 1'b1; c.md_op = MD_MULT;  c.reg_write = 1'b0; end
          6'h19: begin c.md_start = 1'b1; c.md_op = MD_MULTU; c.reg_write = 1'b0; end
          6'h1A: begin c.md_start = 1'b1; c.md_op = MD_DIV;   c.reg_write = 1'b0; end
          6'h1B: begin c.md_start = 1'b1; c.md_op = MD_DIVU;  c.reg_write = 1'b0; end
          6'h20: begin c.alu_op = ALU_ADD; c.trap_ovf = 1'b1; end
          6'h21: c.alu_op = ALU_ADD;
          6'h22: begin c.alu_op = ALU_SUB; c.trap_ovf = 1'b1; end
          6'h23: c.alu_op = ALU_SUB;
          6'h24: c.alu_op = ALU_AND;
          6'h25: c.alu_op = ALU_OR;
          6'h26: c.alu_op = ALU_XOR;
          6'h27: c.alu_op = ALU_NOR;
          6'h2A: c.alu_op = ALU_SLT;
          6'h2B: c.alu_op = ALU_SLTU;
          default: begin c = '0; c.exc = 1'b1; c.exc_code = EXC_RI; end
        endcase
      end
      6'h01: begin
        c.use_rs = 1'b1;
        unique case (rt)
          5'h00: c.br = BR_LTZ;
          5'h01: c.br = BR_GEZ;
          5'h10: begin c.br = BR_LTZ; c.link = 1'b1; c.reg_write = 1'b1; c.dest = 5'd31; end
          5'h11: begin c.br = BR_GEZ; c.link = 1'b1; c.reg_write = 1'b1; c.dest = 5'd31; end
          default: begin c = '0; c.exc = 1'b1; c.exc_code = EXC_RI; end
        endcase
      end
      6'h02: begin c.br = BR_J; c.imm = {4'b0, in[25:0], 2'b0}; end
      6'h03: begin c.br = BR_J; c.imm = {4'b0, in[25:0], 2'b0};
                   c.link = 1'b1; c.reg_write = 1'b1; c.dest = 5'd31; end
      6'h04: begin c.br = BR_EQ;  c.use_rs = 1'b1; c.use_rt = 1'b1; end
      6'h05: begin c.br = BR_NE;  c.use_rs = 1'b1; c.use_rt = 1'b1; end
      6'h06: begin c.br = BR_LEZ; c.use_rs = 1'b1; end
      6'h07: begin c.br = BR_GTZ; c.use_rs = 1'b1; end
      6'h08, 6'h09, 6'h0A, 6'h0B, 6'h0C, 6'h0D, 6'h0E, 6'h0F: begin
        c.use_rs = (opc != 6'h0F); c.b_imm = 1'b1; c.reg_write = 1'b1; c.dest = rt;
        unique case (opc)
          6'h08: begin c.alu_op = ALU_ADD; c.trap_ovf = 1'b1; end
          6'h09: c.alu_op = ALU_ADD;
          6'h0A: c.alu_op = ALU_SLT;
          6'h0B: c.alu_op = ALU_SLTU;
          6'h0C: begin c.alu_op = ALU_AND; c.imm = zimm; end
          6'h0D: begin c.alu_op = ALU_OR;  c.imm = zimm; end
          6'h0E: begin c.alu_op = ALU_XOR; c.imm = zimm; end
          default: begin c.alu_op = ALU_LUI; c.imm = zimm; end
        endcase
      end
      6'h10: begin
        if (rs == 5'h00) begin
          c.mfc0 = 1'b1; c.reg_write = 1'b1; c.dest = rt;
        end else if (rs == 5'h04) begin
          c.mtc0 = 1'b1; c.use_rt = 1'b1;
        end else if (rs == 5'h10 && fn == 6'h18) begin
          c.eret = 1'b1;
        end else begin
          c.exc = 1'b1; c.exc_code = EXC_RI;
        end
      end
      6'h20, 6'h21, 6'h23, 6'h24, 6'h25: begin
        c.mem_read = 1'b1; c.use_rs = 1'b1; c.b_imm = 1'b1;
        c.reg_write = 1'b1; c.dest = rt;
        c.mem_size = (opc[1:0] == 2'b11) ? 2'd2 : {1'b0, opc[0]};
        c.mem_unsigned = opc[2];
      end
      6'h28, 6'h29, 6'h2B: begin
        c.mem_write = 1'b1; c.use_rs = 1'b1; c.use_rt = 1'b1; c.b_imm = 1'b1;
        c.mem_size = (opc[1:0] == 2'b11) ? 2'd2 : {1'b0, opc[0]};
      end
      default: begin c.exc = 1'b1; c.exc_code = EXC_RI; end
    endcase
    return c;
  endfunction

  // ---------------------------------------------------------- pipeline regs
  logic [31:0] pc;
  logic        if_have, if_err_q;
  logic [31:0] if_inst_q;

  logic        id_valid, id_err, id_bd;
  logic [31:0] id_inst, id_pc;

  logic        ex_valid, ex_bd;
  logic [31:0] ex_pc, ex_rsv, ex_rtv;
  logic [4:0]  ex_rs, ex_rt, ex_shamt;
  ctrl_t       ex_c;

  logic        mem_valid, mem_bd, mem_exc;
  logic [4:0]  mem_code;
  logic [31:0] mem_pc, mem_result, mem_store;
  ctrl_t       mem_c;
  logic        mem_done, mem_derr_q;
  logic [31:0] mem_rdata_q;

  logic        wb_valid, wb_bd, wb_exc, wb_eret, wb_write, wb_badv_we;
  logic [4:0]  wb_code, wb_dest;
  logic [31:0] wb_pc, wb_result, wb_badv;

  // ---------------------------------------------------------- shared signals
  logic        advance, lu_stall, wb_take, exc_pending;
  logic        ex_redirect;
  logic [31:0] ex_target;

  // ---------------------------------------------------------------- IF
  logic        if_ok;
  logic [31:0] if_inst;
  logic        if_err;

  assign imem_req  = !if_have;
  assign imem_addr = pc;
  assign if_ok     = if_have || imem_ready;
  assign if_inst   = if_have ? if_inst_q : imem_rdata;
  assign if_err    = if_have ? if_err_q  : imem_err;

  // ---------------------------------------------------------------- ID
  ctrl_t       id_c;
  logic [31:0] rf_rd1, rf_rd2;
  logic        wb_rf_we;

  always_comb begin
    id_c = decode(id_inst);
    if (id_err) begin
      id_c = '0;
      id_c.exc = 1'b1;
      id_c.exc_code = EXC_IBE;
    end
  end

  mips_regfile u_rf (
    .clk (clk),
    .ra1 (id_inst[25:21]), .ra2 (id_inst[20:16]),
    .rd1 (rf_rd1), .rd2 (rf_rd2),
    .we  (wb_rf_we), .wa (wb_dest), .wd (wb_result)
  );

  assign lu_stall = id_valid && ex_valid && (ex_c.mem_read || ex_c.mfc0) &&
                    ex_c.reg_write && ex_c.dest != 5'd0 &&
                    ((id_c.use_rs && id_inst[25:21] == ex_c.dest) ||
                     (id_c.use_rt && id_inst[20:16] == ex_c.dest));

  // ---------------------------------------------------------------- EX
  logic        fwd_mem_ok;
  logic [31:0] rs_f, rt_f, alu_a, alu_b, alu_y, ex_result;
  logic        alu_ovf, ex_live, ex_take_int, ex_exc, br_taken;
  logic [4:0]  ex_code;
  logic        md_busy, irq_pending;
  logic [31:0] md_hi, md_lo;
  logic        ex_md_stall;

  assign fwd_mem_ok = mem_valid && !mem_exc && mem_c.reg_write && !mem_c.mem_read &&
                      !mem_c.mfc0 && mem_c.dest != 5'd0;

  always_comb begin
    rs_f = ex_rsv;
    rt_f = ex_rtv;
    if (wb_rf_we && wb_dest == ex_rs) rs_f = wb_result;
    if (wb_rf_we && wb_dest == ex_rt) rt_f = wb_result;
    if (fwd_mem_ok && mem_c.dest == ex_rs) rs_f = mem_result;
    if (fwd_mem_ok && mem_c.dest == ex_rt) rt_f = mem_result;
    if (ex_rs == 5'd0) rs_f = '0;
    if (ex_rt == 5'd0) rt_f = '0;
  end

  assign alu_a = ex_c.a_shamt ? {27'b0, ex_shamt} : rs_f;
  assign alu_b = ex_c.b_imm   ? ex_c.imm : rt_f;

  mips_alu u_alu (.op(ex_c.alu_op), .a(alu_a), .b(alu_b), .y(alu_y), .ovf(alu_ovf));

  always_comb begin
    unique case (ex_c.br)
      BR_EQ:  br_taken = rs_f == rt_f;
      BR_NE:  br_taken = rs_f != rt_f;
      BR_LEZ: br_taken = $signed(rs_f) <= 0;
      BR_GTZ: br_taken = $signed(rs_f) > 0;
      BR_LTZ: br_taken = rs_f[31];
      BR_GEZ: br_taken = !rs_f[31];
      BR_J, BR_JR: br_taken = 1'b1;
      default: br_taken = 1'b0;
    endcase
    unique case (ex_c.br)
      BR_J:    ex_target = {ex_pc[31:28] , ex_c.imm[27:0]};
      BR_JR:   ex_target = rs_f;
      default: ex_target = ex_pc + 32'd4 + {ex_c.imm[29:0], 2'b00};
    endcase
  end

  assign ex_live     = ex_valid && !exc_pending;
  assign ex_take_int = ex_live && !ex_c.exc && irq_pending;
  assign ex_exc      = ex_c.exc || ex_take_int || (ex_c.trap_ovf && alu_ovf);
  assign ex_code     = ex_c.exc ? ex_c.exc_code : ex_take_int ? EXC_INT : EXC_OV;
  assign ex_redirect = ex_live && !ex_exc && br_taken;

  always_comb begin
    if (ex_c.link)      ex_result = ex_pc + 32'd8;
    else if (ex_c.mfhi) ex_result = md_hi;
    else if (ex_c.mflo) ex_result = md_lo;
    else                ex_result = alu_y;
  end

  assign ex_md_stall = ex_live && md_busy &&
                       (ex_c.md_start || ex_c.mfhi || ex_c.mflo || ex_c.mthi || ex_c.mtlo);

  mips_muldiv u_md (
    .clk   (clk), .rst (rst),
    .start (advance && ex_live && !ex_exc && ex_c.md_start),
    .op    (ex_c.md_op), .a (rs_f), .b (rt_f),
    .wr_hi (advance && ex_live && !ex_exc && ex_c.mthi),
    .wr_lo (advance && ex_live && !ex_exc && ex_c.mtlo),
    .wdata (rs_f),
    .busy  (md_busy), .hi (md_hi), .lo (md_lo)
  );

  // ---------------------------------------------------------------- MEM
  logic        align_err, mem_access, mem_wait, mem_derr, mem_exc_now;
  logic [31:0] mem_rword, load_val, mem_final, cp0_rdata;
  logic [4:0]  mem_code_now;

  assign align_err  = (mem_c.mem_read || mem_c.mem_write) &&
                      ((mem_c.mem_size == 2'd2 && mem_result[1:0] != 2'b00) ||
                       (mem_c.mem_size == 2'd1 && mem_result[0]));
  assign mem_access = mem_valid && !mem_exc && !align_err &&
                      (mem_c.mem_read || mem_c.mem_write);
  assign dmem_req   = mem_access && !mem_done;
  assign dmem_we    = mem_c.mem_write;
  assign dmem_addr  = mem_result;
  assign mem_wait   = dmem_req && !dmem_ready;
  assign mem_rword  = mem_done ? mem_rdata_q : dmem_rdata;
  assign mem_derr   = mem_access && (mem_done ? mem_derr_q : dmem_err);

  always_comb begin
    unique case (mem_c.mem_size)
      2'd0: begin
        dmem_be    = 4'b0001 << mem_result[1:0];
        dmem_wdata = {4{mem_store[7:0]}};
      end
      2'd1: begin
        dmem_be    = mem_result[1] ? 4'b1100 : 4'b0011;
        dmem_wdata = {2{mem_store[15:0]}};
      end
      default: begin
        dmem_be    = 4'b1111;
        dmem_wdata = mem_store;
      end
    endcase
  end

  always_comb begin
    logic [7:0]  b8;
    logic [15:0] h16;
    b8  = mem_rword[8*mem_result[1:0] +: 8];
    h16 = mem_result[1] ? mem_rword[31:16] : mem_rword[15:0];
    unique case (mem_c.mem_size)
      2'd0:    load_val = mem_c.mem_unsigned ? {24'b0, b8}  : {{24{b8[7]}}, b8};
      2'd1:    load_val = mem_c.mem_unsigned ? {16'b0, h16} : {{16{h16[15]}}, h16};
      default: load_val = mem_rword;
    endcase
  end

  assign mem_final    = mem_c.mem_read ? load_val : mem_c.mfc0 ? cp0_rdata : mem_result;
  assign mem_exc_now  = mem_exc || align_err || mem_derr;
  assign mem_code_now = mem_exc ? mem_code :
                        align_err ? (mem_c.mem_write ? EXC_ADES : EXC_ADEL) : EXC_DBE;

  // ---------------------------------------------------------------- WB / CP0
  logic [31:0] epc, exc_vector;

  assign wb_rf_we   = advance && wb_valid && !wb_exc && wb_write;
  assign wb_take    = wb_valid && (wb_exc || wb_eret);
  assign exc_pending = (mem_valid && (mem_exc_now || mem_c.eret)) || wb_take;

  mips_cp0 u_cp0 (
    .clk (clk), .rst (rst),
    .rd_addr (mem_c.imm[15:11]), .rd_data (cp0_rdata),
    .we (advance && mem_valid && !mem_exc_now && mem_c.mtc0 && !wb_take),
    .wr_addr (mem_c.imm[15:11]), .wr_data (mem_store),
    .exc (advance && wb_valid && wb_exc), .exc_code (wb_code),
    .exc_epc (wb_bd ? wb_pc - 32'd4 : wb_pc), .exc_bd (wb_bd),
    .exc_badv_we (wb_badv_we), .exc_badvaddr (wb_badv),
    .eret (advance && wb_valid && !wb_exc && wb_eret),
    .hw_irq (hw_irq),
    .epc (epc), .exc_vector (exc_vector), .irq_pending (irq_pending),
    .timer_irq ()
  );

  assign retire    = advance && wb_valid && !wb_exc;
  assign exc_taken = advance && wb_valid && wb_exc;

  // ---------------------------------------------------------------- control
  assign advance = if_ok && !mem_wait && !ex_md_stall;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc <= RESET_PC;
      if_have <= 1'b0;
      id_valid <= 1'b0;
      ex_valid <= 1'b0;
      mem_valid <= 1'b0;
      wb_valid <= 1'b0;
      mem_done <= 1'b0;
      id_bd <= 1'b0;
    end else begin
      // data-port response parking
      if (advance) mem_done <= 1'b0;
      else if (dmem_req && dmem_ready) begin
        mem_done    <= 1'b1;
        mem_rdata_q <= dmem_rdata;
        mem_derr_q  <= dmem_err;
      end

      if (!advance) begin
        if (!if_have && imem_ready) begin
          if_have   <= 1'b1;
          if_inst_q <= imem_rdata;
          if_err_q  <= imem_err;
        end
      end else if (wb_take) begin
        pc        <= wb_exc ? exc_vector : epc;
        if_have   <= 1'b0;
        id_valid  <= 1'b0;
        ex_valid  <= 1'b0;
        mem_valid <= 1'b0;
        wb_valid  <= 1'b0;
      end else begin
        // MEM -> WB
        wb_valid   <= mem_valid;
        wb_pc      <= mem_pc;
        wb_bd      <= mem_bd;
        wb_exc     <= mem_exc_now;
        wb_code    <= mem_code_now;
        wb_eret    <= mem_c.eret && !mem_exc_now;
        wb_write   <= mem_c.reg_write;
        wb_dest    <= mem_c.dest;
        wb_result  <= mem_final;
        wb_badv_we <= align_err || mem_derr;
        wb_badv    <= mem_result;
        // EX -> MEM
        mem_valid  <= ex_valid && !exc_pending;
        mem_pc     <= ex_pc;
        mem_bd     <= ex_bd;
        mem_c      <= ex_c;
        mem_exc    <= ex_exc;
        mem_code   <= ex_code;
        mem_result <= ex_result;
        mem_store  <= rt_f;
        if (lu_stall) begin
          ex_valid <= 1'b0;
          if (!if_have) begin
            if_have   <= 1'b1;
            if_inst_q <= imem_rdata;
            if_err_q  <= imem_err;
          end
        end else begin
          // ID -> EX
          ex_valid <= id_valid;
          ex_pc    <= id_pc;
          ex_bd    <= id_bd;
          ex_c     <= id_c;
          ex_rs    <= id_inst[25:21];
          ex_rt    <= id_inst[20:16];
          ex_shamt <= id_inst[10:6];
          ex_rsv   <= rf_rd1;
          ex_rtv   <= rf_rd2;
          // IF -> ID
          id_valid <= !ex_redirect;
          id_inst  <= if_inst;
          id_err   <= if_err;
          id_pc    <= pc;
          id_bd    <= id_valid && id_c.br != BR_NONE && !id_c.exc;
          // PC
          pc       <= ex_redirect ? ex_target : pc + 32'd4;
          if_have  <= 1'b0;
        end
      end
    end
  end

`ifndef SYNTHESIS
  a_imem_stable: assert property (@(posedge clk) disable iff (rst)
      imem_req && !imem_ready |=> imem_addr == $past(imem_addr))
    else $error("mips_core: fetch address changed while outstanding");
`endif
endmodule
