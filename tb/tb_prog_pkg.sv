// tb_prog_pkg: a small MIPS assembler (instruction encoders) and the test
// program shared by the core-level and system-level testbenches.
//
// The program runs from the reset vector 0xBFC00000 and keeps its results in
// a data area at virtual 0xA0001000 (uncached alias of physical 0x1000). It
// exercises forwarding, a load-use stall, a counted loop whose delay slot
// runs every iteration while the instruction after it is squashed, multiply
// and both divides, jal/jr, byte and half-word loads and stores, slt/sltu, a
// syscall, an arithmetic overflow, a bus error, a Count/Compare timer
// interrupt and a keyboard interrupt (raised by the test bench once the
// program rings a "doorbell" store). It also programs both DMA controllers.
// The exception handler sits at 0xBFC00380 and logs each exception cause.
package tb_prog_pkg;

  // data-area offsets
  localparam int D_ADD = 'h00, D_SUB = 'h04, D_LU = 'h08, D_SUM = 'h0C, D_DS = 'h10;
  localparam int D_SQ = 'h14, D_MLO = 'h18, D_MHI = 'h1C, D_DLO = 'h20, D_DHI = 'h24;
  localparam int D_ULO = 'h28, D_UHI = 'h2C, D_LINK = 'h30, D_BYTES = 'h34, D_LB = 'h38;
  localparam int D_LBU = 'h3C, D_LH = 'h40, D_LHU = 'h44, D_SLT = 'h48, D_SLTU = 'h4C;
  localparam int D_OVF = 'h50, D_NEXC = 'h54, D_NTIM = 'h58, D_NKEY = 'h5C, D_KEY = 'h60;
  localparam int D_GUN = 'h64, D_DONE = 'h68, D_CAUSE = 'h100, D_BELL = 'h1F8;
  localparam logic [31:0] DATA_BASE = 32'hA000_1000;
  localparam int          HANDLER_IDX = 'hE0;   // 0xBFC00380

  logic [31:0] code [2048];
  int          pc;
  int          jal_idx;

  localparam int ZERO = 0, V0 = 2, A0 = 4, A1 = 5, A2 = 6, A3 = 7;
  localparam int T0 = 8, T1 = 9, T2 = 10, T3 = 11, T4 = 12, T5 = 13, T6 = 14, T7 = 15;
  localparam int S0 = 16, S1 = 17, S3 = 19, S4 = 20, S5 = 21, S6 = 22, S7 = 23;
  localparam int K0 = 26, K1 = 27, RA = 31;

  function automatic logic [31:0] r_t(int rs, int rt, int rd, int sh, int fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), 6'(fn)};
  endfunction
  function automatic logic [31:0] i_t(int op, int rs, int rt, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic void emit(logic [31:0] w);
    code[pc] = w;
    pc++;
  endfunction

  function automatic void ADDU(int d, int s, int t);  emit(r_t(s, t, d, 0, 'h21)); endfunction
  function automatic void ADD (int d, int s, int t);  emit(r_t(s, t, d, 0, 'h20)); endfunction
  function automatic void SUBU(int d, int s, int t);  emit(r_t(s, t, d, 0, 'h23)); endfunction
  function automatic void SLT (int d, int s, int t);  emit(r_t(s, t, d, 0, 'h2A)); endfunction
  function automatic void SLTU(int d, int s, int t);  emit(r_t(s, t, d, 0, 'h2B)); endfunction
  function automatic void SLL (int d, int t, int sh); emit(r_t(0, t, d, sh, 'h00)); endfunction
  function automatic void JR  (int s);                emit(r_t(s, 0, 0, 0, 'h08)); endfunction
  function automatic void SYSCALL();                  emit(r_t(0, 0, 0, 0, 'h0C)); endfunction
  function automatic void MULT(int s, int t);         emit(r_t(s, t, 0, 0, 'h18)); endfunction
  function automatic void DIV (int s, int t);         emit(r_t(s, t, 0, 0, 'h1A)); endfunction
  function automatic void DIVU(int s, int t);         emit(r_t(s, t, 0, 0, 'h1B)); endfunction
  function automatic void MFHI(int d);                emit(r_t(0, 0, d, 0, 'h10)); endfunction
  function automatic void MFLO(int d);                emit(r_t(0, 0, d, 0, 'h12)); endfunction
  function automatic void NOP();                      emit(32'h0); endfunction
  function automatic void ADDIU(int t, int s, int i); emit(i_t('h09, s, t, i)); endfunction
  function automatic void ANDI(int t, int s, int i);  emit(i_t('h0C, s, t, i)); endfunction
  function automatic void ORI (int t, int s, int i);  emit(i_t('h0D, s, t, i)); endfunction
  function automatic void LUI (int t, int i);         emit(i_t('h0F, 0, t, i)); endfunction
  function automatic void LW  (int t, int o, int b);  emit(i_t('h23, b, t, o)); endfunction
  function automatic void LB  (int t, int o, int b);  emit(i_t('h20, b, t, o)); endfunction
  function automatic void LBU (int t, int o, int b);  emit(i_t('h24, b, t, o)); endfunction
  function automatic void LH  (int t, int o, int b);  emit(i_t('h21, b, t, o)); endfunction
  function automatic void LHU (int t, int o, int b);  emit(i_t('h25, b, t, o)); endfunction
  function automatic void SW  (int t, int o, int b);  emit(i_t('h2B, b, t, o)); endfunction
  function automatic void SH  (int t, int o, int b);  emit(i_t('h29, b, t, o)); endfunction
  function automatic void SB  (int t, int o, int b);  emit(i_t('h28, b, t, o)); endfunction
  // branch to instruction index `target`
  function automatic void BEQ(int s, int t, int target); emit(i_t('h04, s, t, target - pc - 1)); endfunction
  function automatic void BNE(int s, int t, int target); emit(i_t('h05, s, t, target - pc - 1)); endfunction
  function automatic void JAL(int target);
    emit({6'h03, 26'((32'hBFC0_0000 + 32'(target) * 4) >> 2)});
  endfunction
  function automatic void J(int target);
    emit({6'h02, 26'((32'hBFC0_0000 + 32'(target) * 4) >> 2)});
  endfunction
  function automatic void MFC0(int t, int d); emit({6'h10, 5'h00, 5'(t), 5'(d), 11'h0}); endfunction
  function automatic void MTC0(int t, int d); emit({6'h10, 5'h04, 5'(t), 5'(d), 11'h0}); endfunction
  function automatic void ERET();             emit(32'h4200_0018); endfunction
  function automatic void LI(int t, logic [31:0] v);
    LUI(t, int'(v[31:16]));
    ORI(t, t, int'(v[15:0]));
  endfunction

  // Writes the six DMA registers of the controller at I/O offset `io`.
  function automatic void DMA_SETUP(int io, logic [31:0] b0s, logic [31:0] b0e,
                                    logic [31:0] b1s, logic [31:0] b1e);
    LI(T1, b0s); SW(T1, io + 'h00, T0);
    LI(T1, b0e); SW(T1, io + 'h08, T0);
    LI(T1, b1s); SW(T1, io + 'h10, T0);
    LI(T1, b1e); SW(T1, io + 'h18, T0);
    ADDIU(T1, ZERO, 1); SW(T1, io + 'h20, T0);
  endfunction

  // Builds the program. DMA buffers: DVI frames at dvi_b0 / dvi_b1 of
  // dvi_bytes each, audio at ac_b0 / ac_b1 of ac_bytes each (physical).
  function automatic void build(logic [31:0] dvi_b0, logic [31:0] dvi_b1, int dvi_bytes,
                                logic [31:0] ac_b0, logic [31:0] ac_b1, int ac_bytes);
    int l1, l2, l3, l4, sub;
    for (int i = 0; i < 2048; i++) code[i] = 32'h0;
    pc = 0;
    LUI(S0, 'hA000); ORI(S0, S0, 'h1000);
    ADDIU(S1, ZERO, 0); ADDIU(S3, ZERO, 0); ADDIU(S4, ZERO, 0);
    ADDIU(S5, ZERO, 0); ADDIU(S7, ZERO, 0);
    ADDIU(T0, ZERO, 5); ADDIU(T1, ZERO, 7);
    ADDU(T2, T0, T1);   SW(T2, D_ADD, S0);            // forwarding
    SUBU(T3, T0, T1);   SW(T3, D_SUB, S0);
    LW(T4, D_ADD, S0);  ADDU(T5, T4, T4); SW(T5, D_LU, S0);   // load-use
    ADDIU(T6, ZERO, 0); ADDIU(T7, ZERO, 4);
    l1 = pc;
    ADDU(T6, T6, T7);
    ADDIU(T7, T7, -1);
    BNE(T7, ZERO, l1);
    ADDIU(S1, S1, 1);                                  // delay slot
    ADDIU(S3, S3, 1);                                  // squashed while taken
    SW(T6, D_SUM, S0); SW(S1, D_DS, S0); SW(S3, D_SQ, S0);
    MULT(T0, T3); MFLO(A0); MFHI(A1); SW(A0, D_MLO, S0); SW(A1, D_MHI, S0);
    ADDIU(A2, ZERO, -17); ADDIU(A3, ZERO, 5); DIV(A2, A3);
    MFLO(A0); MFHI(A1); SW(A0, D_DLO, S0); SW(A1, D_DHI, S0);
    ADDIU(A2, ZERO, 100); ADDIU(A3, ZERO, 7); DIVU(A2, A3);
    MFLO(A0); MFHI(A1); SW(A0, D_ULO, S0); SW(A1, D_UHI, S0);
    jal_idx = pc;
    JAL(0);                                            // patched below
    NOP();
    SW(V0, D_LINK, S0);
    LI(T0, 32'h8081_F2F3); SW(T0, D_BYTES, S0);
    LB(T1, D_BYTES, S0);      SW(T1, D_LB, S0);
    LBU(T1, D_BYTES + 1, S0); SW(T1, D_LBU, S0);
    LH(T1, D_BYTES + 2, S0);  SW(T1, D_LH, S0);
    LHU(T1, D_BYTES, S0);     SW(T1, D_LHU, S0);
    ADDIU(T1, ZERO, 'h11);   SB(T1, D_BYTES + 3, S0);
    ADDIU(T1, ZERO, 'h2233); SH(T1, D_BYTES, S0);
    ADDIU(T0, ZERO, 5);
    SLT(T1, T3, T0);  SW(T1, D_SLT, S0);
    SLTU(T1, T3, T0); SW(T1, D_SLTU, S0);
    SYSCALL();                                         // exception 1
    ADDIU(S6, ZERO, 'h77);
    LI(T0, 32'h7FFF_FFFF); ADDIU(T1, ZERO, 1);
    ADD(S6, T0, T1);                                   // exception 2: overflow
    SW(S6, D_OVF, S0);
    LUI(T0, 'hB000); LW(T1, 0, T0);                    // exception 3: bus error
    // timer interrupt
    MFC0(T0, 9); ADDIU(T0, T0, 2000); MTC0(T0, 11);
    LI(T1, 32'h0040_9001); MTC0(T1, 12);
    l2 = pc;
    BEQ(S5, ZERO, l2); NOP();
    SW(S5, D_NTIM, S0);
    SW(ZERO, D_BELL, S0);                              // doorbell: key press follows
    l3 = pc;
    BEQ(S7, ZERO, l3); NOP();
    SW(S7, D_NKEY, S0);
    LUI(T0, 'hBF00); LW(T1, 'h300, T0); SW(T1, D_GUN, S0);
    DMA_SETUP('h000, dvi_b0, dvi_b0 + dvi_bytes, dvi_b1, dvi_b1 + dvi_bytes);
    DMA_SETUP('h100, ac_b0, ac_b0 + ac_bytes, ac_b1, ac_b1 + ac_bytes);
    SW(S4, D_NEXC, S0);
    ORI(T1, ZERO, 'h600D); SW(T1, D_DONE, S0);
    l4 = pc;
    J(l4); NOP();
    sub = pc;
    ADDU(V0, RA, ZERO); JR(RA); NOP();
    code[jal_idx] = {6'h03, 26'((32'hBFC0_0000 + 32'(sub) * 4) >> 2)};
    if (pc > HANDLER_IDX) $fatal(1, "test program overlaps the exception vector");
    // exception handler at 0xBFC00380
    pc = HANDLER_IDX;
    MFC0(K0, 13);
    ANDI(K1, K0, 'h7C);
    BEQ(K1, ZERO, HANDLER_IDX + 12); NOP();
    SLL(K1, S4, 2); ADDU(K1, K1, S0); SW(K0, D_CAUSE, K1);
    ADDIU(S4, S4, 1);
    MFC0(K1, 14); ADDIU(K1, K1, 4); MTC0(K1, 14);
    ERET();
    ANDI(K1, K0, 'h8000);                              // timer (IP7)
    BEQ(K1, ZERO, HANDLER_IDX + 17); NOP();
    MTC0(ZERO, 11); ADDIU(S5, S5, 1);
    ANDI(K1, K0, 'h1000);                              // keyboard (IP4)
    BEQ(K1, ZERO, HANDLER_IDX + 24); NOP();
    LUI(K1, 'hBF00); LW(K1, 'h200, K1); SW(K1, D_KEY, S0);
    ADDIU(S7, S7, 1);
    ERET();
  endfunction

  // Expected data-area contents (offset, value), worked out by hand.
  function automatic logic [31:0] expected(int off, logic [31:0] key_reg);
    case (off)
      D_ADD:  return 32'd12;
      D_SUB:  return 32'hFFFF_FFFE;
      D_LU:   return 32'd24;
      D_SUM:  return 32'd10;
      D_DS:   return 32'd4;
      D_SQ:   return 32'd1;
      D_MLO:  return 32'hFFFF_FFF6;
      D_MHI:  return 32'hFFFF_FFFF;
      D_DLO:  return 32'hFFFF_FFFD;
      D_DHI:  return 32'hFFFF_FFFE;
      D_ULO:  return 32'd14;
      D_UHI:  return 32'd2;
      D_LINK: return 32'hBFC0_0000 + 32'(jal_idx + 2) * 4;
      D_BYTES: return 32'h1181_2233;
      D_LB:   return 32'hFFFF_FFF3;
      D_LBU:  return 32'h0000_00F2;
      D_LH:   return 32'hFFFF_8081;
      D_LHU:  return 32'h0000_F2F3;
      D_SLT:  return 32'd1;
      D_SLTU: return 32'd0;
      D_OVF:  return 32'h77;
      D_NEXC: return 32'd3;
      D_NTIM: return 32'd1;
      D_NKEY: return 32'd1;
      D_KEY:  return key_reg;
      D_GUN:  return 32'd3;
      D_DONE: return 32'h600D;
      default: return 32'h0;
    endcase
  endfunction

  localparam int N_CHECKED = 27;
  localparam int CHECKED_OFFS [N_CHECKED] = '{
    D_ADD, D_SUB, D_LU, D_SUM, D_DS, D_SQ, D_MLO, D_MHI, D_DLO, D_DHI, D_ULO, D_UHI,
    D_LINK, D_BYTES, D_LB, D_LBU, D_LH, D_LHU, D_SLT, D_SLTU, D_OVF, D_NEXC, D_NTIM,
    D_NKEY, D_KEY, D_GUN, D_DONE};

  // ExcCode field of the logged causes: syscall, overflow, data bus error
  localparam logic [31:0] CAUSES [3] = '{32'h20, 32'h30, 32'h1C};

endpackage
