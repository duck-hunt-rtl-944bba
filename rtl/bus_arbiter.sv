// bus_arbiter: the arbiter of the shared system bus, and the bus register.
//
// The bus is one registered set of signals - 29-bit address, 64-bit data and
// data-valid - that every device drives through an AND-OR merge (`drv`) and
// every device reads (`bus`, one cycle later: the bus latency is one cycle).
//
// The arbiter is a small state machine. In IDLE it takes the highest-priority
// pending request (index 0 highest: DVI DMA read, AC'97 DMA read, core data
// read, core instruction read, core data write) and checks its address and
// length. A request to no device, a burst to a device register, or a write to
// the ROM is refused with a one-cycle `m_err`. Otherwise, once the target is
// ready, the master gets a one-cycle `m_gnt` (its `m_busy` falls) and the
// arbiter remembers master, target and length:
//   read  - the arbiter puts the address on the bus and pulses `t_cmd` of the
//           target in the same bus cycle; the target answers with 1 or 4 data
//           beats (valid high), and the transaction ends after the last beat.
//   write - the master drives its beats from the cycle after the grant, the
//           address with each beat; `t_cmd` reaches the target together with
//           the first beat, and the transaction ends after the last beat.
// Only one transaction is on the bus at a time; only the master that owns it
// listens to the data-valid beats. Grant latency from a request in an idle
// system is one cycle; a read's first beat arrives no earlier than three
// cycles after the grant.
module bus_arbiter
  import soc_pkg::*;
#(
  parameter int ROM_BYTES = 16384
) (
  input  logic                  clk,
  input  logic                  rst,
  // masters
  input  logic [N_MASTERS-1:0]  m_req,
  input  logic [N_MASTERS-1:0]  m_we,
  input  logic [N_MASTERS-1:0]  m_burst,
  input  logic [ADDR_W-1:0]     m_addr [N_MASTERS],
  output logic [N_MASTERS-1:0]  m_busy,
  output logic [N_MASTERS-1:0]  m_gnt,
  output logic [N_MASTERS-1:0]  m_err,
  // the bus
  input  bus_t                  drv,
  output bus_t                  bus,
  // targets
  output logic [N_TARGETS-1:0]  t_cmd,
  output logic                  t_we,
  output logic                  t_burst,
  input  logic [N_TARGETS-1:0]  t_ready
);
  typedef enum logic [2:0] {S_IDLE, S_GRANT, S_RWAIT, S_WWAIT, S_ERR} state_e;
  state_e state;
  localparam int TW = $clog2(N_TARGETS);

  logic [$clog2(N_MASTERS)-1:0] sel, owner;
  logic                         any_req;
  logic [$clog2(N_TARGETS)-1:0] tgt, tgt_q;
  logic                         legal;
  logic [2:0]                   beats_left;
  logic                         first_beat;
  logic [ADDR_W-1:0]            addr_q;
  logic                         we_q, burst_q;
  bus_t                         arb_drv;

  // fixed-priority pick
  always_comb begin
    any_req = |m_req;
    sel = '0;
    for (int i = N_MASTERS - 1; i >= 0; i--)
      if (m_req[i]) sel = i[$clog2(N_MASTERS)-1:0];
  end

  // address decode and width check
  always_comb begin
    logic [ADDR_W-1:0] a;
    a = m_addr[sel];
    tgt = '0;
    legal = 1'b0;
    if (is_ddr(a)) begin
      tgt = TW'(T_MIG); legal = 1'b1;
    end else if (is_rom(a)) begin
      tgt = TW'(T_ROM);
      legal = !m_we[sel] && (a - ROM_BASE) < ADDR_W'(ROM_BYTES);
    end else if (is_io(a)) begin
      unique case (a[9:8])
        IO_DVI:  tgt = TW'(T_DVI);
        IO_AC97: tgt = TW'(T_AC97);
        IO_PS2:  tgt = TW'(T_PS2);
        default: tgt = TW'(T_GUN);
      endcase
      legal = !m_burst[sel];
    end
  end

  always_comb begin
    m_busy = m_req;
    m_gnt  = '0;
    m_err  = '0;
    if (state == S_GRANT) begin
      m_gnt[owner]  = 1'b1;
      m_busy[owner] = 1'b0;
    end
    if (state == S_ERR) begin
      m_err[owner]  = 1'b1;
      m_busy[owner] = 1'b0;
    end
  end

  always_comb begin
    arb_drv = BUS_IDLE;
    if (state == S_GRANT && !we_q) arb_drv.addr = addr_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      bus   <= BUS_IDLE;
      t_cmd <= '0;
      t_we  <= 1'b0;
      t_burst <= 1'b0;
      owner <= '0;
      tgt_q <= '0;
      beats_left <= '0;
      first_beat <= 1'b0;
      addr_q <= '0;
      we_q <= 1'b0;
      burst_q <= 1'b0;
    end else begin
      bus.addr  <= drv.addr | arb_drv.addr;
      bus.data  <= drv.data | arb_drv.data;
      bus.valid <= drv.valid | arb_drv.valid;
      t_cmd <= '0;
      unique case (state)
        S_IDLE: if (any_req) begin
          owner   <= sel;
          tgt_q   <= tgt;
          addr_q  <= m_addr[sel];
          we_q    <= m_we[sel];
          burst_q <= m_burst[sel];
          if (!legal) state <= S_ERR;
          else if (t_ready[tgt]) state <= S_GRANT;
        end
        S_ERR: state <= S_IDLE;
        S_GRANT: begin
          beats_left <= burst_q ? 3'(BURST_BEATS) : 3'd1;
          first_beat <= 1'b1;
          t_we    <= we_q;
          t_burst <= burst_q;
          if (!we_q) begin
            t_cmd[tgt_q] <= 1'b1;
            state <= S_RWAIT;
          end else begin
            state <= S_WWAIT;
          end
        end
        S_RWAIT: if (bus.valid) begin
          beats_left <= beats_left - 1'b1;
          if (beats_left == 3'd1) state <= S_IDLE;
        end
        S_WWAIT: if (drv.valid) begin
          if (first_beat) t_cmd[tgt_q] <= 1'b1;
          first_beat <= 1'b0;
          beats_left <= beats_left - 1'b1;
          if (beats_left == 3'd1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  // A master holds its request until it is granted or refused.
  for (genvar i = 0; i < N_MASTERS; i++) begin : g_hold
    a_req_hold: assert property (@(posedge clk) disable iff (rst)
        m_req[i] && !m_gnt[i] && !m_err[i] |=> m_req[i])
      else $error("bus_arbiter: master %0d dropped its request early", i);
  end
  a_cmd_onehot: assert property (@(posedge clk) disable iff (rst) $onehot0(t_cmd))
    else $error("bus_arbiter: more than one target commanded");
`endif
endmodule
