// mips_adapter: the bridge between the MIPS core (core clock) and the system
// bus (bus clock). There is no cache: every fetch, load and store becomes a
// bus transaction.
//
// Core side. An instruction fetch or a data access is turned into a request
// packet {kind, burst, physical address, 256-bit data}. The physical address
// is the low 29 bits of the virtual address (kseg0 and kseg1 both map onto
// physical 0..512 MB). Memory (DDR2 and ROM) is read as whole 32-byte lines
// (4-beat bursts); device registers are read as single 64-bit beats. The
// packet crosses to the bus clock through a FIFO; the reply, the 256-bit line
// (or the single beat in bits [63:0]) plus an error flag, crosses back
// through a second FIFO, and the addressed 32-bit word is handed to the core.
// A store is a read-modify-write: the line (or beat) is read, the store's
// bytes are merged in under the byte mask, and the result goes back as a
// write packet, whose completion is also acknowledged. Data accesses take
// precedence over fetches when both are waiting; one packet is in flight at a
// time.
//
// Bus side. A packet raises the request line of one of three arbiter masters:
// core data read, core instruction read or core data write. On the grant a
// read collects its 1 or 4 beats in a shift register; a write drives its beats
// on consecutive cycles. A refused request returns the error flag, which the
// core turns into a bus-error exception.
//
// Core ports: level `*_req` with stable address until the one-cycle `*_ready`.
module mips_adapter
  import soc_pkg::*;
#(
  parameter int REQ_FIFO_DEPTH = 4
) (
  input  logic              clk_core,
  input  logic              rst_core,
  input  logic              imem_req,
  input  logic [31:0]       imem_addr,
  output logic [31:0]       imem_rdata,
  output logic              imem_ready,
  output logic              imem_err,
  input  logic              dmem_req,
  input  logic              dmem_we,
  input  logic [31:0]       dmem_addr,
  input  logic [3:0]        dmem_be,
  input  logic [31:0]       dmem_wdata,
  output logic [31:0]       dmem_rdata,
  output logic              dmem_ready,
  output logic              dmem_err,

  input  logic              clk_bus,
  input  logic              rst_bus,
  output logic [2:0]        m_req,     // {data write, instr read, data read}
  output logic [2:0]        m_we,
  output logic [2:0]        m_burst,
  output logic [ADDR_W-1:0] m_addr,
  input  logic [2:0]        m_gnt,
  input  logic [2:0]        m_err,
  input  bus_t              bus,
  output bus_t              drv
);
  typedef enum logic [1:0] {K_DREAD, K_IREAD, K_DWRITE} kind_e;

  typedef struct packed {
    kind_e             kind;
    logic              burst;
    logic [ADDR_W-1:0] addr;
    logic [255:0]      data;
  } req_pkt_t;

  typedef struct packed {
    logic         err;
    logic [255:0] data;
  } rsp_pkt_t;

  // ================================================================ core side
  typedef enum logic [1:0] {C_IDLE, C_WAIT_I, C_WAIT_R, C_WAIT_W} cstate_e;
  cstate_e cstate;

  req_pkt_t          creq;
  logic              creq_push, creq_full;
  rsp_pkt_t          crsp;
  logic              crsp_empty, crsp_pop;
  logic [ADDR_W-1:0] paddr_q;
  logic              burst_q;
  logic [3:0]        be_q;
  logic [31:0]       wdata_q;
  logic [255:0]      merged;
  logic [31:0]       word_sel;

  // The word the core asked for, out of a reply.
  assign word_sel = burst_q ? crsp.data[32*paddr_q[4:2] +: 32]
                            : crsp.data[32*paddr_q[2] +: 32];

  always_comb begin
    merged = burst_q ? crsp.data : {192'b0, crsp.data[63:0]};
    for (int i = 0; i < 4; i++) begin
      if (be_q[i]) begin
        if (burst_q) merged[32*paddr_q[4:2] + 8*i +: 8] = wdata_q[8*i +: 8];
        else         merged[32*paddr_q[2]   + 8*i +: 8] = wdata_q[8*i +: 8];
      end
    end
  end

  always_comb begin
    creq      = '0;
    creq_push = 1'b0;
    crsp_pop  = 1'b0;
    imem_ready = 1'b0;
    dmem_ready = 1'b0;
    imem_err   = crsp.err;
    dmem_err   = crsp.err;
    imem_rdata = word_sel;
    dmem_rdata = word_sel;
    unique case (cstate)
      C_IDLE: if (!creq_full) begin
        if (dmem_req) begin
          creq.kind  = K_DREAD;
          creq.burst = is_burst_region(dmem_addr[ADDR_W-1:0]);
          creq.addr  = dmem_addr[ADDR_W-1:0];
          creq_push  = 1'b1;
        end else if (imem_req) begin
          creq.kind  = K_IREAD;
          creq.burst = is_burst_region(imem_addr[ADDR_W-1:0]);
          creq.addr  = imem_addr[ADDR_W-1:0];
          creq_push  = 1'b1;
        end
      end
      C_WAIT_I: if (!crsp_empty) begin
        crsp_pop   = 1'b1;
        imem_ready = 1'b1;
      end
      C_WAIT_R: if (!crsp_empty) begin
        if (be_q == 4'b0000 || crsp.err) begin
          crsp_pop   = 1'b1;
          dmem_ready = 1'b1;
        end else if (!creq_full) begin
          // store: merge and write back
          crsp_pop   = 1'b1;
          creq.kind  = K_DWRITE;
          creq.burst = burst_q;
          creq.addr  = paddr_q;
          creq.data  = merged;
          creq_push  = 1'b1;
        end
      end
      C_WAIT_W: if (!crsp_empty) begin
        crsp_pop   = 1'b1;
        dmem_ready = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk_core) begin
    if (rst_core) begin
      cstate  <= C_IDLE;
      paddr_q <= '0;
      burst_q <= 1'b0;
      be_q    <= '0;
      wdata_q <= '0;
    end else begin
      unique case (cstate)
        C_IDLE: if (creq_push) begin
          paddr_q <= creq.addr;
          burst_q <= creq.burst;
          if (creq.kind == K_DREAD) begin
            be_q    <= dmem_we ? dmem_be : 4'b0000;
            wdata_q <= dmem_wdata;
            cstate  <= C_WAIT_R;
          end else begin
            cstate <= C_WAIT_I;
          end
        end
        C_WAIT_I: if (crsp_pop) cstate <= C_IDLE;
        C_WAIT_R: if (crsp_pop) cstate <= creq_push ? C_WAIT_W : C_IDLE;
        C_WAIT_W: if (crsp_pop) cstate <= C_IDLE;
        default: cstate <= C_IDLE;
      endcase
    end
  end

  // ================================================================ crossings
  req_pkt_t breq;
  logic     breq_empty, breq_pop;
  rsp_pkt_t brsp;
  logic     brsp_push, brsp_full;

  async_fifo #(.WIDTH($bits(req_pkt_t)), .DEPTH(REQ_FIFO_DEPTH)) u_req_fifo (
    .wclk (clk_core), .wrst (rst_core), .wr_en (creq_push), .din (creq),
    .full (creq_full), .prog_full (), .wr_count (),
    .rclk (clk_bus), .rrst (rst_bus), .rd_en (breq_pop), .dout (breq), .empty (breq_empty)
  );

  async_fifo #(.WIDTH($bits(rsp_pkt_t)), .DEPTH(REQ_FIFO_DEPTH)) u_rsp_fifo (
    .wclk (clk_bus), .wrst (rst_bus), .wr_en (brsp_push), .din (brsp),
    .full (brsp_full), .prog_full (), .wr_count (),
    .rclk (clk_core), .rrst (rst_core), .rd_en (crsp_pop), .dout (crsp), .empty (crsp_empty)
  );

  // ================================================================ bus side
  typedef enum logic [1:0] {B_IDLE, B_REQ, B_READ, B_WRITE} bstate_e;
  bstate_e bstate;

  req_pkt_t     pkt;
  logic [255:0] line;
  logic [1:0]   beat;
  logic [1:0]   last_beat;

  assign last_beat = pkt.burst ? 2'(BURST_BEATS - 1) : 2'd0;
  assign breq_pop  = bstate == B_IDLE && !breq_empty;
  assign m_addr    = pkt.burst ? {pkt.addr[ADDR_W-1:5], 5'b0} : {pkt.addr[ADDR_W-1:3], 3'b0};

  always_comb begin
    m_req   = '0;
    m_we    = 3'b100;
    m_burst = {3{pkt.burst}};
    if (bstate == B_REQ) m_req[pkt.kind] = 1'b1;
  end

  always_comb begin
    drv = BUS_IDLE;
    if (bstate == B_WRITE) begin
      drv.valid = 1'b1;
      drv.addr  = m_addr + ADDR_W'({beat, 3'b000});
      drv.data  = pkt.data[64*beat +: 64];
    end
  end

  always_comb begin
    brsp_push = 1'b0;
    brsp      = '0;
    unique case (bstate)
      B_REQ: if (m_err[pkt.kind]) begin
        brsp_push = 1'b1;
        brsp.err  = 1'b1;
      end
      B_READ: if (bus.valid && beat == last_beat) begin
        brsp_push = 1'b1;
        brsp.data = pkt.burst ? {bus.data, line[255:64]} : {192'b0, bus.data};
      end
      B_WRITE: if (beat == last_beat) brsp_push = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk_bus) begin
    if (rst_bus) begin
      bstate <= B_IDLE;
      pkt    <= '0;
      line   <= '0;
      beat   <= '0;
    end else begin
      unique case (bstate)
        B_IDLE: if (!breq_empty) begin
          pkt    <= breq;
          bstate <= B_REQ;
        end
        B_REQ: begin
          beat <= '0;
          if (m_err[pkt.kind]) bstate <= B_IDLE;
          else if (m_gnt[pkt.kind]) bstate <= pkt.kind == K_DWRITE ? B_WRITE : B_READ;
        end
        B_READ: if (bus.valid) begin
          line <= {bus.data, line[255:64]};
          beat <= beat + 1'b1;
          if (beat == last_beat) bstate <= B_IDLE;
        end
        B_WRITE: begin
          beat <= beat + 1'b1;
          if (beat == last_beat) bstate <= B_IDLE;
        end
        default: bstate <= B_IDLE;
      endcase
    end
  end

`ifndef SYNTHESIS
  a_rsp_room: assert property (@(posedge clk_bus) disable iff (rst_bus) !(brsp_push && brsp_full))
    else $error("mips_adapter: reply FIFO overflow");
`endif
endmodule
