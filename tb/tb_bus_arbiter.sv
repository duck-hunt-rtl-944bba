// tb_bus_arbiter: five master models issue random traffic - burst and single
// reads and writes to memory, ROM reads, register accesses, and requests the
// arbiter must refuse (unmapped addresses, ROM writes, bursts to registers) -
// to six target models that are randomly not ready and answer reads after a
// random delay. Checks that each grant or refusal goes to the highest-priority
// master requesting in the deciding cycle, that exactly the illegal requests
// are refused, that every read beat carries the data of its address, that
// every written beat reaches the addressed target, that the bus is the
// merged drive delayed by one cycle, and that all masters finish. A last
// phase, with every target ready, has each master request alone and checks
// that the grant or refusal comes one to three cycles after the request.
module tb_bus_arbiter;
  import soc_pkg::*;
  localparam int ROM_BYTES = 4096;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #4 clk = !clk;

  logic [N_MASTERS-1:0] m_req = 0, m_we = 0, m_burst = 0, m_busy, m_gnt, m_err;
  logic [ADDR_W-1:0] m_addr [N_MASTERS];
  bus_t drv, bus;
  logic [N_TARGETS-1:0] t_cmd, t_ready = '1;
  logic t_we, t_burst;
  bus_arbiter #(.ROM_BYTES(ROM_BYTES)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [63:0] rdpat(logic [ADDR_W-1:0] a);
    return {a, 3'b101, ~a, 3'b010};
  endfunction
  function automatic logic [63:0] wrpat(int m, logic [ADDR_W-1:0] a);
    return {3'(m), a, ~a, 3'b0};
  endfunction

  bus_t m_drv [N_MASTERS], t_drv [N_TARGETS];
  bit lat_phase = 0;
  always_comb begin
    drv = BUS_IDLE;
    for (int i = 0; i < N_MASTERS; i++) begin
      drv.addr |= m_drv[i].addr; drv.data |= m_drv[i].data; drv.valid |= m_drv[i].valid;
    end
    for (int i = 0; i < N_TARGETS; i++) begin
      drv.addr |= t_drv[i].addr; drv.data |= t_drv[i].data; drv.valid |= t_drv[i].valid;
    end
  end

  // one-cycle bus latency and priority
  bus_t drv_q;
  logic [ADDR_W-1:0] gaddr_q;
  logic [N_MASTERS-1:0] req_q;
  int n_refused = 0, n_done = 0, n_conflict = 0, beats_w = 0;
  always @(posedge clk) begin
    if (!rst) begin
      check(bus.valid == drv_q.valid && bus.data == drv_q.data && bus.addr == (drv_q.addr | gaddr_q),
            "bus is the drive of the previous cycle");
      if (|(m_gnt | m_err)) begin
        int top;
        top = -1;
        for (int i = N_MASTERS - 1; i >= 0; i--) if (req_q[i]) top = i;
        check($onehot(m_gnt | m_err) && (m_gnt | m_err) == (1 << top),
              $sformatf("grant %b / refusal %b with requests %b", m_gnt, m_err, req_q));
        if (!$onehot0(req_q)) n_conflict++;
      end
    end
    drv_q <= drv;
    req_q <= m_req;
    gaddr_q <= '0;
    for (int i = 0; i < N_MASTERS; i++) if (m_gnt[i] && !m_we[i]) gaddr_q <= m_addr[i];
  end

  // targets
  for (genvar t = 0; t < N_TARGETS; t++) begin : g_t
    initial begin
      t_drv[t] = BUS_IDLE;
      forever begin
        @(negedge clk);
        t_ready[t] = lat_phase || ($urandom % 4) != 0;
        if (t_cmd[t]) begin
          logic [ADDR_W-1:0] a;
          int n;
          t_ready[t] = 0;
          a = bus.addr;
          n = t_burst ? 4 : 1;
          if (t_we) begin
            for (int k = 0; k < n; k++) begin
              while (!bus.valid) @(negedge clk);
              check(bus.data[63:61] < N_MASTERS && bus.data == wrpat(bus.data[63:61], bus.addr),
                    $sformatf("target %0d write beat %h at %h", t, bus.data, bus.addr));
              beats_w++;
              if (k != n - 1) @(negedge clk);
            end
          end else begin
            if (t_burst) a[4:0] = 0;
            repeat (1 + $urandom % 3) @(negedge clk);
            for (int k = 0; k < n; k++) begin
              t_drv[t] = '{addr: a + ADDR_W'(8 * k), data: rdpat(a + ADDR_W'(8 * k)), valid: 1'b1};
              @(negedge clk);
              t_drv[t] = BUS_IDLE;
            end
          end
        end
      end
    end
  end

  // masters
  function automatic void pick(int m, output logic [ADDR_W-1:0] a, output bit we, output bit burst,
                               output bit bad);
    int k;
    k = $urandom % 10;
    we = 0; burst = 0; bad = 0;
    case (k)
      0, 1, 2: begin a = ADDR_W'($urandom % 'h100000) & ~29'h1F; burst = 1; we = (m == M_CDW); end
      3:       begin a = ADDR_W'($urandom % 'h100000) & ~29'h7; we = (m == M_CDW); end
      4:       begin a = ROM_BASE + ADDR_W'($urandom % ROM_BYTES) & ~29'h1F; burst = 1; end
      5:       begin a = IO_BASE + ADDR_W'(($urandom % 4) << 8) + ADDR_W'(8 * ($urandom % 6)); we = (m == M_CDW); end
      6:       begin a = 29'h1000_0000 + ADDR_W'($urandom % 'h1000) * 8; bad = 1; end      // unmapped
      7:       begin a = ROM_BASE + ADDR_W'(ROM_BYTES) + 8; bad = 1; end                    // beyond the ROM
      8:       begin a = IO_BASE; burst = 1; bad = 1; end                                   // burst to a register
      default: begin a = ROM_BASE + 8; we = 1; bad = (m == M_CDW); if (m != M_CDW) begin we = 0; end end
    endcase
  endfunction

  for (genvar m = 0; m < N_MASTERS; m++) begin : g_m
    initial begin
      m_drv[m] = BUS_IDLE;
      m_addr[m] = '0;
      wait (!rst);
      for (int n = 0; n < 80; n++) begin
        logic [ADDR_W-1:0] a;
        bit we, burst, bad, gnt;
        pick(m, a, we, burst, bad);
        @(negedge clk);
        m_req[m] = 1; m_we[m] = we; m_burst[m] = burst; m_addr[m] = a;
        @(negedge clk);
        while (!m_gnt[m] && !m_err[m]) @(negedge clk);
        gnt = m_gnt[m];
        check(m_err[m] == bad, $sformatf("master %0d %s %h: refused %b", m, we ? "write" : "read", a, m_err[m]));
        if (m_err[m]) n_refused++;
        @(posedge clk);
        #1 m_req[m] = 0;
        if (gnt) begin
          int nb;
          nb = burst ? 4 : 1;
          if (we) begin
            for (int k = 0; k < nb; k++) begin
              @(negedge clk);
              m_drv[m] = '{addr: a + ADDR_W'(8 * k), data: wrpat(m, a + ADDR_W'(8 * k)), valid: 1'b1};
            end
            @(negedge clk);
            m_drv[m] = BUS_IDLE;
          end else begin
            for (int k = 0; k < nb; k++) begin
              int w;
              w = 0;
              @(negedge clk);
              while (!bus.valid && w < 20) begin w++; @(negedge clk); end
              check(bus.valid && bus.data == rdpat(a + ADDR_W'(8 * k)),
                    $sformatf("master %0d read beat %0d of %h: %h", m, k, a, bus.data));
            end
          end
        end
        repeat ($urandom % 3) @(negedge clk);
      end
      n_done++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (n_done == N_MASTERS);
    // latency phase: every target ready, one master at a time; the response
    // (grant or refusal) must come within one to three cycles
    lat_phase = 1;
    repeat (8) @(negedge clk);
    for (int m = 0; m < N_MASTERS; m++) begin
      int lat;
      lat = 0;
      m_we[m] = 0; m_burst[m] = (m != M_CDW);
      m_addr[m] = (m == M_CDW) ? ROM_BASE : ADDR_W'(32 * m);   // the core write goes to the ROM: refused
      m_req[m] = 1;
      if (m == M_CDW) m_we[m] = 1;
      do begin @(negedge clk); lat++; end while (!m_gnt[m] && !m_err[m] && lat < 10);
      check(lat >= 1 && lat <= 3, $sformatf("master %0d answered after %0d cycles", m, lat));
      check(m_err[m] == (m == M_CDW), $sformatf("master %0d latency-phase request refused %b", m, m_err[m]));
      $display("master %0d response latency %0d cycle(s)", m, lat);
      @(posedge clk);
      #1 m_req[m] = 0;
      if (m != M_CDW) for (int k = 0; k < 4; k++) begin
        int w;
        w = 0;
        @(negedge clk);
        while (!bus.valid && w < 20) begin w++; @(negedge clk); end
        check(bus.valid && bus.data == rdpat(ADDR_W'(32 * m + 8 * k)), $sformatf("latency-phase beat %0d of master %0d", k, m));
      end
      repeat (4) @(negedge clk);
    end
    $display("refused %0d, contested decisions %0d, write beats %0d", n_refused, n_conflict, beats_w);
    check(n_refused > 0 && n_conflict > 0 && beats_w > 0, "refusals, contention and writes all occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    $display("FAIL: watchdog (%0d masters done)", n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
