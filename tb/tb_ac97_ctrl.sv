// tb_ac97_ctrl: runs the AC-link controller from a FIFO model holding a known
// sample stream, with the codec model reporting ready. Decodes every output
// frame: checks the 256-bit frame length, SYNC high for the 16 tag bits, the
// codec register writes in slots 1 and 2 in table order, left and right
// samples in slots 3 and 4 in stream order, the frame counter, and the
// underrun count with PCM slots marked invalid once the stream runs dry.
module tb_ac97_ctrl;
  int checks = 0, failures = 0;
  logic bit_clk = 0, rst = 1;
  always #40 bit_clk = !bit_clk;
  logic sync, sdata_out, sdata_in = 1, fifo_empty, fifo_rd, cmds_done;
  logic [63:0] fifo_data;
  logic [15:0] frames, underruns;
  ac97_ctrl dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [15:0] smp(int n);
    return 16'(n * 977 + 5);
  endfunction
  localparam int WORDS = 12;
  localparam logic [6:0]  CREG [3] = '{7'h02, 7'h04, 7'h18};
  localparam logic [15:0] CVAL [3] = '{16'h0000, 16'h0000, 16'h0808};

  logic [63:0] q[$];
  always @(posedge bit_clk) if (fifo_rd) void'(q.pop_front());
  always @(negedge bit_clk) begin
    fifo_empty = q.size() == 0;
    fifo_data  = fifo_empty ? 64'h0 : q[0];
  end

  logic [255:0] f;
  int nb = -1, sync_len = 0, nframes = 0, ncmd = 0, nsmp = 0, dry = 0;
  logic sync_q = 0;
  always @(negedge bit_clk) if (!rst) begin
    if (sync && !sync_q) begin
      if (nb >= 0) check(nb == 256, $sformatf("frame of %0d bits", nb));
      nb = 0;
      sync_len = 0;
    end
    if (sync) sync_len++;
    if (!sync && sync_q) check(sync_len == 16, $sformatf("SYNC high for %0d bits", sync_len));
    sync_q = sync;
    if (nb >= 0) begin
      f = {f[254:0], sdata_out};
      nb++;
      if (nb == 256) begin
        nframes++;
        check(f[255], "frame valid bit");
        if (f[254]) begin
          check(ncmd < 3 && f[253] && !f[239] && f[238:232] == CREG[ncmd % 3] && f[219:204] == CVAL[ncmd % 3],
                $sformatf("command %0d", ncmd));
          ncmd++;
        end
        if (nsmp < 4 * WORDS) begin
          if (f[252]) begin
            check(f[251] && f[199:184] == smp(nsmp) && f[179:164] == smp(nsmp + 1),
                  $sformatf("samples %0d: %h %h", nsmp, f[199:184], f[179:164]));
            nsmp += 2;
          end
        end else if (!f[252]) dry++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge bit_clk);
    rst = 0;
    repeat (300) @(negedge bit_clk);
    for (int w = 0; w < WORDS; w++)
      q.push_back({smp(4*w+3), smp(4*w+2), smp(4*w+1), smp(4*w)});
    wait (dry >= 3);
    check(ncmd == 3 && cmds_done, $sformatf("%0d commands", ncmd));
    check(nsmp == 4 * WORDS, "all samples sent");
    check(underruns > 0, "underruns counted");
    check(frames == 16'(nframes) || frames == 16'(nframes + 1), $sformatf("frame counter %0d vs %0d", frames, nframes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10ms;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
