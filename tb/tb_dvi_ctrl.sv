// tb_dvi_ctrl: feeds the video output stage from a FIFO model with a known
// byte stream at a small screen size. Checks the line and frame periods, the
// sync pulse widths and positions, the number of active pixels per line, that
// output starts at a frame boundary, every pixel's two 12-bit halves
// (RGB 3-3-2 expanded to 8-8-8, green low half and blue on the rising edge,
// red and green high half on the falling edge), and black plus the underrun
// count once the stream runs dry.
module tb_dvi_ctrl;
  localparam int HA = 16, HF = 3, HS = 4, HB = 5, VA = 5, VF = 2, VS = 1, VB = 2;
  localparam int HT = HA + HF + HS + HB, VT = VA + VF + VS + VB;
  localparam int FRAMES = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic [63:0] fifo_data;
  logic fifo_empty, fifo_rd, hsync, vsync, de, frame_start;
  logic [11:0] d_rise, d_fall;
  logic [15:0] underruns;
  dvi_ctrl #(.H_ACTIVE(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
             .V_ACTIVE(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [7:0] pbyte(int n);
    return 8'(n * 13 + 7);
  endfunction

  logic [63:0] q[$];
  always @(posedge clk) if (fifo_rd) void'(q.pop_front());
  always @(negedge clk) begin
    fifo_empty = q.size() == 0;
    fifo_data  = fifo_empty ? 64'h0 : q[0];
  end

  int cyc = 0, last_hs = -1, last_vs = -1, hs_w = 0, vs_w = 0, de_line = 0, pix = 0, black = 0;
  logic hs_q = 0, vs_q = 0, de_q = 0;
  int hs_wq = 0, vs_wq = 0;
  always @(negedge clk) if (!rst) begin
    cyc++;
    if (hsync && !hs_q) begin
      if (last_hs >= 0) check(cyc - last_hs == HT, $sformatf("line period %0d", cyc - last_hs));
      last_hs = cyc;
    end
    if (vsync && !vs_q) begin
      if (last_vs >= 0) check(cyc - last_vs == HT * VT, $sformatf("frame period %0d", cyc - last_vs));
      last_vs = cyc;
    end
    hs_w = hsync ? hs_w + 1 : 0;
    vs_w = vsync ? vs_w + 1 : 0;
    if (!hsync && hs_q) check(hs_wq == HS, $sformatf("hsync width %0d", hs_wq));
    if (!vsync && vs_q) check(vs_wq == VS * HT, $sformatf("vsync width %0d", vs_wq));
    de_line = de ? de_line + 1 : de_line;
    if (!de && de_q) begin check(de_line == HA, $sformatf("%0d active pixels in a line", de_line)); de_line = 0; end
    if (de && dut.running) begin
      if (pix < FRAMES * HA * VA) begin
        logic [7:0] p, r, g, b;
        p = pbyte(pix);
        r = {p[7:5], p[7:5], p[7:6]};
        g = {p[4:2], p[4:2], p[4:3]};
        b = {4{p[1:0]}};
        if (pix == 0) check(frame_start, "first pixel at the start of a frame");
        check(d_rise == {g[3:0], b} && d_fall == {r, g[7:4]},
              $sformatf("pixel %0d: %h %h", pix, d_rise, d_fall));
        pix++;
      end else begin
        check(d_rise == 0 && d_fall == 0, "black after the stream ends");
        black++;
      end
    end
    hs_q = hsync; vs_q = vsync; de_q = de;
    hs_wq = hs_w; vs_wq = vs_w;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (HT * 3 + 5) @(negedge clk);      // output must wait for the next frame
    for (int w = 0; w < FRAMES * HA * VA / 8; w++) begin
      logic [63:0] d;
      for (int j = 0; j < 8; j++) d[8*j +: 8] = pbyte(8 * w + j);
      q.push_back(d);
    end
    wait (black >= HA * VA);
    check(underruns > 0, "underruns counted once the stream ran dry");
    check(pix == FRAMES * HA * VA, "all pixels shown");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
