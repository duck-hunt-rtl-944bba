// tb_ch7301_i2c: runs the DVI-chip set-up sequencer against an I2C slave model
// that acknowledges every byte except one chosen data byte. Decodes START,
// STOP and the bytes on the wire and checks the write address followed by each
// register/value pair of the table, the SCL bit period (system clock divided
// by the I2C rate), the counted not-acknowledge and the done flag.
module tb_ch7301_i2c;
  localparam int CLK_HZ = 1_600_000, I2C_HZ = 100_000;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic scl_low, sda_low, done, ack_low = 0;
  logic [7:0] nacks;
  wire scl = !scl_low;
  wire sda = !(sda_low || ack_low);
  ch7301_i2c #(.CLK_HZ(CLK_HZ), .I2C_HZ(I2C_HZ)) dut (
    .clk(clk), .rst(rst), .scl_low(scl_low), .sda_low(sda_low), .sda_in(sda),
    .done(done), .nacks(nacks));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [7:0] EXP [15] = '{8'hEC, 8'h49, 8'hC0, 8'hEC, 8'h21, 8'h09,
    8'hEC, 8'h33, 8'h08, 8'hEC, 8'h34, 8'h16, 8'hEC, 8'h36, 8'h60};
  int rises = 0, starts = 0, stops = 0, nbytes = 0, cyc = 0, last_rise = -1;
  logic [8:0] sh;
  logic scl_q = 1, sda_q = 1;
  always @(posedge clk) begin
    cyc++;
    if (scl && scl_q && !sda && sda_q) begin starts++; rises = 0; end
    if (scl && scl_q && sda && !sda_q) stops++;
    if (scl && !scl_q) begin
      if (rises % 9 != 0 && last_rise >= 0)
        check(cyc - last_rise == CLK_HZ / I2C_HZ, $sformatf("SCL period %0d cycles", cyc - last_rise));
      last_rise = cyc;
      sh = {sh[7:0], sda};
      rises++;
      if (rises % 9 == 0) begin
        if (nbytes < 15) check(sh[8:1] == EXP[nbytes], $sformatf("byte %0d = %h", nbytes, sh[8:1]));
        check(sh[0] == (nbytes == 8), $sformatf("acknowledge bit of byte %0d", nbytes));
        nbytes++;
      end
    end
    // slave: pull SDA low for the acknowledge bit, except after byte 8
    if (!scl && scl_q) ack_low = (rises % 9 == 8) && !(nbytes == 8);
    scl_q = scl;
    sda_q = sda;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    wait (done);
    repeat (10) @(posedge clk);
    check(starts == 5 && stops == 5, $sformatf("%0d starts, %0d stops", starts, stops));
    check(nbytes == 15, $sformatf("%0d bytes", nbytes));
    check(nacks == 1, $sformatf("%0d not-acknowledges counted", nacks));
    check(scl && sda, "bus released at the end");
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
