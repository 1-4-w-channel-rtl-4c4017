// tb_asac_ctrl: checks the 12-clock sample slot (adc_start at the first
// clock, smp_strobe at the last), the channel sequence 0..15, the
// channel-one indicator, one-hot LNA power control on the converted
// channel, the 4.096 kHz slot rate from 49.152 kHz, and the gain register.
module tb_asac_ctrl;
  logic clk = 0, rst_n = 0;
  logic [3:0] gain_in = 0, gain_ctrl, ch;
  logic adc_start, smp_strobe, ch_one;
  logic [15:0] pc;
  asac_ctrl dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0, last_strobe = -1, last_start = -1, nstrobe = 0, n_one = 0;
  int exp_ch = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    checks++;
    if (pc != (16'd1 << ch)) failures++;
    if (adc_start) last_start = cyc;
    if (smp_strobe) begin
      checks += 3;
      if (32'(ch) != exp_ch) failures++;
      if (cyc - last_start != 11) failures++;
      if (last_strobe >= 0 && cyc - last_strobe != 12) failures++;
      if (ch_one != (ch == 0)) failures++;
      if (ch_one) n_one++;
      exp_ch = (exp_ch + 1) % 16;
      last_strobe = cyc;
      nstrobe++;
    end else begin
      checks++;
      if (ch_one) failures++;
    end
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    gain_in = 4'd9;
    repeat (49152) @(negedge clk);
    checks += 3;
    if (nstrobe != 4096) begin failures++; $display("FAIL %0d samples per second", nstrobe); end
    if (n_one != 256) failures++;
    if (gain_ctrl != 4'd9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
