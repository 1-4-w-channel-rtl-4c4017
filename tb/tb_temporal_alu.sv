// tb_temporal_alu: the testbench plays the filtered-data window (random
// samples per channel, answered combinationally) and checks, per channel,
// energy = sum(x^2)>>>5 and variance = energy - (sum(x)>>>5)^2, the channel
// order, and the WIN-clocks-per-channel schedule (N_CH*WIN clocks to done).
module tb_temporal_alu;
  import deep_pkg::*;
  localparam int NCH = 16, W = 32;
  logic clk = 0, rst_n = 0, start = 0, busy, done, feat_valid;
  logic [3:0] rd_ch, feat_ch;
  logic [4:0] rd_k;
  word_t rd_data;
  logic signed [47:0] energy, variance;
  temporal_alu dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int mem [NCH][W];
  assign rd_data = 16'(mem[rd_ch][rd_k]);
  int nfeat = 0, t_start, t_done;
  always @(posedge clk) if (rst_n && feat_valid) begin
    longint s = 0, q = 0, en, mn;
    s = 0; q = 0;
    for (int k = 0; k < W; k++) begin s += mem[feat_ch][k]; q += longint'(mem[feat_ch][k]) * mem[feat_ch][k]; end
    en = q >>> 5; mn = s >>> 5;
    checks += 3;
    if (feat_ch != 4'(nfeat % NCH)) failures++;
    if (energy != en) begin failures++; $display("FAIL energy ch %0d got %0d exp %0d", feat_ch, energy, en); end
    if (variance != en - mn * mn) begin failures++; $display("FAIL var ch %0d", feat_ch); end
    nfeat++;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < NCH; c++)
        for (int k = 0; k < W; k++)
          mem[c][k] = (r == 2) ? 32767 - (k % 2) * 65535 : int'($signed(16'($urandom_range(0, 65535)))) >>> (c % 8);
      @(negedge clk); start = 1; t_start = $time;
      @(negedge clk); start = 0;
      wait (done);
      repeat (3) @(negedge clk); t_done = $time;
      checks++;
      if ((t_done - t_start) / 10 != NCH * W + 3) begin
        failures++; $display("FAIL cycles %0d", (t_done - t_start) / 10);
      end
      @(negedge clk);
    end
    checks++;
    if (nfeat != 3 * NCH) failures++;
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
