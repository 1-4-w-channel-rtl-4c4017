// tb_xcorr_unit: random windows and random partner channels; checks
// xcorr_c = (sum_k x_c[k] * x_p(c)[k]) >>> 5 for every channel, the channel
// order and the N_CH*WIN-clock schedule.
module tb_xcorr_unit;
  import deep_pkg::*;
  localparam int NCH = 16, W = 32;
  logic clk = 0, rst_n = 0, start = 0, busy, done, feat_valid;
  logic [3:0] partner [NCH];
  logic [3:0] rd_ch_a, rd_ch_b, feat_ch;
  logic [4:0] rd_k;
  word_t rd_a, rd_b;
  logic signed [47:0] xcorr;
  xcorr_unit dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int mem [NCH][W];
  assign rd_a = 16'(mem[rd_ch_a][rd_k]);
  assign rd_b = 16'(mem[rd_ch_b][rd_k]);
  int nfeat = 0, t_start;
  always @(posedge clk) if (rst_n && feat_valid) begin
    longint s;
    s = 0;
    for (int k = 0; k < W; k++) s += longint'(mem[feat_ch][k]) * mem[partner[feat_ch]][k];
    checks += 2;
    if (feat_ch != 4'(nfeat % NCH)) failures++;
    if (xcorr != (s >>> 5)) begin failures++; $display("FAIL ch %0d got %0d exp %0d", feat_ch, xcorr, s >>> 5); end
    nfeat++;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < NCH; c++) begin
        partner[c] = 4'($urandom);
        for (int k = 0; k < W; k++) mem[c][k] = int'($signed(16'($urandom_range(0, 65535))));
      end
      @(negedge clk); start = 1; t_start = $time;
      @(negedge clk); start = 0;
      wait (done);
      repeat (3) @(negedge clk);
      checks++;
      if (($time - t_start) / 10 != NCH * W + 3) failures++;
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
