// tb_ci_unit: random windows (some regular, some noisy, some on a grid of
// the radius so that distances equal it) and radii; checks
// the count of delay-vector pairs (dimension 2, last 16 samples) closer
// than the radius in maximum norm, and the 16*(16+105)-clock schedule.
module tb_ci_unit;
  import deep_pkg::*;
  localparam int NCH = 16, W = 32, L = 16;
  logic clk = 0, rst_n = 0, start = 0, busy, done, feat_valid;
  logic [15:0] radius = 100;
  logic [3:0] rd_ch, feat_ch;
  logic [4:0] rd_k;
  word_t rd_data;
  logic signed [47:0] count;
  ci_unit dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int mem [NCH][W];
  assign rd_data = 16'(mem[rd_ch][rd_k]);
  int nfeat = 0, t_start;
  always @(posedge clk) if (rst_n && feat_valid) begin
    int cnt, d0, d1;
    cnt = 0;
    for (int i = 0; i < L - 1; i++)
      for (int j = i + 1; j < L - 1; j++) begin
        d0 = mem[feat_ch][W-L+i] - mem[feat_ch][W-L+j];
        d1 = mem[feat_ch][W-L+i+1] - mem[feat_ch][W-L+j+1];
        if ((d0 < 0 ? -d0 : d0) < radius && (d1 < 0 ? -d1 : d1) < radius) cnt++;
      end
    checks++;
    if (count != 48'(cnt) || feat_ch != 4'(nfeat % NCH)) begin
      failures++; $display("FAIL ch %0d got %0d exp %0d", feat_ch, count, cnt);
    end
    nfeat++;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      radius = 16'(50 + 200 * r);
      for (int c = 0; c < NCH; c++)
        for (int k = 0; k < W; k++)
          mem[c][k] = (c % 4 == 1) ? int'(radius) * $urandom_range(0, 3) :   // distances equal to r
                      (c % 2 == 0) ? int'(1000.0 * $sin(0.7 * k)) + $urandom_range(0, 60)
                                   : int'($signed(16'($urandom_range(0, 65535))));
      if (r == 3) mem[0][20] = 32767;   // extreme difference
      @(negedge clk); start = 1; t_start = $time;
      @(negedge clk); start = 0;
      wait (done);
      repeat (3) @(negedge clk);
      checks++;
      if (($time - t_start) / 10 != NCH * (L + 105) + 3) begin
        failures++; $display("FAIL cycles %0d", ($time - t_start) / 10);
      end
      @(negedge clk);
    end
    checks++;
    if (nfeat != 4 * NCH) failures++;
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
