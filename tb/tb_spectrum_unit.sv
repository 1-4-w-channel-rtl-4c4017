// tb_spectrum_unit: windows made of tones at chosen bins plus noise.  The
// band-energy ratio of each channel is compared with a floating-point DFT
// (within 2% of full scale); a pure tone inside the band must give nearly
// 1.0, one outside nearly 0, and an all-zero window exactly 0.  The
// per-channel schedule of 145 clocks (N = 32) is checked too.
module tb_spectrum_unit;
  import deep_pkg::*;
  localparam int NCH = 16, N = 32;
  logic clk = 0, rst_n = 0, start = 0, busy, done, feat_valid;
  logic [4:0] band_lo = 3, band_hi = 5;
  logic [3:0] rd_ch, feat_ch;
  logic [4:0] rd_k;
  word_t rd_data;
  logic signed [47:0] ratio;
  spectrum_unit dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int mem [NCH][N];
  assign rd_data = 16'(mem[rd_ch][rd_k]);
  int nfeat = 0, t_start, maxerr = 0;
  always @(posedge clk) if (rst_n && feat_valid) begin
    real re, im, p, tot, bnd, e;
    int err;
    tot = 0; bnd = 0;
    for (int b = 1; b <= N / 2; b++) begin
      re = 0; im = 0;
      for (int k = 0; k < N; k++) begin
        re += mem[feat_ch][k] * $cos(2.0 * 3.14159265358979 * b * k / N);
        im -= mem[feat_ch][k] * $sin(2.0 * 3.14159265358979 * b * k / N);
      end
      p = re * re + im * im;
      tot += p;
      if (b >= band_lo && b <= band_hi) bnd += p;
    end
    e = (tot == 0) ? 0 : bnd / tot * 32767.0;
    err = int'(real'(ratio) - e);
    if (err < 0) err = -err;
    if (err > maxerr) maxerr = err;
    checks++;
    if (err > 650 || feat_ch != 4'(nfeat % NCH) || (tot == 0 && ratio != 0)) begin
      failures++;
      $display("FAIL ch %0d got %0d exp %0f", feat_ch, ratio, e);
    end
    nfeat++;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      for (int c = 0; c < NCH; c++) begin
        int b1, b2;
        b1 = (c + r) % 16 + 1; b2 = (3 * c + 1) % 16 + 1;
        for (int k = 0; k < N; k++)
          mem[c][k] = (c == 15 && r == 0) ? 0 :
                      int'(4000.0 * $cos(2.0 * 3.14159265358979 * b1 * k / N + c)
                           + ((c % 3 == 0) ? 0.0 : 2500.0 * $sin(2.0 * 3.14159265358979 * b2 * k / N))
                           + real'($urandom_range(0, 400)) - 200.0 + 300.0);
      end
      @(negedge clk); start = 1; t_start = $time;
      @(negedge clk); start = 0;
      wait (done);
      repeat (3) @(negedge clk);
      checks++;
      if (($time - t_start) / 10 != NCH * 145 + 3) begin
        failures++; $display("FAIL cycles %0d", ($time - t_start) / 10);
      end
      @(negedge clk);
    end
    checks++;
    if (nfeat != 3 * NCH) failures++;
    $display("max ratio error %0d", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
