// tb_raw_regs: feeds random 9-bit codes for 16 channels in turn and checks
// that after every sample the 32 taps hold that channel's last 32 samples
// (two's complement), newest first, and zero before they exist.
module tb_raw_regs;
  localparam int NCH = 16, TAPS = 32;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [8:0] in_data = 0;
  logic [3:0] in_ch = 0, out_ch;
  logic signed [8:0] tap [TAPS];
  raw_regs dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int hist [NCH][$];
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 40 * NCH; n++) begin
      @(negedge clk);
      in_valid = 1; in_ch = 4'(n % NCH); in_data = 9'($urandom);
      hist[n % NCH].push_front(int'(in_data) - 256);
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || out_ch != 4'(n % NCH)) failures++;
      for (int t = 0; t < TAPS; t++) begin
        int e;
        e = (t < hist[n % NCH].size()) ? hist[n % NCH][t] : 0;
        checks++;
        if (int'(tap[t]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d tap %0d got %0d exp %0d", n, t, tap[t], e);
        end
      end
      // idle clocks between samples must not move the array
      if (n % 7 == 0) repeat (3) @(negedge clk);
    end
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
