// tb_temporal_fir: random taps, coefficients and shifts; checks the
// registered FIR result (sum of 32 products, arithmetic shift, saturation
// to 16 bits) one clock after each input, and that the channel tag follows.
module tb_temporal_fir;
  import deep_pkg::*;
  localparam int TAPS = 32;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [3:0] in_ch = 0, out_ch;
  logic signed [8:0] tap [TAPS];
  logic signed [15:0] coef [TAPS];
  logic [5:0] shift = 0;
  word_t out_data;
  temporal_fir dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < TAPS; t++) begin tap[t] = 0; coef[t] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      longint acc, e;
      @(negedge clk);
      for (int t = 0; t < TAPS; t++) begin
        tap[t]  = 9'($urandom);
        coef[t] = (n < 200) ? 16'($urandom_range(0, 200) - 100) : 16'($urandom);
      end
      shift = 6'($urandom_range(0, 20));
      in_valid = 1; in_ch = 4'($urandom);
      acc = 0;
      for (int t = 0; t < TAPS; t++) acc += longint'(tap[t]) * longint'(coef[t]);
      e = acc >>> shift;
      if (e > 32767) e = 32767;
      if (e < -32768) e = -32768;
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || longint'(out_data) != e || out_ch != in_ch) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d got %0d exp %0d", n, out_data, e);
      end
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
