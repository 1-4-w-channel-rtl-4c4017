// tb_spatial_filter: streams random frames of 16 samples with random weights
// and checks that the output for channel o during frame m is
// sat((sum_i W[o][i] * x_i[m-1]) >>> shift), frame 0 giving zeros.
module tb_spatial_filter;
  import deep_pkg::*;
  localparam int NCH = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [3:0] in_ch = 0, out_ch;
  word_t in_data = 0, out_data;
  logic signed [15:0] weight [NCH][NCH];
  logic [5:0] shift = 3;
  spatial_filter dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint prev [NCH];
  initial begin
    for (int o = 0; o < NCH; o++)
      for (int i = 0; i < NCH; i++) weight[o][i] = 16'($urandom_range(0, 64) - 32);
    for (int i = 0; i < NCH; i++) prev[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int m = 0; m < 30; m++) begin
      longint cur [NCH];
      for (int c = 0; c < NCH; c++) begin
        longint s, e;
        @(negedge clk);
        in_valid = 1; in_ch = 4'(c);
        in_data = (m % 5 == 4) ? 16'sh7fff : 16'($urandom);
        cur[c] = longint'(in_data);
        s = 0;
        for (int i = 0; i < NCH; i++) s += longint'(weight[c][i]) * prev[i];
        e = s >>> shift;
        if (e > 32767) e = 32767;
        if (e < -32768) e = -32768;
        @(negedge clk); in_valid = 0;
        checks++;
        if (!out_valid || out_ch != 4'(c) || longint'(out_data) != e) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d c=%0d got %0d exp %0d", m, c, out_data, e);
        end
      end
      for (int i = 0; i < NCH; i++) prev[i] = cur[i];
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
