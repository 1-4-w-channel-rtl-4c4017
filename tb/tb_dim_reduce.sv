// tb_dim_reduce: random features and weights (the weight memory is played by
// the testbench); checks red[d] = sat((sum_f P[d][f]*feat[f]) >>> shift)
// and the N_RED*N_FEAT-clock schedule.
module tb_dim_reduce;
  import deep_pkg::*;
  localparam int NF = 80, NR = 4;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  word_t feat [NF];
  logic [5:0] shift = 0;
  logic [1:0] w_d;
  logic [6:0] w_f;
  logic signed [15:0] w_data;
  word_t red [NR];
  dim_reduce dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, t_start;
  int P [NR][NF];
  assign w_data = 16'(P[w_d][w_f]);
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 5; r++) begin
      for (int f = 0; f < NF; f++) feat[f] = 16'($urandom);
      for (int d = 0; d < NR; d++) for (int f = 0; f < NF; f++)
        P[d][f] = (r == 4) ? 32767 : int'($signed(16'($urandom_range(0, 65535)))) >>> (r * 3);
      if (r == 4) for (int f = 0; f < NF; f++) feat[f] = (f % 2) ? 16'sh7fff : 16'sh8000 + 16'(f);
      shift = 6'(4 * r);
      @(negedge clk); start = 1; t_start = $time;
      @(negedge clk); start = 0;
      wait (done);
      checks++;
      if (($time - t_start) / 10 != NR * NF) begin failures++; $display("FAIL cycles %0d", ($time - t_start) / 10); end
      @(negedge clk);
      for (int d = 0; d < NR; d++) begin
        longint s, e;
        s = 0;
        for (int f = 0; f < NF; f++) s += longint'(P[d][f]) * longint'(feat[f]);
        e = s >>> shift;
        if (e > 32767) e = 32767;
        if (e < -32768) e = -32768;
        checks++;
        if (longint'(red[d]) != e) begin failures++; $display("FAIL r=%0d d=%0d got %0d exp %0d", r, d, red[d], e); end
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
