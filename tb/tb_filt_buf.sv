// tb_filt_buf: writes random frames, snapshots the window, keeps writing
// (fewer than WIN frames) and checks through all read ports that the frozen
// window is returned oldest-first, and that frame_done follows channel 15.
module tb_filt_buf;
  import deep_pkg::*;
  localparam int NCH = 16, W = 32, NRD = 5;
  logic clk = 0, rst_n = 0, wr_valid = 0, frame_done, snap = 0;
  logic [3:0] wr_ch = 0;
  word_t wr_data = 0;
  logic [3:0] rd_ch [NRD];
  logic [4:0] rd_k [NRD];
  word_t rd_data [NRD];
  filt_buf dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, frames_seen = 0;
  int hist [NCH][$];
  int win [NCH][W];
  always @(posedge clk) if (rst_n && frame_done) frames_seen++;
  task automatic put_frame();
    for (int c = 0; c < NCH; c++) begin
      @(negedge clk); wr_valid = 1; wr_ch = 4'(c); wr_data = 16'($urandom);
      hist[c].push_back(int'(wr_data));
    end
    @(negedge clk); wr_valid = 0;
  endtask
  initial begin
    for (int p = 0; p < NRD; p++) begin rd_ch[p] = 0; rd_k[p] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      repeat (20 + 7 * round) put_frame();
      @(negedge clk); snap = 1;
      for (int c = 0; c < NCH; c++)
        for (int k = 0; k < W; k++)
          win[c][k] = (hist[c].size() >= W - k) ? hist[c][hist[c].size() - W + k] : 0;
      @(negedge clk); snap = 0;
      repeat (round * 10) put_frame();
      for (int n = 0; n < 300; n++) begin
        for (int p = 0; p < NRD; p++) begin rd_ch[p] = 4'($urandom); rd_k[p] = 5'($urandom); end
        #1;
        for (int p = 0; p < NRD; p++) begin
          checks++;
          if (int'(rd_data[p]) != win[rd_ch[p]][rd_k[p]]) begin
            failures++;
            if (failures < 10) $display("FAIL ch %0d k %0d got %0d exp %0d", rd_ch[p], rd_k[p], rd_data[p], win[rd_ch[p]][rd_k[p]]);
          end
        end
      end
    end
    checks++;
    if (frames_seen != 20 + 27 + 34 + 41 + 60) begin
      failures++;
      $display("FAIL frame_done count %0d", frames_seen);
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
