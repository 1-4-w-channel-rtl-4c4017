// tb_local_ctrl: drives 768 frame_done pulses (3 s at 256 frames/s) and
// checks that exactly 20 iterations start in the first 512 frames, 25 or
// 26 frames apart, that each
// iteration runs FE -> DR -> 84 data-SRAM writes in index order -> RISC
// start, waiting for each stage (the units' done pulses arrive in random
// order and after random delays), and that a trigger arriving while the
// RISC is still busy is dropped and flagged as overrun.
module tb_local_ctrl;
  localparam int NF = 80, NR = 4;
  logic clk = 0, rst_n = 0, frame_done = 0, fe_start, dr_start, dr_done = 0;
  logic [3:0] fe_done = 0;
  logic dm_we, risc_start, risc_busy = 0, iter_start, overrun;
  logic [6:0] dm_idx;
  local_ctrl dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_fe = 0, n_dr = 0, n_risc = 0, n_wr = 0, n_over = 0, next_idx = 0;
  int n_iter512 = 0, last_iter_frame = -1;
  int frames = 0;
  bit slow = 0;
  // stage responders
  always @(posedge clk) if (rst_n) begin
    if (fe_start) begin
      n_fe++;
      fork begin
        for (int u = 0; u < 4; u++) begin
          repeat ($urandom_range(1, 40)) @(negedge clk);
          fe_done[$urandom_range(0, 3)] = 1'b1;
        end
        @(negedge clk); fe_done = 4'hF; @(negedge clk); fe_done = 0;
      end join_none
    end
    if (dr_start) begin
      n_dr++;
      if (n_wr != (n_dr - 1) * (NF + NR)) begin checks++; failures++; end
      fork begin repeat (50) @(negedge clk); dr_done = 1; @(negedge clk); dr_done = 0; end join_none
    end
    if (dm_we) begin
      checks++;
      if (32'(dm_idx) != next_idx) begin failures++; $display("FAIL write index %0d exp %0d", dm_idx, next_idx); end
      next_idx = (next_idx + 1) % (NF + NR);
      n_wr++;
    end
    if (risc_start) begin
      n_risc++;
      checks++;
      if (n_wr != n_risc * (NF + NR)) failures++;
      fork begin
        @(negedge clk); risc_busy = 1;
        repeat (slow ? 6000 : 100) @(negedge clk); risc_busy = 0;
      end join_none
    end
    if (overrun) n_over++;
    if (iter_start) begin
      if (frames <= 512) n_iter512++;
      if (last_iter_frame >= 0 && !slow) begin
        checks++;
        if (frames - last_iter_frame != 25 && frames - last_iter_frame != 26) failures++;
      end
      last_iter_frame = frames;
    end
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 768; f++) begin
      if (f == 512) slow = 1;
      repeat (191) @(negedge clk);
      frame_done = 1; @(negedge clk); frame_done = 0;
      frames++;
    end
    repeat (4000) @(negedge clk);
    checks++;
    if (n_iter512 != 20) begin failures++; $display("FAIL %0d iterations in 512 frames", n_iter512); end
    checks += 2;
    if (n_fe != n_dr || n_dr != n_risc) failures++;
    if (n_over == 0) begin failures++; $display("FAIL no overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
