// tb_risc: loads programs through the instruction port, fills the data SRAM
// through the external port and checks what the programs output:
//  1. sum of dmem[0..9] with a loop (LW, ADD, ADDI, BLT, OUT, HALT);
//  2. arithmetic: SUB, MUL, SRA, AND, OR, LI with negative values, BEQ, JMP,
//     signed BLT;
//  3. a 1-nearest-neighbour search over 4 stored 2-D points, the kind of
//     decision the classification stage runs, written back with SW and
//     read again with LW.
// It also checks that busy falls at HALT and the clocks an instruction takes.
module tb_risc;
  import risc_pkg::*;
  logic clk = 0, rst_n = 0, im_we = 0, dm_ext_we = 0, start = 0, busy, out_valid;
  logic [9:0] im_addr = 0, dm_ext_addr = 0;
  logic [15:0] im_wdata = 0, dm_ext_wdata = 0, out_data;
  risc dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int outs [$];
  always @(posedge clk) if (rst_n && out_valid) outs.push_back(int'($signed(out_data)));

  task automatic load(input logic [15:0] p []);
    for (int i = 0; i < p.size(); i++) begin
      @(negedge clk); im_we = 1; im_addr = 10'(i); im_wdata = p[i];
    end
    @(negedge clk); im_we = 0;
  endtask
  task automatic dmw(input int a, input int d);
    @(negedge clk); dm_ext_we = 1; dm_ext_addr = 10'(a); dm_ext_wdata = 16'(d);
    @(negedge clk); dm_ext_we = 0;
  endtask
  task automatic run(output int cycles);
    int t0;
    outs.delete();
    @(negedge clk); start = 1; t0 = $time;
    @(negedge clk); start = 0;
    wait (!busy);
    cycles = ($time - t0) / 10;
    @(negedge clk);
  endtask
  task automatic expect_outs(input int e [$], input string what);
    checks++;
    if (outs != e) begin
      failures++;
      $display("FAIL %s: got %p exp %p", what, outs, e);
    end
  endtask

  initial begin
    int cyc, sum;
    int px [4], py [4];
    repeat (2) @(negedge clk); rst_n = 1;
    // 1. loop sum
    sum = 0;
    for (int i = 0; i < 10; i++) begin dmw(i, 3 * i - 7); sum += 3 * i - 7; end
    load('{enc_li(1, 0), enc_li(2, 10), enc_li(4, 0),
           enc_i(OP_LW, 3, 1, 0), enc_r(OP_ADD, 4, 4, 3), enc_i(OP_ADDI, 1, 1, 1),
           enc_i(OP_BLT, 1, 2, -4), enc_r(OP_OUT, 4, 0, 0), enc_r(OP_HALT, 0, 0, 0)});
    run(cyc);
    expect_outs('{sum}, "loop sum");
    // 3 LI (2 clk) + 10*(LW 3 + ADD 2 + ADDI 2 + BLT 2) + OUT 2 + HALT 2
    checks++;
    if (cyc != 3 * 2 + 10 * 9 + 2 + 2) begin failures++; $display("FAIL cycles %0d", cyc); end
    // 2. arithmetic and control flow
    load('{enc_li(1, -100), enc_li(2, 7), enc_r(OP_SUB, 3, 1, 2), enc_r(OP_OUT, 3, 0, 0),
           enc_r(OP_MUL, 3, 1, 2), enc_r(OP_OUT, 3, 0, 0),
           enc_i(OP_SRA, 3, 1, 2), enc_r(OP_OUT, 3, 0, 0),
           enc_r(OP_AND, 3, 1, 2), enc_r(OP_OUT, 3, 0, 0),
           enc_r(OP_OR, 3, 1, 2), enc_r(OP_OUT, 3, 0, 0),
           enc_i(OP_BEQ, 2, 2, 1), enc_r(OP_OUT, 1, 0, 0),     // taken: skips
           enc_i(OP_BEQ, 1, 2, 1), enc_r(OP_OUT, 2, 0, 0),     // not taken
           enc_j(19), enc_r(OP_OUT, 1, 0, 0), enc_r(OP_OUT, 1, 0, 0),
           enc_r(OP_OUT, 0, 0, 0),
           enc_i(OP_BLT, 1, 2, 1), enc_r(OP_OUT, 1, 0, 0),     // -100 < 7: taken
           enc_i(OP_BLT, 2, 1, 1), enc_r(OP_OUT, 2, 0, 0),     // 7 < -100: not taken
           enc_r(OP_HALT, 0, 0, 0)});
    run(cyc);
    expect_outs('{-107, -700, -25, int'($signed(16'hff9c & 16'd7)), int'($signed(16'hff9c | 16'd7)), 7, 0, 7}, "arithmetic");
    // 3. nearest neighbour: points at 10..17, query at 20..21, result to 30
    for (int k = 0; k < 4; k++) begin
      px[k] = $urandom_range(0, 60) - 30; py[k] = $urandom_range(0, 60) - 30;
      dmw(10 + 2 * k, px[k]); dmw(11 + 2 * k, py[k]);
    end
    dmw(20, 5); dmw(21, -3);
    load('{enc_li(1, 10), enc_li(7, 18), enc_li(6, 255), enc_li(5, 0), enc_li(2, 0),
           // loop (pc 5): r3 = dx^2 + dy^2
           enc_i(OP_LW, 3, 1, 0), enc_i(OP_LW, 4, 0, 20), enc_r(OP_SUB, 3, 3, 4), enc_r(OP_MUL, 3, 3, 3),
           enc_i(OP_LW, 4, 1, 1), enc_i(OP_SW, 3, 0, 31), enc_i(OP_LW, 3, 0, 21), enc_r(OP_SUB, 4, 4, 3),
           enc_r(OP_MUL, 4, 4, 4), enc_i(OP_LW, 3, 0, 31), enc_r(OP_ADD, 3, 3, 4),
           // if r3 < best: best = r3, idx = r2
           enc_i(OP_BLT, 6, 3, 2), enc_r(OP_ADD, 6, 3, 0), enc_r(OP_ADD, 5, 2, 0),
           enc_i(OP_ADDI, 2, 2, 1), enc_i(OP_ADDI, 1, 1, 2), enc_i(OP_BLT, 1, 7, -17),
           enc_i(OP_SW, 5, 0, 30), enc_i(OP_LW, 3, 0, 30), enc_r(OP_OUT, 3, 0, 0),
           enc_r(OP_OUT, 6, 0, 0), enc_r(OP_HALT, 0, 0, 0)});
    run(cyc);
    begin
      int best, bi, dd;
      best = 255; bi = 0;
      for (int k = 0; k < 4; k++) begin
        dd = (px[k] - 5) * (px[k] - 5) + (py[k] + 3) * (py[k] + 3);
        if (!(best < dd)) begin best = dd; bi = k; end
      end
      expect_outs('{bi, best}, "nearest neighbour");
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
