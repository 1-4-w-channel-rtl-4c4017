// tb_config_regs: checks the reset values (pass-through filters, partner
// c+1, band 1..2, radius 16), then writes random values to every field
// through the address map and reads them back from the outputs; writes to
// the instruction-SRAM range (bit 15 set) must leave the registers alone.
module tb_config_regs;
  import deep_pkg::*;
  localparam int NCH = 16, TAPS = 32, NF = 80, NR = 4;
  logic clk = 0, rst_n = 0, we = 0;
  logic [15:0] addr = 0, wdata = 0;
  logic signed [15:0] fir_coef [TAPS];
  logic signed [15:0] sp_weight [NCH][NCH];
  logic [3:0] partner [NCH];
  logic [5:0] fir_shift, sp_shift, e_shift, v_shift, x_shift, r_shift;
  logic [4:0] band_lo, band_hi;
  logic [15:0] radius;
  logic [3:0] gain;
  logic [1:0] pd = 0;
  logic [6:0] pf = 0;
  logic signed [15:0] p_data;
  config_regs dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wr(input int a, input int d);
    @(negedge clk); we = 1; addr = 16'(a); wdata = 16'(d);
    @(negedge clk); we = 0;
  endtask
  int a [TAPS], w [NCH][NCH], pt [NCH], p [NR][NF], sc [10];
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    chk(fir_coef[0] == 1 && fir_coef[5] == 0, "reset FIR");
    chk(sp_weight[3][3] == 1 && sp_weight[3][4] == 0, "reset spatial");
    chk(partner[15] == 0 && partner[2] == 3, "reset partner");
    chk(band_lo == 1 && band_hi == 2 && radius == 16 && fir_shift == 0, "reset scalars");
    for (int t = 0; t < TAPS; t++) begin a[t] = $urandom_range(0, 65535); wr(t, a[t]); end
    for (int o = 0; o < NCH; o++) for (int i = 0; i < NCH; i++) begin
      w[o][i] = $urandom_range(0, 65535); wr('h100 + 16 * o + i, w[o][i]);
    end
    for (int c = 0; c < NCH; c++) begin pt[c] = $urandom_range(0, 15); wr('h200 + c, pt[c]); end
    for (int s = 0; s < 10; s++) begin sc[s] = $urandom_range(0, 15); wr('h300 + s, sc[s]); end
    for (int d = 0; d < NR; d++) for (int f = 0; f < NF; f++) begin
      p[d][f] = $urandom_range(0, 65535); wr('h400 + 128 * d + f, p[d][f]);
    end
    wr('h8000, 16'h1234);
    wr('h8001 + 'h300, 16'h0f0f);
    for (int t = 0; t < TAPS; t++) chk(fir_coef[t] == 16'(a[t]), "FIR coefficient");
    for (int o = 0; o < NCH; o++) for (int i = 0; i < NCH; i++) chk(sp_weight[o][i] == 16'(w[o][i]), "spatial weight");
    for (int c = 0; c < NCH; c++) chk(partner[c] == 4'(pt[c]), "partner");
    chk(fir_shift == 6'(sc[0]) && sp_shift == 6'(sc[1]) && band_lo == 5'(sc[2]) && band_hi == 5'(sc[3]), "scalars 0-3");
    chk(radius == 16'(sc[4]) && gain == 4'(sc[5]) && e_shift == 6'(sc[6]) && v_shift == 6'(sc[7]), "scalars 4-7");
    chk(x_shift == 6'(sc[8]) && r_shift == 6'(sc[9]), "scalars 8-9");
    for (int d = 0; d < NR; d++) for (int f = 0; f < NF; f++) begin
      pd = 2'(d); pf = 7'(f); #1;
      chk(p_data == 16'(p[d][f]), "reduction weight");
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
