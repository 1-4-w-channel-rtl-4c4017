// config_regs: registers for configuration, written through the program port.
//
// They hold everything the offline calibration programs: the temporal FIR
// coefficients a1..a32, the 16x16 spatial filter weights, each channel's
// cross-correlation partner, the spectrum band, the correlation-integral
// radius, the PGA gain code, result shifts and the dimension-reduction
// weights.  That the filter coefficients live here follows the processor
// description; the address map (deep_pkg) and the reset values are this
// design's.  Reset values make the filters pass samples through unchanged
// (a1 = 1, identity spatial matrix, zero shifts), partner(c) = c+1 mod 16,
// band bins 1..2, radius 16, dimension-reduction weights zero.
//
// Scalar registers at 0x0300 + n: 0 FIR shift, 1 spatial shift, 2 band_lo,
// 3 band_hi, 4 radius, 5 gain code, 6 energy shift, 7 variance shift,
// 8 correlation shift, 9 reduction shift.
//
// Interface: one write per clock (we/addr/wdata); all fields are outputs,
// the reduction weights through a combinational read port (pd, pf).
module config_regs
  import deep_pkg::*;
#(
  parameter int unsigned N_CH = 16,
  parameter int unsigned TAPS = 32,
  parameter int unsigned NF   = 80,
  parameter int unsigned NR   = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [15:0]              addr,
  input  logic [15:0]              wdata,
  output logic signed [CW-1:0]     fir_coef [TAPS],
  output logic signed [CW-1:0]     sp_weight [N_CH][N_CH],
  output logic [$clog2(N_CH)-1:0]  partner [N_CH],
  output logic [5:0]               fir_shift,
  output logic [5:0]               sp_shift,
  output logic [4:0]               band_lo,
  output logic [4:0]               band_hi,
  output logic [15:0]              radius,
  output logic [3:0]               gain,
  output logic [5:0]               e_shift,
  output logic [5:0]               v_shift,
  output logic [5:0]               x_shift,
  output logic [5:0]               r_shift,
  input  logic [$clog2(NR)-1:0]    pd,
  input  logic [$clog2(NF)-1:0]    pf,
  output logic signed [CW-1:0]     p_data
);
  logic signed [CW-1:0] pca [NR][NF];
  assign p_data = pca[pd][pf];

  logic [7:0] lo;
  assign lo = addr[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < TAPS; t++) fir_coef[t] <= (t == 0) ? CW'(1) : '0;
      for (int o = 0; o < N_CH; o++) begin
        partner[o] <= $clog2(N_CH)'((o + 1) % N_CH);
        for (int i = 0; i < N_CH; i++) sp_weight[o][i] <= (o == i) ? CW'(1) : '0;
      end
      for (int d = 0; d < NR; d++)
        for (int f = 0; f < NF; f++) pca[d][f] <= '0;
      fir_shift <= '0; sp_shift <= '0; band_lo <= 5'd1; band_hi <= 5'd2;
      radius <= 16'd16; gain <= '0; e_shift <= '0; v_shift <= '0;
      x_shift <= '0; r_shift <= '0;
    end else if (we && !addr[15]) begin
      case (addr[14:8])
        7'h00: if (32'(lo) < TAPS) fir_coef[lo[$clog2(TAPS)-1:0]] <= wdata;
        7'h01: sp_weight[lo[7:4]][lo[3:0]] <= wdata;
        7'h02: if (32'(lo) < N_CH) partner[lo[$clog2(N_CH)-1:0]] <= wdata[$clog2(N_CH)-1:0];
        7'h03: case (lo)
          8'd0: fir_shift <= wdata[5:0];
          8'd1: sp_shift  <= wdata[5:0];
          8'd2: band_lo   <= wdata[4:0];
          8'd3: band_hi   <= wdata[4:0];
          8'd4: radius    <= wdata;
          8'd5: gain      <= wdata[3:0];
          8'd6: e_shift   <= wdata[5:0];
          8'd7: v_shift   <= wdata[5:0];
          8'd8: x_shift   <= wdata[5:0];
          8'd9: r_shift   <= wdata[5:0];
          default: ;
        endcase
        7'h04, 7'h05:
          if (32'(addr[8:7]) < NR && 32'(addr[6:0]) < NF)
            pca[addr[8:7]][addr[6:0]] <= wdata;
        default: ;
      endcase
    end
  end
endmodule
