// deep: digital EEG/ECoG processor.  Three pipelines analyse the 16 recording
// channels:
//   PP (pre-processing)   raw_regs -> temporal_fir -> spatial_filter ->
//                         filt_buf, one sample per sample slot, all 16
//                         channels folded onto one FIR core and one spatial
//                         MAC bank;
//   FE (feature extraction) ten times a second, temporal_alu, xcorr_unit,
//                         spectrum_unit and ci_unit analyse every channel's
//                         window in parallel, giving NF = 16 x 5 features,
//                         which dim_reduce projects onto NR axes;
//   CD (classification and decision) the features and reduced values are
//                         written to the RISC data SRAM and the RISC program
//                         runs; it decides what the chip outputs.
// local_ctrl schedules FE and CD; config_regs holds the programmed
// coefficients.  The division into these pipelines and units follows the
// processor description.  This implementation runs on the system clock and
// takes a sample whenever smp_valid pulses (once per 12 clocks in the SoC),
// which leaves the folded FE units enough clocks per iteration.
//
// Feature layout in the data SRAM: word 5*c + k for channel c, with k =
// 0 energy, 1 variance, 2 cross-correlation, 3 band-energy ratio (Q0.15),
// 4 correlation-integral count; reduced values at 0x60..0x63.
//
// Program port: prog_we/prog_addr/prog_data write configuration registers
// (addresses below 0x8000) or the instruction SRAM (0x8000 and up).
module deep
  import deep_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               smp_valid,
  input  logic               smp_ch_one,
  input  logic [SAMPLE_W-1:0] smp_data,
  input  logic               prog_we,
  input  logic [15:0]        prog_addr,
  input  logic [15:0]        prog_data,
  output logic [3:0]         gain,
  output logic               out_valid,
  output logic [15:0]        out_data,
  output logic               iter_start,
  output logic               overrun
);
  localparam int unsigned CHW = $clog2(N_CH);
  localparam int unsigned NRD = 5;

  // ---------------- configuration ----------------
  logic signed [CW-1:0] fir_coef [FIR_TAPS];
  logic signed [CW-1:0] sp_weight [N_CH][N_CH];
  logic [CHW-1:0]       partner [N_CH];
  logic [5:0]           fir_shift, sp_shift, e_shift, v_shift, x_shift, r_shift;
  logic [4:0]           band_lo, band_hi;
  logic [15:0]          radius;
  logic [$clog2(N_RED)-1:0]  pd;
  logic [$clog2(N_FEAT)-1:0] pf;
  logic signed [CW-1:0] p_data;

  config_regs #(.N_CH(N_CH), .TAPS(FIR_TAPS), .NF(N_FEAT), .NR(N_RED)) u_cfg (
    .clk, .rst_n, .we(prog_we), .addr(prog_addr), .wdata(prog_data),
    .fir_coef, .sp_weight, .partner, .fir_shift, .sp_shift, .band_lo, .band_hi,
    .radius, .gain, .e_shift, .v_shift, .x_shift, .r_shift, .pd, .pf, .p_data);

  // ---------------- PP pipeline ----------------
  logic [CHW-1:0] ch_cnt, in_ch;
  assign in_ch = smp_ch_one ? '0 : ch_cnt + 1'b1;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         ch_cnt <= CHW'(N_CH - 1);
    else if (smp_valid) ch_cnt <= in_ch;

  logic                      raw_v, fir_v, sp_v;
  logic [CHW-1:0]            raw_ch, fir_ch, sp_ch;
  logic signed [SAMPLE_W-1:0] taps [FIR_TAPS];
  word_t                     fir_y, sp_y;

  raw_regs #(.N_CH(N_CH), .TAPS(FIR_TAPS), .W(SAMPLE_W)) u_raw (
    .clk, .rst_n, .in_valid(smp_valid), .in_data(smp_data), .in_ch,
    .out_valid(raw_v), .out_ch(raw_ch), .tap(taps));

  temporal_fir #(.N_CH(N_CH), .TAPS(FIR_TAPS), .W(SAMPLE_W)) u_fir (
    .clk, .rst_n, .in_valid(raw_v), .in_ch(raw_ch), .tap(taps), .coef(fir_coef),
    .shift(fir_shift), .out_valid(fir_v), .out_ch(fir_ch), .out_data(fir_y));

  spatial_filter #(.N_CH(N_CH)) u_sp (
    .clk, .rst_n, .in_valid(fir_v), .in_ch(fir_ch), .in_data(fir_y),
    .weight(sp_weight), .shift(sp_shift),
    .out_valid(sp_v), .out_ch(sp_ch), .out_data(sp_y));

  logic                 frame_done, fe_start;
  logic [CHW-1:0]       rd_ch [NRD];
  logic [$clog2(WIN)-1:0] rd_k [NRD];
  word_t                rd_data [NRD];

  filt_buf #(.N_CH(N_CH), .WIN(WIN), .NRD(NRD)) u_buf (
    .clk, .rst_n, .wr_valid(sp_v), .wr_ch(sp_ch), .wr_data(sp_y),
    .frame_done, .snap(fe_start), .rd_ch, .rd_k, .rd_data);

  // ---------------- FE pipeline ----------------
  logic [3:0] fe_busy, fe_done;
  logic t_v, x_v, s_v, c_v;
  logic [CHW-1:0] t_ch, x_ch, s_ch, c_ch;
  logic signed [47:0] t_en, t_var, x_val, s_ratio, c_cnt;

  temporal_alu #(.N_CH(N_CH), .WIN(WIN)) u_talu (
    .clk, .rst_n, .start(fe_start), .busy(fe_busy[0]), .done(fe_done[0]),
    .rd_ch(rd_ch[0]), .rd_k(rd_k[0]), .rd_data(rd_data[0]),
    .feat_valid(t_v), .feat_ch(t_ch), .energy(t_en), .variance(t_var));

  xcorr_unit #(.N_CH(N_CH), .WIN(WIN)) u_xc (
    .clk, .rst_n, .start(fe_start), .partner, .busy(fe_busy[1]), .done(fe_done[1]),
    .rd_ch_a(rd_ch[1]), .rd_ch_b(rd_ch[2]), .rd_k(rd_k[1]),
    .rd_a(rd_data[1]), .rd_b(rd_data[2]),
    .feat_valid(x_v), .feat_ch(x_ch), .xcorr(x_val));
  assign rd_k[2] = rd_k[1];

  spectrum_unit #(.N_CH(N_CH), .N(WIN)) u_spec (
    .clk, .rst_n, .start(fe_start), .band_lo, .band_hi,
    .busy(fe_busy[2]), .done(fe_done[2]),
    .rd_ch(rd_ch[3]), .rd_k(rd_k[3]), .rd_data(rd_data[3]),
    .feat_valid(s_v), .feat_ch(s_ch), .ratio(s_ratio));

  ci_unit #(.N_CH(N_CH), .WIN(WIN), .L(CI_WIN)) u_ci (
    .clk, .rst_n, .start(fe_start), .radius,
    .busy(fe_busy[3]), .done(fe_done[3]),
    .rd_ch(rd_ch[4]), .rd_k(rd_k[4]), .rd_data(rd_data[4]),
    .feat_valid(c_v), .feat_ch(c_ch), .count(c_cnt));

  // feature registers, FEAT_PER_CH words per channel
  word_t feat [N_FEAT];
  function automatic int unsigned fidx(input logic [CHW-1:0] c, input feat_kind_e k);
    return 32'(c) * FEAT_PER_CH + 32'(k);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < N_FEAT; f++) feat[f] <= '0;
    end else begin
      if (t_v) begin
        feat[fidx(t_ch, F_ENERGY)] <= sat_shift(t_en, e_shift);
        feat[fidx(t_ch, F_VAR)]    <= sat_shift(t_var, v_shift);
      end
      if (x_v) feat[fidx(x_ch, F_XCORR)] <= sat_shift(x_val, x_shift);
      if (s_v) feat[fidx(s_ch, F_BAND)]  <= sat_shift(s_ratio, 6'd0);
      if (c_v) feat[fidx(c_ch, F_CI)]    <= sat_shift(c_cnt, 6'd0);
    end
  end

  logic  dr_start, dr_busy, dr_done;
  word_t red [N_RED];

  dim_reduce #(.NF(N_FEAT), .NR(N_RED)) u_dr (
    .clk, .rst_n, .start(dr_start), .feat, .shift(r_shift),
    .w_d(pd), .w_f(pf), .w_data(p_data), .busy(dr_busy), .done(dr_done), .red);

  // ---------------- CD pipeline ----------------
  logic dm_we, risc_start, risc_busy;
  logic [$clog2(N_FEAT+N_RED)-1:0] dm_idx;
  logic [9:0]  dm_addr;
  logic [15:0] dm_data;

  local_ctrl #(.NF(N_FEAT), .NR(N_RED), .ITERS(10), .FRAMES(256)) u_ctrl (
    .clk, .rst_n, .frame_done, .fe_start, .fe_done, .dr_start, .dr_done,
    .dm_we, .dm_idx, .risc_start, .risc_busy, .iter_start, .overrun);

  always_comb begin
    if (32'(dm_idx) < N_FEAT) begin
      dm_addr = 10'(DMEM_FEAT_BASE + 32'(dm_idx));
      dm_data = feat[dm_idx];
    end else begin
      dm_addr = 10'(DMEM_RED_BASE + 32'(dm_idx) - N_FEAT);
      dm_data = red[$clog2(N_RED)'(32'(dm_idx) - N_FEAT)];
    end
  end

  risc #(.IM_WORDS(1024), .DM_WORDS(1024)) u_risc (
    .clk, .rst_n,
    .im_we(prog_we && prog_addr[15]), .im_addr(prog_addr[9:0]), .im_wdata(prog_data),
    .dm_ext_we(dm_we), .dm_ext_addr(dm_addr), .dm_ext_wdata(dm_data),
    .start(risc_start), .busy(risc_busy), .out_valid, .out_data);
endmodule
