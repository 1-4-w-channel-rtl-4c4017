// spectrum_unit: spectrum analyzer of the feature-extraction stage, an FFT
// followed by ALUs that turn the spectrum into a band-energy-ratio feature.
//
// For each channel in turn (channel folding) it
//   LOAD  copies the channel's N-sample window into a working register file
//         in bit-reversed order (N clocks),
//   FFT   runs a radix-2 decimation-in-time FFT with one butterfly per clock
//         (log2(N) stages of N/2 butterflies); every stage halves its result
//         so the output is X[k]/N and cannot overflow,
//   POW   adds |X[k]|^2 over bins 1..N/2 into a total and, for bins in the
//         programmed band [band_lo, band_hi], into a band sum (N/2 clocks),
//   DIV   divides band by total with a 16-step restoring divider,
// and reports ratio = band/total in Q0.15 (0 when the total is zero).
// The processor description gives "FFT + ALUs" and the band-energy-ratio
// feature; the radix-2 single-butterfly schedule, the Q14 twiddles and the
// per-stage scaling are this design's choices.
//
// Twiddles are W^k = cos(2*pi*k/32) - j*sin(2*pi*k/32) in Q14, taken from a
// quarter-wave table round(16384*cos(2*pi*k/32)), k = 0..8.  N may be 8, 16
// or 32.  Timing per channel: N + (N/2)*log2(N) + N/2 + 17 clocks (145 for
// N = 32); done pulses together with the last channel's feat_valid.
module spectrum_unit
  import deep_pkg::*;
#(
  parameter int unsigned N_CH = 16,
  parameter int unsigned N    = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [4:0]               band_lo,
  input  logic [4:0]               band_hi,
  output logic                     busy,
  output logic                     done,
  output logic [$clog2(N_CH)-1:0]  rd_ch,
  output logic [$clog2(N)-1:0]     rd_k,
  input  word_t                    rd_data,
  output logic                     feat_valid,
  output logic [$clog2(N_CH)-1:0]  feat_ch,
  output logic signed [47:0]       ratio
);
  localparam int unsigned LN = $clog2(N);
  localparam int unsigned IW = 24;
  localparam logic signed [15:0] QCOS [9] = '{16'sd16384, 16'sd16069, 16'sd15137, 16'sd13623,
                                               16'sd11585, 16'sd9102, 16'sd6270, 16'sd3196, 16'sd0};

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_FFT, S_POW, S_DIV} state_e;
  state_e state;

  logic signed [IW-1:0] re [N];
  logic signed [IW-1:0] im [N];
  logic [LN-1:0]        cnt;      // sample / butterfly / bin counter
  logic [2:0]           stage;
  logic [47:0]          total, band;
  logic [48:0]          rem;
  logic [15:0]          quo;
  logic [4:0]           dstep;

  function automatic logic [LN-1:0] bitrev(input logic [LN-1:0] v);
    for (int i = 0; i < LN; i++) bitrev[i] = v[LN-1-i];
  endfunction

  // twiddle for index k of a 32-point circle, k = 0..15
  function automatic logic signed [15:0] tw_re(input logic [3:0] k);
    return (k <= 4'd8) ? QCOS[k] : -QCOS[4'(5'd16 - 5'(k))];
  endfunction
  function automatic logic signed [15:0] tw_im(input logic [3:0] k);
    return (k <= 4'd8) ? -QCOS[4'd8 - k] : -QCOS[k - 4'd8];
  endfunction

  // butterfly addressing
  logic [LN-1:0] half, pos, i0, i1;
  logic [3:0]    twk;
  logic signed [15:0] wr, wi;
  logic signed [47:0] pr, pi;
  logic signed [IW:0] ar, ai;
  always_comb begin
    half = LN'(1) << stage;
    pos  = cnt & (half - 1'b1);
    i0   = ((cnt >> stage) << (stage + 1)) | pos;
    i1   = i0 | half;
    twk  = 4'((32'(pos) << (LN - 1 - stage)) * (32 / N));
    wr   = tw_re(twk);
    wi   = tw_im(twk);
    pr   = (48'(re[i1]) * 48'(wr) - 48'(im[i1]) * 48'(wi)) >>> 14;
    pi   = (48'(re[i1]) * 48'(wi) + 48'(im[i1]) * 48'(wr)) >>> 14;
    ar   = (IW+1)'(re[i0]);
    ai   = (IW+1)'(im[i0]);
  end

  logic [LN-1:0] bin;
  logic [47:0]   pw;
  assign bin = cnt + 1'b1;
  assign pw  = 48'(48'(re[bin]) * 48'(re[bin]) + 48'(im[bin]) * 48'(im[bin]));

  logic [48:0] rem_sh;
  assign rem_sh = rem << 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; busy <= 1'b0; done <= 1'b0; rd_ch <= '0; cnt <= '0;
      stage <= '0; total <= '0; band <= '0; rem <= '0; quo <= '0; dstep <= '0;
      feat_valid <= 1'b0; feat_ch <= '0; ratio <= '0;
      for (int i = 0; i < N; i++) begin re[i] <= '0; im[i] <= '0; end
    end else begin
      done       <= 1'b0;
      feat_valid <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          busy <= 1'b1; rd_ch <= '0; cnt <= '0; state <= S_LOAD;
        end
        S_LOAD: begin
          re[bitrev(cnt)] <= IW'(rd_data);
          im[bitrev(cnt)] <= '0;
          cnt <= cnt + 1'b1;
          if (cnt == LN'(N - 1)) begin
            state <= S_FFT; stage <= '0; cnt <= '0;
          end
        end
        S_FFT: begin
          re[i0] <= IW'((ar + (IW+1)'(pr)) >>> 1);
          im[i0] <= IW'((ai + (IW+1)'(pi)) >>> 1);
          re[i1] <= IW'((ar - (IW+1)'(pr)) >>> 1);
          im[i1] <= IW'((ai - (IW+1)'(pi)) >>> 1);
          if (cnt == LN'(N / 2 - 1)) begin
            cnt <= '0;
            if (stage == 3'(LN - 1)) begin
              state <= S_POW; total <= '0; band <= '0;
            end else stage <= stage + 1'b1;
          end else cnt <= cnt + 1'b1;
        end
        S_POW: begin
          total <= total + pw;
          if (5'(bin) >= band_lo && 5'(bin) <= band_hi) band <= band + pw;
          cnt <= cnt + 1'b1;
          if (cnt == LN'(N / 2 - 1)) begin
            state <= S_DIV; dstep <= '0; quo <= '0;
            rem <= 49'((5'(bin) >= band_lo && 5'(bin) <= band_hi) ? band + pw : band);
            total <= total + pw;
          end
        end
        S_DIV: begin
          if (dstep == 5'd16) begin
            feat_valid <= 1'b1;
            feat_ch    <= rd_ch;
            ratio      <= (total == '0) ? '0 : 48'(quo >> 1);
            cnt        <= '0;
            if (rd_ch == $clog2(N_CH)'(N_CH - 1)) begin
              state <= S_IDLE; busy <= 1'b0; done <= 1'b1;
            end else begin
              rd_ch <= rd_ch + 1'b1; state <= S_LOAD;
            end
          end else begin
            dstep <= dstep + 1'b1;
            if (rem_sh >= 49'(total)) begin
              rem <= rem_sh - 49'(total);
              quo <= {quo[14:0], 1'b1};
            end else begin
              rem <= rem_sh;
              quo <= {quo[14:0], 1'b0};
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign rd_k = cnt;
endmodule
