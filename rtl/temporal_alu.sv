// temporal_alu: temporal-characteristic ALU of the feature-extraction stage.
//
// On a start pulse it visits the 16 channels in turn (channel folding) and,
// for each, reads the WIN samples of the channel's window one per clock,
// accumulating the sum and the sum of squares.  At the end of a channel it
// reports
//   energy   = sum(x^2) / WIN
//   variance = energy - (sum(x) / WIN)^2
// (divisions by WIN are shifts, WIN a power of two).  Energy and variance are
// the characteristics the processor description names for this unit; the
// sequential one-sample-per-clock schedule is this design's choice.
//
// Timing: WIN clocks per channel, N_CH*WIN clocks in all; feat_valid pulses
// once per channel with feat_ch; done pulses together with the last one.
module temporal_alu
  import deep_pkg::*;
#(
  parameter int unsigned N_CH = 16,
  parameter int unsigned WIN  = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  output logic [$clog2(N_CH)-1:0]  rd_ch,
  output logic [$clog2(WIN)-1:0]   rd_k,
  input  word_t                    rd_data,
  output logic                     feat_valid,
  output logic [$clog2(N_CH)-1:0]  feat_ch,
  output logic signed [47:0]       energy,
  output logic signed [47:0]       variance
);
  localparam int unsigned LW = $clog2(WIN);
  logic signed [47:0] sum, sq, sum_n, sq_n, mean_n, en_n;

  assign sum_n  = sum + 48'(rd_data);
  assign sq_n   = sq + 48'(rd_data) * 48'(rd_data);
  assign mean_n = sum_n >>> LW;
  assign en_n   = sq_n >>> LW;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; rd_ch <= '0; rd_k <= '0;
      sum <= '0; sq <= '0;
      feat_valid <= 1'b0; feat_ch <= '0; energy <= '0; variance <= '0;
    end else begin
      done       <= 1'b0;
      feat_valid <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; rd_ch <= '0; rd_k <= '0; sum <= '0; sq <= '0;
      end else if (busy) begin
        if (rd_k == LW'(WIN - 1)) begin
          feat_valid <= 1'b1;
          feat_ch    <= rd_ch;
          energy     <= en_n;
          variance   <= en_n - mean_n * mean_n;
          sum <= '0; sq <= '0; rd_k <= '0;
          if (rd_ch == $clog2(N_CH)'(N_CH - 1)) begin
            busy <= 1'b0; done <= 1'b1;
          end else rd_ch <= rd_ch + 1'b1;
        end else begin
          sum <= sum_n; sq <= sq_n; rd_k <= rd_k + 1'b1;
        end
      end
    end
  end
endmodule
