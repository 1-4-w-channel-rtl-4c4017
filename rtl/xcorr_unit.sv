// xcorr_unit: cross-channel correlation unit of the feature-extraction stage.
//
// For each channel c it computes the window correlation with a programmable
// partner channel p(c):  xcorr_c = sum_k x_c[k] * x_p(c)[k] / WIN.
// The processor description names the unit and the feature (spatial-domain
// cross-channel correlation); the choice of one programmable partner per
// channel and the one-product-per-clock schedule are this design's.
//
// Interface: two read ports into the filtered-data window (own channel and
// partner).  Timing: WIN clocks per channel, N_CH*WIN in all; feat_valid
// pulses once per channel; done pulses together with the last.
module xcorr_unit
  import deep_pkg::*;
#(
  parameter int unsigned N_CH = 16,
  parameter int unsigned WIN  = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [$clog2(N_CH)-1:0]  partner [N_CH],
  output logic                     busy,
  output logic                     done,
  output logic [$clog2(N_CH)-1:0]  rd_ch_a,
  output logic [$clog2(N_CH)-1:0]  rd_ch_b,
  output logic [$clog2(WIN)-1:0]   rd_k,
  input  word_t                    rd_a,
  input  word_t                    rd_b,
  output logic                     feat_valid,
  output logic [$clog2(N_CH)-1:0]  feat_ch,
  output logic signed [47:0]       xcorr
);
  localparam int unsigned LW = $clog2(WIN);
  logic signed [47:0] acc, acc_n;

  assign rd_ch_b = partner[rd_ch_a];
  assign acc_n   = acc + 48'(rd_a) * 48'(rd_b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; rd_ch_a <= '0; rd_k <= '0; acc <= '0;
      feat_valid <= 1'b0; feat_ch <= '0; xcorr <= '0;
    end else begin
      done       <= 1'b0;
      feat_valid <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; rd_ch_a <= '0; rd_k <= '0; acc <= '0;
      end else if (busy) begin
        if (rd_k == LW'(WIN - 1)) begin
          feat_valid <= 1'b1;
          feat_ch    <= rd_ch_a;
          xcorr      <= acc_n >>> LW;
          acc <= '0; rd_k <= '0;
          if (rd_ch_a == $clog2(N_CH)'(N_CH - 1)) begin
            busy <= 1'b0; done <= 1'b1;
          end else rd_ch_a <= rd_ch_a + 1'b1;
        end else begin
          acc <= acc_n; rd_k <= rd_k + 1'b1;
        end
      end
    end
  end
endmodule
