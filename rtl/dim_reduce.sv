// dim_reduce: dimension-reduction unit, a single multiply-accumulate unit
// that projects the extracted feature vector onto N_RED programmed axes
// (for example principal components found offline):
//   red[d] = sat( (sum_f P[d][f] * feat[f]) >>> shift ),  d = 0..N_RED-1.
// The processor description gives the function (MAC unit reducing the
// feature dimension after extraction); the one-product-per-clock schedule,
// N_RED = 4 and the shift/saturation are this design's choices.
//
// Interface: feat[] is the complete feature vector, held stable while busy.
// The unit asks for weight P[w_d][w_f] on w_d/w_f and expects it back on
// w_data in the same clock (combinational configuration read).
// Timing: N_RED*N_FEAT clocks after start; red[] is valid when done pulses.
module dim_reduce
  import deep_pkg::*;
#(
  parameter int unsigned NF = 80,
  parameter int unsigned NR = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  word_t                    feat [NF],
  input  logic [5:0]               shift,
  output logic [$clog2(NR)-1:0]    w_d,
  output logic [$clog2(NF)-1:0]    w_f,
  input  logic signed [CW-1:0]     w_data,
  output logic                     busy,
  output logic                     done,
  output word_t                    red [NR]
);
  logic signed [47:0] acc, acc_n;
  assign acc_n = acc + 48'(w_data) * 48'(feat[w_f]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; w_d <= '0; w_f <= '0; acc <= '0;
      for (int d = 0; d < NR; d++) red[d] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; w_d <= '0; w_f <= '0; acc <= '0;
      end else if (busy) begin
        if (w_f == $clog2(NF)'(NF - 1)) begin
          red[w_d] <= sat_shift(acc_n, shift);
          acc <= '0; w_f <= '0;
          if (w_d == $clog2(NR)'(NR - 1)) begin
            busy <= 1'b0; done <= 1'b1;
          end else w_d <= w_d + 1'b1;
        end else begin
          acc <= acc_n; w_f <= w_f + 1'b1;
        end
      end
    end
  end
endmodule
