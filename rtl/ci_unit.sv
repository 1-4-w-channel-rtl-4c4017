// ci_unit: chaotic correlation-integral unit of the feature-extraction stage.
//
// It estimates the correlation integral of each channel, a measure of how
// regular (low chaoticity) the signal is.  The last L samples of the
// channel's window are embedded as L-1 two-dimensional delay vectors
// v_i = (x_i, x_{i+1}); the unit counts the pairs i < j whose Chebyshev
// distance max(|x_i - x_j|, |x_{i+1} - x_{j+1}|) is below the programmed
// radius r.  A more regular signal gives a larger count.  The processor
// description only names this unit and its feature (non-linear chaotic
// values); embedding dimension 2, delay 1, the maximum norm and L = 16 are
// this design's choices.
//
// Timing per channel: L clocks to copy the samples, then one pair per clock,
// (L-1)(L-2)/2 clocks (105 for L = 16); feat_valid pulses with the count,
// done together with the last channel's.
module ci_unit
  import deep_pkg::*;
#(
  parameter int unsigned N_CH = 16,
  parameter int unsigned WIN  = 32,
  parameter int unsigned L    = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [15:0]              radius,
  output logic                     busy,
  output logic                     done,
  output logic [$clog2(N_CH)-1:0]  rd_ch,
  output logic [$clog2(WIN)-1:0]   rd_k,
  input  word_t                    rd_data,
  output logic                     feat_valid,
  output logic [$clog2(N_CH)-1:0]  feat_ch,
  output logic signed [47:0]       count
);
  localparam int unsigned LL = $clog2(L);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_PAIR} state_e;
  state_e state;

  word_t         x [L];
  logic [LL-1:0] i, j;
  logic [15:0]   cnt;

  function automatic logic [16:0] absdiff(input word_t a, input word_t b);
    logic signed [16:0] d;
    d = 17'(a) - 17'(b);
    return (d < 0) ? 17'(-d) : 17'(d);
  endfunction

  logic near;
  assign near = (absdiff(x[i], x[j]) < 17'(radius)) &&
                (absdiff(x[i + 1'b1], x[j + 1'b1]) < 17'(radius));
  assign rd_k = $clog2(WIN)'(WIN - L) + $clog2(WIN)'(i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; busy <= 1'b0; done <= 1'b0; rd_ch <= '0;
      i <= '0; j <= '0; cnt <= '0;
      feat_valid <= 1'b0; feat_ch <= '0; count <= '0;
      for (int k = 0; k < L; k++) x[k] <= '0;
    end else begin
      done       <= 1'b0;
      feat_valid <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          busy <= 1'b1; rd_ch <= '0; i <= '0; state <= S_LOAD;
        end
        S_LOAD: begin
          x[i] <= rd_data;
          i    <= i + 1'b1;
          if (i == LL'(L - 1)) begin
            state <= S_PAIR; i <= '0; j <= LL'(1); cnt <= '0;
          end
        end
        S_PAIR: begin
          // vectors 0..L-2, pairs i < j
          if (j == LL'(L - 2)) begin
            if (i == LL'(L - 3)) begin
              feat_valid <= 1'b1;
              feat_ch    <= rd_ch;
              count      <= 48'(cnt + 16'(near));
              i <= '0;
              if (rd_ch == $clog2(N_CH)'(N_CH - 1)) begin
                state <= S_IDLE; busy <= 1'b0; done <= 1'b1;
              end else begin
                rd_ch <= rd_ch + 1'b1; state <= S_LOAD;
              end
            end else begin
              cnt <= cnt + 16'(near);
              i <= i + 1'b1; j <= i + LL'(2);
            end
          end else begin
            cnt <= cnt + 16'(near);
            j <= j + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
