// spatial_filter: programmable spatial linear filter across the 16 channels.
//
// Output channel o of frame m is sum_i W[o][i] * x_i[m], the weighted sum of
// the 16 temporally filtered samples of one frame (one sample period of all
// channels).  The processor description gives the function (spatial linear
// filtering with MAC units) but not its schedule; here the incoming frame is
// collected in a register row, copied to a hold row when its last channel
// arrives, and during the next frame one bank of 16 multipliers produces one
// output channel per incoming sample.  The stream rate is thus kept and the
// latency is one frame.  The result is shifted right by a programmable amount
// and saturated to 16 bits.
//
// Interface: in_valid/in_ch/in_data with in_ch counting 0..15 in order;
// out_valid/out_ch/out_data one clock after the input sample of the same
// channel number, carrying the previous frame's output for that channel.
module spatial_filter
  import deep_pkg::*;
#(
  parameter int unsigned N_CH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [$clog2(N_CH)-1:0]  in_ch,
  input  word_t                    in_data,
  input  logic signed [CW-1:0]     weight [N_CH][N_CH],
  input  logic [5:0]               shift,
  output logic                     out_valid,
  output logic [$clog2(N_CH)-1:0]  out_ch,
  output word_t                    out_data
);
  word_t cur  [N_CH];
  word_t hold [N_CH];
  logic signed [47:0] acc;

  always_comb begin
    acc = '0;
    for (int i = 0; i < N_CH; i++) acc += 48'(weight[in_ch][i]) * 48'(hold[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_CH; i++) begin
        cur[i]  <= '0;
        hold[i] <= '0;
      end
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_ch   <= in_ch;
        out_data <= sat_shift(acc, shift);
        cur[in_ch] <= in_data;
        if (in_ch == $clog2(N_CH)'(N_CH - 1)) begin
          for (int i = 0; i < N_CH - 1; i++) hold[i] <= cur[i];
          hold[N_CH-1] <= in_data;
        end
      end
    end
  end
endmodule
