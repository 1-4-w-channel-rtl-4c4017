// raw_regs: register array that holds the raw samples of all channels for the
// channel-folded temporal FIR filter.
//
// Samples arrive in serial, channel 1..16 in turn.  The registers form 32
// columns of 16 registers each, cascaded into one chain of 32*16 stages, so
// every new sample pushes the whole array by one position.  Because the
// chain is 16 stages long per column, the first register of column j always
// holds the sample of the channel just written, j sample periods back.  One
// FIR core therefore sees the 32-sample history of whichever channel is
// current, which is the channel folding of the processor description.
//
// Interface: in_valid/in_data/in_ch take one 9-bit ADC code (offset binary).
// One clock later out_valid rises with tap[j] = x_ch[n-j] as signed values
// and out_ch the channel of the sample.  The array is cleared on reset.
module raw_regs #(
  parameter int unsigned N_CH = 16,
  parameter int unsigned TAPS = 32,
  parameter int unsigned W    = 9
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [W-1:0]                in_data,
  input  logic [$clog2(N_CH)-1:0]     in_ch,
  output logic                        out_valid,
  output logic [$clog2(N_CH)-1:0]     out_ch,
  output logic signed [W-1:0]         tap [TAPS]
);
  logic signed [W-1:0] r [TAPS][N_CH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < TAPS; j++)
        for (int i = 0; i < N_CH; i++) r[j][i] <= '0;
      out_valid <= 1'b0;
      out_ch    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_ch  <= in_ch;
        // offset binary to two's complement: invert the MSB
        r[0][0] <= {~in_data[W-1], in_data[W-2:0]};
        for (int j = 0; j < TAPS; j++)
          for (int i = 0; i < N_CH; i++) begin
            if (i > 0)      r[j][i] <= r[j][i-1];
            else if (j > 0) r[j][0] <= r[j-1][N_CH-1];
          end
      end
    end
  end

  always_comb
    for (int j = 0; j < TAPS; j++) tap[j] = r[j][0];
endmodule
