// temporal_fir: the single parallel FIR core shared by all 16 channels.
//
// It multiplies the 32 taps delivered by raw_regs with the programmed
// coefficients a1..a32 and adds the products, as in the folded filter of the
// processor description (32 multipliers feeding an adder chain).  The sum is
// shifted right by a programmable amount and saturated to 16 bits; the shift,
// the coefficient width and the saturation are this design's choices.
//
// Interface: in_valid/in_ch/tap in, coef[t] is a(t+1).  The result appears one
// clock later with out_valid and the same channel number.
module temporal_fir
  import deep_pkg::*;
#(
  parameter int unsigned N_CH = 16,
  parameter int unsigned TAPS = 32,
  parameter int unsigned W    = 9
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [$clog2(N_CH)-1:0]  in_ch,
  input  logic signed [W-1:0]      tap  [TAPS],
  input  logic signed [CW-1:0]     coef [TAPS],
  input  logic [5:0]               shift,
  output logic                     out_valid,
  output logic [$clog2(N_CH)-1:0]  out_ch,
  output word_t                    out_data
);
  logic signed [47:0] acc;

  always_comb begin
    acc = '0;
    for (int t = 0; t < TAPS; t++) acc += 48'(tap[t]) * 48'(coef[t]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_ch   <= in_ch;
        out_data <= sat_shift(acc, shift);
      end
    end
  end
endmodule
