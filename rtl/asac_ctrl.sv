// asac_ctrl: clock divider, time and gain control unit of the analog signal
// acquisition circuitry.
//
// The acquisition front end shares one PGA, low-pass filter and 9-bit SAR
// ADC among 16 LNAs through an analog multiplexer, and the LNAs are powered
// alternately.  This unit divides the system clock by DIV (49.152 kHz / 12 =
// 4.096 kHz, i.e. 16 channels x 256 samples/s) into sample slots, steps the
// multiplexer channel once per slot, drives the power-control lines PC1-16,
// the gain control of the PGA and the synchronisation signals to the
// processor.  The block, its outputs and the clock and sample rates follow
// the acquisition-circuit description; the slot timing is this design's:
//   adc_start   pulses in the first system clock of each slot,
//   smp_strobe  pulses in the last clock of the slot, when the converted
//               code of channel ch is on the ADC output,
//   ch_one      is high with smp_strobe for the first channel,
//   pc          is one-hot on the channel being converted.
module asac_ctrl #(
  parameter int unsigned N_CH = 16,
  parameter int unsigned DIV  = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [3:0]               gain_in,
  output logic [3:0]               gain_ctrl,
  output logic                     adc_start,
  output logic                     smp_strobe,
  output logic                     ch_one,
  output logic [$clog2(N_CH)-1:0]  ch,
  output logic [N_CH-1:0]          pc
);
  logic [$clog2(DIV)-1:0] div;

  assign adc_start  = (div == '0);
  assign smp_strobe = (div == $clog2(DIV)'(DIV - 1));
  assign ch_one     = smp_strobe && (ch == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; ch <= '0; gain_ctrl <= '0;
    end else begin
      gain_ctrl <= gain_in;
      if (smp_strobe) begin
        div <= '0;
        ch  <= (ch == $clog2(N_CH)'(N_CH - 1)) ? '0 : ch + 1'b1;
      end else div <= div + 1'b1;
    end
  end

  always_comb begin
    pc = '0;
    pc[ch] = 1'b1;
  end
endmodule
