// sbs_soc: digital part of the 16-channel smart brain sensor SoC.
//
// The acquisition front end (16 LNAs, analog multiplexer, PGA, Gm-C
// low-pass filter, 9-bit SAR ADC) is analog and stays outside: its ADC code
// enters on adc_data, and the LNA power-control lines, the PGA gain code and
// the conversion start leave as ports.  Inside, asac_ctrl divides the
// 49.152 kHz system clock into 4.096 kHz sample slots (16 channels x 256
// samples/s) and tells the processor (deep) when a sample is ready and which
// one belongs to channel one.  The processor's result stream (features or
// decisions, as its RISC program chooses) leaves on out_valid/out_data.
//
// Timing: adc_data must hold the code of channel ch_sel in the clock where
// the slot ends (DIV-1 clocks after adc_start).
module sbs_soc
  import deep_pkg::*;
#(
  parameter int unsigned DIV = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SAMPLE_W-1:0] adc_data,
  output logic                adc_start,
  output logic [3:0]          ch_sel,
  output logic [N_CH-1:0]     lna_pc,
  output logic [3:0]          pga_gain,
  input  logic                prog_we,
  input  logic [15:0]         prog_addr,
  input  logic [15:0]         prog_data,
  output logic                out_valid,
  output logic [15:0]         out_data,
  output logic                iter_start,
  output logic                overrun
);
  logic smp_strobe, ch_one;
  logic [3:0] gain;

  asac_ctrl #(.N_CH(N_CH), .DIV(DIV)) u_asac (
    .clk, .rst_n, .gain_in(gain), .gain_ctrl(pga_gain), .adc_start,
    .smp_strobe, .ch_one, .ch(ch_sel), .pc(lna_pc));

  deep u_deep (
    .clk, .rst_n, .smp_valid(smp_strobe), .smp_ch_one(ch_one), .smp_data(adc_data),
    .prog_we, .prog_addr, .prog_data, .gain, .out_valid, .out_data,
    .iter_start, .overrun);
endmodule
