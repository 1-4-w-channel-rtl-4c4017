// filt_buf: registers for the filtered data, the windows that the feature
// extraction units analyse.
//
// Each channel has a ring of DEPTH = 2*WIN filtered samples, written one
// sample at a time in channel order by the spatial filter; frame_done pulses
// after the last channel of a frame is written.  A pulse on snap (the start
// of a feature-extraction iteration) fixes, for every channel, the window
// of its WIN most recent samples.  Reads then address that frozen window:
// read port p returns, for channel rd_ch[p], window sample rd_k[p], 0 being
// the oldest and WIN-1 the newest.  New samples keep arriving during the
// iteration, but they go to the other half of the ring, so the window stays
// intact as long as an iteration lasts fewer than WIN frames (an iteration
// is 25.6 frames apart at 10 iterations per second).  The processor
// description only names this block; the ring, its depth, the snapshot and
// the combinational read ports are this design's choices.
module filt_buf
  import deep_pkg::*;
#(
  parameter int unsigned N_CH = 16,
  parameter int unsigned WIN  = 32,
  parameter int unsigned NRD  = 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_valid,
  input  logic [$clog2(N_CH)-1:0]  wr_ch,
  input  word_t                    wr_data,
  output logic                     frame_done,
  input  logic                     snap,
  input  logic [$clog2(N_CH)-1:0]  rd_ch [NRD],
  input  logic [$clog2(WIN)-1:0]   rd_k  [NRD],
  output word_t                    rd_data [NRD]
);
  localparam int unsigned DEPTH = 2 * WIN;
  localparam int unsigned AW    = $clog2(DEPTH);

  word_t         mem  [N_CH][DEPTH];
  logic [AW-1:0] wp   [N_CH];   // next slot to write
  logic [AW-1:0] base [N_CH];   // oldest sample of the frozen window

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) begin
        wp[c]   <= '0;
        base[c] <= '0;
        for (int k = 0; k < DEPTH; k++) mem[c][k] <= '0;
      end
      frame_done <= 1'b0;
    end else begin
      frame_done <= wr_valid && (wr_ch == $clog2(N_CH)'(N_CH - 1));
      if (wr_valid) begin
        mem[wr_ch][wp[wr_ch]] <= wr_data;
        wp[wr_ch] <= wp[wr_ch] + 1'b1;
      end
      if (snap)
        for (int c = 0; c < N_CH; c++) base[c] <= wp[c] - AW'(WIN);
    end
  end

  always_comb
    for (int p = 0; p < NRD; p++)
      rd_data[p] = mem[rd_ch[p]][base[rd_ch[p]] + AW'(rd_k[p])];
endmodule
