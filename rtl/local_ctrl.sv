// local_ctrl: local controller (FSM) that schedules the feature-extraction
// and classification stages.
//
// The pre-processing pipeline runs continuously; the controller counts its
// frames (one filtered sample of every channel) and starts a feature
// extraction iteration ITERS times every FRAMES frames, using a phase
// accumulator so that 10 iterations fall into each 256-frame second without
// drift.  An iteration is:
//   FE   start the four feature-extraction units together, wait until all
//        four have reported done,
//   DR   run the dimension-reduction unit,
//   WR   copy the NF features and NR reduced values into the RISC data SRAM
//        (one word per clock, features first),
//   RUN  start the RISC program counter and wait for HALT (busy low); one
//        clock after the start pulse is left for busy to rise.
// A trigger that arrives while an iteration is still running is dropped and
// flagged on overrun.  The rate of 10 iterations per second and the
// activation of the RISC by the feature-extraction pipeline follow the
// processor description; the phase accumulator and the order of the states
// are this design's.
module local_ctrl #(
  parameter int unsigned NF     = 80,
  parameter int unsigned NR     = 4,
  parameter int unsigned ITERS  = 10,
  parameter int unsigned FRAMES = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          frame_done,
  output logic                          fe_start,
  input  logic [3:0]                    fe_done,
  output logic                          dr_start,
  input  logic                          dr_done,
  output logic                          dm_we,
  output logic [$clog2(NF+NR)-1:0]      dm_idx,
  output logic                          risc_start,
  input  logic                          risc_busy,
  output logic                          iter_start,
  output logic                          overrun
);
  typedef enum logic [2:0] {S_IDLE, S_FE, S_DR, S_WR, S_START, S_ACK, S_RUN} state_e;
  state_e state;
  logic [$clog2(FRAMES+ITERS)-1:0] phase;
  logic [3:0] got;
  logic trig;

  assign trig = frame_done && (32'(phase) + ITERS >= FRAMES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; phase <= '0; got <= '0;
      fe_start <= 1'b0; dr_start <= 1'b0; dm_we <= 1'b0; dm_idx <= '0;
      risc_start <= 1'b0; iter_start <= 1'b0; overrun <= 1'b0;
    end else begin
      fe_start <= 1'b0; dr_start <= 1'b0; dm_we <= 1'b0;
      risc_start <= 1'b0; iter_start <= 1'b0; overrun <= 1'b0;
      if (frame_done)
        phase <= trig ? $bits(phase)'(32'(phase) + ITERS - FRAMES)
                      : $bits(phase)'(32'(phase) + ITERS);
      if (trig && state != S_IDLE) overrun <= 1'b1;
      case (state)
        S_IDLE: if (trig) begin
          fe_start <= 1'b1; iter_start <= 1'b1; got <= '0; state <= S_FE;
        end
        S_FE: begin
          got <= got | fe_done;
          if ((got | fe_done) == 4'hF) begin
            dr_start <= 1'b1; state <= S_DR;
          end
        end
        S_DR: if (dr_done) begin
          dm_idx <= '0; dm_we <= 1'b1; state <= S_WR;
        end
        S_WR: begin
          if (dm_idx == $bits(dm_idx)'(NF + NR - 1)) begin
            state <= S_START;
          end else begin
            dm_idx <= dm_idx + 1'b1; dm_we <= 1'b1;
          end
        end
        S_START: begin risc_start <= 1'b1; state <= S_ACK; end
        S_ACK:   state <= S_RUN;   // the RISC raises busy in this clock
        S_RUN: if (!risc_busy) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
