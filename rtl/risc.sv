// risc: programmable processor of the classification and decision stage.
//
// A multi-cycle 16-bit load/store machine with eight registers (r0 = 0), an
// instruction SRAM and a data SRAM (see risc_pkg for the instruction set).
// Its program counter is started by the local controller once the extracted
// and reduced features have been written to fixed data-memory addresses; the
// program runs to a HALT and may drive the chip output with OUT, so the
// output can be features or decisions, as the program chooses.  Both
// memories read synchronously, as SRAM macros would.  The processor
// description gives the role, the program counter and the two SRAMs; the
// instruction set, memory sizes and the schedule (FETCH, EXEC and, for
// loads, a write-back clock) are this design's.
//
// Interface: im_we/im_addr/im_wdata load the program; dm_ext_* write the
// data SRAM while the core is idle; start begins execution at address 0;
// busy stays high until HALT.  out_valid pulses with out_data on OUT.
module risc
  import risc_pkg::*;
#(
  parameter int unsigned IM_WORDS = 1024,
  parameter int unsigned DM_WORDS = 1024
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        im_we,
  input  logic [$clog2(IM_WORDS)-1:0] im_addr,
  input  logic [15:0]                 im_wdata,
  input  logic                        dm_ext_we,
  input  logic [$clog2(DM_WORDS)-1:0] dm_ext_addr,
  input  logic [15:0]                 dm_ext_wdata,
  input  logic                        start,
  output logic                        busy,
  output logic                        out_valid,
  output logic [15:0]                 out_data
);
  localparam int unsigned IA = $clog2(IM_WORDS);
  localparam int unsigned DA = $clog2(DM_WORDS);
  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_EXEC, S_WB} state_e;

  logic [15:0] imem [IM_WORDS];
  logic [15:0] dmem [DM_WORDS];
  logic [15:0] ir, dq;
  logic [15:0] rf [8];
  logic [IA-1:0] pc;
  state_e state;

  opcode_e op;
  logic [2:0] rd, rs, rt;
  logic signed [15:0] imm6, imm9;
  logic [15:0] a, b, c, addr;
  assign op   = opcode_e'(ir[15:12]);
  assign rd   = ir[11:9];
  assign rs   = ir[8:6];
  assign rt   = ir[5:3];
  assign imm6 = 16'(signed'(ir[5:0]));
  assign imm9 = 16'(signed'(ir[8:0]));
  assign a    = (rs == 3'd0) ? 16'd0 : rf[rs];
  assign b    = (rt == 3'd0) ? 16'd0 : rf[rt];
  assign c    = (rd == 3'd0) ? 16'd0 : rf[rd];
  assign addr = a + imm6;

  // instruction SRAM: one write port for program loading, one read port
  always_ff @(posedge clk) begin
    if (im_we) imem[im_addr] <= im_wdata;
    if (state == S_FETCH) ir <= imem[pc];
  end

  // data SRAM: the core owns it while busy, the feature writer otherwise
  always_ff @(posedge clk) begin
    if (busy) begin
      if (state == S_EXEC && op == OP_SW) dmem[addr[DA-1:0]] <= c;
    end else if (dm_ext_we) dmem[dm_ext_addr] <= dm_ext_wdata;
    dq <= dmem[addr[DA-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; busy <= 1'b0; pc <= '0;
      out_valid <= 1'b0; out_data <= '0;
      for (int i = 0; i < 8; i++) rf[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          busy <= 1'b1; pc <= '0; state <= S_FETCH;
        end
        S_FETCH: state <= S_EXEC;
        S_EXEC: begin
          pc    <= pc + 1'b1;
          state <= S_FETCH;
          case (op)
            OP_ADD:  rf[rd] <= a + b;
            OP_SUB:  rf[rd] <= a - b;
            OP_MUL:  rf[rd] <= 16'(a * b);
            OP_ADDI: rf[rd] <= addr;
            OP_LW:   state  <= S_WB;
            OP_BEQ:  if (c == a) pc <= pc + 1'b1 + IA'(imm6);
            OP_BLT:  if ($signed(c) < $signed(a)) pc <= pc + 1'b1 + IA'(imm6);
            OP_LI:   rf[rd] <= imm9;
            OP_JMP:  pc <= IA'(ir[11:0]);
            OP_OUT:  begin out_valid <= 1'b1; out_data <= c; end
            OP_HALT: begin busy <= 1'b0; state <= S_IDLE; end
            OP_SRA:  rf[rd] <= $signed(a) >>> ir[3:0];
            OP_AND:  rf[rd] <= a & b;
            OP_OR:   rf[rd] <= a | b;
            default: ;
          endcase
        end
        S_WB: begin
          rf[rd] <= dq;
          state  <= S_FETCH;
        end
        default: state <= S_IDLE;
      endcase
      rf[0] <= '0;
    end
  end
endmodule
