// point_seq -- point-operation sequencer (field-operation program executor).
//
// Runs one of the programs of ecc_pkg (balanced point doubling, mixed point
// addition, commit, load-P) one micro-operation at a time over fe_regfile:
//   OP_MUL  addresses two registers on read ports A and B, whose data go
//           straight to gf_mul's operand inputs, starts gf_mul, waits for its done, writes c;
//   OP_ADD  writes the XOR of two registers in one cycle;
//   OP_MOV  copies a register in one cycle;
//   OP_END  pulses done.
// With dummy_en = 1 the five dummy operations of the doubling are executed,
// so doubling and addition both issue 14 multiplications and 7 additions
// (the document's high-level dummy insertion). With dummy_en = 0 they are
// skipped, one cycle each, giving the unprotected operation count.
//
// Interface: start (one cycle, while idle) samples prog and dummy_en; done
// pulses one cycle after the last operation's write. op_fire pulses for every
// executed field operation, with op_mul / op_dummy telling its kind.
// Timing: 1 cycle per ADD/MOV/skipped dummy, 1 + gf_mul latency per MUL,
// 1 cycle for END. Programs and operation order are the document's; the
// micro-operation encoding and the timing are this design's.
// The assertions at the end are disabled while rst_n is low; because rst_n
// is also the asynchronous reset of the flops, the linter reports it as a
// net used both synchronously and asynchronously. The assertions are
// simulation checks only and add no logic.
module point_seq
  import ecc_pkg::*;
#(
  parameter int unsigned M = 131
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  prog_e        prog,
  input  logic         dummy_en,
  output logic         busy,
  output logic         done,
  // register file
  output reg_idx_t     ra,
  output reg_idx_t     rb,
  input  logic [M-1:0] rdata_a,
  input  logic [M-1:0] rdata_b,
  output logic         we,
  output reg_idx_t     wa,
  output logic [M-1:0] wd,
  // multiplier
  // (the multiplier takes its operands from read ports A and B)
  output logic         mul_start,
  input  logic         mul_done,
  input  logic [M-1:0] mul_c,
  // activity
  output logic         op_fire,
  output logic         op_mul,
  output logic         op_dummy
);

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_WAITM} state_e;
  state_e      state;
  prog_e       prog_q;
  logic        dummy_q;
  logic [4:0]  pc;
  uop_t        u;

  assign u     = prog_uop(prog_q, pc);
  assign busy  = (state != S_IDLE);
  assign ra    = u.s1;
  assign rb    = u.s2;

  logic skip;
  assign skip = u.dummy && !dummy_q;

  always_comb begin
    we        = 1'b0;
    wa        = u.dst;
    wd        = rdata_a ^ rdata_b;
    mul_start = 1'b0;
    op_fire   = 1'b0;
    op_mul    = 1'b0;
    op_dummy  = u.dummy;
    if (state == S_EXEC && !skip) begin
      unique case (u.kind)
        OP_ADD: begin we = 1'b1; op_fire = 1'b1; end
        OP_MOV: begin we = 1'b1; wd = rdata_a; end
        OP_MUL: begin mul_start = 1'b1; op_fire = 1'b1; op_mul = 1'b1; end
        default: ;
      endcase
    end else if (state == S_WAITM && mul_done) begin
      we = 1'b1;
      wd = mul_c;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      prog_q  <= PRG_PD;
      dummy_q <= 1'b1;
      pc      <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          prog_q  <= prog;
          dummy_q <= dummy_en;
          pc      <= '0;
          state   <= S_EXEC;
        end
        S_EXEC: begin
          if (u.kind == OP_END) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (!skip && u.kind == OP_MUL) begin
            state <= S_WAITM;
          end else begin
            pc <= pc + 1'b1;
          end
        end
        S_WAITM: if (mul_done) begin
          pc    <= pc + 1'b1;
          state <= S_EXEC;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The sequencer never starts a multiplication while one is outstanding,
  // and never writes the registers that hold P or the curve constants.
  a_no_double_start: assert property (@(posedge clk) disable iff (!rst_n)
    mul_start |-> state == S_EXEC);
  a_const_regs: assert property (@(posedge clk) disable iff (!rst_n)
    we |-> (wa != R_PX && wa != R_PY && wa != R_ONE && wa != R_CA && wa != R_CC));

endmodule
