// ad_ctrl -- scalar-multiplication controller (add-and-double, MSB first).
//
// Computes S = d*P with the binary add-and-double (AD) algorithm:
//   if d[K-1] = 1 then S = P else S = O
//   for i = K-2 downto 0:  S = 2S;  if d[i] = 1 then S = S + P
// Each point step is a program run on point_seq: a doubling (PRG_PD) is
// followed by PRG_COMMIT; an addition (PRG_PA) by PRG_COMMIT, or by PRG_LOADP
// when S was still the point at infinity O (then O + P = P). The doubling is
// always executed, also while S = O, whose doubling is again O; only the flag
// s_inf records that S is O. Commit and load-P take the same time, and the
// controller spends one cycle between a doubling's commit and the next point
// operation whether that is an addition or the next bit's doubling, so
// neither the infinity handling nor the key bit adds a timing difference of
// its own: with the dummies on, every point step takes the same time.
//
// Interface: start (one cycle, while idle) samples d, px, py, ca (curve a) and
// cc (fourth root of curve b). The controller first writes them into the
// register file through its own write port (5 cycles), runs the AD loop,
// then reads S out through read port C (3 cycles) and pulses done with
// sx/sy/sz (Jacobian) and inf valid; they hold until the next start.
// The AD algorithm is the document's; the infinity flag, the program split
// and all timing are this design's choices.
// The two top bits of rf_wa and of rf_rc are always 0: the controller only
// writes registers 0..7 (P, the constant 1, a, c) and reads 3..5 (S); the
// ports are full register-index width so the top can mux them with the
// sequencer's.
module ad_ctrl
  import ecc_pkg::*;
#(
  parameter int unsigned M      = 131,
  parameter int unsigned K_BITS = 131
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [K_BITS-1:0] d,
  input  logic [M-1:0]      px,
  input  logic [M-1:0]      py,
  input  logic [M-1:0]      ca,
  input  logic [M-1:0]      cc,
  output logic              busy,
  output logic              done,
  output logic [M-1:0]      sx,
  output logic [M-1:0]      sy,
  output logic [M-1:0]      sz,
  output logic              inf,
  // point sequencer
  output logic              seq_start,
  output prog_e             seq_prog,
  input  logic              seq_done,
  // register file: own write port and read port C
  output logic              rf_we,
  output reg_idx_t          rf_wa,
  output logic [M-1:0]      rf_wd,
  output reg_idx_t          rf_rc,
  input  logic [M-1:0]      rf_rdc,
  // activity
  output logic              step_pd,   // a doubling step starts
  output logic              step_pa    // an addition step starts
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_NEXT, S_ADD, S_GO, S_WAIT, S_OUT, S_DONE
  } state_e;
  // which program is running / runs next
  typedef enum logic [2:0] {
    PH_INIT, PH_PD, PH_PD_FIX, PH_PA, PH_PA_FIX
  } phase_e;

  state_e            state;
  phase_e            phase;
  logic [K_BITS-1:0] d_q;
  logic [M-1:0]      px_q, py_q, ca_q, cc_q;
  logic [2:0]        k;          // load / read-out counter
  int                i;          // current key bit
  logic              s_inf;

  // Load: PX, PY, ONE, CA, CC.
  always_comb begin
    rf_we = (state == S_LOAD);
    unique case (k)
      3'd0:    begin rf_wa = R_PX;  rf_wd = px_q; end
      3'd1:    begin rf_wa = R_PY;  rf_wd = py_q; end
      3'd2:    begin rf_wa = R_ONE; rf_wd = M'(1); end
      3'd3:    begin rf_wa = R_CA;  rf_wd = ca_q; end
      default: begin rf_wa = R_CC;  rf_wd = cc_q; end
    endcase
    unique case (k)
      3'd0:    rf_rc = R_SX;
      3'd1:    rf_rc = R_SY;
      default: rf_rc = R_SZ;
    endcase
  end

  assign busy      = (state != S_IDLE) && (state != S_DONE);
  assign seq_start = (state == S_GO);
  assign step_pd   = (state == S_GO) && (seq_prog == PRG_PD);
  assign step_pa   = (state == S_GO) && (seq_prog == PRG_PA);

  always_comb begin
    unique case (phase)
      PH_INIT:   seq_prog = PRG_LOADP;
      PH_PD:     seq_prog = PRG_PD;
      PH_PD_FIX: seq_prog = PRG_COMMIT;
      PH_PA:     seq_prog = PRG_PA;
      default:   seq_prog = s_inf ? PRG_LOADP : PRG_COMMIT;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      phase <= PH_INIT;
      d_q   <= '0;
      px_q  <= '0;
      py_q  <= '0;
      ca_q  <= '0;
      cc_q  <= '0;
      k     <= '0;
      i     <= 0;
      s_inf <= 1'b1;
      sx    <= '0;
      sy    <= '0;
      sz    <= '0;
      inf   <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE, S_DONE: if (start) begin
          d_q   <= d;
          px_q  <= px;
          py_q  <= py;
          ca_q  <= ca;
          cc_q  <= cc;
          k     <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          k <= k + 1'b1;
          if (k == 3'd4) begin
            k <= '0;
            i <= int'(K_BITS) - 2;
            if (d_q[K_BITS-1]) begin
              s_inf <= 1'b0;
              phase <= PH_INIT;
              state <= S_GO;
            end else begin
              s_inf <= 1'b1;
              phase <= PH_PD;
              state <= S_NEXT;
            end
          end
        end
        // decide whether another key bit is left
        S_NEXT: begin
          if (i < 0) begin
            k     <= '0;
            state <= S_OUT;
          end else begin
            phase <= PH_PD;
            state <= S_GO;
          end
        end
        // one cycle, as long as S_NEXT, so that the gap between point
        // operations does not depend on the key bit
        S_ADD: state <= S_GO;
        S_GO: state <= S_WAIT;
        S_WAIT: if (seq_done) begin
          unique case (phase)
            PH_INIT: begin
              i     <= int'(K_BITS) - 2;
              state <= S_NEXT;
            end
            PH_PD: begin
              phase <= PH_PD_FIX;
              state <= S_GO;
            end
            PH_PD_FIX: begin
              if (d_q[i]) begin
                phase <= PH_PA;
                state <= S_ADD;
              end else begin
                i     <= i - 1;
                state <= S_NEXT;
              end
            end
            PH_PA: begin
              phase <= PH_PA_FIX;
              state <= S_GO;
            end
            default: begin   // PH_PA_FIX
              s_inf <= 1'b0;
              i     <= i - 1;
              state <= S_NEXT;
            end
          endcase
        end
        S_OUT: begin
          k <= k + 1'b1;
          unique case (k)
            3'd0:    sx <= rf_rdc;
            3'd1:    sy <= rf_rdc;
            default: sz <= rf_rdc;
          endcase
          if (k == 3'd2) begin
            inf   <= s_inf;
            done  <= 1'b1;
            state <= S_DONE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
